// Test of the SPI configuration port: an SPI mode-0 master (sclk = clk/8)
// writes every register, reads each one back over miso, reads the status
// input, and checks the configuration outputs and the one-clock key
// generation start pulse.
module tb_spi_config;
  import secure_imc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic sclk, cs_n, mosi, miso;
  logic [7:0] status_in;
  cfg_t cfg;
  logic keygen_start;
  int checks = 0, failures = 0, starts = 0;

  spi_config dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && keygen_start) starts++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic xfer(input logic [15:0] frame, output logic [7:0] rdata);
    cs_n = 0;
    repeat (8) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      mosi = frame[i];
      repeat (4) @(posedge clk);
      sclk = 1;
      if (i < 8) rdata[i] = miso;
      repeat (4) @(posedge clk);
      sclk = 0;
    end
    repeat (8) @(posedge clk);
    cs_n = 1;
    repeat (8) @(posedge clk);
  endtask

  task automatic wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    xfer({1'b1, a, d}, dummy);
  endtask

  task automatic rd(input logic [6:0] a, output logic [7:0] d);
    xfer({1'b0, a, 8'h00}, d);
  endtask

  initial begin
    logic [7:0] d;
    sclk = 0; cs_n = 1; mosi = 0; status_in = 8'h5a;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(cfg.vote_sel == 3'd2 && cfg.act_bits == 4'd8, "reset values");
    for (int it = 0; it < 6; it++) begin
      logic [2:0] vs; logic [7:0] kr; logic [1:0] wp; logic [3:0] ab; logic [9:0] gs;
      vs = 3'($urandom % 5); kr = 8'($urandom); wp = 2'($urandom); ab = 4'(1 + $urandom % 8); gs = 10'($urandom);
      wr(7'h01, {5'd0, vs});
      wr(7'h02, kr);
      wr(7'h03, {6'd0, wp});
      wr(7'h04, {4'd0, ab});
      wr(7'h06, gs[7:0]);
      wr(7'h07, {6'd0, gs[9:8]});
      check(cfg.vote_sel == vs, "vote_sel written");
      check(cfg.key_row_base == kr, "key_row_base written");
      check(cfg.wprec == wprec_e'(wp), "wprec written");
      check(cfg.act_bits == ab, "act_bits written");
      check(cfg.guard_seed == gs, "guard_seed written");
      rd(7'h01, d); check(d == {5'd0, vs}, "read vote_sel");
      rd(7'h02, d); check(d == kr, "read key_row_base");
      rd(7'h03, d); check(d == {6'd0, wp}, "read wprec");
      rd(7'h04, d); check(d == {4'd0, ab}, "read act_bits");
      rd(7'h06, d); check(d == gs[7:0], "read guard lo");
      rd(7'h07, d); check(d == {6'd0, gs[9:8]}, "read guard hi");
      status_in = 8'($urandom);
      rd(7'h05, d); check(d == status_in, "read status");
    end
    check(starts == 0, "no spurious start");
    wr(7'h00, 8'h01);
    check(starts == 1, "one start pulse");
    wr(7'h00, 8'h00);
    check(starts == 1, "writing 0 does not start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
