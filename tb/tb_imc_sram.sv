// Test of the IMC array: row writes against a model array, differential 4b
// group reads with one-clock latency, the compute view of every cell, the
// secure reset of a PUF row and the capture of settled PUF values, and the
// access priority (reset over evaluate over write).
module tb_imc_sram;
  localparam int R = 16, C = 16, RW = 4, GW = 2;
  logic clk = 0, rst_n = 0;
  logic wr_en, rd_en, puf_reset, puf_eval;
  logic [RW-1:0] wr_row, rd_row, puf_row;
  logic [GW-1:0] rd_grp;
  logic [2:0][C-1:0] wr_data, puf_settle;
  logic [2:0][3:0] rd_data, rd_data_n;
  logic [R-1:0][2:0][C-1:0] wt_all;
  logic [R-1:0][2:0][C-1:0] model;
  int checks = 0, failures = 0;

  imc_sram #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  initial begin
    {wr_en, rd_en, puf_reset, puf_eval} = '0;
    wr_row = '0; rd_row = '0; puf_row = '0; rd_grp = '0; wr_data = '0; puf_settle = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int op;
      @(negedge clk);
      op = int'($urandom % 6);
      wr_en = (op <= 1) || (op == 5);
      puf_reset = (op == 2) || ((op == 5) && ($urandom % 2 == 0));
      puf_eval = (op == 3) || (op == 5);
      rd_en = (op == 4);
      wr_row = RW'($urandom); puf_row = RW'($urandom); rd_row = RW'($urandom);
      rd_grp = GW'($urandom);
      for (int s = 0; s < 3; s++) begin
        wr_data[s] = C'($urandom);
        puf_settle[s] = C'($urandom);
      end
      @(posedge clk);
      #1;
      if (puf_reset) model[puf_row] = '0;
      else if (puf_eval) model[puf_row] = puf_settle;
      else if (wr_en) model[wr_row] = wr_data;
      if (rd_en)
        for (int s = 0; s < 3; s++) begin
          check(rd_data[s] == model[rd_row][s][rd_grp*4 +: 4], "read data");
          check(rd_data_n[s] == ~model[rd_row][s][rd_grp*4 +: 4], "read data complement");
        end
      check(wt_all == model, "compute view");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
