// Statistical test of the PUF bitcell model: without noise the response is
// repeatable for every cell; with noise most cells still repeat, the share of
// ones is near one half, two chips differ in about half their cells, and the
// settle output only changes on an evaluation.
module tb_puf_cell_model;
  localparam int R = 64, C = 16;
  logic clk = 0;
  logic eval;
  logic [5:0] row;
  logic [2:0][C-1:0] st0, st1, st2;
  logic [R-1:0][2:0][C-1:0] ref0, ref2;
  int checks = 0, failures = 0;

  puf_cell_model #(.ROWS(R), .COLS(C), .NOISE(0))                       u0 (.clk, .eval, .row, .settle(st0));
  puf_cell_model #(.ROWS(R), .COLS(C), .NOISE(16))                      u1 (.clk, .eval, .row, .settle(st1));
  puf_cell_model #(.ROWS(R), .COLS(C), .NOISE(0), .CHIP_ID(32'hCAFE_F00D)) u2 (.clk, .eval, .row, .settle(st2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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
    int ones, stable, total, differ;
    logic [2:0][C-1:0] hold;
    eval = 0;
    row = '0;
    ones = 0; stable = 0; total = 0; differ = 0;
    @(negedge clk);
    for (int rep = 0; rep < 4; rep++)
      for (int r = 0; r < R; r++) begin
        eval = 1;
        row = 6'(r);
        @(negedge clk);
        if (rep == 0) begin
          ref0[r] = st0;
          ref2[r] = st2;
          for (int s = 0; s < 3; s++) ones += $countones(st0[s]);
          for (int s = 0; s < 3; s++) differ += $countones(st0[s] ^ st2[s]);
        end else begin
          check(st0 == ref0[r], "noiseless response repeats");
          for (int s = 0; s < 3; s++) stable += C - $countones(st1[s] ^ ref0[r][s]);
          total += 3 * C;
        end
      end
    eval = 0;
    hold = st0;
    row = 6'd7;
    repeat (3) @(negedge clk);
    check(st0 == hold, "settle holds without eval");
    check(ones > R * 3 * C * 4 / 10 && ones < R * 3 * C * 6 / 10, "about half ones");
    check(differ > R * 3 * C * 4 / 10 && differ < R * 3 * C * 6 / 10, "chips differ in about half the cells");
    check(stable > total * 85 / 100 && stable < total, "noisy cells mostly repeat, some flip");
    $display("ones=%0d differ=%0d stable=%0d/%0d", ones, differ, stable, total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
