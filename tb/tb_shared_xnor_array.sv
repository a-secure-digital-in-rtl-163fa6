// Random test of the shared XNOR multiplier array: the recombined product of
// every row and column must equal XNOR of the recombined activation and weight
// bits, and share A alone must not equal the product for every input (the
// shares must actually mask it).
module tb_shared_xnor_array;
  localparam int R = 8, C = 4;
  logic [R-1:0][2:0]         act;
  logic [R-1:0][2:0][C-1:0]  wt;
  logic [C-1:0][R-1:0][2:0]  prod;
  int checks = 0, failures = 0, share_a_differs = 0;

  shared_xnor_array #(.ROWS(R), .COLS(C)) dut (.act, .wt, .prod);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int r = 0; r < R; r++) begin
        act[r] = 3'($urandom);
        for (int s = 0; s < 3; s++) wt[r][s] = C'($urandom);
      end
      #1;
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          logic ua, uw;
          ua = ^act[r];
          uw = wt[r][0][c] ^ wt[r][1][c] ^ wt[r][2][c];
          checks++;
          if ((^prod[c][r]) !== ~(ua ^ uw)) begin
            failures++;
            $display("mismatch it=%0d r=%0d c=%0d", it, r, c);
          end
          if (prod[c][r][0] != ~(ua ^ uw)) share_a_differs++;
        end
    end
    checks++;
    if (share_a_differs == 0) begin
      failures++;
      $display("share A always equals the product");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
