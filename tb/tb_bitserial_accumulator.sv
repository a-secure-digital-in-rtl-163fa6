// Random test of the shared bit-serial accumulator. Sequences of B = 1..8
// shared carry-save counts are applied MSB first (first marks the MSB step);
// after the last step the recombined S + C must equal sum_k 2^k * count_k.
// Gaps (in_valid low) must hold the accumulator.
module tb_bitserial_accumulator;
  localparam int IW = 7, AW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, first;
  logic [2:0][IW-1:0] t0;
  logic [2:0] t1;
  logic [2:0][AW-1:0] acc_s, acc_c;
  int checks = 0, failures = 0;

  bitserial_accumulator #(.IN_W(IW), .ACC_W(AW)) dut (.clk, .rst_n, .in_valid, .first, .t0, .t1, .acc_s, .acc_c);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; first = 0; t0 = '0; t1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int nb;
      int expv;
      nb = 1 + it % 8;
      expv = 0;
      for (int k = nb - 1; k >= 0; k--) begin
        int v0, v1;
        v0 = (it % 7 == 0) ? 63 : int'($urandom % 64);    // full-scale counts too
        v1 = (it % 7 == 0) ? 1 : int'($urandom % 2);
        expv = expv * 2 + v0 + v1;
        if ($urandom % 3 == 0) begin
          // idle cycle with garbage on the inputs
          @(negedge clk);
          in_valid = 0;
          first = 1'($urandom);
          t0 = {3{IW'($urandom)}};
          t1 = 3'($urandom);
        end
        @(negedge clk);
        in_valid = 1;
        first = (k == nb - 1);
        t0[1] = IW'($urandom); t0[2] = IW'($urandom);
        t0[0] = IW'(v0) ^ t0[1] ^ t0[2];
        t1[1] = 1'($urandom); t1[2] = 1'($urandom);
        t1[0] = 1'(v1) ^ t1[1] ^ t1[2];
      end
      @(negedge clk);
      in_valid = 0;
      first = 0;
      checks++;
      if (AW'((acc_s[0] ^ acc_s[1] ^ acc_s[2]) + (acc_c[0] ^ acc_c[1] ^ acc_c[2])) != AW'(expv)) begin
        failures++;
        $display("it=%0d B=%0d got=%0d exp=%0d", it, nb,
                 (acc_s[0] ^ acc_s[1] ^ acc_s[2]) + (acc_c[0] ^ acc_c[1] ^ acc_c[2]), expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
