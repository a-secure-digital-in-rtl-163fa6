// Test of the output decoder: random per-column counts A_j are split into
// random carry-save pairs and random shares; for every weight precision and
// activation precision the signed results must equal
// sum_j 2^j * (2*A_j - ROWS*(2^B - 1)) over each group of P columns, unused
// outputs must be zero, and the result must follow in_valid by one clock.
module tb_output_decode;
  import secure_imc_pkg::*;
  localparam int R = 64, C = 16, AW = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, res_valid;
  logic [C-1:0][2:0][AW-1:0] acc_s, acc_c;
  logic [3:0] act_bits;
  wprec_e wprec;
  logic signed [C/4-1:0][31:0] res;
  int checks = 0, failures = 0;

  output_decode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; acc_s = '0; acc_c = '0; act_bits = 4'd8; wprec = WPREC_4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int a[C];
      longint expv[4];
      int b, p;
      b = 1 + it % 8;
      wprec = wprec_e'((it / 8) % 4);
      p = 4 * (int'(wprec) + 1);
      for (int j = 0; j < C; j++) begin
        logic [AW-1:0] sv, cv;
        a[j] = (it % 5 == 0) ? R * ((1 << b) - 1) : (it % 5 == 1) ? 0 : int'($urandom % (R * ((1 << b) - 1) + 1));
        cv = AW'($urandom);
        sv = AW'(a[j]) - cv;
        for (int s = 1; s < 3; s++) begin
          acc_s[j][s] = AW'($urandom);
          acc_c[j][s] = AW'($urandom);
        end
        acc_s[j][0] = sv ^ acc_s[j][1] ^ acc_s[j][2];
        acc_c[j][0] = cv ^ acc_c[j][1] ^ acc_c[j][2];
      end
      for (int g = 0; g < 4; g++) begin
        expv[g] = 0;
        if (g < C / p)
          for (int j = 0; j < p; j++)
            expv[g] += longint'(2 * a[g * p + j] - R * ((1 << b) - 1)) <<< j;
      end
      act_bits = 4'(b);
      @(negedge clk);
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!res_valid) begin
        failures++;
        $display("res_valid missing");
      end
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (longint'($signed(res[g])) != expv[g]) begin
          failures++;
          $display("it=%0d P=%0d B=%0d g=%0d got=%0d exp=%0d", it, p, b, g, $signed(res[g]), expv[g]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
