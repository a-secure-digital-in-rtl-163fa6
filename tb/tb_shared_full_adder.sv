// Exhaustive test of the shared full adder: for all 512 share assignments the
// recombined sum and carry must equal the unshared full adder, and each carry
// share i must not depend on input share i of any operand (non-completeness).
module tb_shared_full_adder;
  logic [2:0] a, b, c, s, co;
  int checks = 0, failures = 0;

  shared_full_adder dut (.a, .b, .c, .s, .co);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic ua, ub, uc;
      logic [2:0] co_ref;
      {a, b, c} = 9'(v);
      #1;
      ua = ^a; ub = ^b; uc = ^c;
      checks++;
      if ((^s) !== (ua ^ ub ^ uc)) begin
        failures++;
        $display("sum mismatch v=%0d", v);
      end
      checks++;
      if ((^co) !== ((ua & ub) | (ub & uc) | (ua & uc))) begin
        failures++;
        $display("carry mismatch v=%0d", v);
      end
      co_ref = co;
      for (int i = 0; i < 3; i++) begin
        a[i] = ~a[i]; b[i] = ~b[i]; c[i] = ~c[i];
        #1;
        checks++;
        if (co[i] !== co_ref[i]) begin
          failures++;
          $display("carry share %0d depends on input share %0d (v=%0d)", i, i, v);
        end
        a[i] = ~a[i]; b[i] = ~b[i]; c[i] = ~c[i];
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
