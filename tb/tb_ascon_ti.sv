// Test of the masked ASCON-128 decryption core. The reference model is first
// checked against the published ASCON-128 known answer (key = nonce =
// 000102..0F, empty message, tag E355159F292911F794CB1432A0103A8A). Then
// random keys are split into random shares, random messages of 1-6 words are
// encrypted by the model and decrypted by the core: every recombined plaintext
// word must match, the shares must mask it, tag_ok must be 1 for the right tag
// and 0 for a corrupted one, and the operation must take 26 + 7n clocks
// from start to done for n words sent without stalls.
module tb_ascon_ti;
  import ascon_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, ct_valid, ct_last, ct_ready, pt_valid, busy, done, tag_ok;
  logic [127:0] nonce, tag_in;
  logic [2:0][127:0] key_sh;
  logic [9:0] guard_seed;
  logic [63:0] ct_data;
  logic [2:0][63:0] pt_sh;
  int checks = 0, failures = 0, cycle = 0;
  logic [63:0] got_q[$];
  int masked = 0;

  ascon_ti dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (rst_n && pt_valid) begin
    got_q.push_back(pt_sh[0] ^ pt_sh[1] ^ pt_sh[2]);
    if (pt_sh[0] != (pt_sh[0] ^ pt_sh[1] ^ pt_sh[2])) masked++;
  end

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
    logic [63:0] p[], c[];
    logic [127:0] k, t;
    k = 128'h000102030405060708090A0B0C0D0E0F;
    p = new[0];
    t = encrypt(k, k, p, c);
    check(t == 128'hE355159F292911F794CB1432A0103A8A, "reference model known answer");

    start = 0; ct_valid = 0; ct_last = 0; ct_data = '0; nonce = '0; tag_in = '0;
    key_sh = '0; guard_seed = 10'h1b3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 12; it++) begin
      int n, t_start, bad;
      n = 1 + it % 6;
      bad = (it % 4 == 3);
      k = {$urandom, $urandom, $urandom, $urandom};
      nonce = {$urandom, $urandom, $urandom, $urandom};
      p = new[n];
      foreach (p[i]) p[i] = {$urandom, $urandom};
      t = encrypt(k, nonce, p, c);
      key_sh[1] = {$urandom, $urandom, $urandom, $urandom};
      key_sh[2] = {$urandom, $urandom, $urandom, $urandom};
      key_sh[0] = k ^ key_sh[1] ^ key_sh[2];
      tag_in = bad ? t ^ (128'd1 << ($urandom % 128)) : t;
      got_q.delete();
      @(negedge clk);
      start = 1;
      t_start = cycle;
      @(negedge clk);
      start = 0;
      for (int i = 0; i < n; i++) begin
        ct_valid = 1;
        ct_data = c[i];
        ct_last = (i == n - 1);
        @(posedge clk);
        while (!ct_ready) @(posedge clk);
        @(negedge clk);
        ct_valid = 0;
        ct_last = 0;
        if (it % 3 == 1) repeat ($urandom % 4) @(negedge clk);   // stall the sender
      end
      while (!done) @(posedge clk);
      if (it % 3 != 1)
        check(cycle - t_start == 26 + 7 * n, $sformatf("decryption time %0d for %0d words", cycle - t_start, n));
      #1;
      check(tag_ok == !bad, $sformatf("tag_ok=%0d for %s tag", tag_ok, bad ? "a wrong" : "the right"));
      check(got_q.size() == n, "one plaintext word per ciphertext word");
      for (int i = 0; i < n && i < got_q.size(); i++)
        check(got_q[i] == p[i], $sformatf("plaintext word %0d of message %0d", i, it));
    end
    check(masked > 0, "plaintext shares mask the plaintext");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
