// Test of the temporal-majority-voting key generator against a model PUF array.
// The model gives every share bit a true value and, for a group evaluated E
// times, flips it in fewer than (E+1)/2 of the evaluations, so majority voting
// must recover the true values exactly. Checked for E = 1, 3, 7 and 31: the
// 3x128-bit key and its complement, the row/group walk from base_row, that
// every evaluation is preceded by a secure reset of the same row, and the
// generation time of 32 * (5E + 1) clocks.
module tb_tmv_keygen;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [2:0] vote_sel;
  logic [7:0] base_row;
  logic puf_reset, puf_settle_req, puf_eval, rd_en;
  logic [5:0] row;
  logic [1:0] grp;
  logic [2:0][3:0] rd_data, rd_data_n;
  logic busy, done, key_valid;
  logic [2:0][127:0] key, keyb;
  int checks = 0, failures = 0;
  int ev;
  int last_reset_cycle, cycle;
  logic [5:0] last_reset_row;
  int E;

  tmv_keygen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
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

  function automatic int unsigned hsh(int unsigned x);
    x = x ^ (x >> 13);
    x = x * 32'h5bd1e995;
    x = x ^ (x >> 15);
    return x;
  endfunction

  function automatic logic true_bit(int s, int r, int g, int b);
    return hsh(32'h77 + s * 1000 + r * 10 + g * 4 + b + 100000 * int'(base_row))[3];
  endfunction

  // number of evaluations (out of E) in which this bit reads wrong
  function automatic int flips(int s, int r, int g, int b);
    return int'(hsh(32'h1234 + s * 977 + r * 31 + g * 7 + b) % ((E + 1) / 2));
  endfunction

  // model array
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (puf_reset) begin
      last_reset_cycle <= cycle;
      last_reset_row <= row;
    end
    if (puf_eval && rst_n) begin
      checks++;
      if (!(last_reset_row == row && cycle - last_reset_cycle == 2)) begin
        failures++;
        $display("evaluation of row %0d not preceded by its secure reset", row);
      end
    end
    if (rd_en) begin
      for (int s = 0; s < 3; s++)
        for (int b = 0; b < 4; b++) begin
          logic v;
          v = true_bit(s, int'(row), int'(grp), b) ^ (ev < flips(s, int'(row), int'(grp), b));
          rd_data[s][b] <= v;
          rd_data_n[s][b] <= ~v;
        end
      ev <= (ev + 1 == E) ? 0 : ev + 1;
    end
  end

  initial begin
    static int sels[4] = '{0, 1, 2, 4};
    start = 0; vote_sel = 0; base_row = 0;
    ev = 0; cycle = 0; last_reset_cycle = -10; last_reset_row = '0;
    rd_data = '0; rd_data_n = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      int t0c;
      logic [2:0][127:0] exp_key;
      vote_sel = 3'(sels[t]);
      E = (2 << sels[t]) - 1;
      base_row = 8'(8 * t + 3);
      ev = 0;
      for (int g = 0; g < 32; g++)
        for (int s = 0; s < 3; s++)
          for (int b = 0; b < 4; b++)
            exp_key[s][(31 - g) * 4 + b] = true_bit(s, int'(base_row) + g / 4, g % 4, b);
      @(negedge clk);
      start = 1;
      @(posedge clk);
      t0c = cycle;
      @(negedge clk);
      start = 0;
      check(busy && !key_valid, "busy after start");
      while (!done) @(posedge clk);
      #1;
      // start is taken at the edge counted in t0c + 1; done is seen one edge after it rises
      check(cycle - t0c == 32 * (5 * E + 1) + 2, $sformatf("generation time %0d for E=%0d", cycle - t0c, E));
      check(key_valid, "key_valid");
      for (int s = 0; s < 3; s++) begin
        check(key[s] == exp_key[s], $sformatf("key share %0d for E=%0d", s, E));
        check(keyb[s] == ~exp_key[s], $sformatf("keyb share %0d for E=%0d", s, E));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
