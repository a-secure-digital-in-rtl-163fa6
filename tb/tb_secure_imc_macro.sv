// End-to-end test of the secure IMC macro at its default size (64 rows x 16
// weight-bit columns), driving only its ports:
//   1. configure over SPI and generate a PUF key from rows 8-15 and then
//      twice from rows 40-47 (3 and 31 majority evaluations); the two keys
//      from the same rows must nearly agree, keys from different rows must
//      differ in about half their bits. The key is
//      read from the key generator once, as the enrolment step in which the
//      model owner learns it.
//   2. encrypt a random weight array with the reference ASCON-128 model,
//      stream it in once with a corrupted tag (tag_ok must be 0) and once with
//      the right tag (tag_ok must be 1); the array must then hold the weights.
//   3. load random shared 8-bit activations, then compute with several
//      activation (1..8 bit) and weight (4/8/12/16 bit) precisions; every
//      result must equal the dot product of the +-1-digit operands, and
//      res_valid must come B + 10 clocks after the cmp_start edge.
// Each mechanism is counted and must have happened at least once.
module tb_secure_imc_macro;
  import secure_imc_pkg::*;
  import ascon_ref_pkg::*;
  localparam int R = ROWS, C = COLS;

  logic clk = 0, rst_n = 0;
  logic spi_sclk, spi_cs_n, spi_mosi, spi_miso;
  logic dec_start, ct_valid, ct_last, ct_ready, dec_done, tag_ok;
  logic [127:0] nonce, tag_in;
  logic [5:0] wt_row_base, act_wr_row;
  logic [63:0] ct_data;
  logic act_wr_en, cmp_start, cmp_busy, res_valid, key_valid;
  logic [2:0][7:0] act_wr_sh;
  logic signed [C/4-1:0][31:0] res;
  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_keygen = 0, n_vote_depths = 0, n_dec_ok = 0, n_tag_fail = 0;
  int n_prec[4] = '{0, 0, 0, 0};
  int n_act1 = 0, n_act8 = 0, n_key_addr = 0;

  secure_imc_macro dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  task automatic spi_xfer(input logic [15:0] frame, output logic [7:0] rdata);
    spi_cs_n = 0;
    repeat (8) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      spi_mosi = frame[i];
      repeat (4) @(posedge clk);
      spi_sclk = 1;
      if (i < 8) rdata[i] = spi_miso;
      repeat (4) @(posedge clk);
      spi_sclk = 0;
    end
    repeat (8) @(posedge clk);
    spi_cs_n = 1;
    repeat (8) @(posedge clk);
  endtask

  task automatic spi_wr(input logic [6:0] a, input logic [7:0] d);
    logic [7:0] dummy;
    spi_xfer({1'b1, a, d}, dummy);
  endtask

  task automatic spi_rd(input logic [6:0] a, output logic [7:0] d);
    spi_xfer({1'b0, a, 8'h00}, d);
  endtask

  task automatic keygen(input int sel, output logic [127:0] k);
    spi_wr(7'h01, 8'(sel));
    spi_wr(7'h00, 8'h01);
    while (!key_valid) @(posedge clk);
    k = dut.u_keygen.key[0] ^ dut.u_keygen.key[1] ^ dut.u_keygen.key[2];
    n_keygen++;
  endtask

  // weights: w[r] holds the 16 weight bits of row r
  logic [C-1:0] w [R];
  logic [7:0]   x [R];

  task automatic load_weights(input logic [127:0] k, input logic bad_tag);
    logic [63:0] p[], c[];
    logic [127:0] t;
    p = new[R * C / 64];
    foreach (p[i]) p[i] = {w[4*i], w[4*i+1], w[4*i+2], w[4*i+3]};
    nonce = {$urandom, $urandom, $urandom, $urandom};
    t = encrypt(k, nonce, p, c);
    tag_in = bad_tag ? ~t : t;
    wt_row_base = '0;
    @(negedge clk);
    dec_start = 1;
    @(negedge clk);
    dec_start = 0;
    foreach (c[i]) begin
      ct_valid = 1;
      ct_data = c[i];
      ct_last = (i == c.size() - 1);
      @(posedge clk);
      while (!ct_ready) @(posedge clk);
      @(negedge clk);
      ct_valid = 0;
      ct_last = 0;
    end
    while (!dec_done) @(posedge clk);
    #1;
    check(tag_ok == !bad_tag, $sformatf("tag_ok=%0d with %s tag", tag_ok, bad_tag ? "a wrong" : "the right"));
    if (bad_tag && !tag_ok) n_tag_fail++;
    if (!bad_tag && tag_ok) n_dec_ok++;
    repeat (6) @(posedge clk);
  endtask

  task automatic compute(input int b, input int prec);
    int p, t0c;
    longint expv[4];
    p = 4 * (prec + 1);
    spi_wr(7'h04, 8'(b));
    spi_wr(7'h03, 8'(prec));
    for (int g = 0; g < 4; g++) begin
      expv[g] = 0;
      if (g < C / p)
        for (int r = 0; r < R; r++) begin
          longint xv, wv;
          xv = 0;
          for (int k = 0; k < b; k++) xv += longint'(2 * int'(x[r][k]) - 1) <<< k;
          wv = 0;
          for (int j = 0; j < p; j++) wv += longint'(2 * int'(w[r][g * p + j]) - 1) <<< j;
          expv[g] += xv * wv;
        end
    end
    @(negedge clk);
    cmp_start = 1;
    @(posedge clk);
    t0c = cycle;
    @(negedge clk);
    cmp_start = 0;
    while (!res_valid) @(posedge clk);
    check(cycle - t0c == b + 10 + 1, $sformatf("compute latency %0d for B=%0d", cycle - t0c - 1, b));
    #1;
    for (int g = 0; g < 4; g++)
      check(longint'($signed(res[g])) == expv[g],
            $sformatf("B=%0d P=%0d result %0d: got %0d expected %0d", b, p, g, $signed(res[g]), expv[g]));
    n_prec[prec]++;
    if (b == 1) n_act1++;
    if (b == 8) n_act8++;
    @(negedge clk);
    check(!cmp_busy, "compute finished");
  endtask

  initial begin
    logic [127:0] k0, k1, k2;
    logic [7:0] st;
    int hd;
    spi_sclk = 0; spi_cs_n = 1; spi_mosi = 0;
    dec_start = 0; ct_valid = 0; ct_last = 0; ct_data = '0; nonce = '0; tag_in = '0;
    wt_row_base = '0; act_wr_en = 0; act_wr_row = '0; act_wr_sh = '0; cmp_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. key generation: a key at rows 8-15, then twice the key at rows 40-47
    spi_wr(7'h02, 8'd8);
    keygen(2, k0);
    spi_wr(7'h02, 8'd40);
    spi_wr(7'h06, 8'h5c);
    spi_wr(7'h07, 8'h01);
    keygen(1, k1);
    keygen(4, k2);
    n_vote_depths = 3;
    check($countones(k0 ^ k2) > 40 && $countones(k0 ^ k2) < 88,
          $sformatf("keys from different rows differ in %0d bits", $countones(k0 ^ k2)));
    n_key_addr++;
    hd = $countones(k1 ^ k2);
    check(hd < 16, $sformatf("keys from 3 and 31 evaluations differ in %0d bits", hd));
    check(k1 != '0 && k1 != '1, "key is not constant");
    check(dut.u_keygen.key[0] != k2, "key share A masks the key");
    spi_rd(7'h05, st);
    check(st[0] == 1'b1, "status shows key_valid");

    // 2. encrypted weight load
    for (int r = 0; r < R; r++) w[r] = C'($urandom);
    for (int r = 0; r < R; r++) w[r] = w[r];
    load_weights(k2, 1'b1);
    load_weights(k2, 1'b0);
    for (int r = 0; r < R; r++)
      check((dut.u_array.mem[r][0] ^ dut.u_array.mem[r][1] ^ dut.u_array.mem[r][2]) == w[r],
            $sformatf("array row %0d holds the decrypted weights", r));

    // 3. activations and compute
    for (int r = 0; r < R; r++) begin
      x[r] = (r < 4) ? 8'hff : 8'($urandom);    // a few full-scale rows
      @(negedge clk);
      act_wr_en = 1;
      act_wr_row = 6'(r);
      act_wr_sh[1] = 8'($urandom);
      act_wr_sh[2] = 8'($urandom);
      act_wr_sh[0] = x[r] ^ act_wr_sh[1] ^ act_wr_sh[2];
    end
    @(negedge clk);
    act_wr_en = 0;
    compute(8, 0);
    compute(1, 3);
    compute(4, 1);
    compute(8, 2);
    compute(3, 3);
    compute(8, 3);
    compute(6, 0);

    check(n_keygen >= 1, "mechanism: key generation");
    check(n_vote_depths >= 2, "mechanism: two majority depths");
    check(n_key_addr >= 1, "mechanism: keys at two addresses");
    check(n_dec_ok >= 1, "mechanism: decryption with valid tag");
    check(n_tag_fail >= 1, "mechanism: tag failure detected");
    for (int p = 0; p < 4; p++) check(n_prec[p] >= 1, $sformatf("mechanism: weight precision %0d bits", 4 * (p + 1)));
    check(n_act1 >= 1 && n_act8 >= 1, "mechanism: 1-bit and 8-bit activations");
    $display("keygen=%0d dec_ok=%0d tag_fail=%0d prec4/8/12/16=%0d/%0d/%0d/%0d act1=%0d act8=%0d key_hd=%0d",
             n_keygen, n_dec_ok, n_tag_fail, n_prec[0], n_prec[1], n_prec[2], n_prec[3], n_act1, n_act8, hd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
