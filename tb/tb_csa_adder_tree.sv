// Streaming test of the shared adder tree at its default size (64 inputs).
// A new random shared input vector enters every clock (with gaps); each output
// must equal the popcount of the recombined inputs (t0 + t1 after share
// recombination) and must appear exactly 9 clocks after its input.
module tb_csa_adder_tree;
  localparam int N = 64, W = $clog2(N + 1), LAT = 9;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  logic [N-1:0][2:0] in_bits;
  logic out_valid;
  logic [2:0][W-1:0] t0;
  logic [2:0] t1;
  int checks = 0, failures = 0;
  int exp_q[$];
  int tin_q[$];
  int cycle = 0;

  csa_adder_tree #(.N_IN(N)) dut (.clk, .rst_n, .in_valid, .in_bits, .out_valid, .t0, .t1);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) if (rst_n && out_valid) begin
    int got, expv, tin;
    got = int'(t0[0] ^ t0[1] ^ t0[2]) + int'(^t1);
    expv = exp_q.pop_front();
    tin = tin_q.pop_front();
    checks++;
    if (got != expv) begin
      failures++;
      $display("popcount mismatch got=%0d exp=%0d", got, expv);
    end
    checks++;
    if (cycle - tin != LAT) begin
      failures++;
      $display("latency %0d, expected %0d", cycle - tin, LAT);
    end
  end

  initial begin
    in_valid = 0;
    in_bits = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      int pc;
      int mode;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      mode = it % 5;
      pc = 0;
      for (int r = 0; r < N; r++) begin
        logic u;
        case (mode)
          0: u = 1'b1;                    // all ones: the maximum count
          1: u = 1'b0;
          default: u = 1'($urandom);
        endcase
        in_bits[r][1] = 1'($urandom);
        in_bits[r][2] = 1'($urandom);
        in_bits[r][0] = u ^ in_bits[r][1] ^ in_bits[r][2];
        pc += int'(u);
      end
      if (in_valid) begin
        exp_q.push_back(pc);
        tin_q.push_back(cycle + 1);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
