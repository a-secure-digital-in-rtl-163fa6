// Side-channel-protected bit-serial shift-accumulator for multi-bit activations.
//
// Activations are applied one bit per step, most significant bit first. Each
// step the adder tree delivers a shared carry-save count (t0 + t1, t1 only in
// bit 0); the accumulator computes acc = 2*acc + count, keeping acc itself in a
// shared carry-save pair (sum S, carry C, value S + C mod 2^ACC_W).
//
// The doubled carry word has a free bit 0, which takes t1 directly, so one row
// of shared full adders (2S, 2C|t1, t0) finishes the tree's last reduction and
// the accumulation in the same clock. On the first (MSB) step the count is
// loaded instead of added to an all-zero accumulator, since adding to known
// {0,0,0} shares would leak.
//
// Timing: one step per clock when in_valid is high; first marks the MSB step.
// The registered S and C are the result one clock after the last step.
//
// Known departure: bit 0 of 2S, bit 1 of the doubled carry word (on all but
// the second step) and the bits of t0 above its width are constant zero
// shares, so those full adders act as half adders; the macro this RTL
// implements avoids all half adders here. Everything else (carry-save partial
// sums, MSB load, shared full adders) follows that macro.
module bitserial_accumulator
  import secure_imc_pkg::*;
#(
  parameter int unsigned IN_W  = $clog2(ROWS + 1),
  parameter int unsigned ACC_W = secure_imc_pkg::ACC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   first,     // this step is the activation MSB
  input  logic [2:0][IN_W-1:0]   t0,        // shared tree row 0
  input  logic [2:0]             t1,        // shared tree row 1, bit 0 only
  output logic [2:0][ACC_W-1:0]  acc_s,     // shared carry-save sum word
  output logic [2:0][ACC_W-1:0]  acc_c      // shared carry-save carry word
);
  logic [2:0][ACC_W-1:0] x, y, z, fs, fc;

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      x[s] = acc_s[s] << 1;
      y[s] = (acc_c[s] << 1) | ACC_W'(t1[s]);
      z[s] = ACC_W'(t0[s]);
    end
  end

  for (genvar i = 0; i < ACC_W; i++) begin : g_fa
    logic [2:0] a, b, c, s, co;
    always_comb begin
      for (int k = 0; k < 3; k++) begin
        a[k] = x[k][i];
        b[k] = y[k][i];
        c[k] = z[k][i];
        fs[k][i] = s[k];
        fc[k][i] = co[k];
      end
    end
    shared_full_adder u_fa (.a(a), .b(b), .c(c), .s(s), .co(co));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (in_valid) begin
      if (first) begin
        for (int s = 0; s < 3; s++) begin
          acc_s[s] <= ACC_W'(t0[s]);
          acc_c[s] <= ACC_W'(t1[s]);
        end
      end else begin
        for (int s = 0; s < 3; s++) begin
          acc_s[s] <= fs[s];
          acc_c[s] <= fc[s] << 1;
        end
      end
    end
  end
endmodule
