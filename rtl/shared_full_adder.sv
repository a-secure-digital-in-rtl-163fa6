// Three-share Boolean-masked full adder (threshold implementation).
//
// The sum is linear, so each sum share is the XOR of the same-index input
// shares. The carry is the majority a&b ^ b&c ^ c&a; every AND term uses the
// threshold sharing in which output share i is built only from input shares
// i+1 and i+2 (non-completeness), so no single share of the carry logic sees
// all shares of any input. No random bits are used.
//
// Purely combinational. Glitches in the carry logic must not reach a second
// non-linear layer, so callers register both outputs before reusing them; the
// adder tree and accumulator do that.
//
// Using only full adders (never half adders) follows the macro this RTL
// implements; the particular carry sharing is this design's choice.
module shared_full_adder
  import secure_imc_pkg::*;
(
  input  logic [2:0] a,   // shares of input a
  input  logic [2:0] b,   // shares of input b
  input  logic [2:0] c,   // shares of input c (carry in)
  output logic [2:0] s,   // shares of sum
  output logic [2:0] co   // shares of carry out
);
  always_comb begin
    s = a ^ b ^ c;
    for (int i = 0; i < 3; i++)
      co[i] = and_ti(i, a, b) ^ and_ti(i, b, c) ^ and_ti(i, c, a);
  end
endmodule
