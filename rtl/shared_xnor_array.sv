// Boolean-shared 1-bit multiplier array: one XNOR per stored weight bit.
//
// Bits are in "+-1" format: a bit value 1 stands for +1 and 0 for -1, so the
// product of two such digits is their XNOR. XNOR is linear over GF(2), so with
// three shares it is computed share by share: share A is inverted, shares B
// and C are plain XORs. This needs no random bits and no registers, and its
// output can feed the adder tree directly.
//
// Interface: act is the shared activation bit broadcast to every row, wt holds
// the shared weight bits of every row and column (straight from the array),
// prod is the shared product per row and column. Combinational.
//
// The shared XNOR multiply is the macro's own technique; the array shape is
// this design's choice.
module shared_xnor_array #(
  parameter int unsigned ROWS = secure_imc_pkg::ROWS,
  parameter int unsigned COLS = secure_imc_pkg::COLS
) (
  input  logic [ROWS-1:0][2:0]            act,   // per row: shares of the activation bit
  input  logic [ROWS-1:0][2:0][COLS-1:0]  wt,    // per row: shares of the weight bits
  output logic [COLS-1:0][ROWS-1:0][2:0]  prod   // per column, per row: product shares
);
  always_comb begin
    for (int c = 0; c < COLS; c++)
      for (int r = 0; r < ROWS; r++) begin
        prod[c][r][0] = ~(act[r][0] ^ wt[r][0][c]);
        prod[c][r][1] =   act[r][1] ^ wt[r][1][c];
        prod[c][r][2] =   act[r][2] ^ wt[r][2][c];
      end
  end
endmodule
