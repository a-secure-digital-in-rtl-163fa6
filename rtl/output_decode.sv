// Output interface of the macro: turns the shared carry-save column sums into
// signed dot products.
//
// Inside the macro every number is in "+-1 digit" form: an n-bit word
// d[n-1:0] stands for sum_k 2^k * (2*d[k] - 1), i.e. odd values from
// -(2^n - 1) to 2^n - 1, so that one-bit products are XNORs. For weight column
// j the accumulator holds A_j = sum_k 2^k * popcount_rows(xnor(act_k, w_j)),
// from which the column's dot product is D_j = 2*A_j - ROWS*(2^B - 1) for
// B-bit activations. Columns are then merged into weights of P = 4, 8, 12 or
// 16 bits: result g = sum_{j<P} 2^j * D_{g*P+j}, for g < COLS/P; the remaining
// outputs are zero.
//
// This stage recombines the shares, so it marks the edge of the protected
// domain. It is registered: res and res_valid follow in_valid by one clock.
//
// The need for a format conversion at the macro interface follows the macro
// this RTL implements; doing the column merge after recombination, in this
// stage, is this design's choice.
module output_decode
  import secure_imc_pkg::*;
#(
  parameter int unsigned NROWS = secure_imc_pkg::ROWS,
  parameter int unsigned NCOLS = secure_imc_pkg::COLS,
  parameter int unsigned AW    = secure_imc_pkg::ACC_W,
  parameter int unsigned RW    = RES_W
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [NCOLS-1:0][2:0][AW-1:0]      acc_s,
  input  logic [NCOLS-1:0][2:0][AW-1:0]      acc_c,
  input  logic [3:0]                         act_bits,
  input  wprec_e                             wprec,
  output logic                               res_valid,
  output logic signed [NCOLS/4-1:0][RW-1:0]  res
);
  logic signed [NCOLS-1:0][RW-1:0]   d;
  logic signed [NCOLS/4-1:0][RW-1:0] r;
  logic [NCOLS-1:0][AW-1:0]          a;
  logic [RW-1:0]                     offset;
  logic [4:0]                        p;     // columns per weight
  logic [4:0]                        ng;    // weights per row

  assign p      = 5'd4 * (5'(wprec) + 5'd1);
  assign ng     = 5'(NCOLS) / p;
  assign offset = RW'(NROWS) * ((RW'(1) << act_bits) - RW'(1));

  always_comb begin
    for (int j = 0; j < NCOLS; j++) begin
      a[j] = (acc_s[j][0] ^ acc_s[j][1] ^ acc_s[j][2]) + (acc_c[j][0] ^ acc_c[j][1] ^ acc_c[j][2]);
      d[j] = (RW'(a[j]) << 1) - offset;
    end
    r = '0;
    for (int g = 0; g < NCOLS / 4; g++)
      for (int j = 0; j < 16; j++)
        if (5'(g) < ng && 5'(j) < p)
          r[g] = r[g] + (d[(g * int'(p) + j) % NCOLS] <<< j);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= in_valid;
      if (in_valid) res <= r;
    end
  end
endmodule
