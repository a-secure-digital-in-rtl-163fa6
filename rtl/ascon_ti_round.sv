// One round of the ASCON permutation on a 3-share Boolean-masked state.
//
// The state is five 64-bit words x0..x4 per share. Linear steps (round constant,
// the XORs around the S-box, the final inversion of x2 and the rotating
// diffusion layer) act share by share; constants and inversions touch share A
// only. The S-box core is the chi map x_w ^= ~x_{w+1} & x_{w+2} over the five
// bits of each of the 64 bit-slices, computed as a threshold implementation in
// which output share s only uses input shares s+1 and s+2.
//
// Uniformity without fresh randomness uses "changing of the guards": the
// output shares of S-box i are additionally masked with shares A and B of the
// chi input of S-box i-1 (A' ^= B_{i-1}, B' ^= A_{i-1}, C' ^= A_{i-1}^B_{i-1};
// the masks cancel, so the result is unchanged). S-box 0 takes its two 5-bit
// guards from guard_in, and S-box 63 hands its own chi-input shares A and B out
// on guard_out for the next round.
//
// Combinational: the caller registers the state after every round so that the
// non-linear layer always starts from register outputs.
//
// Using ASCON with a threshold implementation and changing of the guards
// follows the macro this RTL implements; the exact guard wiring is this
// design's choice.
module ascon_ti_round
  import secure_imc_pkg::*;
(
  input  logic [2:0][4:0][63:0] st_in,
  input  logic [7:0]            rc,
  input  logic [1:0][4:0]       guard_in,    // [0] = share A, [1] = share B guards
  output logic [2:0][4:0][63:0] st_out,
  output logic [1:0][4:0]       guard_out
);
  logic [2:0][4:0][63:0] u, v, w;

  function automatic logic [63:0] rotr(logic [63:0] x, int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  always_comb begin
    // constant addition and input affine layer
    for (int s = 0; s < 3; s++) begin
      logic [63:0] x0, x1, x2, x3, x4;
      x0 = st_in[s][0];
      x1 = st_in[s][1];
      x2 = st_in[s][2] ^ ((s == 0) ? {56'd0, rc} : 64'd0);
      x3 = st_in[s][3];
      x4 = st_in[s][4];
      x0 ^= x4;
      x4 ^= x3;
      x2 ^= x1;
      u[s][0] = x0; u[s][1] = x1; u[s][2] = x2; u[s][3] = x3; u[s][4] = x4;
    end

    // shared chi with guards
    for (int i = 0; i < 64; i++) begin
      logic [4:0] ga, gb;
      for (int k = 0; k < 5; k++) begin
        ga[k] = (i == 0) ? guard_in[0][k] : u[0][k][i-1 < 0 ? 0 : i-1];
        gb[k] = (i == 0) ? guard_in[1][k] : u[1][k][i-1 < 0 ? 0 : i-1];
      end
      for (int k = 0; k < 5; k++) begin
        logic [2:0] nx, y;
        nx = {u[2][(k+1)%5][i], u[1][(k+1)%5][i], ~u[0][(k+1)%5][i]};
        y  = {u[2][(k+2)%5][i], u[1][(k+2)%5][i],  u[0][(k+2)%5][i]};
        v[0][k][i] = u[0][k][i] ^ and_ti(0, nx, y) ^ gb[k];
        v[1][k][i] = u[1][k][i] ^ and_ti(1, nx, y) ^ ga[k];
        v[2][k][i] = u[2][k][i] ^ and_ti(2, nx, y) ^ ga[k] ^ gb[k];
      end
    end
    for (int k = 0; k < 5; k++) begin
      guard_out[0][k] = u[0][k][63];
      guard_out[1][k] = u[1][k][63];
    end

    // output affine layer and linear diffusion
    for (int s = 0; s < 3; s++) begin
      logic [63:0] x0, x1, x2, x3, x4;
      x0 = v[s][0]; x1 = v[s][1]; x2 = v[s][2]; x3 = v[s][3]; x4 = v[s][4];
      x1 ^= x0;
      x0 ^= x4;
      x3 ^= x2;
      if (s == 0) x2 = ~x2;
      w[s][0] = x0 ^ rotr(x0, 19) ^ rotr(x0, 28);
      w[s][1] = x1 ^ rotr(x1, 61) ^ rotr(x1, 39);
      w[s][2] = x2 ^ rotr(x2,  1) ^ rotr(x2,  6);
      w[s][3] = x3 ^ rotr(x3, 10) ^ rotr(x3, 17);
      w[s][4] = x4 ^ rotr(x4,  7) ^ rotr(x4, 41);
    end
    st_out = w;
  end
endmodule
