// Behavioural model (not synthesizable logic): power-up-style settling of the
// IMC SRAM bitcells used as a PUF.
//
// When the feedback of a cross-coupled bitcell is cut and reconnected, the cell
// settles to 0 or 1 depending on which side is stronger through local device
// mismatch; cells with little mismatch are swayed by noise. The model gives
// every cell a fixed signed mismatch drawn from a hash of (CHIP_ID, row, share,
// column) and adds uniform noise of +-NOISE on every evaluation. The noise is
// pseudo-random: the same kind of hash of (cell, evaluation count), so runs are
// repeatable. A cell settles to 1 when mismatch + noise > 0.
//
// Interface: on a clock edge with eval high, settle takes the values of all
// three share cells of every column of row `row`; settle holds otherwise.
//
// The settling mechanism follows the macro this RTL implements; the mismatch
// distribution, the noise level and the hash are this model's own.
module puf_cell_model #(
  parameter int unsigned ROWS    = secure_imc_pkg::ROWS,
  parameter int unsigned COLS    = secure_imc_pkg::COLS,
  parameter int unsigned CHIP_ID = 32'h1234_5678,
  parameter int unsigned NOISE   = 16,           // noise amplitude, mismatch is +-128
  localparam int unsigned RW     = $clog2(ROWS)
) (
  input  logic                 clk,
  input  logic                 eval,
  input  logic [RW-1:0]        row,
  output logic [2:0][COLS-1:0] settle
);
  function automatic logic [31:0] mix(logic [31:0] x);
    x = x ^ (x >> 15);
    x = x * 32'h2C1B_3C6D;
    x = x ^ (x >> 12);
    x = x * 32'h297A_2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  // fixed per-cell mismatch in [-128, 127]
  function automatic int mismatch(logic [31:0] r, logic [31:0] s, logic [31:0] c);
    logic [31:0] h;
    h = mix(CHIP_ID ^ (r * 32'h9E37_79B1) ^ (s * 32'h85EB_CA77) ^ (c * 32'hC2B2_AE3D));
    return int'(h[7:0]) - 128;
  endfunction

  // noise in [-NOISE, NOISE] for one cell at one evaluation
  function automatic int noise(logic [31:0] idx, logic [31:0] evn);
    logic [31:0] h;
    h = mix((idx * 32'h27D4_EB2F) ^ (evn * 32'h1656_67B1) ^ ~CHIP_ID);
    return int'(h % (2 * NOISE + 1)) - int'(NOISE);
  endfunction

  logic [31:0] ev_count;

  initial begin
    settle   = '0;
    ev_count = '0;
  end

  always @(posedge clk) begin
    if (eval) begin
      ev_count <= ev_count + 1;
      for (int s = 0; s < 3; s++)
        for (int c = 0; c < COLS; c++)
          settle[s][c] <= (mismatch(32'(row), 32'(s), 32'(c))
                           + noise(32'(row) * 64 + 32'(s) * 16 + 32'(c), ev_count)) > 0;
    end
  end
endmodule
