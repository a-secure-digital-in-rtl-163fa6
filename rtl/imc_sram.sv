// 8T in-memory-compute SRAM array holding Boolean-shared weight bits, reused
// as a physically unclonable function (PUF).
//
// Each row stores COLS weight bits, each bit as three share cells. The array
// has four kinds of access, one per clock, in this priority:
//   * puf_reset: write a fixed value (all zero) into every cell of row puf_row,
//     removing any data dependence before a PUF evaluation;
//   * puf_eval: the cells of row puf_row take the value they settle to once
//     their feedback is cut and reconnected (puf_settle, from the bitcell
//     mismatch model);
//   * wr_en: write all shares of row wr_row;
//   * rd_en: read one 4-bit column group (per share) of row rd_row; the data and
//     its complement (the two sides of the differential sense amplifier) appear
//     on rd_data / rd_data_n one clock later.
// The compute port wt_all shows every stored bit at once: it models the 8T
// cells' decoupled read ports feeding the per-column multipliers.
//
// The array's reuse as PUF and the secure reset-before-evaluate follow the
// macro this RTL implements; the port set and the reset value are this
// design's choices.
module imc_sram
  import secure_imc_pkg::*;
#(
  parameter int unsigned ROWS = secure_imc_pkg::ROWS,
  parameter int unsigned COLS = secure_imc_pkg::COLS,
  parameter int unsigned GRP  = PUF_GRP,
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned GW  = (COLS / GRP > 1) ? $clog2(COLS / GRP) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // row write
  input  logic                            wr_en,
  input  logic [RW-1:0]                   wr_row,
  input  logic [2:0][COLS-1:0]            wr_data,
  // 4b group read (differential)
  input  logic                            rd_en,
  input  logic [RW-1:0]                   rd_row,
  input  logic [GW-1:0]                   rd_grp,
  output logic [2:0][GRP-1:0]             rd_data,
  output logic [2:0][GRP-1:0]             rd_data_n,
  // PUF operations
  input  logic                            puf_reset,
  input  logic                            puf_eval,
  input  logic [RW-1:0]                   puf_row,
  input  logic [2:0][COLS-1:0]            puf_settle,
  // compute read
  output logic [ROWS-1:0][2:0][COLS-1:0]  wt_all
);
  logic [ROWS-1:0][2:0][COLS-1:0] mem;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem <= '0;
    end else if (puf_reset) begin
      mem[puf_row] <= '0;
    end else if (puf_eval) begin
      mem[puf_row] <= puf_settle;
    end else if (wr_en) begin
      mem[wr_row] <= wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data   <= '0;
      rd_data_n <= '1;
    end else if (rd_en) begin
      for (int s = 0; s < 3; s++) begin
        rd_data[s]   <=  mem[rd_row][s][rd_grp*GRP +: GRP];
        rd_data_n[s] <= ~mem[rd_row][s][rd_grp*GRP +: GRP];
      end
    end
  end

  assign wt_all = mem;
endmodule
