// Side-channel-protected popcount adder tree built only from shared full adders.
//
// N_IN shared one-bit products (all of weight 1) are reduced Wallace-style:
// at every level each column of height h is split into h/3 full adders, the
// h%3 leftover bits pass through, and full-adder carries move up one column.
// No half adder is ever used, so every adder sees three real, data-carrying
// shares and needs no random refresh bits. Reduction stops once no column holds
// more than two bits; the result stays in carry-save form (t0 + t1) for the
// bit-serial accumulator, which absorbs the final addition.
//
// Every level is registered, which keeps carry-logic glitches from combining
// shares across levels. Latency is LEVELS = csa_levels(N_IN) clocks (9 for
// 64 inputs); a new input vector is accepted every clock. in_valid travels
// with the data as out_valid.
//
// Output format: t0[c] is the first bit left in column c, t1 is the second bit
// of column 0 (the only column that ends with two bits). Both are shared.
//
// Full-adder-only carry-save reduction and its shorter pipeline follow the
// macro this RTL implements; the exact adder placement is this design's.
module csa_adder_tree
  import secure_imc_pkg::*;
#(
  parameter int unsigned N_IN  = ROWS,
  parameter int unsigned OUT_W = $clog2(N_IN + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [N_IN-1:0][2:0]    in_bits,   // shared one-bit inputs
  output logic                    out_valid,
  output logic [2:0][OUT_W-1:0]   t0,        // shared first carry-save row
  output logic [2:0]              t1         // shared second bit of column 0
);
  localparam int LEVELS = csa_levels(N_IN);
  localparam int NCOL   = OUT_W + 1;

  for (genvar l = 0; l <= LEVELS; l++) begin : lv
    for (genvar c = 0; c < NCOL; c++) begin : cl
      localparam int H   = csa_height(N_IN, l, c);
      localparam int HS  = (H > 0) ? H : 1;
      logic [HS-1:0][2:0] b;
      if (l == 0) begin : g_in
        if (c == 0) begin : g_c0
          assign b = in_bits;
        end else begin : g_cz
          assign b = '0;
        end
      end else begin : g_red
        localparam int HP   = csa_height(N_IN, l - 1, c);  // height feeding this column
        localparam int NFA  = HP / 3;
        localparam int REM  = HP % 3;
        localparam int NFAC = (c > 0) ? csa_height(N_IN, l - 1, c - 1) / 3 : 0;
        localparam int NFS  = (NFA > 0) ? NFA : 1;
        logic [NFS-1:0][2:0] fs;   // full-adder sums of this column
        logic [NFS-1:0][2:0] fc;   // full-adder carries into column c+1
        if (NFA > 0) begin : g_fa
          for (genvar k = 0; k < NFA; k++) begin : fa
            shared_full_adder u_fa (
              .a (lv[l-1].cl[c].b[3*k]),
              .b (lv[l-1].cl[c].b[3*k+1]),
              .c (lv[l-1].cl[c].b[3*k+2]),
              .s (fs[k]),
              .co(fc[k])
            );
          end
        end else begin : g_nofa
          assign fs = '0;
          assign fc = '0;
        end
        if (H > 0) begin : g_reg
          logic [HS-1:0][2:0] nxt;
          always_comb begin
            nxt = '0;
            for (int k = 0; k < NFA; k++) nxt[k] = fs[k];
            for (int r = 0; r < REM; r++) nxt[NFA + r] = lv[l-1].cl[c].b[3*NFA + r];
          end
          if (NFAC > 0) begin : g_cin
            logic [HS-1:0][2:0] nxt_c;
            always_comb begin
              nxt_c = nxt;
              for (int k = 0; k < NFAC; k++) nxt_c[NFA + REM + k] = lv[l].cl[c-1].g_red.fc[k];
            end
            always_ff @(posedge clk) b <= nxt_c;
          end else begin : g_nocin
            always_ff @(posedge clk) b <= nxt;
          end
        end else begin : g_empty
          assign b = '0;
        end
      end
    end
  end

  // valid pipeline
  logic [LEVELS:0] vpipe;
  assign vpipe[0] = in_valid;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe[LEVELS:1] <= '0;
    else        vpipe[LEVELS:1] <= vpipe[LEVELS-1:0];
  assign out_valid = vpipe[LEVELS];

  // unpack the final level into share-major words
  for (genvar c = 0; c < OUT_W; c++) begin : g_out
    if (csa_height(N_IN, LEVELS, c) > 0) begin : g_b
      for (genvar s = 0; s < 3; s++) begin : g_s
        assign t0[s][c] = lv[LEVELS].cl[c].b[0][s];
      end
    end else begin : g_z
      for (genvar s = 0; s < 3; s++) begin : g_s
        assign t0[s][c] = 1'b0;
      end
    end
  end
  if (csa_height(N_IN, LEVELS, 0) > 1) begin : g_t1
    assign t1 = lv[LEVELS].cl[0].b[1];
  end else begin : g_t1z
    assign t1 = '0;
  end
endmodule
