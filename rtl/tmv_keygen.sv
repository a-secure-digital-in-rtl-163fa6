// Secret-key generator: temporal majority voting over the SRAM-based PUF.
//
// The 128-bit key is kept in three shares, each share bit being the response
// of its own PUF cell, so the unshared key is never formed. Key bits are read
// 4 per share at a time (a 4-bit column group of one row). For every group the
// FSM repeats E = 2^(vote_sel+1) - 1 times (1, 3, 7, 15 or 31):
//   RESET  secure-write the fixed value into the row (puf_reset)
//   SETTLE let the cells settle with feedback cut/reconnected (puf_settle_req)
//   EVAL   capture the settled values into the row (puf_eval)
//   READ   read the 4b group of each share and its complement
//   COUNT  count ones in the true path and ones of the complement in the
//          mirrored path (5-bit counters, differential so that the switching
//          does not depend on the data)
// then SHIFT: a 5:1 multiplexer picks bit vote_sel of every counter, which is
// the majority decision because the count never exceeds E. The decisions are
// shifted 4 bits at a time into the 128-bit key shift registers (true path)
// and keyb shift registers (complement path). Group g lives in row
// base_row + g / (COLS/4), column group g % (COLS/4).
//
// Timing: 5 clocks per evaluation, one SHIFT clock per group; done pulses and
// key_valid rises after 32 * (5E + 1) + 1 clocks. start is ignored while busy.
//
// The voting scheme, the 5b counters, the 5:1 multiplexers, the 4b-in/128b-out
// shift registers, the differential true/complement paths and the secure reset
// before evaluation follow the macro this RTL implements. The state sequence,
// the row/group mapping and the bit order are this design's choices.
module tmv_keygen
  import secure_imc_pkg::*;
#(
  parameter int unsigned NROWS = secure_imc_pkg::ROWS,
  parameter int unsigned NCOLS = secure_imc_pkg::COLS,
  parameter int unsigned KW    = KEY_W,
  localparam int unsigned RW   = $clog2(NROWS),
  localparam int unsigned NGPR = NCOLS / PUF_GRP,             // groups per row
  localparam int unsigned GW   = (NGPR > 1) ? $clog2(NGPR) : 1,
  localparam int unsigned NGRP = KW / PUF_GRP                 // groups per key
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [2:0]                   vote_sel,
  input  logic [7:0]                   base_row,
  // array control
  output logic                         puf_reset,
  output logic                         puf_settle_req,
  output logic                         puf_eval,
  output logic                         rd_en,
  output logic [RW-1:0]                row,
  output logic [GW-1:0]                grp,
  input  logic [2:0][PUF_GRP-1:0]      rd_data,
  input  logic [2:0][PUF_GRP-1:0]      rd_data_n,
  // key
  output logic                         busy,
  output logic                         done,
  output logic                         key_valid,
  output logic [2:0][KW-1:0]           key,
  output logic [2:0][KW-1:0]           keyb
);
  typedef enum logic [2:0] {S_IDLE, S_RESET, S_SETTLE, S_EVAL, S_READ, S_COUNT, S_SHIFT} state_e;
  state_e state;

  logic [2:0]                         sel;        // clamped vote select (5 options)
  logic [4:0]                         n_eval;     // evaluations per group minus one
  logic [4:0]                         ev_cnt;
  logic [$clog2(NGRP)-1:0]            g_cnt;
  logic [2:0][PUF_GRP-1:0][4:0]       cnt_p, cnt_n;
  logic [2:0][PUF_GRP-1:0]            maj_p, maj_n;

  always_comb begin
    sel    = (vote_sel > 3'd4) ? 3'd4 : vote_sel;
    n_eval = 5'((6'd2 << sel) - 6'd2);
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < PUF_GRP; b++) begin
        maj_p[s][b] = cnt_p[s][b][sel];
        maj_n[s][b] = cnt_n[s][b][sel];
      end
  end

  assign row            = RW'(base_row) + RW'(g_cnt / NGPR);
  assign grp            = GW'(g_cnt % NGPR);
  assign puf_reset      = (state == S_RESET);
  assign puf_settle_req = (state == S_SETTLE);
  assign puf_eval       = (state == S_EVAL);
  assign rd_en          = (state == S_READ);
  assign busy           = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      ev_cnt    <= '0;
      g_cnt     <= '0;
      cnt_p     <= '0;
      cnt_n     <= '0;
      key       <= '0;
      keyb      <= '0;
      done      <= 1'b0;
      key_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state     <= S_RESET;
          ev_cnt    <= '0;
          g_cnt     <= '0;
          cnt_p     <= '0;
          cnt_n     <= '0;
          key_valid <= 1'b0;
        end
        S_RESET:  state <= S_SETTLE;
        S_SETTLE: state <= S_EVAL;
        S_EVAL:   state <= S_READ;
        S_READ:   state <= S_COUNT;
        S_COUNT: begin
          for (int s = 0; s < 3; s++)
            for (int b = 0; b < PUF_GRP; b++) begin
              cnt_p[s][b] <= cnt_p[s][b] + 5'(rd_data[s][b]);
              cnt_n[s][b] <= cnt_n[s][b] + 5'(rd_data_n[s][b]);
            end
          if (ev_cnt == n_eval) begin
            state  <= S_SHIFT;
            ev_cnt <= '0;
          end else begin
            state  <= S_RESET;
            ev_cnt <= ev_cnt + 5'd1;
          end
        end
        S_SHIFT: begin
          for (int s = 0; s < 3; s++) begin
            key[s]  <= {key[s][KW-PUF_GRP-1:0],  maj_p[s]};
            keyb[s] <= {keyb[s][KW-PUF_GRP-1:0], maj_n[s]};
          end
          cnt_p <= '0;
          cnt_n <= '0;
          if (g_cnt == $clog2(NGRP)'(NGRP - 1)) begin
            state     <= S_IDLE;
            done      <= 1'b1;
            key_valid <= 1'b1;
          end else begin
            state <= S_RESET;
            g_cnt <= g_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A counter never exceeds the number of evaluations, so bit vote_sel of it
  // is the majority decision.
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SHIFT |-> cnt_p[0][0] <= n_eval + 5'd1 && cnt_n[0][0] <= n_eval + 5'd1);
  a_differential: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_SHIFT |-> maj_p == ~maj_n);
endmodule
