// Side-channel-protected ASCON-128 authenticated decryption of the neural
// network weights, on a 3-share Boolean-masked state.
//
// The model is stored off chip encrypted, so probing the memory bus reveals
// nothing; it is decrypted here on the way into the IMC array. The key arrives
// in three shares from the PUF key generator and is never recombined; IV,
// nonce and ciphertext are public and enter share A. The decrypted words leave
// in three shares (pt_sh) and are written into the array as shares, so the
// plaintext weights never exist unshared on chip. The tag is recombined only
// for the final comparison (tag_ok).
//
// Sequence (ASCON-128, 64-bit rate, no associated data):
//   start  : state = IV || K || N, 12 rounds, x3x4 ^= K, x4 ^= 1
//   blocks : per ciphertext word C: P = x0 ^ C, x0 = C, 6 rounds
//   final  : x0 ^= 1 << 63 (empty padded last block), x1x2 ^= K, 12 rounds,
//            tag = x3x4 ^ K, compared with tag_in
// One round per clock (ascon_ti_round, state registered every round), so a
// 64-bit block costs 7 clocks including its handshake, and a decryption of n
// words sent without stalls takes 26 + 7n clocks from start to done (1 load,
// 12 initial rounds, 7 per word, 12 final rounds, 1 tag compare).
//
// Interface: start is taken in IDLE with nonce and key shares stable during
// the operation. ct_valid/ct_ready is a ready/valid handshake for ciphertext
// words; ct_last marks the final word. pt_valid pulses for one clock with each
// plaintext word. done pulses with tag_ok valid; tag_ok holds until the next
// start. The 10 guard bits are loaded from guard_seed on the first start
// after reset and are then carried from round to round: they are the only
// random bits the cipher ever uses.
//
// ASCON, its threshold implementation and the one-time random guard bits
// follow the macro this RTL implements. Messages of whole 64-bit words, no
// associated data and releasing plaintext before the tag check are this
// design's choices.
module ascon_ti
  import secure_imc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [127:0]         nonce,
  input  logic [2:0][127:0]    key_sh,
  input  logic [9:0]           guard_seed,
  input  logic                 ct_valid,
  input  logic [63:0]          ct_data,
  input  logic                 ct_last,
  output logic                 ct_ready,
  output logic                 pt_valid,
  output logic [2:0][63:0]     pt_sh,
  input  logic [127:0]         tag_in,
  output logic                 busy,
  output logic                 done,
  output logic                 tag_ok
);
  localparam logic [63:0] IV = 64'h8040_0c06_0000_0000;

  typedef enum logic [2:0] {A_IDLE, A_INIT, A_WAIT, A_BLOCK, A_FINAL, A_TAG} state_e;
  state_e state;

  logic [2:0][4:0][63:0] st, rnd_out;
  logic [1:0][4:0]       guard, guard_nxt;
  logic                  seeded;
  logic [3:0]            ridx;       // round constant index 0..11
  logic                  last_blk;
  logic [7:0]            rc;

  assign rc = {4'hf - ridx, ridx};

  ascon_ti_round u_round (
    .st_in    (st),
    .rc       (rc),
    .guard_in (guard),
    .st_out   (rnd_out),
    .guard_out(guard_nxt)
  );

  assign ct_ready = (state == A_WAIT);
  assign busy     = (state != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= A_IDLE;
      st       <= '0;
      guard    <= '0;
      seeded   <= 1'b0;
      ridx     <= '0;
      last_blk <= 1'b0;
      pt_valid <= 1'b0;
      pt_sh    <= '0;
      done     <= 1'b0;
      tag_ok   <= 1'b0;
    end else begin
      pt_valid <= 1'b0;
      done     <= 1'b0;
      case (state)
        A_IDLE: if (start) begin
          for (int s = 0; s < 3; s++) begin
            st[s][0] <= (s == 0) ? IV : 64'd0;
            st[s][1] <= key_sh[s][127:64];
            st[s][2] <= key_sh[s][63:0];
            st[s][3] <= (s == 0) ? nonce[127:64] : 64'd0;
            st[s][4] <= (s == 0) ? nonce[63:0]   : 64'd0;
          end
          if (!seeded) begin
            guard  <= {guard_seed[9:5], guard_seed[4:0]};
            seeded <= 1'b1;
          end
          ridx   <= 4'd0;
          tag_ok <= 1'b0;
          state  <= A_INIT;
        end
        A_INIT: begin
          st    <= rnd_out;
          guard <= guard_nxt;
          ridx  <= ridx + 4'd1;
          if (ridx == 4'd11) begin
            for (int s = 0; s < 3; s++) begin
              st[s][3] <= rnd_out[s][3] ^ key_sh[s][127:64];
              st[s][4] <= rnd_out[s][4] ^ key_sh[s][63:0] ^ ((s == 0) ? 64'd1 : 64'd0);
            end
            state <= A_WAIT;
          end
        end
        A_WAIT: if (ct_valid) begin
          pt_sh[0]  <= st[0][0] ^ ct_data;
          pt_sh[1]  <= st[1][0];
          pt_sh[2]  <= st[2][0];
          pt_valid  <= 1'b1;
          st[0][0]  <= ct_data ^ st[1][0] ^ st[2][0];
          last_blk  <= ct_last;
          ridx      <= 4'd6;
          state     <= A_BLOCK;
        end
        A_BLOCK: begin
          st    <= rnd_out;
          guard <= guard_nxt;
          ridx  <= ridx + 4'd1;
          if (ridx == 4'd11) begin
            if (last_blk) begin
              st[0][0] <= rnd_out[0][0] ^ 64'h8000_0000_0000_0000;
              for (int s = 0; s < 3; s++) begin
                st[s][1] <= rnd_out[s][1] ^ key_sh[s][127:64];
                st[s][2] <= rnd_out[s][2] ^ key_sh[s][63:0];
              end
              ridx  <= 4'd0;
              state <= A_FINAL;
            end else begin
              state <= A_WAIT;
            end
          end
        end
        A_FINAL: begin
          st    <= rnd_out;
          guard <= guard_nxt;
          ridx  <= ridx + 4'd1;
          if (ridx == 4'd11) state <= A_TAG;
        end
        A_TAG: begin
          // finish each tag share first; only the tag itself is recombined
          tag_ok <= (({st[0][3], st[0][4]} ^ key_sh[0]) ^
                     ({st[1][3], st[1][4]} ^ key_sh[1]) ^
                     ({st[2][3], st[2][4]} ^ key_sh[2])) == tag_in;
          done   <= 1'b1;
          state  <= A_IDLE;
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  // Handshake rules: a word offered on ct_* stays put until it is taken, and
  // start is only given while the core is idle.
  a_ct_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ct_valid && !ct_ready |=> ct_valid && $stable(ct_data) && $stable(ct_last));
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> state == A_IDLE);
endmodule
