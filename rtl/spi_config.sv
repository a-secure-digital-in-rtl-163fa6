// SPI configuration port of the macro (SPI mode 0, chip select active low).
//
// The SPI lines are synchronised into the system clock with two flip-flops
// each and their edges detected there, so sclk must be slower than clk/4.
// A frame is 16 bits, most significant first: bit 15 is 1 for a write and 0
// for a read, bits 14:8 the register address, bits 7:0 the write data. A
// write takes effect at the 16th rising sclk edge. For a read, the register
// value is shifted out on miso during bits 7:0, changing after falling edges.
//
// Registers:
//   0x00 CTRL     write 1 to bit 0: start PUF key generation (one-clock pulse)
//   0x01 VOTE     [2:0] majority depth select (1/3/7/15/31 evaluations)
//   0x02 KEYROW   [7:0] first array row used for the key
//   0x03 WPREC    [1:0] weight precision 4/8/12/16 bits
//   0x04 ACTBITS  [3:0] activation precision 1..8
//   0x05 STATUS   read only: status_in
//   0x06 GUARD_LO [7:0] guard seed bits 7:0
//   0x07 GUARD_HI [1:0] guard seed bits 9:8
//
// A configuration port over SPI follows the macro this RTL implements; the
// frame format, register map and reset values are this design's choices.
module spi_config
  import secure_imc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       cs_n,
  input  logic       mosi,
  output logic       miso,
  input  logic [7:0] status_in,
  output cfg_t       cfg,
  output logic       keygen_start
);
  logic [2:0] sclk_q, cs_q, mosi_q;
  logic       rise, fall, active;
  logic [4:0] bitcnt;
  logic [15:0] rx;
  logic [7:0]  tx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sclk_q <= '0;
      cs_q   <= '1;
      mosi_q <= '0;
    end else begin
      sclk_q <= {sclk_q[1:0], sclk};
      cs_q   <= {cs_q[1:0], cs_n};
      mosi_q <= {mosi_q[1:0], mosi};
    end
  end

  assign active = !cs_q[1];
  assign rise   = active && sclk_q[1] && !sclk_q[2];
  assign fall   = active && !sclk_q[1] && sclk_q[2];

  function automatic logic [7:0] reg_read(logic [6:0] a, cfg_t c, logic [7:0] st);
    case (a)
      7'h01:   return {5'd0, c.vote_sel};
      7'h02:   return c.key_row_base;
      7'h03:   return {6'd0, c.wprec};
      7'h04:   return {4'd0, c.act_bits};
      7'h05:   return st;
      7'h06:   return c.guard_seed[7:0];
      7'h07:   return {6'd0, c.guard_seed[9:8]};
      default: return 8'd0;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bitcnt       <= '0;
      rx           <= '0;
      tx           <= '0;
      keygen_start <= 1'b0;
      cfg.vote_sel     <= 3'd2;
      cfg.key_row_base <= 8'd0;
      cfg.wprec        <= WPREC_4;
      cfg.act_bits     <= 4'd8;
      cfg.guard_seed   <= 10'h2a5;
    end else begin
      keygen_start <= 1'b0;
      if (!active) begin
        bitcnt <= '0;
      end else if (rise) begin
        rx     <= {rx[14:0], mosi_q[1]};
        bitcnt <= bitcnt + 5'd1;
        if (bitcnt == 5'd7)
          tx <= reg_read({rx[5:0], mosi_q[1]}, cfg, status_in);
        if (bitcnt == 5'd15 && rx[14]) begin
          // frame bits 15:0 are {rx[14:0], new bit}
          case (rx[13:7])
            7'h00: keygen_start <= mosi_q[1];
            7'h01: cfg.vote_sel     <= {rx[1:0], mosi_q[1]};
            7'h02: cfg.key_row_base <= {rx[6:0], mosi_q[1]};
            7'h03: cfg.wprec        <= wprec_e'({rx[0], mosi_q[1]});
            7'h04: cfg.act_bits     <= {rx[2:0], mosi_q[1]};
            7'h06: cfg.guard_seed[7:0] <= {rx[6:0], mosi_q[1]};
            7'h07: cfg.guard_seed[9:8] <= {rx[0], mosi_q[1]};
            default: ;
          endcase
        end
      end else if (fall && bitcnt >= 5'd9) begin
        tx <= {tx[6:0], 1'b0};
      end
    end
  end

  assign miso = tx[7];
endmodule
