// Secure digital in-memory-compute (IMC) macro: a bit-serial binary-weighted
// dot-product engine whose data and arithmetic are Boolean-shared against
// power/EM side-channel attacks, whose weights arrive encrypted against bus
// probing, and whose cipher key comes from the macro's own SRAM used as a PUF.
//
// Data flow:
//   1. Key generation (SPI CTRL write): tmv_keygen evaluates the PUF rows of
//      imc_sram repeatedly, majority-votes each cell and shifts a 3-share
//      128-bit key into its registers.
//   2. Weight load (dec_start + ciphertext words): ascon_ti decrypts the model
//      with the shared key; every 64-bit shared plaintext word is written into
//      four consecutive array rows (16 weight bits x 3 shares each), most
//      significant 16 bits first, starting at wt_row_base. tag_ok reports the
//      integrity check when dec_done pulses.
//   3. Activation load: act_wr_* writes one row's shared 8-bit activation.
//   4. Compute (cmp_start): for activation bits B-1 down to 0 (B from SPI),
//      the shared bit of every row is broadcast; shared_xnor_array multiplies
//      it with every stored weight bit, one csa_adder_tree per column counts
//      the products (9 clocks), and one bitserial_accumulator per column
//      shift-adds the counts (1 clock). output_decode recombines the shares
//      and forms COLS/P signed results for P-bit weights; res_valid pulses
//      B + 10 clocks after the clock edge that takes cmp_start: the last
//      activation bit enters the tree's first register B edges after it,
//      passes 9 tree registers and the accumulator register (10 registers,
//      as many as the macro's pipeline), and the decoder adds one more.
//
// Weights and activations are expected in +-1 digit form (see output_decode)
// and, for activations, already split into shares by the sender.
//
// The complement key (keyb) from the key generator's mirrored path exists for
// power balancing only and is deliberately left unconnected.
//
// The blocks and their order follow the macro this RTL implements; the array
// size, port set, row mapping of plaintext words and the sequencing are this
// design's choices.
module secure_imc_macro
  import secure_imc_pkg::*;
#(
  parameter int unsigned NROWS = secure_imc_pkg::ROWS,
  parameter int unsigned NCOLS = secure_imc_pkg::COLS,
  localparam int unsigned RW   = $clog2(NROWS),
  localparam int unsigned TW   = $clog2(NROWS + 1),
  localparam int unsigned LAT  = csa_levels(NROWS)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // SPI configuration
  input  logic                              spi_sclk,
  input  logic                              spi_cs_n,
  input  logic                              spi_mosi,
  output logic                              spi_miso,
  // encrypted weight stream
  input  logic                              dec_start,
  input  logic [127:0]                      nonce,
  input  logic [127:0]                      tag_in,
  input  logic [RW-1:0]                     wt_row_base,
  input  logic                              ct_valid,
  input  logic [63:0]                       ct_data,
  input  logic                              ct_last,
  output logic                              ct_ready,
  output logic                              dec_done,
  output logic                              tag_ok,
  // shared activations
  input  logic                              act_wr_en,
  input  logic [RW-1:0]                     act_wr_row,
  input  logic [2:0][ACT_MAX-1:0]           act_wr_sh,
  // compute
  input  logic                              cmp_start,
  output logic                              cmp_busy,
  output logic                              res_valid,
  output logic signed [NCOLS/4-1:0][RES_W-1:0] res,
  // status
  output logic                              key_valid
);
  // ---------------- configuration
  cfg_t cfg;
  logic kg_start, kg_busy, kg_done, dec_busy;
  logic [7:0] status;
  assign status = {4'd0, tag_ok, dec_busy, kg_busy, key_valid};

  spi_config u_spi (
    .clk, .rst_n,
    .sclk(spi_sclk), .cs_n(spi_cs_n), .mosi(spi_mosi), .miso(spi_miso),
    .status_in(status), .cfg(cfg), .keygen_start(kg_start)
  );

  // ---------------- key generation with the array as PUF
  logic                        puf_reset, puf_settle_req, puf_eval, kg_rd_en;
  logic [RW-1:0]               kg_row;
  logic [$clog2(NCOLS/PUF_GRP)-1:0] kg_grp;
  logic [2:0][PUF_GRP-1:0]     rd_data, rd_data_n;
  logic [2:0][KEY_W-1:0]       key_sh, keyb_sh;
  logic [2:0][NCOLS-1:0]       puf_settle;

  tmv_keygen #(.NROWS(NROWS), .NCOLS(NCOLS)) u_keygen (
    .clk, .rst_n, .start(kg_start),
    .vote_sel(cfg.vote_sel), .base_row(cfg.key_row_base),
    .puf_reset, .puf_settle_req, .puf_eval, .rd_en(kg_rd_en),
    .row(kg_row), .grp(kg_grp), .rd_data, .rd_data_n,
    .busy(kg_busy), .done(kg_done), .key_valid, .key(key_sh), .keyb(keyb_sh)
  );

  puf_cell_model #(.ROWS(NROWS), .COLS(NCOLS)) u_puf (
    .clk, .eval(puf_settle_req), .row(kg_row), .settle(puf_settle)
  );

  // ---------------- weight decryption and write-back
  logic                 pt_valid;
  logic [2:0][63:0]     pt_sh, pt_buf;
  logic [2:0]           wr_left;      // rows of pt_buf still to write
  logic [RW-1:0]        wr_row;
  logic                 wr_en;
  logic [2:0][NCOLS-1:0] wr_data;

  ascon_ti u_cipher (
    .clk, .rst_n, .start(dec_start), .nonce, .key_sh, .guard_seed(cfg.guard_seed),
    .ct_valid, .ct_data, .ct_last, .ct_ready,
    .pt_valid, .pt_sh, .tag_in, .busy(dec_busy), .done(dec_done), .tag_ok
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pt_buf  <= '0;
      wr_left <= '0;
      wr_row  <= '0;
    end else begin
      if (dec_start && !dec_busy) wr_row <= wt_row_base;
      if (pt_valid) begin
        pt_buf  <= pt_sh;
        wr_left <= 3'd4;
      end else if (wr_left != 0) begin
        for (int s = 0; s < 3; s++) pt_buf[s] <= pt_buf[s] << NCOLS;
        wr_left <= wr_left - 3'd1;
        wr_row  <= wr_row + 1'b1;
      end
    end
  end
  assign wr_en = (wr_left != 0);
  always_comb
    for (int s = 0; s < 3; s++) wr_data[s] = pt_buf[s][63 -: NCOLS];

  // ---------------- the array
  logic [NROWS-1:0][2:0][NCOLS-1:0] wt_all;

  imc_sram #(.ROWS(NROWS), .COLS(NCOLS)) u_array (
    .clk, .rst_n,
    .wr_en, .wr_row, .wr_data,
    .rd_en(kg_rd_en), .rd_row(kg_row), .rd_grp(kg_grp), .rd_data, .rd_data_n,
    .puf_reset, .puf_eval, .puf_row(kg_row), .puf_settle,
    .wt_all
  );

  // ---------------- activation buffer and bit-serial sequencer
  logic [NROWS-1:0][2:0][ACT_MAX-1:0] act_mem;
  logic [NROWS-1:0][2:0]              act_bit;
  logic [3:0]                         bit_idx;
  logic                               issuing, issue_first, issue_last;
  logic [LAT-1:0]                     first_pipe, last_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) act_mem <= '0;
    else if (act_wr_en) act_mem[act_wr_row] <= act_wr_sh;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing <= 1'b0;
      bit_idx <= '0;
    end else if (cmp_start && !cmp_busy) begin
      issuing <= 1'b1;
      bit_idx <= cfg.act_bits - 4'd1;
    end else if (issuing) begin
      if (bit_idx == 0) issuing <= 1'b0;
      else              bit_idx <= bit_idx - 4'd1;
    end
  end
  assign issue_first = issuing && (bit_idx == cfg.act_bits - 4'd1);
  assign issue_last  = issuing && (bit_idx == 0);

  always_comb
    for (int r = 0; r < NROWS; r++)
      for (int s = 0; s < 3; s++) act_bit[r][s] = act_mem[r][s][bit_idx[2:0]];

  // ---------------- shared multiply, adder trees, accumulators
  logic [NCOLS-1:0][NROWS-1:0][2:0]  prod;
  logic [NCOLS-1:0]                  tree_valid;
  logic [NCOLS-1:0][2:0][TW-1:0]     t0;
  logic [NCOLS-1:0][2:0]             t1;
  logic [NCOLS-1:0][2:0][ACC_W-1:0]  acc_s, acc_c;

  shared_xnor_array #(.ROWS(NROWS), .COLS(NCOLS)) u_mult (
    .act(act_bit), .wt(wt_all), .prod
  );

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    csa_adder_tree #(.N_IN(NROWS)) u_tree (
      .clk, .rst_n, .in_valid(issuing), .in_bits(prod[c]),
      .out_valid(tree_valid[c]), .t0(t0[c]), .t1(t1[c])
    );
    bitserial_accumulator #(.IN_W(TW)) u_acc (
      .clk, .rst_n, .in_valid(tree_valid[c]), .first(first_pipe[LAT-1]),
      .t0(t0[c]), .t1(t1[c]), .acc_s(acc_s[c]), .acc_c(acc_c[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_pipe <= '0;
      last_pipe  <= '0;
    end else begin
      first_pipe <= {first_pipe[LAT-2:0], issue_first};
      last_pipe  <= {last_pipe[LAT-2:0],  issue_last};
    end
  end

  // accumulators hold the result one clock after the last count arrives
  logic acc_done;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc_done <= 1'b0;
    else        acc_done <= last_pipe[LAT-1];
  end

  assign cmp_busy = issuing || (|last_pipe) || acc_done;

  output_decode #(.NROWS(NROWS), .NCOLS(NCOLS)) u_decode (
    .clk, .rst_n, .in_valid(acc_done), .acc_s, .acc_c,
    .act_bits(cfg.act_bits), .wprec(cfg.wprec),
    .res_valid, .res
  );
endmodule
