// Shared types, sizes and helper functions for the secure in-memory-compute macro.
//
// Every secret bit in the macro is carried as three Boolean shares whose XOR is
// the bit (share index 0 = "A", 1 = "B", 2 = "C"). A shared W-bit word is a
// packed [2:0][W-1:0] array: one W-bit word per share.
//
// The array size (64 rows x 16 weight-bit columns) and the configuration
// register layout are this design's own choices; the 3-share scheme, the 4b PUF
// read group, the 128b key, the 5 majority-vote depths and the 1-8b activation
// / 4-16b weight precisions follow the macro this RTL implements.
package secure_imc_pkg;

  localparam int ROWS      = 64;   // dot-product length (rows of the IMC array)
  localparam int COLS      = 16;   // weight-bit columns per row
  localparam int ACT_MAX   = 8;    // maximum activation precision (bits)
  localparam int KEY_W     = 128;  // cipher key width
  localparam int PUF_GRP   = 4;    // bits per PUF read (per share)
  localparam int ACC_W     = 16;   // accumulator width per column
  localparam int RES_W     = 32;   // decoded result width

  // Weight precision codes (number of adjacent columns forming one weight).
  typedef enum logic [1:0] {
    WPREC_4  = 2'd0,
    WPREC_8  = 2'd1,
    WPREC_12 = 2'd2,
    WPREC_16 = 2'd3
  } wprec_e;

  // Configuration written over SPI.
  typedef struct packed {
    logic [2:0] vote_sel;      // majority depth: 2^(vote_sel+1)-1 PUF evaluations
    logic [7:0] key_row_base;  // first SRAM row used as PUF for the key
    wprec_e     wprec;         // weight precision
    logic [3:0] act_bits;      // activation precision, 1..8
    logic [9:0] guard_seed;    // one-time random guard bits for the cipher
  } cfg_t;

  // Column heights of a full-adder-only carry-save reduction of n one-bit
  // inputs (all in column 0) after `level` levels. A column of height h uses
  // h/3 full adders; h%3 bits pass through; carries move up one column.
  function automatic int csa_height(int n, int level, int col);
    int h [32];
    int nh [32];
    for (int c = 0; c < 32; c++) h[c] = 0;
    h[0] = n;
    for (int l = 0; l < level; l++) begin
      for (int c = 0; c < 32; c++) nh[c] = h[c] / 3 + h[c] % 3;
      for (int c = 1; c < 32; c++) nh[c] += h[c-1] / 3;
      for (int c = 0; c < 32; c++) h[c] = nh[c];
    end
    return h[col];
  endfunction

  // Number of full-adder levels until no column holds more than two bits.
  function automatic int csa_levels(int n);
    int h [32];
    int nh [32];
    int l;
    int mx;
    for (int c = 0; c < 32; c++) h[c] = 0;
    h[0] = n;
    l = 0;
    mx = n;
    while (mx > 2) begin
      for (int c = 0; c < 32; c++) nh[c] = h[c] / 3 + h[c] % 3;
      for (int c = 1; c < 32; c++) nh[c] += h[c-1] / 3;
      mx = 0;
      for (int c = 0; c < 32; c++) begin
        h[c] = nh[c];
        if (h[c] > mx) mx = h[c];
      end
      l++;
    end
    return l;
  endfunction

  // 3-share threshold AND: share i of x&y, computed from shares i+1, i+2 only.
  function automatic logic and_ti(int i, logic [2:0] x, logic [2:0] y);
    int j;
    int k;
    j = (i + 1) % 3;
    k = (i + 2) % 3;
    return (x[j] & y[j]) ^ (x[j] & y[k]) ^ (x[k] & y[j]);
  endfunction

endpackage
