# Secure digital in-memory-compute macro

A digital in-memory-compute (IMC) macro computes neural-network dot products
next to the SRAM that holds the weights. This design protects such a macro
against two kinds of attacker:

* **Side-channel attacks.** The attacker measures supply current or EM
  emissions and correlates them with the data. Every secret bit in the datapath
  (weights, activations, partial sums, the cipher key and the cipher state) is
  carried as three Boolean shares whose XOR is the bit. The logic works on the
  shares so that no gate sees all three shares of a value. The arithmetic is
  chosen so that it needs **no fresh random bits while running**. The only
  randomness is 10 guard bits loaded once into the cipher.
* **Bus probing.** The attacker reads the model as it crosses the bus from
  external memory. Weights are stored off chip encrypted with ASCON-128. They
  are decrypted inside the macro, and the decryption itself runs on shares.
  Because the plaintext leaves the cipher in shares, it goes into the array in
  shares and is never formed in the clear. The cipher key is not stored
  anywhere: it comes from the macro's own SRAM cells used as a physically
  unclonable function (PUF).

The rest of this file covers how the shared arithmetic works, then the key
generator and the cipher, then how to use and simulate the RTL, and last
where the RTL departs from the original macro and what it leaves out.

## Number format: why the multiplier is an XNOR

A one-bit product in the usual {0,1} encoding is an AND. Sharing an AND needs
extra random bits and registers (about 48 gate equivalents per multiply). This
macro gives every bit the value **+1 (bit = 1) or -1 (bit = 0)**. The product
of two such digits is their XNOR. XNOR is linear, so it is computed share by
share (share A inverted, shares B and C plain XOR). That needs no randomness
and no register.

An n-bit word `d` then stands for `sum_k 2^k (2 d_k - 1)`. This format holds
the odd numbers from -(2^n - 1) to 2^n - 1. A two's-complement odd value `X`
converts to `d = (X + 2^n - 1) / 2`. Weights and activations must be in this
format before they are encrypted or shared; the macro does not convert them.

For weight column `j` and B-bit activations, the hardware computes

    A_j = sum_k 2^k * popcount_over_rows( xnor(act_bit_k, w_j) )

The dot product of the signed digits is `D_j = 2 A_j - ROWS (2^B - 1)`.
`output_decode` applies this formula and then merges adjacent columns into
multi-bit weights. For P-bit weights, `result_g = sum_{j<P} 2^j D_{gP+j}`.

## The shared datapath

    activation shares (per row) ──► shared_xnor_array ──► csa_adder_tree (x16) ──► bitserial_accumulator (x16) ──► output_decode
    weight shares (imc_sram)    ──┘        (comb.)          9 registered levels          1 register                   1 register

### Full adders only (`shared_full_adder`, `csa_adder_tree`)

The sum output of a full adder is linear, so it is shared share by share. The
carry is a majority function, `ab ^ bc ^ ca`. Each of its AND terms is shared
as a threshold implementation: output share i uses only input shares i+1 and
i+2. Half adders are avoided. A half adder is a full adder with one input tied
to a known zero, and its shared outputs are not uniform without random
refreshing.

The popcount tree is a Wallace reduction over the 64 product bits of a column.
At each level a column of height h gets h/3 full adders. Its h mod 3 leftover
bits move down to the next level unchanged, and the carries move up one
column. Every level is registered, so glitches in one level's carry logic
never feed the next non-linear level. For 64 inputs the tree has **9 levels**.
It stops once no column holds more than two bits; only column 0 still has two.
The final addition is left to the accumulator. `secure_imc_pkg::csa_height`
and `csa_levels` compute the column heights at elaboration time, and the
generate loops in `csa_adder_tree` build the tree from them.

### Bit-serial accumulator (`bitserial_accumulator`)

Activations are applied one bit per clock, most significant bit first. The
accumulator keeps a shared carry-save pair (S, C) and computes
`acc = 2*acc + count` with one row of shared full adders. This row also does
the tree's last reduction: bit 0 of the doubled carry word is always free, so
the tree's second column-0 bit goes there, and no fourth operand is needed. On
the MSB step the count is **loaded** rather than added to an all-zero
accumulator. Adding known zero shares would leak.

Pipeline depth from an activation bit to the accumulator is 10 registers (9
in the tree plus 1 in the accumulator). The decoder adds one more clock.
`res_valid` rises B + 10 clocks after the clock edge that accepts
`cmp_start`.

### Output (`output_decode`)

The decoder recombines the shares, adds S + C, applies the format offset and
merges columns. It is the edge of the protected domain. Its outputs are the
signed results: 4 results for 4-bit weights, 2 for 8-bit, and 1 for 12-bit or
16-bit weights.

## PUF key generation (`imc_sram`, `puf_cell_model`, `tmv_keygen`)

The IMC array doubles as the PUF. One evaluation of a row has four steps:

1. **Secure write reset.** A fixed value is written to the row, so the
   evaluation does not depend on the data that was there before.
2. **Settle.** The feedback in the cells is cut and reconnected. Each cell
   settles to 0 or 1, depending on which side its local mismatch favours.
   `puf_cell_model` is a behavioural stand-in for this analog step. It gives
   each cell a fixed hashed mismatch and adds pseudo-random noise on every
   evaluation. The noise is a hash of the cell and an evaluation counter.
3. **Capture.** The settled values are written into the row.
4. **Read.** A 4-bit column group of each of the three shares is read. The
   read returns the data and its complement, like the two sides of a
   differential sense amplifier.

Each key share bit is a different cell, so the 128-bit key exists **only as
three shares**. Cells with little mismatch are noisy, so each 4-bit group is
evaluated E times and a majority vote is taken (temporal majority voting). The
vote depth is E = 2^(s+1) - 1, which gives 1, 3, 7, 15 or 31 evaluations
(`vote_sel` = s). The count in a 5-bit counter then never exceeds E. Bit s of
the counter is therefore exactly the majority decision, and a 5:1
multiplexer picks it.

A second set of counters counts the complement read. It shifts into a
complement key (`keyb`) register, so the switching activity does not depend on
the key value. `keyb` has no other use and is left unconnected in the top.

The decisions shift 4 bits at a time into 128-bit shift registers, one per
share. Group g uses row `key_row_base + g/4` and column group `g mod 4`. A
key therefore takes 8 rows, and different base rows give different keys. One
key costs 32 x (5E + 1) clocks.

The key must be enrolled once: in a trusted setting the model owner learns it
and encrypts the model with it. The testbench does this by reading the key
generator's registers. No error correction is done on chip. The key is only
as stable as majority voting makes it, and an external code (for example
BCH) is expected to handle the rest.

## Masked ASCON-128 (`ascon_ti`, `ascon_ti_round`)

ASCON's S-box is an affine map, then the chi map
`x_w ^= ~x_{w+1} & x_{w+2}` over five bits, then another affine map. The
affine parts, the round constant and the diffusion layer are computed share
by share; constants and inversions go into share A only. Chi is shared with
the same non-complete AND sharing as the full adder.

A 3-share chi on its own is not uniform. Uniformity comes from the "changing
of the guards" method. S-box i adds shares A and B of the chi input of S-box
i-1 to its outputs:

    A' ^= B_(i-1)
    B' ^= A_(i-1)
    C' ^= A_(i-1) ^ B_(i-1)

These added terms cancel, so the result is unchanged. S-box 0 takes its guards
from a 10-bit register. That register is seeded once from `guard_seed` (SPI
registers 0x06/0x07) after reset. From then on it is refilled each round from
S-box 63.

One round runs per clock, and the state is registered after every round.
Decryption follows standard ASCON-128 with a 64-bit rate and no associated
data:

* Initialise: 12 rounds.
* Each ciphertext word: `P = x0 ^ C`, then 6 rounds.
* After the last word: pad an empty block, then 12 rounds.
* Compare the tag.

Each plaintext word leaves in shares. When the ciphertext replaces x0, the
new share A becomes `C ^ x0B ^ x0C`, and shares B and C keep their random
values. Only the tag is recombined, for the compare. A message of n words
sent without gaps takes 26 + 7n clocks. A testbench checks the unprotected
reference model (`tb/ascon_ref_pkg.sv`) against the published ASCON-128
known answer for key = nonce = 00..0F.

## Top level (`secure_imc_macro`) and how to drive it

| Step | Ports | What happens |
|---|---|---|
| configure | `spi_*` (mode 0, 16-bit frames `{w, addr[6:0], data[7:0]}`, sclk < clk/4) | registers: 0x00 bit0 start key generation, 0x01 vote depth, 0x02 key base row, 0x03 weight precision (0..3 = 4/8/12/16 b), 0x04 activation bits (1..8), 0x05 status (read only), 0x06/0x07 guard seed |
| key | `key_valid` | key generation runs in the array rows it is given |
| weights | `dec_start`, `nonce`, `tag_in`, `wt_row_base`, `ct_valid/ct_ready/ct_data/ct_last`, `dec_done`, `tag_ok` | each plaintext word fills 4 rows (most significant 16 bits first) from `wt_row_base` on; 16 words fill the array |
| activations | `act_wr_en`, `act_wr_row`, `act_wr_sh[3][8]` | one row's activation, already in 3 shares, per clock |
| compute | `cmp_start`, `cmp_busy`, `res_valid`, `res[4]` | signed results for the configured precisions |

Key generation overwrites the rows it uses, so run it before loading
weights. Plaintext is written as it is decrypted, and `tag_ok` comes at the
end. A user must therefore discard the weights if `tag_ok` is 0.

Default size: 64 rows x 16 weight-bit columns (`secure_imc_pkg::ROWS`,
`COLS`). `NROWS` and `NCOLS` are parameters of the top. The pipeline depth
follows from `NROWS` automatically.

## Simulating

Every module in `rtl/` except the package and the cipher round (tested
through `ascon_ti`) has a self-checking testbench `tb/tb_<module>.sv` that
prints `TB_RESULT checks=N failures=M`. For example, for the whole macro at
its default size:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
      rtl/secure_imc_pkg.sv tb/ascon_ref_pkg.sv tb/tb_secure_imc_macro.sv \
      --top-module tb_secure_imc_macro -Mdir obj && ./obj/Vtb_secure_imc_macro

(`-y` lets verilator find each module in the file of the same name; the
packages are listed first.) The other testbenches build the same way with
their own top module.

The end-to-end test runs at the default parameters. It builds in about 1.5
minutes and runs in under a second. Concurrent assertions in `ascon_ti`
(ciphertext handshake) and `tmv_keygen` (counter bound, true and complement
decisions agree) are checked during every simulation built with `--assert`. It does the following:

* generates a key from rows 8-15, then the key of rows 40-47 twice, with
  vote depths 3 and 31; the two keys from the same rows must nearly agree,
  and keys from different rows must differ in about half their bits;
* decrypts a random weight array once with a wrong tag and once with the
  right one;
* computes with all four weight precisions and with 1- to 8-bit
  activations;
* compares every result with a dot product computed directly from the
  operands;
* checks the compute latency.

The other testbenches cover their blocks alone. They include an exhaustive
check of the full adder and its non-completeness, a streaming check of the
tree (values and the 9-clock latency), PUF statistics, and majority voting
against a model array with injected minority errors.

## Departures and limits

* **Array size, register map and interfaces** are this design's own. The
  original macro's dimensions are not known. 64 rows were chosen because they
  give its 10-register datapath latency.
* **Half adders in the accumulator.** In three places the accumulator's
  full-adder row gets known-zero inputs: bit 0 of 2S, bit 1 of the doubled
  carry word (zero on every step but the second), and the bits above the
  tree's width. These adders act as half adders there. The original
  accumulator avoids half adders completely with a "modified" carry-save
  format whose details are not available.
* **The security properties are not proven here.** The testbenches check
  functional correctness. They also check non-completeness of the
  full-adder sharing. They do not check uniformity of the carry sharing or of
  the cipher's guard wiring, and they do no leakage assessment. The exact
  guard wiring used in the original cipher is not known; the one here is
  correct by construction and non-complete.
* **Format conversion** of weights and activations into the +-1 digit form
  is left to the sender, because activations arrive already in shares.
  Column merging happens in `output_decode`, after the shares are
  recombined.
* **Analog parts are modelled.** The bitcells, bitlines and sense amplifiers
  appear as a register array (`imc_sram`) plus a behavioural model of the
  settling cells (`puf_cell_model`). The model only stands in for the
  cells; its hashed mismatch and noise are not hardware. No error correction for the key is included.
