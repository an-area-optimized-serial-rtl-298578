# Slice-serial ICEPOLE permutation core

ICEPOLE-128 is an authenticated-encryption scheme built as a duplex: a
1280-bit state is repeatedly XORed with data blocks of up to 1024 bits and
scrambled by a permutation made of rounds

    R = kappa o psi o pi o rho o mu

A fully parallel round needs logic for all 1280 bits at once. This core goes
the other way, for small area: it keeps the state in plain shift registers and
pushes it through a single 20-bit datapath, one *slice* per clock cycle. Four
of the five round steps only ever look at one slice at a time; the fifth
(rho) only moves bits along a word, which the shift registers do by
themselves. The result is a core of roughly 1280 state flip-flops, 64
constant flip-flops, ~50 control flip-flops and a few hundred gates of
combinational logic, spending 127 cycles per round.

## State, slices and rows

The state is a 4 x 5 x 64 cube of bits `S[x][y][z]`: 20 words of 64 bits,
x = 0..3, y = 0..4. Throughout the RTL

* word `(x,y)` is register / slice bit `j = 5*x + y`;
* a **slice** is the 20 bits with the same `z` (`slice_t`, 20 bits);
* a **row** is the 5 bits of a slice with the same `x`, i.e. slice bits
  `[5x+4:5x]`. Bit `y` of a row is the coefficient of `X^y` when the row is
  read as an element of GF(2^5).

`icepole_state` holds the 20 words in 20 shift-enable registers. Slice `z` is
stored at bit `z` of every register. All registers shift towards the MSB, so
bit 63 of each register is the *head*: the slice being processed now. The new
slice enters at bit 0. One full pass of 64 shifts visits the slices in the
order z = 63, 62, ..., 0 and leaves each slice back at its own bit position.

## What each step needs

| step | works on | how the core does it |
|------|----------|----------------------|
| mu   | slice -> slice | `icepole_mu`: 4x4 matrix over GF(2^5), XORs only |
| rho  | word -> word   | each word register rotates by its own offset (word enables) |
| pi   | slice -> slice | wiring inside `icepole_slice_dp` |
| psi  | row -> row     | `icepole_psi`: four 5-bit s-boxes, one slice per cycle |
| kappa| word S[0][0]   | constant XORed one bit per slice (`icepole_kappa`) |

* **mu** multiplies the four rows `Z0..Z3` by

      | 2  1  1  1 |
      | 1  1 18  2 |
      | 1  2  1 18 |
      | 1 18  2  1 |

  modulo `X^5 + X^2 + 1`. Multiplying by 2 is a shift with a conditional XOR
  of `00101`; 18 = `X^4 + X` is built from four such steps.
* **rho**: `S'[x][y][z] = S[x][y][(z + r(x,y)) mod 64]`. A left rotation of a
  register gives `S'[z] = S[z-1]`, so word `(x,y)` is rotated
  `k = (64 - r(x,y)) mod 64` times. All words rotate in parallel in a 63-cycle
  rho pass, each stopping when it has done its own `k`. The offsets (in
  `icepole_pkg::RHO_R`) are

      x\y   0   1   2   3   4
      0     0  36   3  41  18
      1     1  44  10  45   2
      2    62   6  43  15  61
      3    28  55  25  21  56

* **pi** moves word `(x,y)` to `(x',y')` with `x' = (x+y) mod 4`,
  `y' = (x' + y + 1) mod 5`. Inside a slice this is a fixed bit permutation,
  no gates.
* **psi** on a row `M0..M4`:
  `Zk = Mk ^ (~M(k+1) & M(k+2)) ^ (all bits 0) ^ (all bits 1)`, indices mod 5.
* **kappa** XORs a 64-bit round constant into `S[0][0]`; in slice-serial form
  this is one constant bit into slice bit 0 per cycle.

## The pass schedule

An operation of the core is a sequence of *passes* over the state, driven by
`icepole_ctrl`:

1. **LOAD** (64 slice cycles, more if the data source stalls). The head slice
   is offered on `dout_o` (squeeze), combined with `din_i` if the command says
   so (absorb), and, if any rounds follow, run through mu: the first step of
   round 1.
2. For each round i:
   * **RHO** (63 cycles): per-word rotation.
   * **SLICE** (64 cycles): pi, psi and kappa finish round i; in the same
     cycle mu starts round i+1, except in the last round.

Folding mu of the next round into the slice pass of the current one is what
makes a round cost one slice pass plus one rho pass: 127 cycles. The
datapath for one slice (`icepole_slice_dp`) is therefore a chain of three
optional stages:

    head slice -> [pi -> psi -> kappa bit]  -> dout_o
                                            -> [XOR / overwrite with din_i]
                                            -> [mu] -> back into the state

### Cycle budget

With no stalls an operation has `64 + 127 * n_rounds` working cycles after the
`start_i` cycle, and `done_o` is high in the following cycle. A 1024-bit
block followed by the six-round permutation takes 827 cycles: 1.24 bits per
cycle, about 463 Mbit/s at 374 MHz. (Published figures for this architecture
on a Virtex-6 FPGA, 374 MHz and 468 Mbit/s, imply about 818 cycles per block.
The gap is schedule detail that is not known here.)

## Round constants: the kappa generator

The ICEPOLE definition describes its round constants as the output of a
64-bit LFSR with feedback polynomial `f(x) = 1 + x^60 + x^61 + x^63 + x^64`.
The published constants cannot come from a plain 64-bit LFSR with that
polynomial. This design makes them with two 32-bit registers `hi` and `lo`
and a nonlinear feedback path:

* **update** (one step to the next round's constant, a right shift):
  `hi <= {0, hi[31:1]}` (zero input) and
  `lo <= {hi[0] | fb, lo[31:1]}` with `fb = lo[0] ^ lo[1] ^ lo[3] ^ lo[4]`.
  Seen as one 64-bit word, this is a right shift in which bit 31 becomes
  the OR of the bit moving in from `hi` and the LFSR feedback.
* **shift** (serial output): `{hi,lo}` rotates left and bit 63 is the output,
  so the constant leaves MSB first. That is the order in which the slices
  pass (z = 63 first). After the 64 cycles of a slice pass the register is
  back where it started, ready for the next update.
* **load**: restart from the round-0 constant `0x0091A2B3C4D5E6F7`.

The first constants are `0091A2B3C4D5E6F7`, `0048D159E26AF37B`,
`002468ACF13579BD`, `00123456F89ABCDE`, ... Treat this generator as the
least certain part of the design (see *Trust and departures*).

The controller reloads the generator at `start_i`, updates it
`cmd.first_round` times during the LOAD pass, shifts it during every SLICE
pass and updates it once at the start of every RHO pass except the first.
A permutation can therefore start at any constant index, e.g. rounds 6..11.

## Interface of `icepole_core`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (state cleared to zero) |
| `start_i` | in | 1 | start an operation; sampled only when idle |
| `cmd_i` | in | `cmd_t` | command, sampled with `start_i` |
| `busy_o` | out | 1 | operation in progress |
| `done_o` | out | 1 | one-cycle pulse at the end |
| `din_i`, `din_valid_i` | in | 20, 1 | data slice (bit `5x+y` = word `S[x][y]`) and its valid |
| `din_ready_o` | out | 1 | high during LOAD when the command absorbs |
| `dout_o`, `dout_valid_o` | out | 20, 1 | state slice before data is combined, and its valid |

`cmd_t` (in `icepole_pkg`):

* `absorb`: combine `din_i` into the state during LOAD. The core then
  advances one slice only in cycles with `din_valid_i` high. A low valid
  stalls it.
* `replace[19:0]`: per word, 1 overwrites the word with `din_i`, 0 XORs.
  All ones loads a state. Replacing the rate words is the duplex decryption
  update. All zeros is the encryption update.
* `n_rounds` (0..15): rounds after LOAD. 0 gives a pure load/squeeze pass.
* `first_round`: index of the first round constant.

Slices are exchanged in the order z = 63 down to 0. Both a data source that
holds 64-bit words and a consumer of `dout_o` have to transpose between
words and slices. The core does no such reordering. This is the price of the
fast slice-wide port; a bit-serial port would need only a shift register but
would take 1280 cycles to load a state. `dout_o` needs no ready: the consumer
must take a slice in every cycle with `dout_valid_o` high.

Typical use for one ICEPOLE-128 block: `start_i` with `absorb=1`,
`replace=0` (or the rate words for decryption), `n_rounds=6`. Feed the 64
slices of the block, with zeros in words that are not data, and collect
`dout_o`: it is the keystream to XOR with the block.

## Module hierarchy

    icepole_core
    ├── icepole_ctrl       pass sequencer, handshake, all enables
    ├── icepole_state      20 x 64-bit shift-enable registers
    ├── icepole_kappa      round-constant generator
    └── icepole_slice_dp   pi, psi, kappa bit, data port, mu
        ├── icepole_psi
        └── icepole_mu
    icepole_pkg            types (slice_t, cmd_t, phases), rho table, pi and GF helpers

The only parameter of the top is `KAPPA_START`, the round-0 constant. Sizes
(20 words of 64 bits) are fixed by the cipher and live in `icepole_pkg`.

## Trust and departures

Verified (all in simulation, against a separately written word-level
reference model in `tb/icepole_ref_pkg.sv`):

* every step unit against its reference (GF multiplication by generic
  shift-and-reduce, s-box exhaustively per row);
* the constant generator's sequence, serial bit order and 64-cycle return;
* the controller's pass lengths, per-word rotation counts, constant
  updates/shifts, mu enables, stalls and latency;
* the full core at its default parameters through loading, absorbing with a
  mixed replace mask under random stalls, six- and twelve-round
  permutations, squeezing and a duplex block, with exact cycle counts.

Not verified, and where this design departs from or goes beyond its source:

* **No official test vectors.** The reference model shares this design's
  reading of the cipher: the bit order inside a row, the rho offsets, the
  constant start value and the generator's OR feedback. If any of these
  differs from the ICEPOLE definition, core and model agree with each other
  and both are wrong. Check against official ICEPOLE known-answer tests
  before use.
* **The mode is not included.** Key/nonce/secret-message-number
  initialisation, padding, frame bits and tag extraction must be run by the
  host through the command interface.
* **Cycle count.** 827 cycles per six-round block, against about 818 implied
  by the published throughput; the exact published schedule is not known.
* **Flip-flop count.** 1390 flip-flops here. The published FPGA results list
  about 1620, which probably includes interface logic not modelled here.
* The state is built from flip-flops. Two follow-up optimisations are not
  built: mapping the state to shift-register LUTs (which roughly halves the
  FPGA slice count) and the reversed-endianness variant of rho/kappa that
  removes multiplexers.
* The command set, the valid/ready handshake, the replace mask, the reset
  values and the merging of mu into the slice pass are this design's own
  choices.

## Simulating

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. For example, the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/icepole_pkg.sv tb/icepole_ref_pkg.sv tb/tb_icepole_core.sv \
        --top-module tb_icepole_core
    ./obj_dir/Vtb_icepole_core

Replace `core` by `mu`, `psi`, `kappa`, `state`, `slice_dp` or `ctrl` for
the unit tests. All of them finish in well under a second.
`tb_icepole_core` runs the core at its default parameters.
