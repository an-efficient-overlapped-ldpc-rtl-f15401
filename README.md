# Overlapped LDPC decoder for an upper-dual-diagonal quasi-cyclic code

A sum-product LDPC decoder spends each iteration in two parts: the check node
update (CNU) and the variable node update (VNU). Each part needs the other's
results, so a plain decoder runs them one after the other and half of the
hardware is idle at any time. This decoder runs part of the VNU at the same time
as the CNU. It can do so because of the way the parity part of the
parity-check matrix is built (an *upper-dual-diagonal* structure). The schedule
is fixed and simple, and does not depend on the shift values of the code.

For the 2304-bit rate-1/2 WiMAX/WiBro-style code used here, one iteration takes
**25 clock cycles instead of 36** (30.6 % fewer). A complete 12-iteration decode
takes 302 cycles, counted from the initialisation cycle to the output strobe.

## The code

The parity-check matrix H is quasi-cyclic. It is described by a 12 x 24 *base
matrix*. Each entry stands for an L x L block, with L = 96 by default. An entry
is either a zero block or an identity matrix cyclically shifted by *s*. In that
block, check *i* of the block row connects to variable *(i + s) mod L* of the
block column.

* **Columns 0-11: information part H1.** These columns carry the IEEE 802.16e
  rate-1/2 shift values for z = 96. Their column degrees are 3 or 6, and their
  ones are spread over all rows.
* **Columns 12-23: parity part H2, upper-dual-diagonal.** Block row *r* has
  unshifted identity blocks in parity columns *r* and *r + 1*. The last row has
  one only in the last parity column:

  ```
          parity col  12 13 14 ... 22 23
          row  0       I  I
          row  1          I  I
          ...
          row 10                   I  I
          row 11                      I
  ```

Encoding is a back-substitution from the bottom row up, with no Gaussian
elimination: p11 = s11, then p_r = s_r xor p_(r+1), where s_r is the syndrome of
the information bits for block row r. The testbench encoder works this way.

The whole matrix lives in `rtl/ldpc_pkg.sv`. That file holds the table `H1`,
the function `base_shift` that adds the parity part, and constant functions
that derive the edge tables from them. There are 73 non-zero blocks
("edges"). A row has at most 7 of them and a column at most 6. For L < 96
the shifts are scaled to floor(s·L/96), the 802.16e rule. The testbenches
use this to run small instances. To use another code, replace `H1` and, if
needed, `MB`/`NB`. Everything else is computed from them.

**The H1 shift values are recalled from 802.16e and have not been checked
against the standard's text.** The decoder is correct for any shift table, but
check the table before claiming interoperability.

## The overlapped schedule (the key idea)

The hardware handles one block row of L check nodes, or one block column of L
variable nodes, per clock. Rows are always processed top to bottom. Because of
the upper-dual-diagonal shape, parity column 12+j touches only rows j-1 and j.
So as soon as row j has finished its CNU, column 12+j is ready. It can be
updated in the next cycle, while the CNU moves on to row j+1. The information
columns touch rows all over the matrix, so they must wait for the last row.

| step t | CNU (block row) | VNU (block column) |
|---|---|---|
| 0 | row 0 | — |
| 1 … 11 | row t | parity column 12+t−1 (its rows t−2, t−1 are done) |
| 12 | — | parity column 23 |
| 13 … 24 | — | information column t−13 |

That is 1 + 11 overlapped + 13 = 25 steps per iteration, against 12 + 24 = 36
for rows-then-columns. In each step the row and the column never share an edge.
Every column is read only after all of its rows were written in an earlier
cycle. Every row of the next iteration is read only after all of its columns
were written. The decoder therefore gives exactly the same results as a
textbook *flooding* sum-product decoder. The end-to-end testbench relies on
this and compares the two bit for bit.

An ordinary (lower) dual-diagonal parity part would make the first parity
column depend on rows 0 and 1. The overlap would then start one step later and
save only 10 steps per iteration. The upper form saves 11.

The same 25-step pattern holds for any MB x NB matrix of this shape. The
savings are MB−1 steps out of MB+NB. The original publication quotes larger savings for
rates 2/3, 3/4 and 5/6 (22.9 %, 18.3 %, 13.1 %) than this schedule gives
(21.9 %, 16.7 %, 10.7 %). Only the rate-1/2 figure (30.6 %) is matched, and it
is the one the latency results refer to.

## Block structure

```
in_llr ──► ldpc_init_buffer ──(1-cycle copy)──► ldpc_msg_regfile ◄──► ldpc_cnu_block
 (L LLRs/beat)                                   edge messages   ◄──► ldpc_vnu_block
                                                 channel LLRs
                     ldpc_ctrl ── row / column selects, write enables
                                                 decision register ──► hard_out
```

* **`ldpc_init_buffer`** collects one codeword, one block column (L LLRs) per
  valid/ready beat, for 24 beats. It then hands the whole codeword over in a
  single cycle. The next codeword can be loaded while the current one is
  decoded. It also saturates -32 to -31.
* **`ldpc_msg_regfile`** holds one 6-bit register per edge and lane, 7008 at
  L = 96. At any time a register holds either the variable-to-check or the
  check-to-variable message. Each edge is first overwritten by its row's CNU
  and later by its column's VNU, so one register is enough. Messages are
  stored in variable order. The check port applies each edge's cyclic shift as
  fixed wiring, because the shifts are constants. There are two independent
  ports:
  * the check port reads and writes a whole block row;
  * the variable port reads and writes a whole block column, plus the channel
    LLRs and the decision register.

  An assertion checks that the two ports never hit the same edge in one cycle.
* **`ldpc_cnu_block`** has L lanes and is combinational. Per lane it computes
  the sum-product check update in the phi domain. It sums phi(|q|) over the
  row, then subtracts each input's own term and applies phi again. The output
  sign is the XOR of the other inputs' signs.
* **`ldpc_vnu_block`** has L lanes and is combinational. For each lane it
  computes total = channel + Σ incoming messages. Each edge gets total minus
  its own message, saturated. The decision bit is the sign of total.
* **`ldpc_ctrl`** runs the table above for N_ITER iterations (12 by default).
  It enables decision writes in the last iteration, and it keeps step counters
  for observation.
* **`ldpc_decoder`** is the top level and wires the blocks together.

### Number format

All messages and LLRs are 6-bit two's complement with 2 fractional bits
(range ±7.75), saturated to ±31 so that negation is always exact. A positive
LLR means bit 0.

phi(x) = −ln(tanh(x/2)) is a 32-entry table: `phi_q(k) = min(31, round(4·phi(k/4)))`,
with `phi_q(0) = 31`. The table is coarse: phi(x) rounds to 0 from x = 3.0 up.
Wider messages or a finer phi grid would decode better. Changing them means
editing `W` and `phi_q` in the package.

## Interface and timing of `ldpc_decoder`

Parameters:

| parameter | default | meaning |
|---|---|---|
| `L` | 96 | expansion factor, which is also the number of lanes |
| `N_ITER` | 12 | number of decoding iterations |

Ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | input handshake; a beat is taken when both are high |
| `in_llr` | in | L × 6 | channel LLRs of block column c (variables c·L … c·L+L−1), columns 0…23 in order |
| `busy` | out | 1 | update steps running |
| `out_valid` | out | 1 | one-cycle pulse: `hard_out` holds the result |
| `hard_out` | out | 24 × L | decided code bits, `[c][j]` = bit c·L+j; columns 0–11 are the information bits |
| `iter` | out | 8 | current iteration |
| `n_cnu`, `n_vnu`, `n_overlap` | out | 16 | steps with a CNU, a VNU, and both at once, for the current or last decode |

Timing:

* The cycle after the 24th beat is the initialisation cycle, provided the
  decoder is idle.
* Then come N_ITER × 25 busy cycles.
* `out_valid` follows one cycle later: 2 + 25·N_ITER = 302 cycles from the
  initialisation cycle, counted inclusively.
* If the next codeword was loaded during the decode, the next initialisation
  cycle immediately follows the last busy cycle. Back to back, that is one
  codeword every 301 cycles.
* `hard_out` stays valid until the last iteration of the next codeword begins.

There is no early termination: the number of iterations is fixed.

For other code rates using shortening and puncturing, no extra hardware is
needed:

* feed shortened (known-zero) bits as +31;
* feed punctured bits as 0.

## Performance against the reference numbers

| quantity | target | this RTL |
|---|---|---|
| cycles per iteration, overlapped vs rows-then-columns | 25 vs 36 | 25 vs 36 |
| 12-iteration decode at 100 MHz | 3,040 ns | 3,020 ns (302 cycles) |
| back-to-back rate at a 13 ns clock (target 531 Mbps) | 531 Mbps | 2304 bits / (301 × 13 ns) = 589 Mbps |

Gate counts and power (a 90 nm synthesis, voltage scaling to 0.7 V) are not
reproduced by RTL simulation.

## How far it can be trusted

Each block has a self-checking testbench in `tb/` that compares the block
against values computed independently in the testbench:

| testbench | what it checks |
|---|---|
| `tb_ldpc_cnu_block` | 3000 random vectors against the SPA rule, with phi computed in floating point |
| `tb_ldpc_vnu_block` | 3000 random vectors, saturation included |
| `tb_ldpc_ctrl` | the schedule against the data dependencies of H (not against a copy of the step table), once per row and column per iteration, 25 cycles and 11 overlaps per iteration, latency |
| `tb_ldpc_init_buffer` | filling with gaps, backpressure when full, -32 saturation, one-cycle take |
| `tb_ldpc_msg_regfile` | every row and column port read and write against its own expanded-matrix model, including a simultaneous row and column write |
| `tb_ldpc_decoder` | L = 24, 6 frames streamed back to back (details below) |
| `tb_ldpc_decoder_full` | default size (L = 96, 2304 bits, 12 iterations), one frame with about 190 channel errors (details below) |

`tb_ldpc_decoder` runs at L = 24 with the full 12 iterations:

* every decision is compared with a flooding reference decoder (`tb/ldpc_ref_pkg.sv`);
* low-noise frames must decode to the codeword that was sent;
* it checks busy-cycle counts, the one-cycle gap between decodes, and the step counters;
* it counts overlap steps, loads during a decode, back-to-back starts, input saturation and corrected frames.

`tb_ldpc_decoder_full` checks that the result matches the reference decoder bit
for bit and equals the codeword that was sent. It also checks the 302-cycle
latency.

What is not verified:

* the decoding performance (BER against Eb/N0) of the chosen fixed-point format;
* the 802.16e shift values themselves.

## Departures and choices

The following come from the design this RTL implements:

* the upper-dual-diagonal parity structure;
* a 12 × 24 base matrix with L = 96;
* one block row or column of L nodes per clock;
* a one-cycle buffered initialisation;
* 12 fixed iterations;
* the overlap of the CNU of rows 2…12 with the VNU of the parity columns.

The following were chosen here:

* the storage organisation (one shared register per edge, variable order, fixed rotations);
* the 6-bit message format and the phi table;
* the column-per-beat input with valid/ready;
* the registered `out_valid`;
* the observation counters;
* the L-scaling of the shifts;
* the exact step order of the information columns (0…11, after the last parity column).

The codeword length is the build-time parameter `L`. The original publication
stresses that the structure suits variable codeword lengths. Switching the
length at run time, as 802.16e does for z = 24…96, would need run-time
barrel shifters in place of the fixed rotations, and that is not built.

The rows-then-columns decoder used as the comparison baseline is not included.

## Simulating

Plain Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ldpc_decoder \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv rtl/ldpc_init_buffer.sv rtl/ldpc_ctrl.sv \
  rtl/ldpc_msg_regfile.sv rtl/ldpc_cnu_block.sv rtl/ldpc_vnu_block.sv \
  rtl/ldpc_decoder.sv tb/tb_ldpc_decoder.sv
./obj_dir/Vtb_ldpc_decoder
```

* Swap the top module and the last file to run another testbench.
* Each testbench ends with `TB_RESULT checks=N failures=M`.
* The full-size testbench builds in about half a minute and simulates in well
  under a second.
