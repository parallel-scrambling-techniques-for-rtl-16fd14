# Parallel scramblers for SDH and ATM line signals

SDH and ATM links scramble every transmitted bit with a pseudo-random
sequence. The sequence comes from a small shift register generator (SRG)
clocked at the line rate: 622.08 Mb/s for STM-4 and 2488.32 Mb/s for STM-16.
This RTL does the same scrambling at a fraction of that rate. The line bit
stream is treated as N interleaved low-rate streams. Each stream is scrambled
with its own sub-sequence, and all N sub-sequences come from one
*parallel shift register generator* (PSRG). Everything runs at the base rate.
For SDH that is the STM-1 rate, one bit per lane per clock at 155.52 MHz. For
ATM it is one byte per clock at 19.44 or 77.76 MHz. The line signal stays bit
for bit the one a serial scrambler would produce, so the far end cannot tell
the difference.

The method follows Kim and Lee, *Parallel Scrambling Techniques for SDH and ATM
Transmissions*. Three applications are built, and the top module
`parallel_scrambling_top` places them side by side:

| Application | Scrambler type | Generator | Base rate |
|---|---|---|---|
| SDH STM-N link (default STM-4) | frame synchronous, x^7+x^6+1 | (8,N) PSRG | 1 bit/lane/clock |
| SDH-based ATM (STM-1 or STM-4 frames) | frame synchronous, x^7+x^6+1 | (1,8) PSRG | 1 byte/clock |
| Cell-based ATM | distributed sample scrambler (DSS), x^31+x^28+1 | (1,8) PSRG plus a correction circuit | 1 byte/clock |

## 1. The parallel shift register generator (`psrg`)

### What it must produce

Let s_0, s_1, ... be the serial scrambling sequence. An (M,N) PSRG produces N
sequences T_0 … T_{N-1}, one bit of each per clock. If you take M bits of T_0,
then M bits of T_1, and so on up to T_{N-1}, and then start again with T_0,
you get s back. In terms of indices, T_i at clock k is
`s[(k/M)*M*N + i*M + k%M]`.

- **SDH, M = 8.** The N AUG signals are byte interleaved. Lane i carries bytes
  i, i+N, i+2N, … of the STM-N stream, so lane i needs exactly T_i.
- **ATM, M = 1 and N = 8.** The byte stream is treated as 8 bit-interleaved
  streams. Bit j of each byte is then scrambled with T_j.

### How it is built

T_0 is itself a sequence of period 2^L−1, spread out by a factor of M. It can
be generated by a single SRG of length M·L whose characteristic polynomial is
C(x^M), where C is the serial polynomial. This register is kept as a vector u:

- u[n] holds T_0 advanced by n clocks, so u[0] is the present output.
- Each clock, u shifts down by one.
- The new top bit is u[0] XOR the u[L·M − i·M] for which c_i = 1.

Every other output is a fixed XOR of the taps u[j·M] (j = 0 … L−1). The
tap set of T_i is read from the coefficients of the polynomial

    x^(i·M·m)  mod  G(x)

In this polynomial:

- G(x) = x^L·C(1/x) is the reciprocal of the serial polynomial.
- m is the inverse of M·N modulo the period 2^L−1.

For every configuration used here M·N is a power of two. m is then a power of
two as well, and the decimated sequences keep the same polynomial.

The initial contents follow from the same picture. u[n] must be
`s[(n/M)*M*N + n%M]`, with s started from the serial reset state.

### Tables are computed, not stored

No tap table or initial state is written into the RTL by hand.
`scr_pkg` holds constant functions that compute, at elaboration, from
(L, C, seed, M, N):

- the tap masks (`psrg_tap`),
- the initial state (`psrg_init`),
- one register step (`psrg_step`).

Other sizes therefore need only a parameter change. For the STM-4 case the
functions give the following:

| Output | Taps (U_n = u[n]) |
|---|---|
| T_0 | U_0 |
| T_1 | U_8 + U_16 + U_32 |
| T_2 | U_8 + U_32 |
| T_3 | U_8 + U_24 + U_48 |

The (8,4) initial state (56 bits, from the output end) is
`11111110 11100100 00011100 10001101 11111100 11001000 00111000`. The (1,8)
initial state for x^7+x^6+1 is `1000101`. The testbench checks both values
against the published generator.

### Interface

The generator has the following control inputs:

- `load` forces the initial state into the register on the next clock.
- `adv` steps the register.
- `corr` is XORed into the next state. The DSS descrambler uses it for its
  corrections.

`lane[i]` is T_i for the present clock (combinational). `state` exposes u so
that it can be sampled. Reset loads the initial state.

There are two limits, both checked by assertions at elaboration:

- M·N must be a power of two.
- M·L may be at most 64.

For example, (8,4) and (8,16) give 56 flip-flops, and the DSS (1,8) generator
gives 31.

### The modular form (`psrg_msrg`)

The same outputs can also come from a modular register (a Galois LFSR), which
`psrg_msrg` implements. The register is w[0..ML−1], and its output stage
w[ML−1] carries T_0. Each clock:

- the register shifts one stage towards the output;
- the bit shifted out re-enters at stage 0;
- that bit is also XORed into every stage j·M for which G(x) = x^L·C(1/x) has
  the term x^j.

The generating polynomial is therefore G(x^M); for (8,4) that is
x^56 + x^8 + 1.

The output taps are derived from the simple form. A simple-register tap u[n] is
"the output n clocks from now", which is a fixed linear function of w: row n of
a matrix P whose first row selects the output stage and whose later rows follow
one register step each. Tap mask b_i = Pᵀ·a_i, where a_i is the simple-form tap
mask of T_i.

The initial state is solved stage by stage from the output end, so that the
first ML outputs equal those of T_0. Row k of P has its leading one at stage
ML−1−k, which makes this a triangular solve.

Numbering the stages W_i = w[ML−1−i] from the output end, the STM-4 case gives:

| Output | Taps |
|---|---|
| T_0 | W_0 |
| T_1 | W_8 + W_16 + W_32 |
| T_2 | W_8 + W_32 |
| T_3 | W_0 + W_8 + W_24 + W_48 |

The initial states the testbench checks are:

| Generator | Initial state (output end first) |
|---|---|
| (8,4) | `… 11001000 11000110` (the last 8 bits differ from the simple form) |
| (1,8) | `1000100` |
| serial modular register | `1111110` |

At the top level the transmitters use the simple form and the two frame
synchronous receivers use the modular form (`RX_MSRG = 1`), so every loop-back
also checks that the two forms agree. Setting `MSRG` on `sdh_par_rx` or
`fss_byte_scrambler` selects the form; it is 0 (simple) by default at those
blocks.

## 2. SDH STM-N link (`sdh_par_tx`, `sdh_par_rx`)

### Where the scrambler sits

A serial SDH transmitter byte-interleaves N AUGs with the section overhead
(SOH) and then scrambles the whole STM-N signal. The parallel transmitter does
these steps in a different order. The SOH is inserted into each lane first. Each
lane is then scrambled with its T_i. Only after that are the lanes
byte-interleaved. The receiver does the same in reverse: demultiplex, then
descramble each lane, then remove the SOH.

Transmitter chain (`sdh_par_tx`):

```
aug_bit[N], soh_bit[N] -> soh_insert -> XOR T_i (psrg 8,N) -> byte_interleave_mux -> line_word[8N]
```

Receiver chain (`sdh_par_rx`):

```
line_word[8N] -> byte_interleave_demux -> XOR T_i (psrg 8,N) -> soh_remove -> aug_bit[N], soh_bit[N]
```

### Frame layout per lane

Lane byte c of a row becomes STM-N column c·N + lane. Each lane frame is
therefore 9 rows × 270 bytes:

- Lane columns 0–8 are the lane's share of the 9·N SOH columns.
- The SOH occupies rows 1–3 and 5–9.
- Row 4 of those columns carries the AU pointers and comes with the AUG data.
- The first 9 bytes of row 1 in every lane make up the first 9·N bytes of the
  frame. These are the framing and identification bytes, and they are sent
  unscrambled.

`stm_frame_timer` counts row, column and bit and provides these flags:

- `in_soh`: the bit belongs to the SOH.
- `unscrambled`: the bit is in the first 9·N bytes of the frame.
- `frame_start`: first bit of the frame.
- `byte_last`: last bit of a byte.

The PSRG holds its initial state while the unscrambled bytes pass. The first
scrambled bit is therefore scrambled with the reset state 1111111 of the serial
scrambler, and the line signal equals that of a serial x^7+x^6+1 scrambler
reset at byte 9N+1.

### Timing

- **Lanes.** Each lane is one bit per clock, MSB of each byte first.
- **Line side.** One N-byte word every 8 clocks, byte 0 first. `line_fs` marks
  the first word of a frame. The serializer to the real line is not part of
  the design.
- **Transmitter.** `aug_rd` and `soh_rd` tell the source which stream was
  consumed in this clock.
- **Receiver.** The receiver's frame timer is aligned by `line_fs`.
  From that frame on it produces:
  - `aug_bit` with `aug_valid`, and `aug_fs` marking the first AUG bit of each
    frame;
  - `soh_bit` with `soh_valid`.

### Not included

Frame alignment (the A1/A2 search) is not part of the design. The receiver
expects `line_fs` from an external framer.

## 3. SDH-based ATM frame scrambler (`fss_byte_scrambler`)

Here the STM-1 or STM-4 signal is one serial stream and there is no lane
structure. The byte stream is treated as 8 bit-interleaved streams, and each
byte is XORed with the 8 outputs of a (1,8) PSRG: bit 7 (sent first) with
T_0, …, bit 0 with T_7. Because descrambling is the same operation, one module
serves both directions.

The frame length is set by `STM_N`:

| STM_N | Bytes per frame | Unscrambled bytes | Byte clock |
|---|---|---|---|
| 1 | 2430 | 9 | 19.44 MHz |
| 4 | 9720 | 36 | 77.76 MHz |

A byte counter is synchronised by `in_fs`. The generator is held in its
initial state during the unscrambled bytes. The output is registered, with
one clock of latency.

## 4. Cell-based ATM distributed sample scrambler

### Why it needs correction logic

A cell-based link has no frames to reset the generator on. The DSS instead
sends two samples of the scrambler state in every cell. The descrambler uses
them to pull its own generator into step.

### The scrambler (`dss_par_scrambler`)

The generator is a free-running 31-stage (1,8) PSRG for x^31+x^28+1. One cell
is 53 bytes, so the same sampling point comes round every α = 53 clocks. In
the HEC byte of each cell the scrambler places two samples:

Take t as the serial position of the HEC byte's first bit.

- **HEC bit 8.** The sequence bit s(t−211), 211 bit times before the HEC byte
  starts. This is output T_5 of 27 byte clocks earlier.
- **HEC bit 7.** The sequence bit s(t+1), the one belonging to the HEC byte's
  second bit position. This is T_1 now.

The old sample is not kept in a delay line. It is computed from the present
state, because the state 27 steps back is a linear function of the present
state: the sampling vector v0 is multiplied by T^−27, where T is the
generator's transition matrix.

Each cell byte is handled as follows:

- **Header bytes 0–3 and the 48 payload bytes** are XORed with the PSRG
  outputs.
- **The HEC byte** is not scrambled. It is computed as CRC-8 (x^8+x^2+x+1) over
  the four scrambled header bytes, XOR 0x55, and the two samples are then added
  into its top two bits.

### The descrambler (`dss_par_descrambler`)

The descrambler runs its own PSRG from an arbitrary state. In each cell it
does the following:

1. It recovers the transmitted samples from the HEC byte by removing the CRC
   of the received header and the 0x55 coset.
2. It computes the same two samples from its own state.
3. It takes the differences diff0 and diff1.
4. BETA clocks after the sampling time it XORs diff0·c0 ⊕ diff1·c1 into its
   state.

The differences are linear in the state error e. With suitable vectors c0 and
c1, sixteen rounds of "sample, compare, correct" drive e to zero. The vectors
are:

    Δ  = [v0; v1; v0·T^α; v1·T^α; …]    (2J rows, J = 16; first row dropped -> Δ0, 31×31)
    c_s = T^((J−1)α+β) Δ0^-1 e_(29+s)  (+ a u-dependent term, u ∈ {0,1})

Δ0 is the matrix of sampling vectors with its first row dropped. It is
invertible, and with this choice the residual correction matrix is exactly
zero. Without line errors, the descrambler state therefore equals the
scrambler state after at most 16 cells, whatever state it started from.
`scr_pkg::dss_corr_vec` computes c0 and c1 at elaboration, together with the
matrix power and the inverse.

The descrambler has these parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `BETA` | 1 | correction delay, any value 1–53 |
| `U_SEL` | 0 | the free bit u in the correction vectors |
| `LOCK_CELLS` | 4 | length of the lock indicator's run |

Outputs:

- `locked` is high once the sample pairs have agreed for LOCK_CELLS cells in a
  row.
- `corr_event` marks every nonzero correction.
- The descrambled cell is output with its HEC byte recomputed over the clear
  header.

One bit error in a HEC sample makes the descrambler apply a wrong correction.
It then recovers within the next 16 cells. The testbenches show this.

### Not included

Cell delineation is not included. `cell_start` must mark byte 0 of every cell.

## 5. Top level (`parallel_scrambling_top`)

The top holds six units side by side, with every port brought out under the
prefixes `sdh_tx_`, `sdh_rx_`, `atm_fss_tx_`, `atm_fss_rx_`, `dss_tx_` and
`dss_rx_`:

- the STM-N transmitter and receiver (`SDH_N`, default 4),
- an SDH-based ATM scrambler and descrambler (`ATM_STM_N`, default 1),
- a DSS scrambler and descrambler (`DSS_BETA`, default 1).

A fourth parameter, `RX_MSRG` (default 1), builds the two frame synchronous
receivers with the modular generator. Clock and asynchronous active-low reset
are shared. Nothing connects the three
applications internally. The testbench loops each transmitter back into its
receiver.

## 6. Verification

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<n>`. The reference models are written
independently of the RTL: a plain serial L-bit shift register for each
polynomial, bit-serial frame builders, and a bit-level CRC.

| Testbench | What it checks |
|---|---|
| `tb_psrg` | (8,4), (8,16) and DSS (1,8) lanes against the serial sequence; published initial states; reload |
| `tb_psrg_msrg` | the modular form for (8,4), (8,16), (1,8), (1,1) and the DSS polynomial against the serial sequence; published initial states |
| `tb_soh_insert`, `tb_soh_remove` | SOH/AUG placement per row and column, the unscrambled flag, frame marks |
| `tb_byte_interleave_mux`, `tb_byte_interleave_demux` | byte order, bit order, word timing |
| `tb_sdh_par_tx` | line words equal a serial STM-N scrambler on the interleaved frame (N = 4, also run at 16) |
| `tb_sdh_par_rx` | serially scrambled frames are recovered, starting mid-frame (modular generator by default) |
| `tb_fss_byte_scrambler` | STM-1 and STM-4 against a serial scrambler, and scramble-then-descramble with the modular generator |
| `tb_dss_par_scrambler` | every byte and both HEC samples against a serial x^31+x^28+1 model |
| `tb_dss_par_descrambler` | locking from a random state within 16 cells for BETA = 1, 26, 53; recovery after a HEC bit error |
| `tb_parallel_scrambling_top` | all three links end to end at the default parameters |
| `tb_top_stm16_stm4atm` | the same end-to-end run with the top set to STM-16 (`SDH_N = 16`) and STM-4 SDH-based ATM (`ATM_STM_N = 4`) |

`tb_parallel_scrambling_top` runs with all top parameters at their defaults,
for three STM-4 frames (58,320 clocks), about 24 STM-1 ATM frames and about 1,100 cells, with one HEC sample bit flipped at cell 300. It also
counts each mechanism and fails if any of them never happens:

- reloads of each frame generator,
- SOH bits delivered,
- DSS corrections,
- DSS locks and unlocks after an injected error.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/scr_pkg.sv tb/tb_parallel_scrambling_top.sv --top-module tb_parallel_scrambling_top
./obj_dir/Vtb_parallel_scrambling_top
```

Replace the testbench name to run another one. Each testbench has a watchdog.

## 7. Choices and limits

Choices made in this design that the method does not fix:

- Reset is asynchronous and active low. Generators reset to their initial
  state.
- Bit order: the MSB of each byte is sent first on the line.
- SDH lane 0 is the first byte of each interleaved group.
- The line side is a word interface, not a serial one.
- Where the lanes meet the frame: the SOH of row 4 is treated as AU pointer
  space, carried by the AUG.
- The HEC of the DSS cells is the standard ATM HEC (CRC-8, coset 0x55),
  computed over the scrambled header. The two samples are added to it. Any
  incoming HEC value is ignored and replaced.
- The default DSS correction delay is 1. The lock indicator is this design's
  own addition.

Limits:

- Frame alignment, cell delineation, cell mapping into STM frames, and the
  self-synchronous x^43+1 payload scrambler used with SDH-based ATM are all
  outside the design.
- No timing analysis has been done. Each clock the logic has the following
  paths:
  - SDH generator: at most 3-input XORs.
  - DSS: a 31-bit register step, two 31-bit correction masks, and an 8-bit CRC
    update.
- STM-16 (`SDH_N = 16`) and STM-4 ATM (`ATM_STM_N = 4`) are parameter settings,
  not the top's defaults. `tb_top_stm16_stm4atm` runs them end to end.
