# Real-time evaluation machine for speech waveform coders

Speech coders such as CVSD, ADM, ADPCM and companded PCM are usually judged
with a distortion analyzer and a single sine tone. That does not tell how a
coder handles real speech. This machine measures a coder while it runs on
real speech. It samples the analog input of the coder and its decoded output
at the same instant, and a microprogram then computes an objective quality
measure in real time, typically the segmental signal-to-noise ratio

    SNR_SEG = (1/M) * sum over segments m of 10*log10( sum s(n)^2 / sum (s(n) - r(n))^2 )

where s is the coder input, r the decoded output, and each segment holds
128 samples.

The hardware follows the "A Real-Time Performance Evaluation System for
Speech Waveform Coders" design: a 16-bit microprogrammed bit-slice
processor with a 64-bit microinstruction, a 1k x 16 data memory, a writable
control store loaded by a support processor, and sampling at up to 32 kHz
from a 4.5 MHz clock (one microinstruction every 220 ns). The measure itself
is software (microcode), so any objective measure can be loaded. This
repository holds synthesizable SystemVerilog for the digital part of that
machine. The analog front end and the support processor stay outside it, as
ports.

## Block structure

```
           coder input ──► S/H ─┐                       ┌── support processor
  analog   coder output ─► S/H ─┴► MUX ► A/D            │   (loads control store,
  (outside)                              │ 16           │    reads output register)
                                         ▼              ▼ 64
  ┌──────── io_control ────────┐   ┌──────────── wcs (control store) ──┐
  │ sampling clock, conversion │   │ 1024 x 64, address mux host/seq.  │
  │ order, input/output        │   └──────────────┬────────────────────┘
  │ requests, priority         │                  ▼
  └───────────┬────────────────┘          micro_ir (pipeline register)
              │ A/D sample                        │ fields
   IBUS ◄─────┼──── direct field, MOR             ▼
    │ 16      │                         mcu: cc_mux + sequencer ──► next address
    ▼         ▼ requests                   ▲ 4 status
  ┌─────────── cpu ───────────┐            │
  │ 4 x alu_slice, shift_mux, │────────────┘
  │ carry_mux, status_reg     │
  └────────────┬──────────────┘
               ▼ Y (16)
   OBUS ──► D/A latch, MAR1, MAR2, MBR, output register   (bus_control)
               │
   mem_interface: MAR1/MAR2 ─► address mux ─► data_memory (1k x 16) ─► MOR
                  MBR ─► write data
```

| Module | Role |
|---|---|
| `eval_system` | top level; wires everything below |
| `eval_pkg` | microinstruction struct, field encodings, status type |
| `cpu` | 16-bit CPU: four `alu_slice`, `shift_mux`, `carry_mux`, `status_reg` |
| `alu_slice` | 4-bit slice: 16-word register file, Q register, ALU, shifters |
| `mcu` | microprogram control: next-address decoder, `cc_mux`, `sequencer` |
| `sequencer` | address mux of direct / register / uPC / file (4-deep stack) |
| `cc_mux` | 16-input condition multiplexer, 11 inputs used |
| `wcs` | writable control store, 64-bit words |
| `micro_ir` | pipeline register with the current microinstruction |
| `mem_interface` | MAR1, MAR2, address select, auto-increment, MBR, MOR |
| `data_memory` | 1k x 16 RAM |
| `bus_control` | IBUS source mux, OBUS decoder, D/A latch, output register |
| `io_control` | sampling clock, S/H and A/D sequencing, interrupt requests |

## The microinstruction

All control comes from one 64-bit word (`eval_pkg::uinstr_t`), held in the
pipeline register while the control store is already read for the next
word. The word is split into the CPU part, the control-unit (MCU) part and
the bus and memory controls. The reference design gives the fields and the
widths: 64-bit word, 12-bit direct field, 4 status lines. The bit positions
and all encodings below are this implementation's own. An all-zero word is
a no-operation.

| Bits | Field | Meaning |
|---|---|---|
| 2:0 | `src` | ALU operands (R,S): AQ, AB, 0Q, 0B, 0A, DA, DQ, D0 (D = IBUS) |
| 5:3 | `fn` | R+S+Cin, S−R−1+Cin, R−S−1+Cin, OR, AND, ~R&S, XOR, XNOR |
| 8:6 | `dst` | none, Q, B←F (Y=A), B←F, B←F/2 & Q/2, B←F/2, B←2F & 2Q, B←2F |
| 12:9 | `a` | A register address |
| 16:13 | `b` | B register address (the one written) |
| 18:17 | `sh` | shift multiplexer mode: logical, 32-bit arithmetic, 32-bit logical, 32-bit rotate |
| 20:19 | `cin` | carry in: 0, 1, stored C, inverted stored C |
| 24:21 | `na` | next-address operation (below) |
| 28:25 | `cc` | condition select |
| 29 | `cc_pol` | invert the condition |
| 41:30 | `direct` | branch address, and a 12-bit operand on the IBUS |
| 42 | `stat_ld` | load the status register (Z, N, C, V) |
| 44:43 | `irq_clr` | bit 0 clears the input request, bit 1 the output request |
| 46:45 | `ibus` | IBUS source: direct field, MOR, A/D, zero |
| 49:47 | `obus` | OBUS destination: none, D/A, MAR1, MAR2, MBR, output register, MAR1+MAR2 |
| 50 | `auto_inc` | increment MAR1 and MAR2 together |
| 51 | `mem_sel` | memory address from MAR1 (0) or MAR2 (1) |
| 52 | `mem_rd` | MOR ← memory |
| 53 | `mem_wr` | memory ← MBR |
| 63:54 | spare | write 0 |

Next-address operations (`na`):
- CONT: continue.
- JUMP, CJP: jump and conditional jump to the direct field.
- CALL, CJS: push the return address and jump (conditional for CJS).
- RET, CRET: return from the file (conditional for CRET).
- LDR: load the sequencer register R from the direct field.
- JR, CJR: jump to R (conditional for CJR).
- ZERO: restart at address 0.
- PUSH: push the next address as a loop start.
- LOOP: when the condition holds, pop and continue; otherwise jump back to
  the loop start.

Conditions (`cc`, 11 of the 16 inputs are used):
- TRUE
- Z, C, N, V
- N⊕V, (N⊕V)|Z, ~C|Z
- input request, output request, either request.

## Pipelining and timing

One microinstruction runs per clock. In each cycle:

1. The control unit works out the next address from the word in
   `micro_ir` and the status register. This path is combinational.
2. The control store reads that address asynchronously.
3. At the clock edge, `micro_ir` takes the new word. In the same edge the
   CPU registers, the status register, the MARs, the MBR, the MOR and the
   latches take the results of the word that was executing.

So a conditional branch tests flags stored by an earlier word, never the
ALU result of its own word. The program counter (uPC) always holds the
fetch address plus one, and that value is what CALL and PUSH save.

Values loaded into MAR1, MAR2 or the MBR are used by the next word. Memory
reads are asynchronous, so data read into the MOR appears on the IBUS one
word later. A read and a write in the same word at the same address read
the old contents.

Starting and stopping: while `run` is low, the support processor owns the
control store (`host_we/host_addr/host_wdata`), and the sequencer, the
pipeline register and all machine registers are held. After `run` rises
the machine executes one no-operation, then the word at address 0.

## CPU and double-length arithmetic

The CPU is four 4-bit slices in a ripple chain. Each slice holds its 4 bits
of the 16 registers, of Q and of the ALU. Shift links pass the end bits
between neighbouring slices. At the two outer ends of the word, the shift
multiplexer decides what enters:
- In the 32-bit modes it feeds the bit that leaves the RAM shifter into Q,
  and the other way round, so R(b):Q shifts as one 32-bit word, either
  arithmetic (sign in), logical, or as a rotate.
- In the logical mode the two shifters work independently and shift in
  zeros.

A 32-bit addition takes two words:
1. Add the low halves with `cin` = 0 and `stat_ld` = 1.
2. Add the high halves with `cin` = stored C.

Together with the double shift, this gives the double-precision arithmetic
that the division in the measure routine needs. Flags: Z is the AND of the
slices' zero detects, N is F[15], C is the carry out of slice 3, and V is
the carry into bit 15 XOR the carry out of it. Logic functions give C = V = 0.

The slices use the classic 2901-style operand, function and destination
set. They do not model the special functions of the original slice chip,
such as multiply and divide steps.

## Data memory and the two address registers

The 1k x 16 memory never takes an address straight from the CPU. MAR1 and
MAR2 are loaded from the OBUS. The `mem_sel` bit of each word picks one of
them, and `auto_inc` steps both at once. A program can therefore keep the
coder-input block behind MAR1 and the decoded-output block behind MAR2,
with both at the same offset. It then alternates between them at no address
cost. The MBR holds the data to write, and the MOR holds the data read,
which goes onto the IBUS.

## Sampling, conversion and interrupt requests

`io_control` divides the clock by `rate_div`, with a minimum of 141 clocks.
141 = ceil(4.5 MHz / 32 kHz), so the rate never goes above 32 kHz.
`codec_clk` is a square wave at the sampling rate, for the coder under
test. At each sampling instant:

1. `sh_hold` puts both sample-and-holders in hold at once.
2. The analog mux selects the coder input (`adc_chan` = 0) and the A/D
   starts (`adc_start` pulse). On `adc_done` the word is latched and the
   **input request** rises.
3. The mux selects the coder output, a second conversion runs, and the
   **output request** rises. Then the holders release.

Requests are not hardware interrupts. The microprogram polls them with
conditional branches, and the original software checks them every 30
cycles or so. The input request has priority. While it is pending:
- the output-request condition reads as false;
- an A/D read on the IBUS returns the input sample.

So even a program that tests the output request first serves the input
sample first. Each request is cleared by the matching `irq_clr` bit. If a
sampling instant arrives while conversions are still running, it is
skipped and counted in `overruns`.

## Capacity against the measurements the machine was built for

| Workload | Needed | Built |
|---|---|---|
| CVSD at 32 kbit/s (32 kHz sampling) | ≥ 141 clocks per sample pair | minimum divisor 141 |
| CVSD at 16 kbit/s | 281 clocks per sample | ok |
| 64 kbit/s PCM (8 kHz × 8 bit) | 563 clocks per sample | ok |
| one 128-sample segment, both signals | 256 words | 1024 words |
| 7.3 s utterance | processed segment by segment | ok; it could not be stored whole (467,200 words) |
| segmental SNR program of `tb_snrseg_pcm`, PCM at 8 kHz | 355 clocks at worst (segment end) | 563 clocks per sample |
| the same program at 32 kHz | about 200 clocks per sample for the two squares alone | 141: does not fit |

The 8 kHz rate for 64 kbit/s PCM and the one-bit-per-sample CVSD rate are
standard facts about those coders. They are not stated in the reference
design.

## Departures and own choices

From the reference design:
- the block set and buses;
- the 64-bit microword and its field list;
- 16-bit data, four 4-bit slices, 10-bit memory addresses and a 12-bit
  direct field;
- the 1k x 16 memory;
- the sequencer's four address sources;
- 11 of 16 condition inputs;
- the 4.5 MHz clock and the 32 kHz limit;
- simultaneous sampling, two request types with input priority, and
  auto-increment of both MARs.

Chosen here, because the reference gives no detail:
- every field encoding and bit position;
- the 16-word register file;
- a 4-deep sequencer file;
- a control store of 1024 words (`WCS_DEPTH`; the address is 12 bits wide);
- separate memory read and write bits;
- the A/D start/done handshake and the conversion order;
- the reset and stop behaviour.

The reference lists "six" OBUS destinations but names five. Here the sixth
is "MAR1 and MAR2 together". The block diagram draws the MOR on the
input-bus side of the memory and the MBR on the output-bus side. This
implementation follows the written description instead: the MOR holds read
data for the IBUS, and the MBR holds write data from the OBUS.

The segmental-SNR microprogram of the original system is not included.
It has initialization, main, logarithm (a 64-term series), I/O service and
display routines, and a delay counter that lines r(n) up with s(n).

Its listing is not given. `tb_snrseg_pcm` carries a program of its
own for the same measurement, described under Verification. It differs
from the original in two ways:
- it takes the log2 of each energy, by normalising shifts plus a 7-bit
  linear fraction, instead of dividing the energies and using a series;
- it squares with a 16-step shift-and-add loop, which is too slow for
  32 kHz. The original interleaves its logarithm with request service to
  reach that rate, and its squaring method is unknown.

Not part of this RTL: the low-pass filter, the automatic gain control, the
sample-and-holders, the analog multiplexer, the A/D and D/A converters, the
coder under test and the 8080 support processor. Their signals are ports of
`eval_system`.

## Verification

Every module has a self-checking testbench in `tb/` (`tb_<module>.sv`). It
compares against an independent model and prints
`TB_RESULT checks=N failures=M`:
- CPU and slices: random microoperations against 16-bit and 4-bit
  reference models. Shifts are modelled as 32-bit shifts of R:Q. The CPU
  test also runs a chained 32-bit add.
- Sequencer and control unit: every next-address operation, the file,
  and the conditions.
- Memory path: random MAR, MBR and MOR traffic with auto-increment.
- `io_control`: sampling period, clamping at 141 clocks, conversion order,
  priority and clearing, overrun.

`tb_eval_system` runs the whole machine with default parameters. It loads a
41-word microprogram and feeds one 128-sample segment at 32 kHz from an A/D
model, with r(n) = s(n) + noise. The microprogram:
1. stores both signals in two memory blocks through MAR1 and MAR2;
2. echoes s(n) to the D/A;
3. sums s − r into a 32-bit total, branching on the sign and carrying into
   the high word;
4. divides the total by 128 with a counted loop of subroutine calls to a
   32-bit arithmetic shift;
5. reports the total and the mean through the output register.

The testbench checks the reported words, both memory blocks, every D/A
word, the 141-clock sampling period, that no sample is lost, and that every
mechanism happened. Those mechanisms are both request services, both
requests pending together, both sign branches, a chained carry, and the
calls and loop.

To run one testbench with Verilator (the package goes first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_eval_system \
    rtl/eval_pkg.sv $(ls rtl/*.sv | grep -v eval_pkg) tb/tb_eval_system.sv
./obj_dir/Vtb_eval_system
```

`tb_snrseg_pcm` runs the measurement the machine was built for. A μ-law
PCM codec model at 8 kHz (563 clocks per sample) codes an 800 Hz tone in
eight segments of 128 samples. The segments have different levels, and one
is nearly silent. The codec model delays its output by three samples. The
microprogram in the testbench:
1. writes s(n) to memory through MAR1 and reads s(n − 3) back through
   MAR2, which starts three words behind; a delayed-sample counter preset
   to −3 skips the first three outputs;
2. squares s(n) and e(n) = s(n) − r(n) with a shift-and-add loop on the R:Q
   double shift;
3. accumulates 32-bit energies per segment;
4. discards a segment whose signal energy is below a threshold;
5. takes log2 of both energies by normalising shifts;
6. reports the sum of the log ratios and the number of kept segments.

The testbench checks four things:
- the two reported words against a bit-exact model;
- the result in dB, which is within 0.5 dB of a floating-point SNR_SEG
  (36.8 dB against 36.8 dB);
- that exactly one segment and three samples were skipped, and no sample
  was lost;
- that the longest service, 355 clocks, fits in the sample period.

A microword's 12-bit direct field carries either a constant or a branch
target, not both. Constants needed inside a branching word are therefore
kept in a register.

The end-to-end run takes well under a second. To write your own
microprogram, build words as `eval_pkg::uinstr_t`, as `tb_eval_system`
does with its `alu()` and `br()` helpers. Load them while `run` is low,
then raise `run`.
