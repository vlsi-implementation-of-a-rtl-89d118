# Bi-processor subband coding engine

This RTL implements a programmable engine for multiresolution (subband) picture
coding and decoding. A picture is split into four subbands (LL, LH, HL, HH) by a
separable 2D filter bank. The filters are 1D *lattice* filters: polyphase
structures built from cross-sections with one coefficient ρ each. In exact
arithmetic they reconstruct the picture perfectly. In fixed point they
reconstruct it to within a few LSB. Recursively splitting the LL band gives the
higher stages.

The engine divides the work between two independently sequenced processors:

* the **transfer processor (TP)**, an "intelligent DMA" engine. It moves pixels
  and intermediate results between the video ports, an external 32-bit data
  memory and the other processor. The memory holds the line delays of the
  vertical filter, and the TP generates all the irregular address streams that
  edge handling and multi-stage scheduling need;
* the **computation processor (CP)**, which does the arithmetic on four
  resources working in parallel: two lattice units (VF for vertical and HF for
  horizontal filtering), one 10x16 scaling multiplier and one 16-bit
  adder-subtractor. They are joined by three splittable buses.

Two 16-word FIFOs connect the processors. A processor that would read an
empty FIFO or write a full one stalls until it can go on, so the two programs
stay in step without any explicit handshaking in the microcode. The external
host loads both microprogram RAMs at boot time, and the programs choose the
filter lengths, the number of stages, the picture format, the edge handling,
and whether the engine analyses (codes) or synthesises (decodes).

```
 video in ──►┌──────────── TP ─────────────┐        ┌───────────── CP ──────────────┐
 video out ◄─│ video regs, 32/16 staging   │──16──► │FIFO in, FIFO out              │
             │ FIFO to CP, FIFO from CP    │◄──16── │3 buses, each splittable:      │
 SRAM  ◄─32─►│ address unit (adder + 16    │        │ seg0: FIFOs, VF               │
 addr  ◄─16──│   pointer regs)             │        │ seg1: 10x16 mul, 16b +/-, HF  │
             │ sequencer + irq ctrl        │        │direct link HF <-> +/-         │
             │ program RAM 256x24          │        │sequencer, program RAM 160x24  │
             └─────────────────────────────┘        └───────────────────────────────┘
                         ▲ external host (program load) ▲
```

## The lattice cross-section, and how one resource computes it

Each cross-section takes an upper and a lower input and computes

    out_up  = inp_up  + ρ · inp_low
    out_low = inp_low + ρ · inp_up

An L-tap filter has N = L/2 − 1 cross-sections. The lower branch is delayed
by one sample between sections. A final adder and subtractor produce the low
band (u + l) and the high band (u − l), and each band is then scaled, by
λ(1+ρ_N) and λ(1−ρ_N) respectively.

VF and HF (`lattice_pe`) each do one cross-section in two consecutive cycles,
using a single 8x16 multiplier and a single 24-bit adder:

```
 bus / own RF ─► X ─┬─► × ρ[ptr] ─► P (24b) ──────────────┐
                    └─► D1 ─► D2                          ├─► + ─► S (24b) ─► >>shift[idx] ─► sat16 ─┬──────────┐
                          mux(X | D2) ─► align/sign-extend ┘                                          └► O1 ► O2 ┤ mux
                                                                            register file 16x16 ◄────────────────┘
                                                                            └─► bus, and back to the X input mux
```

The schedule of one cross-section, in the cycles where the CP executes an
EXEC word:

| cycle | control | effect |
|---|---|---|
| c0 | `x_ld` (inp_low) | X ← inp_low |
| c1 | `x_ld` (inp_up) | X ← inp_up, P ← ρ·inp_low |
| c2 | `add_delay=0` | S ← inp_up + ρ·inp_low, P ← ρ·inp_up |
| c3 | `add_delay=1`, `rf_we` | S ← inp_low (from D2) + ρ·inp_up; out_up written to the register file |
| c4 | `rf_we` | out_low written |

With the output delay configured, each `rf_we` moves two cycles later. A new
cross-section can start every two cycles, so an L-tap filter on one
resource takes L − 2 cycles per output pair (with the split register file
described below). ρ is Q2.6 (range −2 to +1.984). Inside the sign
extension the addend is shifted left by 6 bits to line up with the product.
The barrel shifter then shifts right by the amount in the shifts bank entry
for that cross-section, so 6 means unit gain and each extra step scales the
result down by 2. It saturates to 16 bits. The 24-bit sum wraps and is not
checked. The multiply/add/shift pipeline runs freely in every EXEC cycle: a
result comes out a fixed number of EXEC cycles after its inputs, whatever
the neighbouring instructions do.

In its default (unified) mode, the register file has a read pointer and a
write pointer. Each moves on by
one (mod 16) when the instruction asks for it. Storing out_up and out_low of
successive samples one after the other puts l(n−1) right before u(n). That is
the order the next section needs for its low and up inputs. So the
one-sample delay of the lower branch comes from the pointers alone.

### Several cross-sections on one resource: the split register file

An L-tap filter on one resource takes L − 2 cycles per pair only if the
cross-sections of consecutive pairs are interleaved. A section's result
leaves the pipeline four cycles after its first input, so section s+1 of
pair n cannot directly follow section s. For 8 taps (N = 3) the resource
runs s0(n), s2(n−1), s1(n) in each 6-cycle period. The results of all
sections then interleave, and a single read pointer can no longer follow
them. The configuration bit `split` divides the 16 words into two halves:

* results of the final section (the one whose ρ bank index is `fin_idx`) go
  to the upper half, through their own write pointer. The bus reads them in
  order, so the adder sees l(n−1) and u(n) one after the other, as before;
* all other results go to the lower half, in the order up0, low0, up1, low1,
  ... of each pair. Section s+1 reads its lower input `low_s(n−1)` at the
  feedback pointer, and its upper input `up_s(n)` `fb_off` = 2N − 3 words
  further on. The feedback pointer then moves on by 2.

The ρ and shift banks hold the coefficients in execution order (ρ0, ρ2, ρ1
for the 8-tap schedule above), and `fin_idx` names the bank entry of the
final section.

## Computation processor

`cp_core` contains the two lattice units, `scale_mult` (10-bit Q2.8
coefficients from a 4-entry bank, rounded, saturated, one cycle of latency),
`addsub16` and `cp_network`:

* `addsub16` has an operand register A, which is loaded from its input. The
  other operand, B, comes straight from the network. It computes A+B, A−B
  or B−A into a result register. Holding A lets the low and high bands of
  one pair come out in two consecutive cycles.
* `cp_network` has three 16-bit buses. Each bus has two segments: segment 0
  on the FIFO side (FIFO in, FIFO out, VF) and segment 1 on the far side
  (multiplier, adder-subtractor, HF). When a bus is joined, one source drives
  all of it. When it is split, each segment carries its own transfer, so three
  buses can carry up to six transfers per cycle. A direct link joins HF and
  the adder-subtractor, in both directions. Routing is held in configuration
  registers, and an assertion checks that each segment of a split bus is
  driven from its own side.

A CP EXEC word drives every resource in the same cycle. With three
operations in each lattice unit, plus the scaling multiply and the
add/subtract, that is up to eight operations per cycle. The resource
pipelines move only in EXEC cycles, so LOOP, JUMP and CONF words do not upset
a schedule.

## Transfer processor

`tp_core` contains:

* `addr_unit`: 16 pointer registers with one write port and two read ports,
  plus one adder. The memory address is `rf[ra] + rf[rb]`, and with write-back
  the sum goes into `rf[ra]`, which gives pre-modified pointer walks. Wrap-around
  of circular line buffers is left to the program.
* `tp_format`: a 32-bit staging register. It is loaded from or stored to memory
  as a whole word, and read or written 16 bits at a time. The module also holds
  the one-word video input register (valid/ready; an arriving word raises the
  data-input interrupt) and the registered video output.
* two `sync_fifo`s, 16 bits x 16 words, with first-word fall-through.
* `irq_ctrl`: two interrupt lines, data input (vector 0xE0, higher priority)
  and end of line (vector 0xF0), each with a pending flag and an enable mask.

A TP EXEC word does at most one memory access and one 16-bit move per cycle.
The possible moves are: video in → FIFO or staging half, staging half → FIFO
or video out, and FIFO from CP → staging half or video out. The memory is an
asynchronous SRAM: address, write strobe and write data are valid during the
access cycle, and read data is sampled at its end.

No edge extension is built into the hardware. The program makes the samples
beyond the ends of a line by reading the right words in the right order. For a
whole-sample symmetric extension, it reads word 1 and sends its low half (x2),
then word 0 and its high half (x1), then the line itself. At the end, it sends
the low half of the last word again (x(W−2)) and the high half of the word
before it (x(W−3)). Other extension methods are other address sequences.

## Sequencer and microinstruction formats

Both processors use `useq` and 24-bit words. Bits [23:21] hold the opcode:

| op | name | fields |
|---|---|---|
| 0 | EXEC | [20:0] datapath word (TP or CP format below) |
| 1 | CONF | [20:0] configuration / immediate |
| 2 | LOOP | [15:8] count (0 acts as 1), [7:0] address of the last body word |
| 3 | JUMP | [7:0] target |
| 4 | RETI | return from interrupt |
| 5 | HALT | stop; `running` falls |

Loops have no overhead. LOOP pushes {start = pc+1, last, count} onto a stack
four levels deep. When the word at `last` completes, the sequencer branches
back in the same cycle, until the count runs out. Nested loops must end at
different addresses; the outer loop needs at least one word after the inner
body. An interrupt is taken between instructions, also while the current
instruction is stalled. The sequencer saves the PC (one level, no nesting)
and jumps to the vector. The loop stack is not saved, so interrupt routines
must not use LOOP.

TP EXEC: [20:19] memory op (0 none, 1 read into staging, 2 write staging),
[18] address write-back, [17:14] ra, [13:10] rb, [9:7] move, [6] staging half.
TP CONF: [20]=0 loads register [19:16] with [15:0]; [20]=1 sets the interrupt
mask to [1:0].

CP EXEC: [20:15] VF control, [14:9] HF control. Each of these is
{x_ld, x_from_rf, add_delay, rho_nxt, rf_we, rd_nxt}. Then [8] adder load A,
[7:6] adder op, [5] multiplier load, [4:3] scaling coefficient select,
[2] pop FIFO in, [1] push FIFO out.
CP CONF: [20:17] group, [16:13] index, [12:0] value. The groups are: ρ and
shift banks of VF/HF, scaling coefficients, per-unit configuration
([2:0] last ρ index, [3] output delay, [4] split, [8:5] fb_off, [11:9]
fin_idx), register file pointers (index: write pointer, [3:0] read pointer,
[7:4] feedback pointer, [11:8] final-half write pointer), bus routing and
destination routing.

`sbc_pkg` has encoder functions for all of these (`tp_exec`, `cp_exec`,
`seq_loop`, ...).

## What the tests run

`tb/tb_sbc_pkg.sv` holds the example programs and their bit-exact integer
reference models. The basic CP program, `cp_filter_prog`, is a 6-tap
analysis lattice: cross-section 0 on VF,
cross-section 1 on HF, the final add/subtract (operands taken over the direct
HF link) and the scaling. It takes 15 EXEC cycles per input pair, inside two
nested loops. It uses one split bus (FIFO→VF on segment 0, adder→multiplier on
segment 1) and two joined buses (VF→HF, multiplier→FIFO). The TP program feeds
the CP from the data-input interrupt routine and counts lines in the
end-of-line routine. Its main loop packs the CP results two per memory word,
and it plays them back on the video output at the end.

`cp_pipe_prog` builds the same filter as a software pipeline. A new pair
starts every 3 cycles, and one pair spans 11 cycles, so four pairs are in
flight at once. The adder-subtractor sets the 3-cycle rate: for each pair it
loads A, adds and subtracts, and both operands come over the one HF link.
The program has a 9-word prologue, a 3-word steady-state body under one or
two hardware loops, and a 9-word epilogue. In the prologue and the epilogue
only the pairs that exist contribute operations. When the body needs two
nested loops, the outer loop's closing word is a CONF, which does not advance
the pipelines and so leaves the schedule intact. For one CCIR 601 luminance
line (720 samples) the outputs come out 1083 cycles apart from first to
last, with no stall. A 4:2:2 line has 720 pairs in all, which at 3 cycles each
is about 2160 cycles. The line period at 60 MHz is 3840 cycles.

`cp_pipe8_prog` is an 8-tap filter with all three cross-sections on HF, using
the split register file. Its steady state is a 6-word body, so it runs at
L − 2 = 6 cycles per pair. 200 pairs give 1195 cycles from the first output
to the last. Slots that are empty at the start and the end of the stream
still step the ρ pointer, so the pointer stays in phase with the schedule.

`cp_synth_prog` decodes. As the document says, it uses the same resources
with the operations in the other order. Each pair first goes through the
scaling multiplier, with the inverse scale factors. Then the adder-subtractor
forms the difference and the sum. Its result register holds the sum until the
next pair, which gives the one-pair delay on the upper branch. HF then runs
the last cross-section with −ρ1, and VF runs the first with −ρ0 on values it
reads back from HF. An inverse cross-section is an ordinary one whose two
inputs enter in swapped roles, since the section is symmetric in them. A pair
takes 14 cycles. The output lags the input by two pairs.

| testbench | covers |
|---|---|
| `tb_sbc_top` | whole chip, end to end, default parameters. It checks every output word and memory word against the integer model, checks the CP cycle count, and requires each of these to happen at least once: TP stall, CP stall, FIFO full, video back-pressure, both interrupts, split bus, nested loops in both processors |
| `tb_cp_rate` | the pipelined programs on the CP. 6-tap: 10 pairs, then a 720-sample line. 8-tap on one resource: 10 pairs, then 200. It checks every output, the exact EXEC count (period × pairs plus fill and drain), no stall, and the output spacing |
| `tb_cp_decode` | coding then decoding on the CP. It runs `cp_filter_prog` on 120 random samples and then, after a reset, `cp_synth_prog` on the hardware's output. Both outputs are checked bit for bit against integer models, along with the synthesis EXEC count. It also checks that the decoded samples, two pairs late, equal the input to within a tolerance |
| `tb_tp_edge` | edge extension by the TP. A program reads stored lines and sends each to the CP FIFO mirrored by two samples at both ends (x2 x1 \| x0 … x(W−1) \| x(W−2) x(W−3)). The mirrored samples come from address arithmetic and the choice of staging half alone. It checks every word and the cycle count, 3W/2 + 8 per line |
| `tb_tp_core`, `tb_cp_core` | each processor alone, with the other side modelled |
| `tb_useq` | loop nesting, zero overhead (exact cycle count), stalls, interrupt entry/return |
| `tb_lattice_pe` | two chained cross-sections with random ρ/shift, saturation, both output paths, the split register file, random pipeline freezes |
| others | one per block: FIFO, address unit, interrupt controller, program RAM, format/video registers, multiplier, adder-subtractor, bus network |

Simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`, for
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/sbc_pkg.sv tb/tb_sbc_pkg.sv tb/tb_sbc_top.sv --top-module tb_sbc_top
./obj_dir/Vtb_sbc_top
```

Other testbenches build the same way, with their own file and top module
(`tb_sbc_pkg.sv` is needed by `tb_sbc_top`, `tb_cp_core`, `tb_cp_rate` and
`tb_cp_decode`). Each testbench prints `TB_RESULT checks=N failures=M`. All testbenches
initialise or reset everything they read, and they pass with random initial
state (`+verilator+rand+reset+2`).

## Sizes

Data word 16 bits, memory word 32 bits, memory address 16 bits, instructions
24 bits. Program RAMs are 256 words (TP) and 160 words (CP). FIFOs are
16 x 16, the pointer and lattice register files 16 x 16, the lattice
multiplier 8x16 with 24-bit accumulation, the scaling multiplier 10x16, and
there are four loop levels and three buses. All of these come from the
published design. This design adds: 8-entry ρ and shift banks (L up to 18
taps), 4 scaling coefficients, 8-bit loop counts, and the Q2.6 / Q2.8
coefficient formats.

At the published 60 MHz clock, the resources give 60 MOPS of 16-bit
add/subtract, 120 MOPS of 24-bit add, 120 MOPS of 8x16 multiply and 60 MOPS of
10x16 multiply. A CCIR 601 picture with 8-tap filters needs, over three
stages, about 28, 85, 85 and 14 MOPS of these. The data memory port can carry
32 bits x 60 MHz = 1.92 Gbit/s, against about 0.95 Gbit/s needed.

## Where this design is its own

The published design describes the blocks, their sizes and how the lattice
unit is built. It does not give an instruction set, and it gives no timing
for any interface. These parts were therefore chosen for this RTL:

* all microinstruction encodings, and splitting the CP controls into
  per-cycle EXEC fields and CONF-written registers;
* the bus segment boundary (between VF and the multiplier), routing held in
  registers, and the direct link feeding both adder operands;
* stall-on-FIFO as the synchronisation mechanism, and first-word
  fall-through FIFOs;
* the TP staging register as the 32/16-bit converter, the 16-bit video ports
  with valid/ready, and asynchronous SRAM timing;
* interrupt priority, vectors, masking and single-level entry;
* coefficient formats, saturation in the shifter and the scaler,
  wrap-around in the adder-subtractor and the 24-bit sum;
* pointer addressing of the lattice register files, and the split mode that
  lets several cross-sections share one resource at the published L − 2
  cycles per filter. The feedback offset is one constant, and the tests use
  it with N = 3 and a schedule that starts sections 4 cycles apart. Other
  schedules would have to keep those distances constant as well;
* the example programs themselves, since no microcode is published: a
  6-tap filter spread over VF and HF, an 8-tap filter on HF alone, the
  6-tap decoder and the TP's edge extension. A
  complete two-dimensional stage, with line delays in memory and the TP
  multiplexing columns and stages, is not among the tests. Decoding is
  shown in one dimension only, and it is not software-pipelined
  (14 cycles per pair);
* the synthesis scaling: the decoder multiplies by −1.023 and −0.512
  (Q2.8), which undoes the coder's output scaling and the gain of the
  inverse cross-sections together. The two factors keep the coder's exact
  2 : 1 ratio, so the bands do not leak into each other. Reconstruction is
  exact only in exact arithmetic. The shifts and the scaler truncate, and
  the inverse sections amplify that error about 2.9 times. With the test
  coefficients and inputs within ±1000, the decoded samples are within
  8 LSB of the input (the test allows 16).

The data memory, the host, the pads, and the quantizer and entropy coder of
a complete codec are outside this RTL. The top level brings out the memory
and host ports.
