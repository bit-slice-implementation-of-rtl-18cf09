# A 16-bit bit-slice signal processor for LPC speech coding

Real-time linear predictive coding (LPC) of speech needs many
multiply-accumulates per sample: autocorrelation, lattice
analysis, pitch detection. This design is a microprogrammed 16-bit
two's complement processor for that job, built the way bit-slice
machines were: four 4-bit ALU slices of the 2901 type, a 2910-type
microprogram sequencer, a 16 x 16 multiplier, and a wide (48-bit)
horizontal microinstruction that drives every unit directly in every cycle.

Three ideas shape it:

* **Harvard organisation.** The microprogram memory (4K x 48) and the data
  memory (64K x 16) are separate. Fetching the next microinstruction and
  reading or writing data happen in the same cycle.
* **A two-level pipelined control unit.** The control store is built from
  slow memory. So the next address is registered in front of it, and the word
  it returns is registered behind it. The memory then has a whole microcycle
  (200 ns at 5 MHz) to answer. The cost is a one-word fetch-ahead. A *cycle
  suppressor* hides it after jumps.
* **A single-cycle read-operate-write data memory.** One microinstruction
  can read a data word, pass it through the ALU and write the result back.

All of it is synthesizable SystemVerilog. The original was built from
catalogue parts. Here the slice, the sequencer and the multiplier are RTL
models of what those parts do. Nothing in this RTL is electrical or
process-specific.

## Block diagram

```
                 +-------------------- control unit ----------------------+
 status word --> | 2910-type sequencer --Y--> MAR --> microprogram memory  |
 (flags, ext)    |      ^  D=imm, map=Y bus          4K x 48              |
                 |      |                               |                 |
                 |      +------ MIR (microinstruction) <+                 |
                 |  cycle suppressor --> exec                             |
                 +--------------------------|------------------------------+
                                            | fields
        D bus (ALU operand)                 v
  mem[DAR] / imm / product / input --> [ ALU: 4 x 2901 slices ] --> Y bus
                                                                     |
        Y bus (ALU result) --> mem[DAR], DAR, multiplier X/Y, output port
```

| Module | Role |
|---|---|
| `lpc_processor` | top: control unit, data path, buses, status register, I/O ports |
| `control_unit` | sequencer, MAR, microprogram memory, MIR, cycle suppressor |
| `am2910_seq` | 2910-type sequencer: uPC, 5-word stack, register/counter |
| `cycle_suppressor` | cancels the fetched-ahead word after a sequence break |
| `ucode_rom` | 4K x 48 microprogram memory with a load port |
| `alu16` | four slices in cascade, shift end multiplexers, flags |
| `am2901_slice` | 4-bit slice: 16 x 4 register file, Q, 8 sources/functions/destinations |
| `data_memory` | 64K x 16 memory with its data address register (DAR) |
| `trw_mult` | 16 x 16 signed multiplier with X, Y and product registers |
| `lpc_pkg` | microinstruction struct and all field codes |

## The microinstruction

Each word has 48 bits in 13 fields. The field positions and widths are
those of the original machine. The codes inside the ALU and sequencer
fields are the 2901's and the 2910's. The other codes are this design's
own. `lpc_pkg::uinstr_t` defines them all.

| Bits | Field | Codes |
|---|---|---|
| 1..0 | shift end multiplexers | zero, rotate, double length (register file + Q as 32 bits), stored carry |
| 4..2 | ALU source | 2901: AQ AB ZQ ZB ZA DA DQ DZ |
| 7..5 | ALU function | 2901: R+S, S-R, R-S, OR, AND, ~R&S, XOR, XNOR (subtractions add Cn) |
| 10..8 | ALU destination | 2901: QREG NOP RAMA RAMF RAMQD RAMD RAMQU RAMU |
| 11 | unused | |
| 15..12 | ALU register A | |
| 19..16 | ALU register B (written) | |
| 20 | carry in | |
| 23..21 | external operand source (D bus) | 0, mem[DAR], imm sign-ext, imm zero-ext, product[31:16], product[15:0], product[30:15] (Q15), input port |
| 27..24 | external result destination (Y bus) | none, mem[DAR], DAR, mult X, mult Y, output, mem[DAR] then DAR+1, DAR+1, DAR-1, X and Y |
| 31..28 | condition select | status word bit, see below |
| 35..32 | sequencer instruction | 2910: JZ CJS JMAP CJP PUSH JSRP CJV JRP RFCT RPCT CRTN CJPP LDCT LOOP CONT TWB |
| 47..36 | immediate | sequencer D input (jump target, count) **and** D-bus constant |

The immediate is a single field. A word that jumps or loads the counter
therefore cannot also carry an unrelated constant for the ALU.

Status word (condition select): bit 0 is always 1 (unconditional). Bits 1-10
are Z, !Z, C, !C, N, !N, V, !V, N^V (signed less than) and !(N^V). Bits
11-15 are the five `ext_cond` inputs. The flags come from a status
register. It stores the ALU flags of every executed microinstruction, so a
conditional jump tests the result of the word executed just before it.

## Control pipeline and the cycle suppressor

This is the part that takes the most care when writing microcode.

The sequencer computes the next address Y from the word in the MIR. Y is
registered into the MAR. The memory word at the MAR is registered into the
MIR. In steady state, while the word at address *a* executes, the word at
*a+1* is already being fetched, and the sequencer is choosing the address of
the word after that.

When the executing word breaks the sequence (a taken jump, call, return,
JMAP, JZ, or a LOOP that jumps back), the word at *a+1* has already been
fetched but must not run. The cycle suppressor marks the next cycle
cancelled (`exec` = 0). In that cycle no register, memory, flag or port
changes, and the sequencer is given CONT so that MAR and MIR refill from
the target. **Every break costs exactly one cycle.** The original stopped
the clock for a cycle. This design uses an enable.

The counter loops **RFCT, RPCT and TWB are not suppressed.** The word
after a counter-loop instruction always executes: on every pass, and once
more on exit. So the loop-control word is written one word before the end
of the loop body. For example, a one-word loop body sits in the slot after
an `RPCT` that jumps to itself:

```
7: RPCT 7   ; loop control (also does datapath work if wanted)
8: body     ; runs on every pass, then the program continues at 9
```

LDCT n followed by such a loop runs the body n+1 times, as on the 2910.

The pipeline keeps the sequencer's uPC one address ahead. This design pushes
uPC-1 on CJS, JSRP and PUSH, so a return (CRTN) lands on the word right after
the call, and a LOOP goes back to the word right after the PUSH. A plain 2910
would push uPC (`am2910_seq` parameter `RET_ADJ` = 0).

After reset the MIR is empty and its first cycle is cancelled. The word at
address 0 executes in the second cycle after reset.

## Data path timing

* **Memory.** `mem[DAR]` is read combinationally onto the D bus. A write
  goes to the DAR held during the cycle. A DAR step in the same word takes
  effect afterwards. So `xs=MEM, ALU, xd=MEM_INC` reads, operates, writes
  back and steps in one cycle.
* **Multiplier.** X and Y load from the Y bus. The product register takes
  X*Y on every edge. A product is readable by the second word after the one
  that loaded the last operand. That is one cycle to load and one 200 ns
  cycle to multiply. The Q15 source (product bits 30..15) gives fractional
  results.
* **Shifts.** The RAMD/RAMU/RAMQD/RAMQU destinations shift across all four
  slices. The shift field picks what enters the free end. `SH_DOUBLE` on
  RAMD is an arithmetic right shift (the sign enters). On RAMQD/RAMQU it
  makes the register file and Q one 32-bit register.
* **Ports.** `in_rd` pulses in the cycle that reads `in_data`. `out_valid`
  is high for one cycle after a write to the output register. A microprogram
  typically polls an input-ready line on `ext_cond[0]` with CJP.

## Where this departs from the original machine

* The original's data path could cycle in 120 ns, and it ran at 5 MHz
  (200 ns) because of its slow control store. The RTL has no timing of its
  own. The cycle counts quoted here are converted at 200 ns.
* Edge-triggered registers replace the original's level-transparent
  latches. The cancelled cycle is an enable, not a stopped clock.
* The control store is an array with a load port (`pl_*`, or a hex file
  named by `INIT_FILE`) in place of EPROMs.
* The slice is modelled at its function. Carry and overflow are 0 for the
  logic functions. There are no P/G outputs. The carry ripples: there is no
  lookahead unit. The register file resets to zero.
* The sequencer's condition is the selected status bit, active high. There
  is no CCEN pin: status bit 0 (always true) takes its place. CJV takes its
  vector from the immediate. JMAP takes its target from the low 12 bits of
  the ALU result bus.
* The codes of the external source/destination fields, the shift field,
  the status word, the I/O ports and the DAR step operations are not
  published. They are this design's.
* The multiplier's rounding and format-adjust controls are not modelled.
* The vocoder microprograms are not part of this RTL. The testbenches carry
  microprograms of their own: the autocorrelation front end, lattice
  analysis after Burg and after Itakura, the Levinson-Durbin recursion,
  autocorrelation pitch detection with center clipping, and a compact
  Gold-Rabiner pitch detector.

## LPC microprograms and the real-time budget

Besides the front end run by `tb_lpc_processor`, five testbenches load
complete LPC microprograms into the processor at its default size. These
are the analysis and pitch algorithms the machine was built for. The counts are from simulation. Times assume the
5 MHz microcycle, a 20 ms frame of 160 samples and LPC order 10:

| Testbench | Algorithm | Microwords | Microcycles | Time |
|---|---|---|---|---|
| `tb_lpc_processor` | input, offset removal, autocorrelation R(0..10) | 32 | 15,547 | 3.1 ms |
| `tb_lpc_levinson` | Levinson-Durbin recursion from R(0..10) | 80 | 2,749 | 0.55 ms |
| `tb_lpc_burg` | Burg lattice, k1..k10 | 65 | 41,976 | 8.4 ms |
| `tb_lpc_itakura` | Itakura lattice, k1..k10 (with a square root) | 89 | 43,699 | 8.7 ms |
| `tb_lpc_pitch` | center-clipped autocorrelation pitch, lags 20..120 | 60 | 69,142 | 13.8 ms |
| `tb_lpc_gold_rabiner` | Gold-Rabiner pitch, 320 samples | 124 | 33,835 | 105 cycles/sample |

Each fits its frame. Autocorrelation plus Levinson plus clipped
autocorrelation pitch is 17.5 ms per 20 ms frame. Either lattice plus
Gold-Rabiner is about 12 ms. Gold-Rabiner at 105 cycles per sample is
3.4 ms per 160-sample frame. The lattice forms cost far more than
Levinson-Durbin. That is the price of their stability
under fixed-point truncation.

All of them build words with the same `u()` helper. They use the
processor's mechanisms in typical ways:
- the Levinson division and the Itakura square root are subroutines
  (CJS/CRTN);
- an inner loop closes on a counter (RPCT) with useful work in its delay
  slot;
- a conditional jump in the same word does ALU work, because it tests the
  flags stored by the word before.

* `tb_lpc_burg`: the whole processor at its default size runs lattice LPC
  analysis after Burg, on a 160-sample frame with order 10. For each stage
  the microprogram does four things:
  1. It accumulates the forward/backward cross-correlation and energy with
     Q15 products.
  2. It divides with a 15-step restoring division in the ALU. The register
     file and Q shift as one 32-bit register, and the carry flag serves as
     the unsigned compare. The division saturates to 0x7fff when the
     quotient would reach 1.
  3. It writes the reflection coefficient k to the output port.
  4. It updates the lattice errors in place.

  A model with the same 16-bit arithmetic gives the expected coefficients.
  The run takes about 42,000 microcycles, about 8.4 ms at 5 MHz, inside the
  20 ms frame. Truncated Q15 products of small samples make the sums coarse.
  The coefficients therefore show the machine's fixed-point behaviour, not
  floating-point Burg values.

* `tb_lpc_itakura`: the same frame and lattice, with the Itakura
  coefficient k = C/sqrt(F*B). Here C is the forward/backward
  cross-correlation, and F and B are the forward and backward energies. A
  microcoded subroutine computes the square root. It first forms F*B as 32
  bits. It then builds the root one bit at a time, from bit 14 down. Each
  trial value goes to both multiplier inputs at once (the X-and-Y
  destination). The square is compared with F*B, high word first, and the
  low words only on a tie. The run takes about 43,700 microcycles (8.7 ms).
  The coefficients come out close to the Burg ones for the same frame.

* `tb_lpc_levinson`: the Levinson-Durbin recursion of order 10, starting
  from R(0..10). It produces the reflection coefficients, the predictor
  coefficients a1..a10 and the final prediction error. The division is a
  subroutine that is called once per order. All 21 outputs are checked
  against a model with the same arithmetic. The run takes about 2,750
  microcycles (0.55 ms).

* `tb_lpc_pitch`: pitch detection on a 160-sample voiced frame with a
  period of 57 samples. The microprogram finds the peak magnitude and
  center-clips the frame at about 0.3 of the peak. It then computes the
  autocorrelation for lag 0 and for lags 20..120, and picks the first lag
  with the largest value. The autocorrelation inner loop takes six words,
  with two self-incrementing pointers. Its last word both closes the loop
  and accumulates the product. The test checks R(0), the lag and R(lag)
  against a model, and checks that the lag is within 3 samples of the true
  period. The run takes about 69,000 microcycles, 13.8 ms at 5 MHz. Add the
  front end (3.1 ms) and the recursion (0.55 ms) and a full analysis still
  fits in a 20 ms frame.

* `tb_lpc_gold_rabiner`: pitch detection after Gold and Rabiner. It
  processes one sample at a time as samples arrive, over 320 samples. At
  each peak or valley the microprogram forms six pulse measurements: the
  peak height, and its rise from the last valley and from the last peak;
  and the same three for the valley. A subroutine then runs six
  peak-detecting estimators. Each keeps its threshold, blanking counter,
  last pulse time and period in data memory. A pulse above the threshold
  outside blanking gives a period and resets the threshold. Otherwise the
  threshold decays by 1/32 per sample, computed with the multiplier. At the
  end a vote picks the period that most estimators agree with to within 2
  samples. This is a compact form of the method: fixed blanking and decay,
  and a six-way vote in place of the full coincidence table. All outputs are
  checked against a model, and the estimate must match the true period. It
  takes about 105 microcycles per sample. That is well under the 625 cycles
  between samples at 8 kHz.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_am2901_slice`, `tb_alu16`: random instructions against reference
  models. These cover all sources, functions, destinations and shift modes,
  with carry, overflow, zero and sign.
* `tb_am2910_seq`: random instructions against a model of the 2910
  instruction set, including stack overflow.
* `tb_cycle_suppressor`: a break cancels exactly the next cycle, except for
  counter loops.
* `tb_control_unit`: a microprogram with a counter loop, taken and not-taken
  jumps, a call and return, and a PUSH/RFCT loop. The executed sequence is
  checked cycle by cycle.
* `tb_ucode_rom`, `tb_data_memory`, `tb_trw_mult`: memory contents,
  single-cycle read-modify-write, cancelled cycles, multiplier latency and
  signed products.
* `tb_lpc_processor`: the whole processor at its default size (4K x 48
  control store, 64K data words). It runs an LPC analysis front end on a
  160-sample frame (20 ms at 8 kHz):
  1. input with handshake polling;
  2. in-place removal of a constant, at one read-modify-write per sample;
  3. the autocorrelation R(0..10) with Q15 products;
  4. a subroutine that writes R(k) and R(k)/2;
  5. a dump of the frame;
  6. a JMAP exit.

  Every output is checked against a model. The test counts each mechanism
  (breaks, cancelled cycles, counter-loop jumps, calls, returns,
  read-modify-writes, multiplies, input waits, JMAP, shifts) and fails if
  one never happens. It also checks that a cycle is cancelled exactly after
  each break, and that the read-modify-write loop takes two cycles per
  sample. The run takes about 15,500 microcycles, about 3.1 ms at 5 MHz.
  That is well inside the 20 ms frame.

* The five microprogram testbenches in the next section also check every
  output against a model with the same 16-bit arithmetic.

To simulate with Verilator, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl rtl/lpc_pkg.sv \
          tb/tb_lpc_processor.sv --top-module tb_lpc_processor
./obj_dir/Vtb_lpc_processor
```

Replace the testbench and top-module names to run another testbench.
`tb/tb_lpc_processor.sv` also shows how to write microcode. Its `u()`
function builds a `uinstr_t` from named fields with NOP defaults.
