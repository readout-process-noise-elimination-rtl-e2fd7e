# BLM digitizer firmware: sliding sums, de-ripple and the ELMS micro-sequencer

A beam loss monitor turns the charge collected by ion chambers into abort
decisions and loss readouts. Each input is integrated for about 21 us and
digitized to 16 bits, so the processing FPGA receives one reading per channel
roughly every 1050 clocks at 50 MHz. That budget is too long to waste and the
FPGA is too small to keep 16 running sums in 16 separate accumulators. So one
shared datapath, stepped by a tiny micro-sequencer, computes the sums one after
another.

This RTL implements that processing for a 4-channel card:

* **16 sliding sums.** Each channel has an immediate sum (length 1) and a fast,
  a slow and a very-slow sum. Every sum is compared with its own threshold,
  giving 16 abort requests, and these are combined into one system abort.
* **Integration sums** for slow-extraction use. A pedestal is measured, then a
  reading is added only when the smoothed signal stands above a squelch level.
* **De-ripple.** An order-2 CIC filter is applied first. Then a stored one-period
  waveform of the 60 Hz power-supply noise is subtracted, so that small losses
  can be seen under ripple larger than the signal.
* **ELMS**, the *Enclosed Loop Micro-Sequencer*, steps the shared datapath. Its
  distinguishing feature is that FOR loops with a fixed count are done by the
  hardware itself, with no compare-and-branch instruction. A FOR word gives
  "repeat the words from BckA to EndA cnt+1 times".

All of it is plain synthesizable SystemVerilog. The memories are arrays that
start at zero.

## Block map

```
adc_valid, adc_data[4] ─┬─> sums03 ─ latch ─> do_sums (RUNat04)
                        │      seq128 = elms (elms_rom + elms_lrr_stack) + seq_decoder
                        │               │ one-hot strobes
                        │      sums_datapath: Parameter RAM, Sum Keeping RAM (sync_ram),
                        │                     raw record (record_ram), SumD accumulator
                        │               ├─> abort_req[16] ─> abort_logic ─> sys_abort
                        │               └─> very-slow sums, EndCycle ─> integ_sum ─> integ[4]
                        └────────> deripple ─> cic (y), dr, wf_ok
```

| file | what it is |
|---|---|
| `elms_pkg.sv` | instruction layout of the sequencer, assembler functions |
| `seq128_pkg.sv` | user instruction codes and the sliding-sum program |
| `elms_lrr_stack.sv` | loop registers, 128-word loop stack, loop-end compare |
| `elms_rom.sv` | 128 x 36 program memory with a registered address and a load port |
| `elms.sv` | the sequencer: PC, branch and loop logic, user output register |
| `seq_decoder.sv` | decodes the user fields into strobes |
| `seq128.sv` | sequencer + program + decoder |
| `sync_ram.sv` | registered-input RAM (Parameter RAM, Sum Keeping RAM) |
| `record_ram.sv` | 4 x 64K x 16 circular record of raw readings |
| `sums_datapath.sv` | the shared sliding-sum datapath |
| `abort_logic.sv` | system abort from the 16 requests |
| `deripple.sv` | CIC sums, waveform capture and validation, subtraction |
| `integ_sum.sv` | pedestal, squelch, integration |
| `sums03.sv` | top level |

## The ELMS sequencer

### Instruction word

A word is 36 bits. If any of bits 35..32 is set, the word is a program control
word and the sequencer executes it. Otherwise it is a *user* word: the sequencer
only registers bits 31..0 and hands them to the application. The sequencer has
no ALU and no data registers.

| bits 35..32 | name | BckA 23:16 | EndA 15:8 | 7:0 | action |
|---|---|---|---|---|---|
| 1000 | JMP | | | desA | next PC = desA |
| 0001 | JMPIF | | | desA | next PC = desA if input `cond_jmp` is high |
| 0010 | FOR | BckA | EndA | cnt | push loop; run BckA..EndA cnt+1 times |
| 1010 | CALL | BckA | EndA | desA | push loop with cnt = 1, jump to desA |
| 0100 | RTN | | | | pop the loop and go to its BckA |
| 1100 | BRK | | | desA | pop the loop and go to desA |

The bits act independently: CALL is JMP plus FOR, and BRK is JMP plus RTN.
BRK follows from that bit reading. It is not separately specified.

### How a loop runs without a branch

The Loop & Return Registers (LRR) hold the innermost loop as {BckA, EndA, CNT}.
Older loops are pushed into a 128-word stack. Every cycle a comparator checks
the PC, which is the address of the word now at the memory output:

```
LoopBack = (PC == EndA) && (CNT != 0)   -> next PC = BckA, CNT -= 1
LastPass = (PC == EndA) && (CNT == 1)   -> pop
```

A loop pushed with cnt makes passes with CNT = cnt, cnt-1, ..., 1, and each of
those passes jumps back. On the pass that ends with CNT = 1, the entry is popped
at the same time as the jump. The final pass therefore runs under the outer
loop's registers, and at EndA it simply falls through. That gives cnt+1 passes
in total, with no instruction spent at the loop end.

Words between the FOR and BckA run once, as the loop's initialization. They may
hold loops of their own.

CALL is a one-count loop whose body is elsewhere. The PC jumps to desA, runs
until EndA, then returns to BckA and pops. Any stretch of code can be called
this way. RTN returns early, and inside a FOR it acts as a break: it jumps back
to BckA once more and pops, so the remaining pass falls through.

Behaviour that this design adds on top of the rules above:

* Entries carry a valid bit, so an empty LRR never matches.
* A FOR with cnt = 0 is popped at its EndA without jumping back. With the two
  formulas alone it would never be popped.
* A push with an empty LRR does not store anything in the stack. So 129 levels
  fit: the LRR plus 128 stack words.
* Overflow is the programmer's problem. An assertion reports it in simulation.

### Next-address logic

The memory has a registered address, like an FPGA block RAM. The next address
is chosen combinationally from the word now at the memory output, so taken
branches and loop-backs cost no bubble:

```
rst -> 0   >   run_at04 -> 4   >   JMP / CALL / BRK / taken JMPIF -> desA
    >   LoopBack or RTN -> BckA   >   PC + 1
```

After reset the program parks in `03: JMP 03`. Nothing toggles there. The
`do_sums` pulse (RUNat04) forces the PC to 4 for one clock. This is the
non-pipelined organization. A pipelined one, with registers on both sides of
the memory, would be faster but needs a bubble after every branch. It is not
built.

### User instructions and their timing

A user word has four 4-bit fields: SEQA 31:28, SEQB 27:24, SEQC 23:20 and SEQDQQ
19:16. It also has two 8-bit fields, ADH 15:8 and ADL 7:0, which carry addresses
or constants. Each field value 1..15 is one named strobe (see `seq128_pkg.sv`).
Strobes that a step may need together are placed in different fields.

If a word is fetched in cycle t:

* SEQA, SEQB, SEQC, ADH and ADL are valid in cycle t+1.
* SEQDQQ is valid in cycle t+2.

The delayed field exists because the Parameter RAM and the Sum Keeping RAM
register their address. An instruction presents the address through ADL or ADH
in t+1. The data then comes out in t+2, when the SEQDQQ strobe captures it.

## The sliding-sum program

Each of the 16 sums is updated with `S = S + x[n] - x[n - len]`. The old reading
`x[n-len]` is read from the raw record, a circular buffer of 64K points per
channel. The program is an outer FOR over the 4 sum types and an inner FOR over
the 4 channels:

| PC | fields | meaning |
|---|---|---|
| 03 | JMP 03 | sleep |
| 05 | IncCirBufPT | advance the record pointer |
| 06 | SetType 0 | |
| 07 | FOR 08..17 cnt 3 | 4 types |
| 08 | SelSumLengths, EnQLen, ADL 40 | QLen = length of this type |
| 09 | SetCh 0 | |
| 0A | FOR 0B..16 cnt 3 | 4 channels |
| 0B | EnQCH | QCH = current reading |
| 0C | LdSumMQ, ADH 80 | SumMQ = stored sum |
| 0D | EnSumsMemA, LdModeSelX, ADL 68 | record address = ptr - QLen; QThr = threshold |
| 0E-0F | SumsMemCS, SumsMemOE, EnQTailSqch | read the old reading into QTail |
| 10-12 | EnSumD with sloadSumD / add / SubSumD | SumD = SumMQ + QCH - QTail |
| 14 | WRsumX, ADH 80 | store SumD |
| 15 | ChkSumsOT | abort_req = SumD > QThr |
| 16, 17 | IncCh, IncType | loop ends |
| 18-1D | FOR over channels: SumsMemCS, SumsMemWE, SelCurrAddr | store the new readings at ptr |
| 1E, 1F | EndCycle; JMP 03 | done, back to sleep |

Words 00-17 are the original program. The table above lists them
field by field; the testbench checks the assembled words against the machine codes.
Words 18-1F are this design's own addition. The raw readings have to be written
somewhere, and the program has to return to sleep.

The address map is also this design's choice:

* Parameter RAM: `ADL + type` under SelSumLengths, otherwise `ADL + {type,ch}`.
  Sum lengths are at 0x40..0x43 and thresholds at 0x68..0x77.
* Sum Keeping RAM: `ADH + {type,ch}`.

A reading arrives, and `cycle_done` (EndCycle) follows 234 clocks later. The
reading period is about 1050 clocks.

Sum lengths may be 1..65535 (16-bit record pointer). Sums are 32 bits wide.

## De-ripple

The fast sliding sum still carries 60 Hz and 180 Hz ripple. Its sinc response
has sharp zeros that cannot be kept on the noise lines while the accelerator
ramps. The de-ripple path works in three steps.

1. **CIC sum of order 2**, length K = 128. This is the sliding sum of the
   sliding sum. No storage is needed for the first-stage sums:

   ```
   u[n] = u[n-1] + x[n] - 2x[n-K] + x[n-2K]        y[n] = y[n-1] + u[n]
   ```

   The first zero falls at about 360 Hz, so y can be decimated. The same
   recursion on `x[n-L]`, `x[n-L-K]` and `x[n-L-2K]` gives `y[n-L]`, the CIC sum
   one period (L = 752 readings) earlier.
2. **Waveform capture and validation.**
   * A 24-bit accumulator grows by 22336 per reading. Its top 7 bits address a
     128-point page, so the accumulator wraps once per 1/60 s.
   * The first reading at each new address writes y into the channel's tentative
     page and adds y into a waveform sum.
   * Throughout the period, `|y[n] - y[n-L]|` is compared with `max_dy`. A loss
     that is not periodic breaks this check and spoils the period.
   * At a wrap, a clean period flips the page bit PG, so the tentative page
     becomes the one in use. It also latches the mean, `WM = sum >>> 7`.
3. **Subtraction.** The output is `DR = y - (WF[PG][addr] - WM)`. WF - WM has
   zero mean, so slow (DC) losses stay in DR and only the periodic part is
   removed. Until a first waveform is valid, WF - WM is forced to 0 and DR = y.

A period may only become valid if L + 2K readings had been taken when it began.
Before that, y[n-L] has no real history behind it. As a result, the first usable
waveform appears after the third period.

The block keeps its own 1024-point history per channel instead of reading the
64K raw record, so it runs independently of the sequencer. It handles the 4
channels one after another in 9 clocks each. In the full-size test, the ripple
left in DR is about 1/29 of the ripple in y.

## Integration sums with squelch

After `ped_start`, the next 752 readings of each channel are summed into P.
Then the block works out two things:

* the pedestal per reading, `P / 752`;
* the pedestal scaled to the very-slow sum, `P * vs_len / 752`.

The very-slow sum is set short, about 64 readings, so that it acts as a smoothed
input. At every `cycle_done`, `diff = very-slow sum - scaled pedestal` is
formed. If the squelch is off, or `diff > squelch`, then `x - P/752` is added to
the integration sum. Otherwise the sum is held.

This is dedicated logic, not microcode. The original drove it with further
sequencer strobes whose program is not available.

## System abort

`abort_logic` counts the channels that have at least one request of a type
enabled in `abort_type_mask`. It raises `sys_abort` one clock later when that
count reaches `abort_min_channels`. The rule is "number of channels and types
of requests", and the exact form is this design's choice.

## Using it

Parameters of `sums03` and their defaults:

| parameter | default |
|---|---|
| `REC_DEPTH` | 65536 |
| `CIC_K` | 128 |
| `PERIOD_L` | 752 |
| `DEC_INC` | 22336 |
| `N_PED` | 752 |

Host set-up before the first reading:

* Write the four sum lengths to Parameter RAM 0x40..0x43.
* Write the 16 thresholds to 0x68 + 4·type + channel.
* Set `max_dy`, `squelch`, `squelch_en`, the abort mask and the channel
  minimum.
* Pulse `ped_start` at the start of a beam cycle.

After that, pulse `adc_valid` with the four readings once per reading period.
The period must be at least about 240 clocks. A new program can be written
through `prog_*` while the sequencer sleeps.

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. To run one with Verilator, for example the
full-size end-to-end test:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/elms_pkg.sv rtl/seq128_pkg.sv tb/tb_sums03.sv --top-module tb_sums03
./obj_dir/Vtb_sums03
```

`tb_sums03` runs the top at its default sizes for 2700 readings (2.8 M clocks,
a few seconds). It compares all 16 sums and requests after every reading with
its own running sums, and it checks:

* the system abort;
* the pedestal and the integration sums;
* the program length;
* the three forced periods;
* the page flips;
* the rejection of a period that contains a beam-loss burst;
* the reduction of the ripple.

The block testbenches go further:

* `tb_elms` runs a program with every control instruction and nested loops and
  compares the PC trace.
* `tb_sums_datapath` checks sums of lengths 1 to 200 through pointer wrap.
* `tb_deripple` checks y, DR and the page bookkeeping against a direct,
  non-recursive CIC computation.

`tb_long_sums` runs the top at its default sizes for 70000 readings (17.5 M
clocks, about 15 s), with lengths up to 65535. This takes the record pointer
through a full wrap. It holds one channel at full scale until that channel's
65535-long sum reaches 65535 x 65535, the largest value a 32-bit sum must
carry.

## Departures and open points

* **Field positions.** The loop-instruction fields are placed as the assembled
  program words place them: BckA 23:16, EndA 15:8, cnt/desA 7:0.
* **Strobe meanings.** LdModeSelX is taken to load the threshold of the current
  sum. EnQCH takes the latched ADC reading. Both are readings of names whose
  function is not spelled out.
* **Unused strobes.** Strobes for integration, DACs, waveform writes and
  constants are decoded but drive nothing. Their datapath is not specified.
* **Missing pieces.** The analog ping-pong integrators and the ADC are outside
  the design, and there is no host bus protocol.
* **Record size.** The 4 x 64K x 16 record is a 4 Mbit memory. On a small FPGA it
  would be an external SRAM, and its `cs/oe/we` interface is shaped for that.
