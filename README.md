# A reconfigurable multiprocessor for real-time data paths

Many real-time signal-processing algorithms move data at a rate close to the
clock: every cycle a new sample arrives and a result leaves. A conventional
processor that fetches one instruction at a time cannot keep up. Such systems
are usually built from hard-wired pipelines of adders, shifters and
registers, each pipeline laid out to follow the data-flow graph of the
algorithm.

This design is a programmable replacement for those hard-wired pipelines. It
is a cluster of eight 16-bit **execution units** (EXUs). Each EXU has its own
small register files and its own instruction memory. A **crossbar** joins the
EXUs to each other and to the chip's I/O buses, and its routing can change
every clock. A data-flow graph maps onto the cluster almost node for node. An
EXU can also time-share several operations if the sample rate allows it.

The chip's nominal rate is 25 MHz. Each EXU completes one instruction per
clock, so eight EXUs give 200 million operations per second. 128 data pins
give 400 MB/s of I/O.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable, apart from the
testbenches and the EPROM model in `tb/`.

## How a cycle works

Instruction issue is the core idea. An external sequencer sends the chip a
single **3-bit global address** (`gaddr`) each clock. Each EXU looks that
address up in its own **nanostore**, a local 8-word × 53-bit memory, and
executes the word it finds there. The eight EXUs therefore run eight different
instructions from one broadcast address. The chip needs only three instruction
pins, which leaves the pins free for data. The nanostores are loaded once, at
set-up time.

In one clock an EXU does the following (`rtl/exu.sv`):

1. Each of its two register files (A and B, six registers each) can write a
   value. The value comes either from the crossbar input for that file (IN1
   for A, IN2 for B) or from the EXU's own result (local feedback).
2. File A is read directly. File B is read through a logarithmic arithmetic
   right shifter (0–15 places).
3. The arithmetic unit computes pass A, pass B, add, subtract, max, min or
   accumulate. Results saturate instead of wrapping, in two's complement or
   unsigned format. The unit also produces a **status flag**.
4. The result is written back on the next rising edge and loaded into the
   pipeline register. The EXU's output (to the crossbar and the output buses)
   is either the result itself or the pipeline register.

Register reads, the shifter and the adder are combinational, so an
instruction really does finish in one clock. The output path from result to
output bus is also combinational unless the instruction selects the pipeline
register. The adder is a carry-select adder with 4-bit blocks
(`rtl/csel_adder.sv`).

### The instruction word

`paddi_pkg::instr_t` lays out the 53-bit nanostore word. Only the width is
fixed by the architecture. The field layout below is this implementation's
own, and 12 bits are left reserved.

| field     | bits | meaning |
|-----------|------|---------|
| `in1`     | 6    | source of file A: `fb` (own result), `t1` (Type I choice), `t2` (Type II choice) |
| `in2`     | 6    | source of file B, same encoding |
| `wa`,`wb` | 3+3  | write address 1..6 in file A / B; 0 means no write |
| `ra`,`rb` | 3+3  | read address 1..6 (0 reads zero) |
| `dly_a`,`dly_b` | 1+1 | delay-line mode for the file |
| `shamt`   | 4    | arithmetic right shift of the B operand |
| `op`      | 3    | `OP_PASSA, OP_PASSB, OP_ADD, OP_SUB, OP_MAX, OP_MIN, OP_ACC` (7 reserved, acts as pass A) |
| `sgn`     | 1    | 1 = two's complement, 0 = unsigned |
| `pipe`    | 1    | output comes from the pipeline register |
| `obus`    | 4    | drive output bus k |
| `ien`     | 2    | interrupt enables IEN1, IEN2 |
| `rsv`     | 12   | unused |

The all-zero word is a no-op: it writes nothing, drives no bus and enables no
interrupt.

The function `paddi_pkg::src_sel(self, src)` builds the crossbar fields from
a plain source number: 0–7 is an EXU and 8–11 is an input bus. Use it rather
than encoding `t1`/`t2` by hand.

### Register files and delay lines

Each file (`rtl/regfile.sv`) has one write port and one combinational read
port. **Register 6 is a scan register.** During configuration it is part of
the chip's serial chain, so it starts with a constant; after that it is an
ordinary register. The common idiom "B6 holds the constant 1" comes from
this.

In **delay-line mode**, writing address *w* shifts registers 1..*w* (the new
value enters register 1). Register *w* then holds the input from *w* writes
earlier, which is used to retime a stream without spending EXU cycles. How
the delay line works is this implementation's choice; the architecture only
says the files can be configured as delay lines.

### The status flag

The flag is 1 when the B operand (after the shifter) is greater than the A
operand, compared in the instruction's number format. It is computed every
cycle, whatever the operation, and max/min use the same comparison.

Be careful with the polarity. The architecture describes the flag as
"a > b", while the example program's comment speaks of B ≥ A. Only the strict
**B > A** reading makes the published counter example behave as described
(see below), so that is what is built. If your programs assume the other
polarity, swap the operands.

## The crossbar

A full 12-input crossbar at every one of the 16 EXU inputs would not fit the
pitch of the data paths. The crossbar is therefore built in two layers
(`rtl/crossbar.sv`, `rtl/xbar_type1.sv`, `rtl/xbar_type2.sv`):

* The cluster has two halves, EXUs 0–3 and 4–7.
* A **Type I switch** at each EXU input chooses one of the three other EXUs
  of its own half, or the output of its Type II switch.
* A **Type II switch** chooses one of the four EXUs of the other half, or one
  of the four input buses.

An EXU's own output is not routed through the crossbar; it uses the local
feedback path (`fb`). The selections come from each receiving EXU's current
instruction, so the routing follows the program clock by clock.

There are four 16-bit input buses and four 16-bit output buses, 128 pins in
all. Four-in, four-out is this implementation's split of the 128 pins. An
output bus carries the output of the EXU whose instruction sets that bus's
`obus` bit. Several drivers on one bus is a programming error: an assertion
reports it, and the lowest-numbered EXU wins. The chip's tri-state bus drivers
are modelled as multiplexers.

**Status flags are routed statically**, by each EXU's configuration word:

* The sources of an EXU's interrupt flags 1 and 2 (`f1src`, `f2src`): 0–7 is
  an EXU's flag, 8–9 is external flag input 0–1, and 10–15 is constant 0.
* Which external flag outputs the EXU's own flag drives (`flagout`). Each
  output is the OR of all the flags routed to it.

## Interrupts and the counter example

The broadcast address gives every EXU the same control flow. Interrupts let
a single EXU break away from it (`rtl/exu_ctl.sv`):

* If the executing instruction has IEN1 set and the EXU's flag 1 is high,
  then **in the next cycle** the EXU executes the word at its vector IVEC1
  instead of the broadcast address.
* IEN2, flag 2 and IVEC2 work the same way. Interrupt 1 wins if both fire.
* The interrupt lasts one cycle. After it, the EXU follows `gaddr` again
  unless the flag fires again with its enable set.

The reference program is a block-depth counter that cycles 0, 1, 2 on two
EXUs. `tb/tb_paddi_chip.sv` runs it on EXUs 0 and 1:

* **Counter** (EXU 0): A6 = 0 and B6 = 1; flag 1 comes from EXU 1; IVEC1 = 1.
  * Word 0 computes `A6 + B6`, writes the result to A6 and B1, drives output
    bus 0, and sets IEN1.
  * Word 1 computes `A6 - B1`, which is 0, writes it to A6 and B1, and drives
    bus 0.
* **Compare** (EXU 1): A6 = 0; its flag goes to flag output 0.
  * Word 0 latches the counter's output into B6, computes `A6 - B6`, and
    drives output bus 1.

Cycle by cycle, with `gaddr` held at 0:

| cycle | counter word | bus 0 | compare B6 | flag (B6 > 0) |
|-------|--------------|-------|------------|---------------|
| 0     | 0            | 1     | 0          | 0             |
| 1     | 0            | 2     | 1          | 1 → vector    |
| 2     | 1 (vector)   | 0     | 2          | 1, IEN1 off   |
| 3     | 0            | 1     | 0          | 0             |

Bus 0 repeats 1, 2, 0. The counter register itself holds 0, 1, 2.

## 32-bit operation

EXUs 2k and 2k+1 work as one 32-bit unit when both have the `link` bit set in
their configuration words; EXU 2k is the low half. The two halves exchange
signals (`link_lo_t`, `link_hi_t` in the package):

* The low half sends up its adder carry and its unsigned half-word
  comparison.
* The high half works out the 32-bit comparison and whether the 32-bit
  result saturates, and sends both back down. Both halves then saturate, and
  pick for max/min, as one 32-bit word.
* The low half's shifter takes its fill bits from the high half's operand.

Program both halves with the same operation, format and shift. Results appear
on two buses or crossbar paths, one per half.

The linking mechanism itself is this implementation's design. The
architecture states only that pairs of EXUs can be configured as 32-bit
units.

## Configuration

After reset the chip configures itself from a byte-wide EPROM through two
small state machines:

* `rtl/cfg_eprom_fsm.sv` drives the EPROM address and waits two clocks of
  access time per byte. It then hands out the byte's bits MSB first.
* `rtl/cfg_seq_fsm.sv` steers those bits into the chip's global shift
  register.

The shift register has two parts:

* **Nanostore part.** Each nanostore (`rtl/nanostore.sv`) has a 53-bit scan
  register at its I/O, and the eight are chained EXU 0 → EXU 7. Each row is
  shifted in (424 bits) and then written into that row of all eight
  nanostores at once. This repeats for rows 0 to 7.
* **Static part.** Per EXU, A6 (16 bits), then B6 (16 bits), then the 17-bit
  configuration word `exu_cfg_t`, chained EXU 0 → EXU 7. That is 392 bits,
  shifted after the last row.

`running` then rises and the EXUs start executing. `scan_out` is the far end
of the static chain.

To build an EPROM image, write the bits in this order, MSB first within each
byte:

```
for row in 0..7:  { word[EXU7][row], word[EXU6][row], ..., word[EXU0][row] }  MSB first
then:             { seg[EXU7], ..., seg[EXU0] }  MSB first,  seg = { cfg, B6, A6 }
```

The image is exactly 473 bytes, and configuration takes about 4,730 clocks.
The task `build_image` in `tb/tb_paddi_chip.sv` is a working example.

The nanostore's scan register can also capture a stored row (`capture`) and
shift it out, for read-back. The chip-level sequencer does not use this, and
the top ties `capture` low.

## Where this RTL departs from the original chip

* **Clocking.** The original uses two-phase clocks and master-slave latches.
  Here there is one clock and every register is a rising-edge flip-flop.
* **Circuits.** The SRAM cells, sense amplifiers, pre-charge and dynamic row
  decoders are replaced by a register array.
* **Pads, clock generation and the bit-slice layout** of the crossbar have no
  RTL counterpart.
* **This implementation's own choices**, where the architecture is silent:
  * the instruction-field layout;
  * the bus split;
  * the flag pin counts (2 in, 2 out);
  * the delay-line behaviour;
  * the accumulate operand (the pipeline register);
  * the interrupt priority;
  * the bus-conflict rule;
  * the 32-bit link signals;
  * the EPROM size (2 KB, 11 address bits), access wait and image order;
  * the reset: asynchronous, active low, clearing all registers except the
    nanostore arrays.
* **External parts.** The external sequencer and the EPROM are not part of
  the chip. The testbench drives `gaddr` directly and uses
  `tb/eprom_model.sv`.

## Verification

Every RTL module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench:

* **Adder and shifter:** integer arithmetic.
* **Arithmetic unit:** a wide-integer model of every operation, both formats,
  single and linked.
* **Register file:** a reference array.
* **Crossbar:** every source for every input.
* **Configuration machines:** bit streams and counts.
* **EXU and control:** directed sequences worked out by hand.

`tb/tb_paddi_chip.sv` runs the whole chip at its default size:

* It configures the chip from an EPROM image.
* It runs the counter example and checks buses 0 and 1 and flag output 0
  every clock.
* In the same phase it runs:
  * a linked 32-bit saturating add;
  * an external-flag interrupt.
* It then switches the global address, a mode change, and runs:
  * a delay line feeding a shifter through a Type I switch and the pipeline
    register;
  * a 32-bit accumulator;
  * a max that reaches across the halves through a Type II switch.
* It counts each mechanism (interrupt, flag output, external interrupt,
  saturation, carry between linked halves, mode switch, delay line,
  accumulation, Type II path) and fails if any never occurs.

Not verified: clock rate, power and area. These depend on the technology and
cannot be checked here.

## Simulating

All files sit flat in `rtl/` and `tb/`. The package must be read first. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/paddi_pkg.sv tb/tb_paddi_chip.sv --top-module tb_paddi_chip -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_paddi_chip` with its name. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. Lint
the synthesizable part with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/paddi_pkg.sv rtl/paddi_chip.sv
```

The remaining lint warnings are about unused package constants, the reserved
instruction bits, and link fields that only one half of a pair reads.

## Files

| file | contents |
|------|----------|
| `rtl/paddi_pkg.sv` | sizes, instruction and configuration types, link types, `src_sel` |
| `rtl/paddi_chip.sv` | top level |
| `rtl/exu.sv`, `rtl/regfile.sv`, `rtl/shifter.sv`, `rtl/alu.sv`, `rtl/csel_adder.sv` | execution unit |
| `rtl/exu_ctl.sv` | address selection, interrupts, configuration word |
| `rtl/nanostore.sv` | instruction store with scan register |
| `rtl/crossbar.sv`, `rtl/xbar_type1.sv`, `rtl/xbar_type2.sv` | crossbar and flag routing |
| `rtl/cfg_eprom_fsm.sv`, `rtl/cfg_seq_fsm.sv` | configuration controller |
| `tb/tb_*.sv` | testbenches, one per module |
| `tb/eprom_model.sv` | behavioural EPROM |
