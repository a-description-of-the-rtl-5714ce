# MATHILDA — a 64-bit horizontally microprogrammed processor in SystemVerilog

MATHILDA is a processor built for research on interpreters and processor
design, and it is meant to be microprogrammed by its users. It has no fixed
instruction set. Each 64-bit microinstruction does four things in one step:

- It moves one word across a 64-bit main data path.
- It fires up to four microoperations on the registers hanging off that path.
- It steps three shift registers.
- It picks its successor with `if c then At else Af`.

Almost every control register in the machine is built the same way. Each
one is a *Standard Group*: sixteen registers, a pointer into them, and two
registers that save the pointer. So a microprogram can keep, for each unit
(masks, shift amounts, ALU functions, counters), a small table of settings
and switch between them in one microinstruction.

This repository holds synthesizable RTL for the whole processor, from the
control store to the I/O ports. It also holds a self-checking testbench for
every unit and one for the whole processor.

## The Standard Group (`mat_std_group`)

A Standard Group has these parts:

- N = 16 elements of W bits.
- A 4-bit pointer P.
- Two pointer-save registers, Save1 and Save2.

P can be loaded, incremented, decremented (modulo 16) or cleared. The load
source is a value chosen by the caller (immediate, EX, shifted bus), Save1 or
Save2. Save1 loads from a value or from Save2. `Save2 := P` saves the
pointer.

The original machine has two clock pulses per microinstruction. Pulse 1
saves and writes; pulse 2 changes the pointer. Here both happen on one
rising edge, and every update reads the values from before that edge. So
"write element, save pointer, then step the pointer" takes one
microinstruction, as intended. One side effect is this design's own: writing
`Save2 := P` and `P := Save2` together swaps them.

Every unit that has "an SG" instantiates this module with its own width.
Examples are CASG (16 bits), BSSG (6 bits), ALSG (6 bits), BESG (4 bits) and
the 1-bit condition registers CR.

## The main data path

One transport per microinstruction runs:

```
SOURCE --(AND bus mask)--> BUS --(right rotate)--> --(AND postshift mask)--> SB --> destination
```

- **SOURCE** picks one of eight inputs: status port, AL, VS, DS, WA, WB, IA
  or IB.
- **Bus masks** (`mat_bus_masks`) AND the source with `MA[MAP] | MB[MBP]`.
  MA and MB are 16 x 64-bit groups. The result is the BUS.
- **Bus shifter** (`mat_bus_shifter`) rotates the BUS right by 0..63 places
  when the microinstruction's BS-enable bit is set. The shift amount comes
  from BSS: immediate, EX, the bit encoder or BSSG.
- **Postshift masks** (`mat_postshift_masks`, `mat_mask_gen`) AND the rotated
  word with `PA[PAP] | PB[PBP] | PG`. PG is a generated mask of n zeros
  counted from bit 0 or from bit 63. The result is the shifted bus SB.
- **SB** goes to one shifted-bus destination: MA, MB, LR, WA, WB, OA or OB.
  At the same time, the AS, VS and DS shift registers can load it.

The BUS and SB of each transport are latched (`bus_q`, `sb_q`). All BUS and
SB conditions are taken from these latches. This matches the machine's rule
that a result is tested by the *next* microinstruction.

### Working registers (`mat_working_regs`)

WA and WB each hold 256 x 64-bit registers. Each 8-bit pointer is split into
a 4-bit *unit* part (WAU) and a 4-bit *group* part (WAG):

- **Coupled:** stepping the unit part carries into the group part, so
  WA behaves as one flat file of 256 registers.
- **Uncoupled:** the unit part wraps, so a microprogram can walk within one
  group of 16.

Both parts have Standard-Group save registers.

A loading mask (LA for WA, LB for WB) is a 64-bit Standard Group. It decides
which bits of the destination register a transport writes. The other bits
keep their value.

### AL, the shifters and the local registers

- **AL** (`mat_al_unit`, `mat_alu`) combines the local register at the LR
  output pointer (A) with the accumulator shifter AS (B). Its result is a
  bus source. It uses one of 32 functions, 16 arithmetic and 16 logic, plus
  carry-in. The function register ALF loads from immediate data or from
  ALSG, or takes one of the fixed `SET` codes (A+B, A-B, A, A+1, B, all
  zeros, all ones). A new function takes effect from the next
  microinstruction. AL conditions are:
  - result all ones;
  - result bits 0 and 63;
  - carry;
  - one's and two's complement overflow.
- **AS and VS** (`mat_bit_shifter`) shift the whole 64-bit register one
  place per microinstruction. The bit that enters at each end comes from a
  3-bit source register (S0, S63). The eight choices are zero, one, the bit
  leaving at the other end, the *variable bit* V, or bits wired from the
  neighbouring shifters, the bus and CR. V is the bit at the position held in
  the 6-bit register AS(V)S. Feeding V back lets the shifter act as one of
  any width from 1 to 64.
- **DS** (`mat_double_shifter`) works the same way but moves two places per
  step.
- Each of the three has two dedicated bits in every microinstruction: idle,
  left, right or load.
- **LR** (`mat_local_regs`) is four 64-bit registers with separate input and
  output pointers.
- **BPG** (`mat_bus_parity`) is the parity of the BUS.

### Bit Encoder (`mat_bit_encoder`)

Two priority encoders find the lowest and highest one bit of the BUS.

- `L load` pushes the lowest-bit index into LSB1 and moves the old LSB1 into
  LSB2.
- `M load` does the same for MSB1 and MSB2.

From these four registers the encoder computes one of sixteen 6-bit values:

- LSB1, LSB1-1, MSB1, MSB1+1;
- the length MSB1-LSB1;
- the differences of two lengths or of two positions;
- the "half plus one" of each of the above.

That value can drive the bus shift amount, the postshift mask generator and
Counter B. The common job it serves is normalising or extracting a bit field
in one transport. Conditions report equal and zero lengths and the signs of
the differences.

### Status Port (`mat_status_port`)

This is a 64-input selector addressed by SPP. Its output is zero-extended to
64 bits and used as a bus source. Input 0 is a 16-bit literal from the
microinstruction, so `SPP = 0` puts a constant on the BUS. The other inputs
let a microprogram read back the machine's control state: counters,
pointers, the bit encoder, EX, SA, IRA, WSA, selection registers and device
numbers. Inputs 1..22 are used; their order is listed in the header of
`mathilda.sv`. Inputs 23..63 read as zero.

## Counters and the Wide Store address

- **CA and CB** (`mat_counter`) are 16-bit counters with a zero condition.
  Each has its own Standard Group. They load from immediate, EX or the bit
  encoder, the shifted bus, or their group.
- **WSA** (`mat_wsa`) is the 16-bit address register of the shared 32 K-word
  Wide Store. It has a busy flag, which a load sets and `ws_taken` clears,
  and an out-of-range condition. The memory itself is outside the processor.

## Input and output facilities (`mat_input_port`, `mat_output_port`)

There are two input ports (IA, IB) and four output ports (OA..OD). Each
serves up to 16 devices, selected by a 4-bit device register.

**Input.** Activating an input port does two things: it clears the selected
device's *data available* flag, and it sends that device a one-clock
`*_req`. The device answers with `*_ld`, which fills its buffer and data-mark
bit and sets *data available* again. A microprogram waits on the
data-available condition.

**Output.** An output activation succeeds only if the selected device is not
busy (*space available*). It copies the port register and a mark bit into
the device buffer and sets busy. The device clears busy with `*_done`. OA and
OB are loaded from the shifted bus as destinations; OC and OD are loaded from
the BUS by a microoperation.

## The control unit (`mat_sequencer`, `mat_return_stack`, `mat_control_store`)

The control store is 4096 x 64 bits and writable. A microinstruction holds
two 3-bit address sources, Af and At. The selected condition c picks one.
The eight sources are:

| code | next address |
|---|---|
| 0 | EX(11:0), the External register |
| 1 | CUAL: a 12-bit ALU with the current address A as its A input |
| 2 | RB stack adder (pops RB) |
| 3 | RA stack adder (pops RA) |
| 4 | SA, the save-address register |
| 5 | A-1 |
| 6 | A+1 |
| 7 | A |

Details of the sources:

- **CUAL and the adders.** The B input of the CUAL and of both stack adders
  is chosen by BISB: 0, the 6-bit field t sign-extended, the 12-bit T.t, or
  SA(5:0). Their carry-in is c or not-c, chosen by CISB. So one
  microinstruction can do a relative branch or a computed jump, or return to
  "top of stack plus offset".
- **Return stacks RA and RB.** Each is sixteen 12-bit entries. Pushing onto
  a full stack forces a jump to address 0, as do external signals and the
  snooper line, but only while interrupts are enabled (INTON/INTOFF). The
  address that would have been used is saved in IRA.
- **EX** is a 16-bit register loaded from outside (`ex_in`). It rotates by
  four places, so a microprogram can take a 16-bit code apart four bits at
  a time.
- **Control store loading.** OC doubles as the control store's data
  buffer. `CS LOAD` writes OC into the control store at the address that
  the `if c then At else Af` selection produced, and then continues at A+1.
  If OC is loaded in the same microinstruction, the BUS is written directly.
  `STOPA`/`STOPB` halt the sequencer until `cont`.

### Conditions and short/long cycle (`mat_conditions`)

The 7-bit CSB field selects one of 128 conditions (`mat_pkg::cond_e`). The
selected condition can also be saved:

- into CR, a 1-bit Standard Group;
- into the program switches KC and KD.

KA and KB are console inputs.

**Short cycle** (the reset state) runs one microinstruction per clock, and
sequencing sees the conditions left by the *previous* microinstruction.

**Long cycle** (after `CYL`) takes two clocks. The first executes; the second
sequences on the conditions this same microinstruction produced. CR, KC and
KD loads happen in the sequencing clock. `CYS` returns to short cycle.

## The microinstruction (`mat_pkg::uinst_t`, `mat_mop_decode`, `mat_mop_pkg`)

| field | bits | use |
|---|---|---|
| F1, S1, M/D2, F2, M/D3, F3, S3, M/D4, F4 | 35 | microoperations and data |
| BS enable, SBD, SOURCE | 7 | transport |
| BISB, CISB, CSB, Af, At | 16 | sequencing |
| AS, VS, DS control | 6 | shifters |

Decoding rules:

- F1 always names a microoperation.
- F2, F3 and F4 name one when their M/D bit is 1. When it is 0 they carry
  immediate data.
- A "load from CM|EX|SB|SG" microoperation sits in F1 or F3. Its source is
  S1 or S3, and its immediate data is F2 or F4.
- 16-bit immediates, and the status-port literal, join two fields.

The decoder gives one strobe per microoperation (`act`). The top applies
each strobe to its unit.

Which field each microoperation belongs to follows the original machine's
microoperation tables. **The binary codes are this implementation's own:**
code *k* of a field is the *k*-th name in that field's list in
`mat_mop_pkg.sv`. The same holds for the bit order inside the
microinstruction and the numbering of conditions, sources and status-port
inputs. Microcode written for the original hardware therefore needs
re-assembling. `tb/tb_mathilda.sv` shows a small assembler written as
SystemVerilog functions.

## How far to trust it, and where it departs

- **Taken from the original design:** the structure of every unit, all
  widths and sizes, and the sequencing scheme. Also the one-edge equivalent
  of the two-pulse timing, and the handshakes of the ports.
- **This design's own choices:**
  - all binary encodings (microoperations, conditions, source/destination
    codes, selector codes of Standard Groups, fill sources of the shifters);
  - the status-port input order;
  - parity sense;
  - that the CUAL carry condition is the carry of the *previous* sequencing
    step;
  - the reset state: registers cleared, short cycle, interrupts off. The
    exception is MA: every element is all ones except MA[1], which is all
    zeros, so MAP = 0 passes the source unmasked;
  - OC keeps its 16 device interfaces while also serving as the control
    store's data buffer (the original also describes OC as dedicated to
    the control store);
  - the `cs_ld_*` loader port, which writes the control store from outside
    and holds sequencing while it is used.
- **Not included:**
  - The snooper, a measurement unit with its own control store, because it
    is only outlined. Its interrupt line is the `snoop` input.
  - The Wide Store memory itself, which is external.
  - The host and the I/O devices. Their interfaces are top-level ports.

Every unit testbench compares the unit against a reference model computed
in the testbench, mostly with random stimulus (exhaustive where the input
space is small, directed for the sequencer).

`tb_mathilda` runs the whole processor at its default sizes (4096-word
control store, 256 working registers, 16 devices per port). It runs one
microprogram that uses:

- masks and rotation;
- the bit encoder feeding Counter B through the status port;
- a counted loop;
- a subroutine call and return;
- long cycle;
- an input handshake with waiting;
- a control-store write and execution of the written word;
- a forced jump to 0 with IRA read back;
- STOP/continue;
- output handshakes with stalls.

It counts every mechanism and fails if any of them did not happen. It also
checks loop and long-cycle clock counts.

`tb_wl_wa_search` runs a classic microprogramming exercise on the full
machine: N words arrive over IA into WA, then WA is searched for the first
register with bit 63 set. The hit is copied to WB[0] and its pointer is
saved in WAPS. It covers N = 256 (hit at the start, in the middle, at the
end, and no hit) and N = 2. It checks the words sent out on OC, the number
of passes through the test instruction, and the saved pointer.

## Simulating

All files are plain SystemVerilog-2017. Compile the two packages first:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl --top-module tb_mathilda \
    rtl/mat_mop_pkg.sv rtl/mat_pkg.sv tb/tb_mathilda.sv
./obj_dir/Vtb_mathilda
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Replace
`tb_mathilda` with `tb_mat_<unit>` to test one unit. The top has three
parameters: `NDEV` (devices per port, 16), `NREG` (working registers, 256)
and `WS_WORDS` (Wide Store size for the range check, 32768).
