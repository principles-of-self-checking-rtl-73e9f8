# SCAMP: a self-checking microprogrammed 16-bit processor

SCAMP is a 16-bit microprogrammed processor designed so that a failure
anywhere in one integrated-circuit package can never produce a wrong result
without being noticed. Every failure of that size is detected while the
processor does its normal work, and no separate test run is needed. The
processor does this with about 50 % extra hardware, much less than running two
copies and comparing them. Three ideas make it work:

* **Data is coded everywhere.** Every 16-bit word carries a 4-bit check
  symbol, the word's value modulo 15 (a *low-cost residue code*). A fifth
  4-bit data path slice works on the check symbols in parallel with the four
  slices that work on the data.
* **The microprogram is coded, and checked after it has reached the
  slices.** Each 60-bit microinstruction carries a 4-bit check nibble. The
  control lines are collected again in a *sink register* at their
  destinations, and it is the sink register that gets checked.
* **What cannot be coded is duplicated.** The microprogram sequencer
  (branching, condition codes, opcode decoding) is present twice, and the two
  next-address outputs are compared.

The processor has four checkers: one each for the data paths, the
microprogram, the two sequencers and the clock. Their two-rail outputs are
merged into one global error signal. A sticky error log (`err_log`) records
which checkers have fired since reset. The processor does not halt itself.

This repository holds synthesizable SystemVerilog for the whole machine at
its original size: 16-bit data, 16 general registers, 4 scratchpads and a
1K-word microprogram memory. Each module has a self-checking testbench. An
end-to-end testbench runs a microprogram on the full design and injects a
fault for each checker.

## Block diagram

```
                 +-----------+   next0   +---------------------+
   conditions -->| useq  #0  |---+------>| tsc_eq_checker (10) |--> z_seq
   opcode ------>|           |   |   +-->|                     |
                 +-----------+   |   |   +---------------------+
                 +-----------+   |   |
                 | useq  #1  |---)---+ next1
                 +-----------+   |
                      seq_sel -> mux -> uaddr
                                   |
                 +-----------------v-------------------+
                 | mprom: 15 x (1K x 4) ROM + check ROM |  repair_en/idx
                 |        -> microprogram data reg     |
                 +-----------------+-------------------+
                     control lines | check nibble
          +------------------------+---------------> sink_checker --> z_up
          v
  +--------------+ +--------------+ +--------------+ +--------------+ +-------------+
  | slice D15-12 | | slice D11-8  | | slice D7-4   | | slice D3-0   | | check slice |
  +------+-------+ +------+-------+ +------+-------+ +------+-------+ +------+------+
         |  carry/shift chain between data slices          |                |
         +------------------+---------------+--------------+                |
                            v D-bus data (16)                               v
    constant / I/O data -> D-bus mux  <----------------------------- check nibble (4)
                            |                                               |
                            |                                           +---v---+
                            |   K-bus = D-bus rotated right by 4        | fixup |<-- gen
                            |   (data slices)          K of check slice +---+---+
                            v                                               |
                  check register (16) --> residue_gen --> gen               |
                                                 |                          |
                                      tsc_eq_checker(4) <-- check register (4)
                                                 |
                                               z_dp
```

## The data path code and the check slice

This is the hardest part of the design to follow.

### Why a residue code

A check symbol that is the data modulo 15 survives addition directly. Because
16 = 1 (mod 15), the residue of a 16-bit word is the one's complement sum of
its four 4-bit nibbles, and the residue of a sum is the sum of the residues.
So the check slice, an ordinary 4-bit slice, can compute the new check symbol
with the same add or subtract command as the data slices. A failure in any one
slice changes the data part or the check part, but not both consistently.
The code misses one class of single-slice error: a nibble that flips from all
ones to all zeros, or back. Modulo 15, 1111 and 0000 are both zero. This
weakness is inherent to the code.

### Fix-up

The check slice computes with 4-bit one's complement arithmetic. The data part
uses 16-bit two's complement arithmetic. The `fixup` unit sits between the
check slice output and the rest of the design, and corrects the difference:

| situation | correction added to the check slice output `v` (mod 15) |
|---|---|
| add / subtract, no shift | `c4 - cout16` (check-slice carry out minus data carry out) |
| result shifted left one place | `2(c4 - cout16) + (sin - sout)` |
| result shifted right one place | `8(c4 - cout16) + 8(sin - sout)` |
| second step of two-step AND / OR | `- gen` |
| second step of two-step XOR | `- 2 gen` |

`sin` and `sout` are the bits that enter and leave the 16-bit data part in a
shift. For a rotation they are equal, so the correction vanishes. The check
slice always rotates its own four bits, because a 4-bit rotation multiplies a
residue by 2 (left) or by 8, which is 2^-1 mod 15 (right). Subtraction is
`A + ~B + cin`. Both the 16-bit and the 4-bit complement are congruent to
`-x` mod 15, so subtraction needs no extra term. The output is always
reduced to 0..14. `tb_fixup` checks these equations against real 16-bit
arithmetic for every operation and every shift kind.

### Checking one microcycle later

At the end of every microcycle the 16-bit D-bus word and the fixed-up check
symbol are latched into the check registers (`dpath_checker`). During the
next microcycle `residue_gen` recomputes the residue of the latched word, and
a two-rail equality checker compares it with the latched check symbol. So
checking never lengthens the microcycle. Every data transfer in the machine
passes over the D-bus, so this one checker covers all data: register moves,
ALU results, constants and I/O.

### Two-step logical operations

No code short of duplication survives AND or OR. SCAMP instead uses
identities whose check symbols can be computed from the operands' check
symbols:

```
A and B = A + B - (A or B)        A or B = A + B - (A and B)
A xor B = A + B - 2 (A and B)
```

An AND takes two microcycles:

1. The data slices compute `A or B` and drive the D-bus. Nothing is stored,
   and the microinstruction clears `chk_en` because this word has no valid
   check symbol.
2. The data slices compute `A and B`. The check slice *adds* the operands'
   check symbols, and the fix-up unit subtracts `gen`, the residue that the
   data path checker is computing at that moment for step 1's word. The
   result goes into the destination register: the data slices load from
   the D-bus, and the check slice loads from its K-bus, which is the fix-up
   output.

Because the operand check symbols take part in the result, a bad operand still
gives a bad result: the unit is *detection lossless*. A checker at the output
is then enough, with none needed at the inputs.

### Exceptions to identical slice control

All five slices get the same control lines, with these exceptions in
`scamp_top`:

* Load source (`kd_data`, `kd_chk`): the data slices and the check slice
  each have their own D-bus / K-bus select. The data slices' K-bus is the
  D-bus rotated right by 4 bits, and this rotation leaves the residue
  unchanged (16 = 1). So a 4-bit rotate loads the data slices from K and the
  check slice from D. An arithmetic result needing a fix-up loads the check
  slice from K, which is the fix-up output.
* In step 2 of a logical operation, the check slice adds, with carry in 0.
* When RW or RX is used as a short operand, the upper three data slices
  take 0. The operand is then the 4-bit value itself, not that value copied
  into every nibble.
* The check slice's shift input is its own shift output.

## Microprogram memory, sink register and repair

`mprom` stores 1024 words of 64 bits: fifteen 4-bit ROM packages for the 60-bit
microinstruction, plus a check ROM. Each bit of the check nibble is the XOR of
the same bit in all fifteen data nibbles (a *4-adjacent* code). So a failed
package, whatever it outputs, always gives a non-zero syndrome. The addressed
word is registered in the microprogram data register.

`sink_checker` latches the control lines, as delivered to the slices, into the
sink register, together with that microinstruction's check nibble. It then
checks them in the next microcycle with four XOR trees and a 4-bit two-rail
equality checker. (In RTL the lines at the destination are the same nets as
at the source. In a board-level build they are separate wires, and the point
of the sink register is to catch a broken one.)

**Repair.** The check ROM and the parity logic can stand in for a failed ROM
package. With `rom_repair_en` set, the output of package `rom_repair_idx` is
replaced by the XOR of the other fourteen packages and the check ROM. The
machine keeps running correctly, but without microprogram checking.
Likewise, `seq_sel` makes sequencer #1 drive the ROM in place of sequencer #0.
In the original these are socket and jumper changes. Here they are inputs.

## Microinstruction format

60 bits, from the most significant end (`scamp_pkg::uword_t`):

| field | bits | meaning |
|---|---|---|
| `spare` | 1 | unused, zero |
| `seq_op` | 3 | CONT, JUMP, JCOND, CALL, RET, MAP, LDCNT, LOOP |
| `cond_sel`, `cond_pol` | 3+1 | TRUE, CARRY, ZERO, SIGN (latched), SSYNC, counter zero; `cond_pol` inverts |
| `cc_latch` | 1 | latch carry, zero and sign of this cycle |
| `io_op` | 3 | load BAR for read / write, load BDR, MSYNC on / off |
| `chk_en` | 1 | check this cycle's D-bus word |
| `fix_sub` | 2 | two-step logic: subtract `gen` 0, 1 or 2 times |
| `dbus_src` | 2 | slices, constant (`lit` = {check, data}), I/O data bus |
| `ld_rw`, `ld_rx` | 2 | load RW / RX from D-bus bits 7:4 / 3:0 |
| `kd_data`, `kd_chk` | 2 | register load from D-bus (0) or K-bus (1), data slices / check slice |
| `dst` | 2 | none, general register (selected by RW or RX), scratchpad (port B address) |
| `sh_op` | 4 | none, ROL, ROR, SHL, SHR, SRA (one place, 16 bits); bits 3:2 are the direction lines, bits 1:0 pick the bit entering the end |
| `cin` | 1 | carry in |
| `spa`, `spb` | 2+2 | scratchpad port A / B addresses |
| `gr_sel_x` | 1 | general register selected by RW (0) or RX (1) |
| `b_src` | 2 | scratchpad B, RW, RX, zero |
| `a_src` | 2 | general register, scratchpad A, zero |
| `alu_op` | 3 | ADD, SUB (`A + ~B + cin`), AND, OR, XOR |
| `lit` | 20 | constant with its check symbol, or branch address / loop count in bits 9:0 |

A constant and a branch address share `lit`, so a microinstruction can do
one or the other. MAP jumps to `{lit[9:8], D-bus[15:8]}`, the opcode of the
instruction on the D-bus. The all-zero word is a valid no-operation, and so
is the word in the data register after reset.

## Sequencers

`useq` keeps the address of the microinstruction now in the data register,
and computes the next address from that microinstruction. It has a
four-entry return stack, a 10-bit loop counter and latched carry, zero and
sign. After reset the first address fetched is 0. LOOP decrements the
counter and branches while the new count is not zero. The loop counter
bounds I/O waits: a routine polls SSYNC with JCOND and LOOP, and leaves
through the fall-through path if the device does not answer in time. The two
copies get identical inputs. A 10-bit two-rail equality checker compares
their next addresses in the same cycle.

## Multiplication with a single checker

Each iteration of a multiply is a double-length shift plus a conditional
add. Every word must pass the one D-bus checker, so this cannot be done in
one microcycle (that would need a second register pair with its own
checker). `tb_scamp_multiply` shows the loop at two microcycles per
iteration, using only the hardware above:

```
X0:  Q <- Q + Q, latch carry;  load loop counter (15)
X:   Q <- Q + Q, latch carry;  if the carry latched before is set, go to Y1
Y0:  P <- (P + 0) << 1;        loop to X
Y1:  P <- (P + M) << 1;        loop to X
     then P <- P + M if the last bit shifted out of Q was 1
```

The multiplier bit that leaves Q in one iteration reaches the next
iteration through the sequencer's latched carry and a conditional branch.
This needs no extra data path state, so nothing escapes the code. The
routine forms the low 16 bits of the product. A full 32-bit product needs a
link between the two halves of the double-length shift, and that is not
built.

## I/O

I/O is memory-mapped and entirely under microprogram control. `io_ctrl` holds
the bus address register (BAR) and the bus data register (BDR), both with
their check symbols, so I/O words stay coded, plus the R/W and MSYNC signals.

A read goes like this:

1. Load BAR with the read command.
2. Raise MSYNC.
3. Poll SSYNC.
4. Put the I/O data bus on the D-bus, and drop MSYNC.

A write loads BAR and BDR, then raises MSYNC. The BDR drives the data bus
only while MSYNC is high during a write. An assertion checks that BAR is not
reloaded while MSYNC is high. Errors further along the I/O bus are not
covered.

## Clock checker

`periodic_checker` counts reference-clock cycles (`ref_clk`, an independent
oscillator at least four times faster) between rising edges of the
processor clock. It sets a sticky error when a period is longer than 16 or
shorter than 2 reference cycles. This is a plain digital stand-in for a
totally self-checking periodic signal checker, and it is not self-checking
itself.

## Files

| file | contents |
|---|---|
| `rtl/scamp_pkg.sv` | types, microinstruction layout, mod-15 and two-rail helper functions |
| `rtl/scamp_top.sv` | the processor |
| `rtl/scamp_slice.sv` | 4-bit data path slice |
| `rtl/fixup.sv` | check symbol fix-up |
| `rtl/dpath_checker.sv` | check registers, residue generator, equality checker |
| `rtl/residue_gen.sv` | 16-bit mod-15 residue tree |
| `rtl/tsc_eq_checker.sv` | two-rail equality checker |
| `rtl/mprom.sv` | microprogram ROM, check ROM, data register, repair |
| `rtl/sink_checker.sv` | sink register and microprogram code checker |
| `rtl/useq.sv` | microprogram sequencer |
| `rtl/io_ctrl.sv` | BAR, BDR, R/W, MSYNC |
| `rtl/periodic_checker.sv` | clock checker |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_scamp_top.sv` | end-to-end test at full size |
| `tb/tb_scamp_multiply.sv` | multiply loop and its microcycle count, at full size |

The ROM has no write port. Its contents come from the `INIT_FILE` parameter
of `mprom` (`$readmemh`, one 64-bit word per line, with the check nibble in
bits 63:60), or a testbench preloads the array.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_scamp_top \
    -Irtl -y rtl rtl/scamp_pkg.sv tb/tb_scamp_top.sv -o sim
./obj_dir/sim
```

Replace `tb_scamp_top` with any other `tb_*` name to run a unit test.

`tb_scamp_top` contains a small microassembler: SystemVerilog functions that
build `uword_t` values and write them, with their check nibbles, into the
ROM. Its program does the following, and writes every result with its check
symbol to a device model through the I/O controller:

* add, and subtract in both directions
* two-step AND, OR and XOR
* all five shifts
* a K-bus nibble rotation
* a short operand
* an I/O read, and an I/O read that times out
* an opcode-map branch
* a zero result

Along the way it uses CALL/RET and branches on carry, sign and zero. It then
checks:

* a constant with a deliberately wrong check symbol, which must trip the
  data path checker
* a corrupted ROM word, which must trip the microprogram checker, and then
  the same word repaired, which must not
* a disturbed sequencer copy, which must trip the sequencer checker
* a stopped clock, which must trip the clock checker
* the error log, which must record exactly the checkers that fired

A second pass, after reset, runs the program from sequencer #1 with one ROM
package corrupted in every word and repaired. The program takes 247
microcycles per pass.

`tb_scamp_multiply` runs the multiply loop described above on 32 operand
pairs, with all checkers quiet, and requires exactly 30 microcycles for the
15 loop iterations.

## How far it can be trusted

* Each module's testbench compares against values computed independently:
  * the residue generator and the equality checker are tested exhaustively
  * the slice is checked against a behavioural model over random operations
  * the fix-up is checked against true 16-bit arithmetic
* Each testbench has been run against a copy of its module with one
  deliberate bug, and it failed as it should.
* The end-to-end test checks results and check symbols, and counts every
  mechanism listed above. It is one program, not a random instruction
  stream.
* Nothing here has been fault-simulated at gate level. The self-checking
  *properties* (fault-secure, self-testing) of the checkers and the slices
  have not been verified formally. The two-rail checker follows the
  standard construction. The clock checker is not self-checking.

## Where this design goes beyond, or falls short of, the original

Choices made here because the original leaves them open:

* the microinstruction format and all encodings
* the ALU operation set, including XOR
* the sequencer command set, stack depth and opcode-map format
* the exact fix-up equations (derived here from the code)
* the check-enable bit and the timing of the sink register
* the clock checker circuit
* reset values
* treating the D-bus as a multiplexer, not a three-state bus
* the short-operand exception for the upper slices

Not built:

* **The instruction set microprogram.** SCAMP runs instructions similar to
  those of an Interdata 7/16, with PDP-11-like addressing modes. The original
  lists its instruction formats only in outline, so no instruction-level
  microcode is provided. The hardware runs any microprogram placed in the
  ROM.
* **Division, and a double-length product.** Multiplication is shown only
  as a 16-bit product, at the original's rate of two microcycles per
  iteration. Division is not written.
* **Main memory and I/O devices.** These are outside the processor, and only
  behavioural models in the testbench stand in for them.
* **Slice replacement.** Replacing a failed data slice with the check slice
  is a board change.
* **The ROM checksum word.** The original proposes it for diagnosing ROM
  failures. It would be microprogram contents, not logic.
* **Checking beyond the I/O registers.** Errors further out on the I/O bus
  are not detected, as in the original.
