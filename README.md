# ROM-based control unit for a PIC16F84A-style processor

A PIC16F84A instruction is 14 bits wide, and its six most significant bits
are enough to tell every instruction class apart. This control unit uses
that fact directly. `IR_Data[13:8]` addresses a 64-entry, 17-bit read-only
*control memory*. Each entry holds the complete set of control signals for
one instruction class. Three small gates then add the few decisions that
depend on bits outside the opcode: the destination bit `d` (`IR_Data[7]`)
and the processor state (reset, skip condition).

The unit is combinational. It is meant for a two-stage processor: while the
instruction in the instruction register (IR) executes, the next one is
fetched into IR. Two-cycle behaviour (jumps, taken skips) comes from clearing
the word just fetched into a NOP, not from a state machine.

```
             IR_Data[13:8]      +-------------------+  m, L_or_F, C_en, DC_en, Z_en,
   IR --------------------------| control  (64x17)  |--PC_Sel, Push, Pop ---------> datapath / PC / stack
     |                          +-------------------+
     |                            W_write  Write_en  F_write  IR_clear  IR_clear_cond
     |  IR_Data[7] = d               |        |        |         |         |
     +------------------------> w_write_logic    data_write_logic   ir_reset_logic <-- Reset, alu_zero
                                     |                 |                  |
                                   W_we            DataWrite            IR_Res
```

## Files

| file | contents |
|---|---|
| `rtl/pic_ctrl_pkg.sv` | control-word struct `ctrl_word_t`, ALU codes `alu_op_e`, PC select `pc_sel_e` |
| `rtl/control.sv` | the 64 x 17 control memory |
| `rtl/w_write_logic.sv` | `W_we = W_write \| (Write_en & ~d)` |
| `rtl/data_write_logic.sv` | `DataWrite = F_write \| (Write_en & d)` |
| `rtl/ir_reset_logic.sv` | `IR_Res = Reset \| IR_clear \| (IR_clear_cond & alu_zero)` |
| `rtl/pic_control_unit.sv` | top: the four blocks wired together |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/pic_datapath_model.sv` | behavioural model of the rest of the processor, for simulation only |

## The control word

There are 17 bits. `W_write` is bit 16 and `Pop` is bit 0:

| field | bits | meaning |
|---|---|---|
| `W_write` | 1 | always write the result to W (literal class) |
| `Write_en` | 1 | write the result to the destination chosen by `d` (byte-oriented file register class) |
| `m` | 4 | ALU operation |
| `L_or_F` | 1 | ALU operand B: 1 = file register `f`, 0 = literal `k` (`IR_Data[7:0]`) |
| `F_write` | 1 | always write the result to `f` (BCF, BSF) |
| `C_en`, `DC_en`, `Z_en` | 3 | update the carry, digit-carry and zero flags |
| `IR_clear` | 1 | two-cycle jump: clear the next fetched instruction |
| `IR_clear_cond` | 1 | conditional skip: clear it if the ALU result is zero |
| `PC_Sel` | 2 | next PC: 00 PC+1, 01 `IR_Data[10:0]`, 10 top of stack, 11 unused |
| `Push`, `Pop` | 2 | return-stack push (CALL) and pop (RETURN, RETLW) |

### Why three write signals

Bit 7 of an instruction is the `d` bit only in the byte-oriented class. In a
literal instruction it is bit 7 of `k`, and in BCF/BSF it is the low bit of
the bit number. So the control memory marks which kind of destination an
instruction has:

* byte-oriented operations set `Write_en`. `d = 0` writes W and `d = 1`
  writes `f`;
* literal operations set `W_write`, which forces a write to W;
* BCF/BSF set `F_write`, which forces a write to `f`;
* everything else (bit tests, CALL, GOTO, RETURN) writes nothing.

NOP (`14'h0000`) and MOVWF share address `00 0000`. The ALU code there passes
W through. A NOP, with `d = 0`, therefore writes W back into W, and a MOVWF,
with `d = 1`, writes W into `f`. CLRF and CLRW share `00 0001` in the same
way, with the ALU code for zero.

### ALU codes

The ALU belongs to the datapath, not to this unit. Its codes must agree with
the control memory. Operand A is W, and operand B is `k` or `f`:

| m | op | used by | m | op | used by |
|---|---|---|---|---|---|
| 0000 | A + B | ADDWF, ADDLW | 1000 | B | MOVF, MOVLW, RETLW |
| 0001 | B - A | SUBWF, SUBLW | 1001 | rotate B left through C | RLF |
| 0010 | A & B | ANDWF, ANDLW | 1010 | rotate B right through C | RRF |
| 0011 | A \| B | IORWF, IORLW | 1011 | swap nibbles of B | SWAPF |
| 0100 | A ^ B | XORWF, XORLW | 1100 | 0 | CLRF, CLRW |
| 0101 | ~B | COMF | 1101 | A | MOVWF, NOP |
| 0110 | B + 1 | INCF, INCFSZ | 1110 | B with bit b cleared (IR[10]=0) or set (IR[10]=1) | BCF, BSF |
| 0111 | B - 1 | DECF, DECFSZ | 1111 | (IR[10] ? ~B : B) & (1 << b) | BTFSC, BTFSS |

Here b is `IR_Data[9:7]`. Only codes 1001, 1100 and 1101 are fixed by the
source design. The other thirteen are this design's own, and you can
reassign them in `alu_op_e` without touching anything else. The instruction
set needs 18 operations but there are only 16 codes. Each pair of bit
instructions therefore shares one code, and `IR_Data[10]` (the bit that
tells the pair apart in the opcode) picks the variant.

## Skips, jumps and the instruction register clear

`IR_Res` clears IR at the next clock edge. What was being fetched becomes
the all-zero NOP:

* **Reset**: the processor starts from a NOP.
* **Jumps** (`IR_clear`): CALL, GOTO, RETURN and RETLW change the PC. The
  instruction fetched after them is the wrong one, so it is discarded. This
  makes them take 2 cycles.
* **Skips** (`IR_clear_cond`): DECFSZ, INCFSZ, BTFSC and BTFSS discard the
  next instruction when the skip condition holds. They take 1 cycle, or 2
  when the skip is taken.

A single condition, `alu_zero` from the datapath, serves all four skips.
DECFSZ and INCFSZ skip when their result is zero. The bit-test ALU code
(1111) masks the tested bit, inverting it first for BTFSS. The result is
therefore zero exactly when BTFSC finds the bit clear or BTFSS finds it set.
The skip instructions do not update Z, so `alu_zero` must be the ALU's live
result, not the Z flag.

## Opcode map held in the control memory

| address | instruction | address | instruction |
|---|---|---|---|
| 00 0000 | MOVWF, NOP | 01 00bb | BCF |
| 00 0001 | CLRF, CLRW | 01 01bb | BSF |
| 00 0010 | SUBWF | 01 10bb | BTFSC |
| 00 0011 | DECF | 01 11bb | BTFSS |
| 00 0100 | IORWF | 10 0kkk | CALL |
| 00 0101 | ANDWF | 10 1kkk | GOTO |
| 00 0110 | XORWF | 11 00xx | MOVLW |
| 00 0111 | ADDWF | 11 01xx | RETLW |
| 00 1000 | MOVF | 11 1000 | IORLW |
| 00 1001 | COMF | 11 1001 | ANDLW |
| 00 1010 | INCF | 11 1010 | XORLW |
| 00 1011 | DECFSZ | 11 1011 | RETURN |
| 00 1100 | RRF | 11 110x | SUBLW |
| 00 1101 | RLF | 11 111x | ADDLW |
| 00 1110 | SWAPF | | |
| 00 1111 | INCFSZ | | |

This is a modified PIC16F84A instruction set. RETURN is not at its usual
opcode (`00 0000 0000 1000`) because the memory sees only the top six
bits. Here it takes the one free prefix of the literal group, `11 1011`.
Fields that are don't-care for an instruction are stored as 0.

## Where this design departs from, or adds to, its source

* The source design fixes the memory organisation, the 17 signals and their
  order, the opcode map, and the control words of MOVWF/NOP, CLRF/CLRW, RLF
  and CALL. The other control words are derived here from what each
  instruction does, including its status flags and cycle count.
* These are this design's choices: the ALU codes other than 1001, 1100 and
  1101; `PC_Sel = 10` for returns; RETURN at `11 1011`; don't-cares stored
  as 0.
* The source names only three inputs for `IR_Res`: Reset, `IR_clear` and
  `IR_clear_cond`. A conditional skip also needs its condition, so the
  `alu_zero` input is added.
* The source says which inputs each of the three gates takes, but not the
  functions themselves. The functions used here are this design's.
* The source calls the control module `Conrol`. Here it is `control`, with
  the same ports.
* The memory is read asynchronously. Synthesis infers a 64 x 17 ROM.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs.

* `tb_control` applies all 64 addresses. For each one it works out the
  mnemonic from the opcode map and derives the expected control word from
  that mnemonic's destination, ALU operation, affected flags and cycle count.
  It also compares the rows fixed by the source design bit for bit.
* `tb_w_write_logic`, `tb_data_write_logic` and `tb_ir_reset_logic` check
  complete truth tables.
* `tb_pic_control_unit` is the end-to-end test, at the top's only
  configuration. The control unit drives `pic_datapath_model`: 1K x 14
  program memory, 10-bit PC, 8-level stack, 128-byte data memory, W and
  C/DC/Z. An instruction-level reference model in the testbench runs the
  same program. Every executed instruction must agree with the reference on
  program address, W, flags and the whole data memory. Every cycle must be
  a flush bubble exactly when the reference says the previous instruction
  took a second cycle. The test runs in two parts:
  * A hand-written program (a counted loop with a subroutine, bit
    set/clear, taken and untaken bit tests, a RETLW table) checks its final
    values. It must reach its halt loop after exactly 66 cycles, the sum of
    the per-instruction cycle counts.
  * Eight random 1K-word programs then run for 3000 cycles each, with random
    resets.

  The test counts each mechanism and fails if any never happened. The
  mechanisms are: W written through `d = 0`, `f` through `d = 1`, W by a
  literal instruction, `f` by BCF/BSF, jump flush, skip taken, skip not
  taken, push, pop, reset, each flag enable, both non-sequential PC sources,
  and both operand sources. It also asserts that Push and Pop never occur
  together, that `PC_Sel` never takes the unused value, and that W and `f`
  are never written in the same cycle.

The datapath model is an aid for testing, not part of the design. Its
sizes are the usual PIC16F84A ones. It has no special-function registers:
STATUS is held apart from the data memory.

To run a testbench with Verilator (from the repository root; the package
goes first):

```
verilator --binary --timing --assert -Wno-fatal rtl/pic_ctrl_pkg.sv \
    rtl/control.sv rtl/w_write_logic.sv rtl/data_write_logic.sv \
    rtl/ir_reset_logic.sv rtl/pic_control_unit.sv \
    tb/pic_datapath_model.sv tb/tb_pic_control_unit.sv \
    --top-module tb_pic_control_unit -Mdir obj
obj/Vtb_pic_control_unit
```

The other testbenches need only the package, their module and their own
file. Each runs in well under a second.

## Using it in a processor

Connect `IR_Data` to the instruction register and `alu_zero` to a zero
detector on the ALU output. Connect `W_we`, `DataWrite`, `m`, `L_or_F` and
the flag enables to the datapath, `IR_Res` to the instruction register's
synchronous clear (it must clear IR to `14'h0000`), `PC_Sel` to the PC
input multiplexer, and `Push`/`Pop` to the return stack. The stack must
push the already-incremented PC, which is the address after the CALL. If
your ALU uses other operation codes, change `alu_op_e` in `pic_ctrl_pkg`;
the control memory follows automatically.
