# ROM-based control path for a PIC16F84A-style processor

A PIC16F84A instruction is 14 bits wide, and its six most significant bits
are enough to tell every instruction apart. This control path exploits that:
`IR_Data[13:8]` addresses a 64-word, 17-bit control memory, and the word read
out *is* the complete set of control signals for the instruction in the
instruction register. No state machine is needed: every instruction executes
in one cycle, and the two-cycle instructions (jumps, calls, returns, taken
skips) get their second cycle by clearing the instruction register so that
the instruction already fetched behind them turns into a NOP.

Three small combinational circuits finish the job, because some decisions
depend on bits the control memory never sees: the destination bit `d`
(`IR_Data[7]`) and the ALU's zero result.

The RTL covers the control path only. The datapath it drives (ALU, W
register, file registers, status register, program counter with return
stack, program memory with instruction register) belongs to other parts of
the processor and is not included; the end-to-end testbench carries a
behavioural model of it.

## Blocks

| Module | File | Role |
|---|---|---|
| `pic_ctrl_pkg` | `rtl/pic_ctrl_pkg.sv` | ALU operation codes, `PC_Sel` codes, 17-bit control-word struct |
| `control` | `rtl/control.sv` | 64 x 17 control memory, a constant array read asynchronously |
| `w_write_logic` | `rtl/w_write_logic.sv` | write enable of W |
| `data_write_logic` | `rtl/data_write_logic.sv` | write enable of the data memory |
| `ir_res_logic` | `rtl/ir_res_logic.sv` | synchronous clear of the instruction register |
| `control_top` | `rtl/control_top.sv` | the four blocks wired together (top) |

All of it is combinational. Outputs belong to the instruction currently in
the instruction register and are used at the next clock edge by the
registers they drive.

## The control word

Bit 16 down to bit 0:

| Bits | Signal | Meaning |
|---|---|---|
| 16 | `W_write` | instruction always writes W (literal operations) |
| 15 | `Write_en` | instruction writes W or f, as `d` says (byte-oriented file operations) |
| 14:11 | `m` | ALU operation |
| 10 | `L_or_F` | ALU operand B: 1 = file register, 0 = 8-bit literal |
| 9 | `F_write` | instruction always writes f (BCF, BSF) |
| 8 | `C_en` | update carry |
| 7 | `DC_en` | update digit carry |
| 6 | `Z_en` | update zero flag |
| 5 | `IR_clear` | flush the next instruction (CALL, GOTO, RETURN, RETLW) |
| 4 | `IR_clear_cond` | flush the next instruction if the ALU result is zero (DECFSZ, INCFSZ, BTFSC, BTFSS) |
| 3:2 | `PC_Sel` | next PC: 00 = PC+1, 01 = literal k, 10 = top of stack |
| 1 | `Push` | push return address (CALL) |
| 0 | `Pop` | pop return address (RETURN, RETLW) |

### How W and f writes are decided

The control memory cannot see `d`, so it marks a byte-oriented operation
with `Write_en` and leaves the choice to two gates:

    W_we      = W_write | (Write_en & ~d)
    DataWrite = F_write | (Write_en &  d)

Literal operations set `W_write` and clear `Write_en`, so bit 7 of their
literal cannot cause a file write. NOP and MOVWF share one location
(`00 0000`): with `d = 1` it is MOVWF and writes W to f; with `d = 0` it is
NOP and writes W back into W through the "pass W" ALU operation, which is
harmless. CLRF and CLRW likewise share `00 0001`.

### Two-cycle instructions

    IR_Res = Reset | IR_clear | (IR_clear_cond & Z)

`Z` here is the zero indication of the result the ALU produces in this
cycle, not the status register's Z bit: the skip instructions do not update
the status flags. For the four skip instructions the ALU result is zero
exactly when the skip is taken (DECFSZ/INCFSZ by their nature; BTFSC tests
`f & mask`, BTFSS tests `~f & mask`). A cleared instruction register holds
`14'h0000`, which decodes as NOP.

The end-to-end testbench confirms the resulting cycle counts: one cycle per
instruction, two for CALL, GOTO, RETLW and RETURN and for a taken skip.

## Contents of the control memory

ALU codes (`alu_op_e` in `pic_ctrl_pkg`):

| m | Operation | m | Operation |
|---|---|---|---|
| 0000 | W + B | 1000 | B (move) |
| 0001 | B - W | 1001 | rotate B left through C |
| 0010 | W & B | 1010 | rotate B right through C |
| 0011 | W \| B | 1011 | swap nibbles of B |
| 0100 | W ^ B | 1100 | 0 (clear) |
| 0101 | ~B | 1101 | W (pass W) |
| 0110 | B + 1 | 1110 | clear/set bit b of B (`IR_Data[10]` = value) |
| 0111 | B - 1 | 1111 | bit test: `B & mask` or `~B & mask` (`IR_Data[10]` = 1 selects the latter) |

The codes 1100 (clear), 1101 (pass W) and 1001 (rotate) come from the
original specification; the rest is this design's own numbering. The two
bit codes rely on the ALU decoding `IR_Data[10]` and the bit number
`IR_Data[9:7]` itself, because sixteen codes are two short of eighteen
distinct operations.

Contents by address (`IR_Data[13:8]`); fields not listed are 0, `L_or_F` is 1
for rows 00 and 01 and 0 for rows 10 and 11:

| Address | Instruction | W_write | Write_en | m | F_write | C/DC/Z_en | IR_clear | IR_clear_cond | PC_Sel | Push | Pop |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 00 0000 | MOVWF / NOP | 0 | 1 | 1101 | 0 | 000 | 0 | 0 | 00 | 0 | 0 |
| 00 0001 | CLRF / CLRW | 0 | 1 | 1100 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 0010 | SUBWF | 0 | 1 | 0001 | 0 | 111 | 0 | 0 | 00 | 0 | 0 |
| 00 0011 | DECF | 0 | 1 | 0111 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 0100 | IORWF | 0 | 1 | 0011 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 0101 | ANDWF | 0 | 1 | 0010 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 0110 | XORWF | 0 | 1 | 0100 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 0111 | ADDWF | 0 | 1 | 0000 | 0 | 111 | 0 | 0 | 00 | 0 | 0 |
| 00 1000 | MOVF | 0 | 1 | 1000 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 1001 | COMF | 0 | 1 | 0101 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 1010 | INCF | 0 | 1 | 0110 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 00 1011 | DECFSZ | 0 | 1 | 0111 | 0 | 000 | 0 | 1 | 00 | 0 | 0 |
| 00 1100 | RRF | 0 | 1 | 1010 | 0 | 100 | 0 | 0 | 00 | 0 | 0 |
| 00 1101 | RLF | 0 | 1 | 1001 | 0 | 100 | 0 | 0 | 00 | 0 | 0 |
| 00 1110 | SWAPF | 0 | 1 | 1011 | 0 | 000 | 0 | 0 | 00 | 0 | 0 |
| 00 1111 | INCFSZ | 0 | 1 | 0110 | 0 | 000 | 0 | 1 | 00 | 0 | 0 |
| 01 00bb | BCF | 0 | 0 | 1110 | 1 | 000 | 0 | 0 | 00 | 0 | 0 |
| 01 01bb | BSF | 0 | 0 | 1110 | 1 | 000 | 0 | 0 | 00 | 0 | 0 |
| 01 10bb | BTFSC | 0 | 0 | 1111 | 0 | 000 | 0 | 1 | 00 | 0 | 0 |
| 01 11bb | BTFSS | 0 | 0 | 1111 | 0 | 000 | 0 | 1 | 00 | 0 | 0 |
| 10 0kkk | CALL | 0 | 0 | 1101 | 0 | 000 | 1 | 0 | 01 | 1 | 0 |
| 10 1kkk | GOTO | 0 | 0 | 1101 | 0 | 000 | 1 | 0 | 01 | 0 | 0 |
| 11 00xx | MOVLW | 1 | 0 | 1000 | 0 | 000 | 0 | 0 | 00 | 0 | 0 |
| 11 01xx | RETLW | 1 | 0 | 1000 | 0 | 000 | 1 | 0 | 10 | 0 | 1 |
| 11 1000 | IORLW | 1 | 0 | 0011 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 11 1001 | ANDLW | 1 | 0 | 0010 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 11 1010 | XORLW | 1 | 0 | 0100 | 0 | 001 | 0 | 0 | 00 | 0 | 0 |
| 11 1011 | RETURN | 0 | 0 | 1101 | 0 | 000 | 1 | 0 | 10 | 0 | 1 |
| 11 110x | SUBLW | 1 | 0 | 0001 | 0 | 111 | 0 | 0 | 00 | 0 | 0 |
| 11 111x | ADDLW | 1 | 0 | 0000 | 0 | 111 | 0 | 0 | 00 | 0 | 0 |

The instruction encoding is a modified PIC16F84A set: RETURN sits at
`11 1011 xxxx xxxx` instead of its standard place, so that every instruction
is identified by its top six bits. The flag enables follow the "status
affected" column of the instruction set.

The array `CTRL_ROM` in `rtl/control.sv` holds these 64 words, address 0
first, each written field by field in binary with its instruction named.

## Where this design departs from or goes beyond the specification

The original specification fixes the memory size and addressing, the port
list, the meaning of each control signal, the instruction set with cycle
counts and affected flags, and a few rows of the control memory. The
following are this design's own choices:

* ALU codes other than 1100, 1101 and 1001, and the bit-operation scheme
  described above.
* The specification lists code 1001 for both RRF and RLF; a single code
  cannot rotate both ways, so RLF keeps 1001 and RRF uses 1010.
* Its row for location `00 0001` carries the SUBWF label, but the opcode and
  the word (clear, only `Z_en`) are those of CLRF/CLRW; it is implemented as
  CLRF/CLRW and SUBWF lives at `00 0010`.
* `PC_Sel = 10` (top of stack) for returns; only 00 and 01 are given.
* Don't-care fields are stored as 0 (with `m = 1101` where nothing is
  written).
* The three enable formulas: the specification names their inputs, not the
  functions. Reset is active high.
* The control memory is read asynchronously.

## Verification

`control` also carries immediate assertions on the word it reads: never
`Push` with `Pop`, never `IR_clear` with `IR_clear_cond`, never `Write_en`
with a forced write, and `Push` only with `PC_Sel = 01`.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb/control_tb.sv` | all 64 opcodes against a reference decoder written from the instruction set (`tb/ctrl_ref_pkg.sv`), plus the fixed rows of the specification's table and ADDLW |
| `tb/w_write_logic_tb.sv`, `tb/data_write_logic_tb.sv`, `tb/ir_res_logic_tb.sv` | exhaustive truth tables |
| `tb/control_top_tb.sv` | every opcode with both values of `d`, `Z` and `Reset`; then a 13-instruction program (CALL/RETLW loop closed by DECFSZ, GOTO, BTFSS taken, BTFSC not taken, ADDWF) on a behavioural datapath, checking final W and file contents, flags, stack depth and the exact cycle count (30); counts every mechanism (W/f writes by `d`, literal and bit writes, skips taken and not taken, jump and reset flushes, push, pop, each `PC_Sel`) and fails if one never occurs |

`control_top` has no parameters, so `control_top_tb` runs the design at
full size. To run one with Verilator from the repository root:

    verilator --binary --timing --assert --top-module control_top_tb \
      -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/pic_ctrl_pkg.sv tb/ctrl_ref_pkg.sv tb/control_top_tb.sv
    ./obj_dir/Vcontrol_top_tb

The ALU, status-flag, stack and memory behaviour in `control_top_tb` is a
model written for the test, using this design's ALU codes; it is not part
of the RTL and has not been checked against a real PIC16F84A.

## Changing the design

To change what an instruction does, edit its word in `CTRL_ROM`
(bit layout above) and the matching case of `ref_ctrl` in
`tb/ctrl_ref_pkg.sv`. To renumber ALU operations, change `alu_op_e` and
edit the affected `CTRL_ROM` words; the testbenches use the enum names, so
only `CTRL_ROM` holds numeric codes.
