# A custom processor without an instruction set, generated per program

This RTL implements the hardware side of a flow that turns a C program into a
processor built for that program alone. The processor keeps the
fetch-and-execute style of an ordinary CPU, but it has no instruction set and no
decoder. The C code is split into basic blocks, and each block is scheduled into
states. Registers and functional units are shared wherever lifetimes and usage
allow. The per-block data paths are then merged into one final data path. The
schedule becomes the contents of a control memory: one wide control word per
state. Every bit of that word drives the data path directly: multiplexer
selects, register write enables, the operation of each functional unit, one
constant, and how the next address is formed.

The control unit and the data-memory wrapper are the same for every program.
Everything program-specific is in the data path and the control memory. The
RTL reflects that split:

| module | role |
|---|---|
| `nisc_processor` | top: control unit + data path + data memory |
| `ctrl_unit` | fixed controller; holds the control memory and sequences it |
| `nisc_datapath` | the generated data path; its whole shape is set by parameters |
| `func_unit` | two-input, one-output unit with a chosen set of operations |
| `reg_file` | register (file) shared by operands with disjoint lifetimes |
| `src_mux` | multiplexer at a port reached by more than one connection |
| `dmem_wrap` | data memory, with a processor port and a host port |
| `nisc_pkg` | operation codes, next-address modes, control-word layout |

The default parameters build the one data path the source publication draws in
full: the worked example `g = ((a*b) + (c*d)) / (e*f)`.

## The worked example: two units, four registers

The expression breaks into five three-address statements:

    ST1: T5 = a * b      ST2: T4 = c * d      ST3: T3 = e * f
    ST4: T6 = T5 + T4    ST5: g  = T6 / T3

These are scheduled into three states:

| state | statements |
|---|---|
| S1 | T5 = a*b, T4 = c*d |
| S2 | T3 = e*f, T6 = T5+T4 |
| S3 | g = T6 / T3 |

At most two multiplications and one addition are needed in any state. The
operations are therefore packed into two units: FU_1 = ADD/MUL and
FU_2 = MUL/DIV. The ten operands share four registers:

| register (index) | holds, in time order |
|---|---|
| R_1 (0) | c, e, res |
| R_2 (1) | d, f, T6 |
| R_3 (2) | a, T4, T3 |
| R_4 (3) | b, T5 |

Binding each statement to a unit gives the connections:

    S1:  FU_1: T4  = R_1 * R_2 -> R_3      FU_2: T5 = R_3 * R_4 -> R_4
    S2:  FU_1: T6  = R_4 + R_3 -> R_2      FU_2: T3 = R_1 * R_2 -> R_3
    S3:                                    FU_2: g  = R_2 / R_3 -> R_1

This gives five multiplexers:
- two 2-input multiplexers on FU_1 (A from R_1 or R_4; B from R_2 or R_3);
- two 3-input multiplexers on FU_2 (A from R_3, R_1 or R_2; B from R_4, R_2 or R_3);
- one multiplexer choosing FU_1 or FU_2 as the input of R_3.

The published drawing does not show how a..f get into the registers or where
`g` goes. Here every register can also be loaded from the data memory, and R_1
can be stored to it. The address comes from the control word's constant. So
R_1, R_2 and R_4 gain a 2-input multiplexer, and R_3's multiplexer gets a third
input.

With one memory port, the program is nine states long:

| addr | state | work |
|---|---|---|
| 0-3 | load | a→R_3, b→R_4, c→R_1, d→R_2 |
| 4 | S1 | both multiplications; e→R_1 in the same state, because c is read in this state for the last time |
| 5 | load | f→R_2 |
| 6 | S2 | addition and third multiplication |
| 7 | S3 | division |
| 8 | store | g from R_1; halt |

## The control word

There is no instruction format. The control word is the concatenation of one
field per controlled element, LSB first:

| field | bits | meaning |
|---|---|---|
| next mode | 3 | `NXT_SEQ`, `NXT_JUMP`, `NXT_BRT` (jump if status = 1), `NXT_BRF` (jump if status = 0), `NXT_HALT` |
| target | AW | jump / branch address |
| constant | CONST_W | sign-extended to the data width; usable as operand, register input or memory address |
| memory | 1 + 5 + 5 | store enable, address source, store-data source |
| register *r* (×NREG) | 1 + 5 | write enable, input source |
| unit *f* (×NFU) | 4 + 5 + 5 | operation, A source, B source |

With the defaults (AW = 8, CONST_W = 16, four registers, two units) the word is
90 bits wide. `nisc_pkg` has functions that return each field's offset
(`cw_const_lsb`, `cw_mem_lsb`, `cw_reg_lsb`, `cw_fu_lsb`, `cw_width`). A
testbench helper, `tb/nisc_tb_pkg.sv` (`cw_builder`), assembles words field by
field.

Source selects are indices into two fixed source spaces:
- **operand space:** registers `0..NREG-1`, then the constant at index `NREG`.
  It feeds unit inputs, the memory address and the store data.
- **write space:** unit outputs `0..NFU-1`, then memory read data (`NFU`), then
  the constant (`NFU+1`). It feeds register inputs.

Only the sources named in the connection masks (below) are actually wired. A
select that names an unwired source yields 0, and an assertion in
`nisc_datapath` flags a register written from one.

The status bit is "the result of unit `STATUS_FU` is non-zero". In practice it
is a comparison (`OP_LT`, `OP_EQ`) computed in the same state as the branch
that uses it.

## Describing another program's data path

`nisc_datapath` (and the top, which passes the parameters through) is fully
described by these parameters:

| parameter | meaning |
|---|---|
| `NREG`, `NFU` | number of registers and of functional units |
| `FU_OPS[f]` | operation set of unit *f*, an OR of `M_ADD`, `M_SUB`, `M_MUL`, `M_DIV`, `M_SHIFT`, `M_AND`, `M_OR`, `M_XOR`, `M_NOT`, `M_COMP`, `M_ASSIGN` |
| `FU_A_CONN[f]`, `FU_B_CONN[f]` | bit mask over the operand space: the sources wired to each unit input |
| `REG_CONN[r]` | bit mask over the write space: the sources wired to register *r* |
| `MEM_ADDR_CONN`, `MEM_DATA_CONN` | masks over the operand space for the memory address and store data |
| `STATUS_FU` | the unit whose result is the branch status |

A port with one bit set in its mask is a plain wire. A port with several gets
a multiplexer of exactly that many inputs. This matches the rule of the merging
step: a multiplexer is inserted wherever more than one connection reaches a
port.

The testbenches also use a second configuration, the *loop data path*
(`LOOP_*` in `tb/nisc_tb_pkg.sv`):
- four registers: i, s1, s2, x;
- FU0 = ADD/SUB;
- FU1 = comparator, which drives the status;
- the memory address taken either from register i or from the constant.

It runs counted loops and if/else constructs.

The 5-bit selects allow up to 31 registers plus the constant, and up to 30
functional units.

## Control flow and profiling

A basic block is a run of consecutive control words. A conditional branch is
one word with a comparison in the data-path fields and `NXT_BRF` / `NXT_BRT`
in the next-address field. A loop is four blocks:
- initialisation;
- condition test, which branches out when the test fails;
- body;
- increment, which jumps back to the condition test.

The flow weighs the blocks by how often they execute. Procedure calls are
multiplied by iterations per call:

| procedure (calls) | block | total iterations |
|---|---|---|
| proc1 (5), straight line | BB0 | 5 |
| proc2 (4), 10-iteration loop | BB1 init / BB2 test / BB3 body / BB4 incr | 4 / 40 / 40 / 40 |
| proc3 (3), 20-iteration loop with if/else (40 % / 60 %) | BB5 init / BB6 test / BB7 branch test / BB8 if / BB9 else / BB10 incr | 3 / 60 / 60 / 24 / 36 / 60 |

`tb_profile_example` runs the three procedures with those call counts and
measures the block counts from the program counter. One difference is checked
explicitly: a loop's condition test runs once more per call than its body (the
final, failing test). The measured BB2 and BB6 are therefore 44 and 63, not 40
and 60.

## Interfaces and timing

- One state per clock. Units are combinational. A state reads its registers,
  computes, and writes the results at the clock edge that ends it. A value
  written in one state can be read in the next.
- `ctrl_unit` reads the control memory combinationally (distributed RAM) at
  `pc`. The next `pc` is registered. Branch decisions use the status of the
  same state.
- `dmem_wrap` reads combinationally and writes on the clock edge, so a load
  fits in a state. Its second (host) port loads inputs and reads results. If
  both ports write one word in the same cycle, the processor port wins.
- Running a program:
  1. Load the control words through `prog_we/prog_addr/prog_data` while idle.
  2. Write the data through `h_*`.
  3. Pulse `start`. The run begins at address 0.
  4. `busy` stays high until the halting word has executed. Then `done` rises
     and stays high until the next `start`.
  5. `cycles` holds the number of states the run took.
- Reset is synchronous and active-high. It clears the registers, `pc`, `done`
  and `cycles`. The memories are not cleared.
- The data width is 32 bits. Arithmetic follows C `int`:
  - the product keeps its low word;
  - the quotient truncates toward zero;
  - `x / 0` gives all ones, and `MIN / -1` gives `MIN`;
  - `OP_LT` is signed;
  - `OP_SHR` is a logical shift by the low five bits of B.

## Building and simulating

Each module is in `rtl/<name>.sv`. Packages come first. With Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/nisc_pkg.sv tb/nisc_tb_pkg.sv tb/tb_nisc_processor.sv \
      --top-module tb_nisc_processor
    ./obj_dir/Vtb_nisc_processor

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle
watchdog. The testbenches are:

| testbench | what it checks |
|---|---|
| `tb_nisc_processor_full` | top at all defaults. Expression (1) on 20 operand sets (negative values, a zero divisor); each `g` and the 9-cycle run length. |
| `tb_nisc_processor` | end to end. A default processor runs expression (1) and a loop-configured one runs the if/else loop. It counts every mechanism and fails if any never occurred: loads, stores, constants, the R_3 input multiplexer switching units, FU_2 switching between MUL and DIV, branches taken and not taken, jumps, halts. |
| `tb_profile_example` | the profiling example above: block counts, results and cycle counts |
| `tb_nisc_datapath` | default data path driven with the expression's control words. Register contents after every state match the register assignment table. Nothing is written while `active` is low. |
| `tb_ctrl_unit` | random control programs under random status, against a next-address model |
| `tb_func_unit` | every operation against a reference, and a restricted unit (ADD/MUL) |
| `tb_reg_file`, `tb_src_mux`, `tb_dmem_wrap` | random traffic against models |

## What the published flow has that this RTL does not

- **The software flow.** C parsing, scheduling, register and unit sharing, and
  data-path merging produce the parameters and the control-memory image. They
  are tools, not hardware, and are not included. The programs in
  `tb/nisc_tb_pkg.sv` were written by hand in the form those tools would emit.
- **The benchmark data paths.** The publication evaluates an 8×8 DCT (plain and
  unrolled), a 32-point DCT and SHA-1. It gives only their sizes, not their
  connections, so no configuration is supplied for them. The required sizes
  against this RTL:

  | program | units | registers | statements | fits the defaults | what it needs |
  |---|---|---|---|---|---|
  | DCT 8×8 | 3 | 14 | 28 | no (2 units, 4 registers) | `NFU=3`, `NREG=14` |
  | unrolled DCT 8×8 | 5 | 25 | 161 | no | `NFU=5`, `NREG=25` |
  | 32-point DCT | 5 | 29 | 791 | no | `NREG=29` and `AW ≥ 9`: one 426-cycle block needs about 426 control words |
  | SHA-1 | 7 | 30 | 158 | no | `NREG=30` (31 operand sources, within the 5-bit selects). All its operation types exist in `func_unit`. |

- **Multi-cycle or pipelined units.** Unit latencies exist as a concept in the
  flow, but no values are published. All units here finish in one state.
  Large multipliers and dividers will therefore set a long clock period.

## Choices made here

These were not specified in the publication and are this design's own:
- the data width;
- the control-word layout and the next-address modes;
- the constant width;
- the memory depths and read timing;
- the host port and `start`/`done`/`cycles`;
- the memory connections of the example data path;
- the comparison kinds and the semantics of the edge cases.

The controller's form (a control memory read every state, plus a next-address
block fed by a status bit and an address field) follows the usual
no-instruction-set processor structure. It does not copy that structure's
pipeline register.
