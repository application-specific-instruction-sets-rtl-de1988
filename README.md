# Implicit registers for an extensible processor

An application-specific instruction (ASI) often wants more operands than a
small embedded core's register file can supply in one cycle. A typical RISC
register file has two read ports and one write port, so a custom instruction
whose data-flow graph has four inputs and two outputs cannot get them all
through the ports at once. This design gives the custom logic a few **implicit
registers (IRs)** of its own. Operands that do not fit through the read ports
are copied into IRs beforehand. Results that do not fit through the write
port are left in IRs. ASIs read and write the IRs without naming them in the
instruction word. A value left in an IR by one ASI can be consumed by a later
ASI with no copy at all.

The RTL here is the datapath side of such a processor:

- the 2-read/1-write general purpose register file (GPRF);
- the implicit register file;
- the application-specific functional unit (AFU) with its operand and result
  routing, holding one example ASI;
- the custom instruction unit that runs the move instructions and the ASIs.

The base processor's own pipeline (fetch, decode, ALU, load/store) is a
standard core and is not included. Its instruction issue and its write-back
are ports of the top module.

## The cost of missing ports

Let an ASI have `I` inputs and `O` outputs, and let the register file have
`N_in = 2` read ports and `N_out = 1` write port. The instruction itself
carries `N_in` inputs and `N_out` outputs. The rest travel with move
instructions:

    extra moves in  = ceil(I / N_in)  - 1      (ext_Rin, two values per move)
    extra moves out = ceil(O / N_out) - 1      (ext_Rout, one value per move)

Each move takes one cycle. Take an ASI with four inputs and two outputs: it
costs one ext_Rin, the ASI itself, and one ext_Rout, so three cycles. If it
replaces three one-cycle base instructions, it saves nothing. The saving
appears when a compiler allocates IRs so that values stay in them between
ASIs: every operand that is already in an IR saves part of a move. The end
to end testbench runs this three-cycle sequence and checks the count. It
then runs a second ASI that finds both IR operands already in place and
needs no move.

## Instruction set of the custom unit

The decoded custom instruction is `asip_pkg::ci_t`:

| field    | width | meaning |
|----------|-------|---------|
| `kind`   | 2     | `CI_NONE`, `CI_EXT_RIN`, `CI_EXT_ROUT`, `CI_ASI` |
| `asi_id` | 8     | which ASI (`CI_ASI`) |
| `rs1`, `rs2` | 5 each | GPRF registers on read ports 1 and 2; these always drive the ports |
| `rd`     | 5     | GPRF register on the write port |
| `rs1_v`, `rs2_v` | 1 each | `CI_EXT_RIN`: lane 0 / lane 1 in use (a clear bit is an empty slot) |
| `ir_idx` | 4     | `CI_EXT_RIN`: first target IR; `CI_EXT_ROUT`: source IR |
| `wr_rd`  | 1     | `CI_ASI`: write the primary result to `rd` |

- **ext_Rin** copies `GPRF[rs1]` to `IR[ir_idx]` and `GPRF[rs2]` to
  `IR[ir_idx+1]`. Either lane can be left empty. One move fills two IRs
  because both read ports are used.
- **ext_Rout** copies `IR[ir_idx]` to `GPRF[rd]`. One value per move,
  because there is one write port.
- **ASI** executes ASI `asi_id`. It takes `GPRF[rs1]` and `GPRF[rs2]` plus
  IR contents as operands. It writes its primary result to `GPRF[rd]` when
  `wr_rd` is set, and its extra results into IRs.

If an IR index is out of range or the ASI number is unknown, the instruction
writes nothing and `ext_error` is raised for that cycle.

The field layout is an encoding chosen for this RTL. A real core decodes its
own custom-instruction format into it.

## Operand binding: where an ASI finds its extra operands

This rule is the hardest part to get right when adding ASIs or writing the
compiler side.

- Extra input `k` of an ASI (counting after the two GPRF operands) is
  always read from `IR[k]`.
- Extra output `k` is always written to `IR[k]`.

The instruction word therefore carries no IR numbers for an ASI. The
register allocator must place every value in the slot its consumer expects.
It can leave a producer's extra result in exactly the slot the next ASI
reads, so that no move is needed. This works like the allocation tables
of an interval-based allocator: each IR holds one live value at a time.
A value's interval ends at the instruction that consumes it, so the same
IR can be given to a value produced by that instruction.

The implemented example ASI (`ASI_FIG3`, number 0) has four inputs and two
outputs:

    s = c + d
    e = (a & b) + s        -> GPRF[rd]
    f = s                  -> IR[0]
    with a = GPRF[rs1], b = GPRF[rs2], c = IR[0], d = IR[1]

A typical use is:

    ext_Rin  rs1=c_reg rs2=d_reg ir_idx=0      # c -> IR0, d -> IR1
    ASI 0    rs1=a_reg rs2=b_reg rd=e_reg      # e -> e_reg, f -> IR0
    ext_Rout ir_idx=0 rd=f_reg                 # f -> f_reg

If the next ASI wants `f` as its `c` and the same `d`, it can be issued
directly after the ASI, with no move in between.

Writing `f` into `IR[0]` overwrites `c` only at the clock edge, after the
ASI has read it, so an ASI can consume and replace an IR in the same cycle.

## Timing

Everything completes in one cycle. GPRF and IR reads are combinational. An
instruction presented on `ci` in one cycle has its GPRF and IR writes
applied at the next rising edge of `clk`, and they are visible to the
instruction after it. There is no forwarding inside the GPRF. In a
pipelined core the custom unit sits in the execute stage, next to the ALU.
The core's usual forwarding network then covers back-to-back use of a
result.

The GPRF has one write port, and the custom unit and the base pipeline's
write-back share it. The top gives the custom unit priority and asserts that
the two never write in the same cycle. A correct pipeline never makes them
collide, since only one instruction is in write-back at a time.

Reset (`rst_n`, asynchronous, active low) clears the GPRF, the IRs and their
valid bits. Register 0 of the GPRF always reads zero.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/asip_pkg.sv` | `asip_pkg` | port counts, field widths, `ci_kind_e`, `ci_t`, ASI numbers |
| `rtl/gprf.sv` | `gprf` | 32 x 32-bit register file, `NUM_RD` read ports, 1 write port |
| `rtl/implicit_regs.sv` | `implicit_regs` | `NUM_IREGS` registers, per-register write enable, valid bits |
| `rtl/asi_fig3.sv` | `asi_fig3` | the example ASI datapath |
| `rtl/custom_logic.sv` | `custom_logic` | AFU: operand binding, ASI selection, result routing |
| `rtl/ext_unit.sv` | `ext_unit` | executes ext_Rin / ext_Rout / ASI; holds the IRs and the AFU |
| `rtl/asip_top.sv` | `asip_top` | GPRF + custom unit, shared write port |

Parameters of `asip_top`: `NUM_IREGS` (default 3) and `DATA_W` (default 32).
Three IRs is the largest number needed by any of the benchmark programs this
architecture was evaluated with. That set is matrix multiply, quicksort,
Dijkstra, SHA, an MP3 decoder and AES. They need 1, 0, 1, 2, 3 and 0 IRs
respectively, and at most 5 inputs and 2 outputs per ASI (MP3). With two
read ports and three IRs an ASI can take up to five inputs. With one write
port and three IRs it can leave up to four results. The ASIs of those
programs are not part of this RTL, because only their operand counts are
known.

`ext_unit` also exports the IR contents and valid bits. `asip_top` brings
them out as `ir_data` / `ir_valid`, for observation and debugging.

## What follows the architecture and what was chosen here

Taken from the architecture:

- a register file with two read ports and one write port;
- implicit registers inside the custom logic;
- moves with one-cycle latency, two values per ext_Rin and one per ext_Rout;
- single-cycle ASIs;
- the example ASI's three nodes and its connections;
- at most three IRs;
- ext_Rin naming two source registers that fill two IRs in order, with
  empty slots allowed.

Chosen for this RTL:

- 32-bit data and 32 registers, with `r0` reading zero;
- the instruction field layout and the 8-bit ASI number;
- the `ir_idx` base of ext_Rin, so that a move can reach the third IR;
- the positional binding of extra operands and results to IRs;
- one IR pool shared by all ASIs, rather than private IRs per ASI, so
  that values can pass from one ASI to the next;
- the IR valid bits;
- error reporting;
- write-port priority;
- reset values.

Not included:

- the base processor pipeline;
- multi-cycle ASIs;
- the compiler flow that finds templates, selects ASIs and allocates IRs. It
  is software, although the bandwidth cost model above and the binding rule
  are what it targets.

## Adding an ASI

1. Write its datapath as a module, like `asi_fig3`.
2. Give it a number in `asip_pkg`.
3. Add a case in `custom_logic`. Connect inputs 3, 4, ... to `ir_q[0]`,
   `ir_q[1]`, .... Drive `result`/`result_valid` for the primary output and
   `ir_we[k]`/`ir_wdata[k]` for extra output `k`.
4. Raise `NUM_IREGS` if the ASI needs more than three extra operands or
   results.

`custom_logic` refuses to elaborate with fewer than two IRs, since the
example ASI needs two.

## Simulation

Every testbench checks itself. It prints one line,
`TB_RESULT checks=<n> failures=<m>`, and stops. Each also has a watchdog
that ends the run with a failure if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/asip_pkg.sv tb/tb_asip_top.sv --top-module tb_asip_top -o sim
    ./obj_dir/sim

Replace `tb_asip_top` with any other testbench name.

| testbench | what it checks |
|-----------|----------------|
| `tb_gprf` | random reads and writes against a reference array; r0; read-during-write returns the old value |
| `tb_implicit_regs` | random multi-register writes, valid bits, reset |
| `tb_asi_fig3` | corner values and random operands, both outputs, wrap-around |
| `tb_custom_logic` | operand binding, result routing, unknown ASI numbers, idle cycles |
| `tb_ext_unit` | random ext_Rin / ext_Rout / ASI stream against a model, including empty slots and out-of-range indices |
| `tb_asip_top` | end to end at default parameters (see below) |

`tb_asip_top` uses the default parameters and runs in well under a second.
It loads operands through the base write-back port. It then runs the
three-cycle example sequence and checks both results and the cycle count.
Next it runs:

- an ASI that reuses IR contents without a move;
- an ext_Rin with an empty slot;
- an ASI whose only kept result is in an IR;
- a round trip through the third IR;
- two illegal instructions;
- 3000 random instructions.

Every cycle it compares both read ports and all IRs with a reference model.
It counts each mechanism and fails if any of them never happened.
