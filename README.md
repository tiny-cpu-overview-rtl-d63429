# Tiny CPU

Tiny CPU is a very small teaching processor. It shows how a processor fetches
and runs instructions using a handful of registers, one adder and a state
machine. It has one 8-bit accumulator (ACC), an 8-bit address space
(256 bytes of memory) and five instructions. Every instruction is carried out
as a fixed list of register transfers, one per clock cycle: for example
"MAR ← PC, MEM_RD", then "MDR ← MEM, PC ← PC+1", then "IR ← MDR". The
controller is a state machine with states S1 to S8. In each state it raises
the load, increment or clear inputs of the registers. There is no pipeline and
no overlap between instructions.

This RTL follows the published Tiny CPU description for:

- the datapath blocks;
- the control-signal names;
- the opcodes;
- the state sequence of each instruction;
- the memory timing.

Details the description leaves open were filled in here, and are marked as such
below and in each file's header.

The same sources also contain a second, unrelated example: a gated D latch, and
a master-slave D flip-flop built from two of those latches. It is included as
well and sits beside the CPU in the top level.

## Instruction set

An instruction is one opcode byte. Bits 7:5 select the operation and bits 4:0
are ignored. ADD, STR and JNZ are followed by a second byte, the operand
address M.

| Mnemonic | Opcode `IR[7:5]` | Bytes | Effect | Cycles |
|---|---|---|---|---|
| `ADD M` | 001 | 2 | ACC ← ACC + mem[M]; Z ← (ACC == 0) | 8 |
| `STR M` | 010 | 2 | mem[M] ← ACC | 7 |
| `CLA`   | 011 | 1 | ACC ← 0 | 4 |
| `JNZ M` | 101 | 2 | if Z == 0: PC ← M | 6 |
| `RST`   | 111 | 1 | PC ← 0 | 4 |

`JNZ M` jumps to the address M itself. It does not jump to the address stored
at M. That reading matches the register transfer of its last state,
"if Z = 0 then PC ← MDR": in that state MDR holds the operand byte. A summary
line elsewhere in the source reads "PC ← [M]", but the cycle list and the
example program both need the direct jump.

The three unused opcodes (000, 100, 110) behave as one-byte no-ops taking
4 cycles. This is this design's choice; the source does not define them.

## Datapath

```
              pcl pcinc intrs            mmx  mal
                   │                      │    │
                 ┌─▼──┐      PC      ┌────▼┐ ┌─▼──┐
          ┌─────►│ PC ├─────────────►│1 mux├►│MAR ├──► mem_addr
          │      └────┘         ┌───►│0    │ └────┘
          │                     │    └─────┘
  bus ────┼──────────┬──────────┴───────────────────┐ MDR output = bus
  (=MDR)  │          │                              │
          │      ┌───▼──┐  irl   ┌────┐  mdil ┌─────┴─┐◄── mem_rdata (mdi)
          │      │  IR  │◄───    │ Z  │  mdol │  MDR  │──► mem_wdata
          │      └──┬───┘        └─▲──┘       └───▲───┘
          │      IR[7:5]           │ ==0          │ mdo
          │         ▼          ┌───┴─────┐        │
          │     decoder        │ Add/Sub │◄─ bus  │
          │         ▼          └───▲─┬───┘        │
          │     controller         │ │sum         │
          │                        │ ▼            │
          │                  ACC ──┴─[ACC]◄ accl, cla
          │                          └────────────┘
```

- **One internal bus, driven only by MDR.** Every register that takes a value
  from the bus (PC, IR, MAR through its mux, the Add/Sub unit) takes MDR. A
  value from memory therefore always passes through MDR first. That is why an
  operand takes two cycles to arrive: the address goes into MAR, then the data
  goes into MDR. Because MDR is the bus's only source, the bus is a plain wire,
  with no tri-state drivers.
- **MAR's input mux.** `mmx = 1` selects PC, for fetching an opcode or operand
  byte. `mmx = 0` selects the bus, to follow an operand address into memory.
- **MDR has two inputs.** `mdil` loads the memory read data (`mdi`). `mdol`
  loads ACC (`mdo`) for a store. The MDR output is also the memory write data.
- **ACC and Z.** The Add/Sub unit adds ACC and the bus. `accl` loads the sum
  into ACC and, in the same cycle, loads "sum is zero" into Z. `cla` clears
  ACC. CLA leaves Z unchanged: Z is fed only from the Add/Sub output. That is
  this design's reading of the block diagram.
- **Add/Sub.** The unit can subtract (`sub = 1`, two's complement), but no
  instruction uses this, so the CPU ties `sub` to 0. No carry or overflow flag
  exists. Sums wrap modulo 256.

## Controller and cycle timing

All registers change on the rising clock edge. The controls are a function of
the current state and the decoded IR only, so each control is high for exactly
the one cycle of its state. The cycle lists below come from the source. The
signal names are those of the datapath drawing.

| State | Fetch (all)               | ADD                    | STR                    | JNZ                       | CLA    | RST     |
|---|---|---|---|---|---|---|
| S1 | MAR←PC, MEM_RD: `mmx mal mem_rd` | | | | | |
| S2 | MDR←MEM, PC←PC+1: `mdil pcinc`  | | | | | |
| S3 | IR←MDR: `irl`                   | | | | | |
| S4 | | MAR←PC, MEM_RD          | MAR←PC, MEM_RD          | MAR←PC, MEM_RD             | `cla`  | `intrs` |
| S5 | | MDR←MEM, PC←PC+1        | MDR←MEM, PC←PC+1        | MDR←MEM, PC←PC+1           | | |
| S6 | | MAR←MDR, MEM_RD (`mmx=0 mal mem_rd`) | MAR←MDR, MDR←ACC (`mmx=0 mal mdol`) | `pcl` if Z = 0 | | |
| S7 | | MDR←MEM (`mdil`)        | MEM_WR (`mem_w`)        | | | |
| S8 | | ACC←ACC+MDR (`accl`)    | | | | |

- IR is loaded at the end of S3, so S3 always goes to S4. From S4 on, the
  decoded opcode selects the controls and the last state. After the last state
  the controller returns to S1.
- The states are encoded as 1 to 8 (`tiny_pkg::state_e`). This encoding is
  this design's choice.
- Four assertions in `control_fsm` state rules that the controller keeps:
  - PC gets at most one of load, increment or clear in a cycle;
  - MDR never loads both inputs in the same cycle;
  - ACC never gets load and clear in the same cycle;
  - memory is never read and written in the same cycle.
- Reset is a synchronous, active-high `rst` input. It clears every register
  and puts the controller in S1. The source describes only the RST
  instruction, so this reset is this design's addition. After reset the CPU
  fetches from address 00.

## Memory interface

`tiny_mem` holds 256 × 8 bits, with synchronous write and asynchronous read,
as in the source's memory cycles:

- **Reads.** `rdata` always shows `mem[addr]`. MAR is loaded in one cycle
  (S1, S4 or S6), and MDR captures the data in the next cycle (S2, S5 or S7).
- **MEM_RD.** The CPU raises `mem_rd` in the cycle that loads a read address
  into MAR. This memory does not need the signal, so the top only brings it
  out as a port.
- **Writes.** A write happens at the rising edge that ends STR's S7, with
  MAR = M and MDR = ACC.

A memory with synchronous read is not provided. With this controller it would
not work unchanged: such a memory would need MEM_RD one cycle earlier, because
data registered at the end of S1 would come from the old MAR.

The memory's contents are undefined at power-up. Load a program by writing the
array `u_mem.mem` of `tiny_top` before releasing `rst`, as the top-level
testbench does.

## Example program

```
00  60      CLA          ; ACC <- 0
01  20 78   ADD $78      ; ACC <- ACC + 1
03  40 FF   STR $FF      ; [FF] <- ACC
05  A0 01   JNZ $01      ; repeat until ACC wraps to 0
07  E0      RST          ; start over
78  01      ONE
```

CLA followed by ADD is the way to load ACC with a memory value. The loop
stores 01, 02, …, FF, 00 to address FF. On the 256th ADD, ACC wraps to 0 and
Z is set. JNZ then falls through, and RST restarts the program. One pass takes
4 + 256 × (8 + 7 + 6) + 4 = 5384 cycles. The source listing shows RST at
address 06, but JNZ occupies 05 and 06, so the RST byte goes at 07.

## Latch and flip-flop example

- **`d_latch`** is a gated D latch. `q` follows `d` while `c = 1` and holds
  while `c = 0`. `qn` is the complement of `q`.
- **`ms_dff`** chains two such latches: master output `y`, then the slave. The
  two gates are CK and its inverse, so one of the two latches is always opaque
  and `q` changes at only one clock edge:
  - `RISING = 0` (default): master gated by CK, slave by ~CK. `q` takes `d`
    at the falling edge.
  - `RISING = 1`: the gates are swapped, and `q` takes `d` at the rising edge.

Lint tools report latches in these two modules. They are the intended
function. `tiny_top` instantiates one flip-flop of each kind on the shared
inputs `ff_d` and `ff_ck`. They share nothing with the CPU.

## Files

| File | Contents |
|---|---|
| `rtl/tiny_pkg.sv` | opcodes, decoded-instruction enum, state enum, control struct `ctrl_t` |
| `rtl/pc_reg.sv`, `mar_reg.sv`, `mdr_reg.sv`, `ir_reg.sv`, `acc_reg.sv`, `z_flag.sv` | datapath registers |
| `rtl/add_sub.sv` | Add/Sub unit |
| `rtl/instr_decoder.sv` | IR[7:5] → instruction |
| `rtl/control_fsm.sv` | S1–S8 controller and its assertions |
| `rtl/tiny_cpu.sv` | CPU: datapath + decoder + controller |
| `rtl/tiny_mem.sv` | 256 × 8 memory |
| `rtl/d_latch.sv`, `rtl/ms_dff.sv` | latch and master-slave flip-flop |
| `rtl/tiny_top.sv` | top: CPU + memory, and the two flip-flops |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tiny_ref_pkg.sv` | instruction-level reference model used by the CPU and top testbenches |

The width parameter `W` (default 8) sets the data width, the address width and
the bus width together. The datapath needs them to be equal, because PC and
MAR load from the 8-bit bus. The memory depth in the top is `2**W`.

## Verification

Each testbench checks its module against values it works out itself. Each one
ends by printing `TB_RESULT checks=N failures=M`.

- **`tb_tiny_cpu`** runs six random 256-byte programs, about 9000 instructions
  in all. The programs include self-modifying stores and unused opcodes. The
  CPU runs in lock-step with `tiny_ref_pkg`. At every instruction boundary the
  test compares PC, ACC, Z, every stored byte and the cycle count of each
  instruction.
- **`tb_control_fsm`** compares every state and all twelve control signals
  with the table above.
- **`tb_tiny_top`** runs the example program for three passes at the default
  size. It checks:
  - every store;
  - the 5384-cycle pass length;
  - the reference model at each instruction boundary;
  - that each mechanism occurred the expected number of times: each
    instruction, taken and not-taken JNZ, Z set, ACC wrap-around, restart by
    RST, and both flip-flop kinds.

To simulate with Verilator from the project root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y tb -y rtl +libext+.sv \
  rtl/tiny_pkg.sv tb/tiny_ref_pkg.sv tb/tb_tiny_top.sv --top-module tb_tiny_top
./obj_dir/Vtb_tiny_top
```

Replace `tb_tiny_top` with any other testbench name. `tiny_ref_pkg.sv` is
needed only for `tb_tiny_cpu` and `tb_tiny_top`.
