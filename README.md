# A vertex shader co-processor for small FPGAs

This is a floating-point co-processor for an embedded CPU. It runs vertex shader code (the per-vertex transform and lighting step of a 3D render pipeline). The aim is to use as few FPGA slices as possible. Three ideas keep it small:

- **No instruction decoder and no scheduler in hardware.** An offline converter turns a shader into a *control table* with one 128-bit row per clock cycle. Each row names the eight operands that go into the ALU in that cycle, and which finished result leaves the ALU in that cycle and where it is stored. The only control logic is a program counter that walks the table.
- **A scalar ALU with a fixed dataflow.** One cycle can deliver a 4D dot product `a·b + c·d + e·f + g·h`. All units are pipelined and run every cycle. The row only picks which of nine results to keep.
- **BlockRAM instead of a register file.** Eight identical copies of a 512 × 32-bit BlockRAM form the *register array*. Every write goes to all eight copies. Each copy has its own read address, so the eight ALU operands are read in one cycle without large multiplexers.

Vertices do not depend on each other, so the converter can interleave several vertices ("threads") in one table. The original hardware ran four threads; the testbenches here run four and sixteen. Interleaving hides the long latencies of the units.

```
            +------------------- ALU result (to all eight copies) ----------------+
            v                                                                      |
   +--------+--------+   8 x 32 bit   +-----+  result  +------------+  read  +-----+------+    +-----+
   | register array  |--------------->| ALU |--------->| output RAM |------->|    FCM     |<-->| CPU |
   | 8 x 512 x 32    |  operands a..h +-----+          |  512 x 32  |        | controller |    +-----+
   +--------+--------+                   ^             +------------+        +-----+------+
            ^  8 read addresses          | inv, select        ^ out/oe          |   |
            |                            |                    |                 |   | writes vectors
   +--------+---------------------------+--------------------+--+              |   | (while idle)
   | sequencer: PC -> instruction memory (512 x 128) -> row fields |<-- rows ---+   |
   +---------------------------------------------------------------+               |
            ^-------------------------------- register write port (mux) ----------+
```

## The control table

A row is four 32-bit words, `cmd0` (bits 31:0 of the row) to `cmd3` (bits 127:96). Bit 0 is the least significant bit of each word.

| word | 8:0  | 17:9 | 26:18 | 27    | 28    | 29    | 30    | 31   |
|------|------|------|-------|-------|-------|-------|-------|------|
| cmd0 | src0 | src1 | dst   | we    | inv0  | inv1  | inv2  | inv3 |
| cmd1 | src2 | src3 | out   | oe    | inv4  | inv5  | inv6  | inv7 |
| cmd2 | src4 | src5 | –     | div   | rsq   | slt   | mult2 | dot2 |
| cmd3 | src6 | src7 | –     | f2i   | i2f   | mult4 | dot4  | –    |

`src0..src7` are register-array addresses, read into ALU inputs `a..h`. `invK` flips the sign of input K. The nine bits `div … dot4` are a one-hot select of the ALU output. If `we` is set, the selected result is written to register `dst`. If `oe` is set, it is written to output-RAM address `out`.

### Timing rule

This rule is what a program generator must get right. Each row passes through three pipeline stages: fetch (instruction BlockRAM), register read (register-array BlockRAM) and the ALU stage. **Every field of a row acts in that row's ALU-stage cycle:**

- its operands enter the ALU;
- its select bits pick the result that is at the ALU output in that same cycle, which belongs to operands issued *earlier*;
- that result is written to `dst` and/or `out` at the end of the cycle.

So an operation whose operands are in row `t` and whose command has delay `D` must be collected by row `t + D`. That row sets the select bit and `dst`/`out`. A value written by row `r` can be a source of row `r + 2` or later. Row `r + 1` still reads the old value. Rows that collect nothing leave every select bit clear. Such a row gives 0, and with `we`/`oe` clear it stores nothing.

Each row has one result slot, so the ALU delivers at most one scalar per cycle. The select is an OR of the selected results. Two select bits in one row are a programming error.

### ALU commands and delays

| select | result                                  | delay |
|--------|-----------------------------------------|-------|
| dot4   | a·b + c·d + e·f + g·h                   | 19 |
| dot2   | a·b + c·d                               | 14 |
| mult4  | a·b·c·d, computed as (a·b)·(c·d)        | 18 |
| mult2  | a·b                                     | 9  |
| div    | a / b                                   | 27 |
| rsq    | 0x5F3759DF − (a >> 1) on the raw bits   | 2  |
| slt    | a·b + c·d < 0 ? e·f : g·h               | 14 |
| i2f    | float(a), a read as a signed integer    | 6  |
| f2i    | int(a), truncated toward zero           | 6  |

The delays all come from one fixed network: multiplier 9, adder 5. Four multipliers form a·b, c·d, e·f and g·h. Two adders form a·b + c·d (dot2) and e·f + g·h. A third adder joins them (dot4). A fifth multiplier forms mult4 from a·b and c·d. The divider, the rsq seed and both converters take input `a` (and `b`).

**slt needs e..h twice.** Its comparison a·b + c·d is ready after 14 cycles. The e·f and g·h products that it selects between are ready after 9 cycles. So they are the products of the e..h operands given **5 rows after** the a..d operands. The program must give `e, f, g, h` in the issuing row and again in row `t + 5`. With a = x, b = 1, c = d = e = f = 0, g = x, h = y, slt gives max(0, x)·y. That is the clamped diffuse term of a light.

**rsq** is only a start value. One Newton step `x' = x·(1.5 − 0.5·a·x²)` maps onto the ALU as `t = mult4(a, x, x, x)` and then `x' = dot2(x, 1.5, t, −0.5)`, with `inv3` giving the minus sign. Between them they take 18 + 14 rows plus the register round trips. Division is a real unit, so no reciprocal trick is needed for a / b.

## Memories

| memory | size | written by | read by |
|---|---|---|---|
| register array (`reg_array`) | 8 copies × 512 × 32 bit (128 4D vectors) | ALU (`dst`/`we`) while running, CPU while idle | ALU, 8 addresses per cycle |
| instruction memory (`instr_mem`) | 512 × 128 bit | CPU | program counter |
| output RAM (`output_mem`) | 512 × 32 bit | ALU (`out`/`oe`) | CPU |

All three are simple dual-port memories with a registered read, as BlockRAM has. They start at zero. A read and a write of the same address on one edge return the old data. The output RAM has its own address field. So a program can place results anywhere for the CPU without touching the register array. The CPU never needs a read port into the register array.

## The CPU port (`fcm_controller`)

On the FPGA the co-processor sits on the PowerPC's fabric co-processor bus (FCM). Its load/store instructions carry only five address bits. This RTL models that port as a simple request/acknowledge bus:

- `cpu_req` is a one-cycle pulse, together with `cpu_wr`, `cpu_space`, `cpu_addr[4:0]` and `cpu_wdata[127:0]`.
- The controller answers with a one-cycle `cpu_ack`. On a read, `cpu_rdata` is valid while `cpu_ack` is high.
- Send the next request only after the ack.

| space | operation |
|---|---|
| 0 registers | write a 4D vector to vector `{page[1:0], addr}`, i.e. scalars `{vector, 0..3}`; x is `wdata[31:0]`. Takes 4 cycles and is held while a program runs. |
| 1 instructions | write one row to row `{page[3:0], addr}`. |
| 2 output RAM | read a 4D vector from `{page[1:0], addr}`. Takes 5 cycles. |
| 3 control | address 0: write `page`. Address 1: start a run; `wdata[8:0]` is the index of the last row. Address 2: read `busy` in `rdata[0]`. |

A run starts at row 0 and stops after the given last row. `busy` stays high for `last + 3` cycles. While a run is busy the ALU owns the register array's write port, so a CPU vector write waits until the run ends. The CPU can therefore queue the first vector of the next batch during a run. Results can be read from the output RAM at any time.

A typical flow:
1. Write the table and the shared constants once.
2. For each batch of vertices: write the vertex inputs, start, poll busy, read the outputs.

## Number format

Operands are IEEE-754 single precision. The units round to nearest even. Subnormal inputs and results become signed zero. Overflow and division by zero give a signed infinity. NaNs get no special treatment. `float2int` truncates and saturates to the 32-bit range. `int2float` rounds to nearest even. An exact zero sum is +0. The testbench reference model applies the same rules, and the outputs match it bit for bit.

## How far this follows the published design

These parts follow the published design:
- the block structure;
- the eight duplicated BlockRAMs;
- the ALU dataflow;
- the command set and every delay except the adder's;
- the instruction format;
- the sign inversion as an XOR on the sign bit;
- the separate output RAM;
- the PC-only control.

Choices made in this design:

- **Adder delay 5.** It is not given directly. It is the step between the mult2 (9), dot2 (14) and dot4 (19) delays. It makes mult4 = 18 and slt = 14 with the "5 cycles later" rule, as given.
- **Bit and word order of the row.** Bit 0 is taken as the LSB, with `cmd0` in the low word. The original format lists only bit ranges. PowerPC tools number bit 0 as the MSB, so a table produced for the original hardware may need its words bit-reversed.
- **Pipeline alignment.** The three-stage pipeline, and the rule that `dst`/`out`/select act together with the row's operands, are this design's reading of "the output multiplexer is controlled by the current instruction".
- **Page register width.** The original uses a 2-bit page register to extend the 5-bit FCM address. Two bits reach the 128 vectors of the data memories, but only 128 of the 512 instruction rows. Here the register is 4 bits wide: data spaces use its low 2 bits, the instruction space uses all 4.
- **CPU bus.** The real APU/FCM signal set is not modelled. The req/ack bus, the space codes and the start/status registers are this design's own.
- **Pipelining of the FP units.** The divider is a real 27-stage pipeline that produces one quotient bit per stage. The adder has five working stages: order, align, add, normalise, round. The multiplier has four working stages (unpack, two 24×12 partial products, their sum, round) followed by five balancing registers. The converters and the rsq seed are one combinational stage followed by a register chain. In all units the latency and the one-operation-per-cycle throughput are exact. Meeting the original 100 MHz on an FPGA was not checked. It may need register retiming for the multiplier and the converters.
- **Several select bits** are ORed. The original does not say what happens.

Not included:
- the host CPU;
- the DDR memory controller, VGA output and system bus around the co-processor;
- the offline shader converter, which is software. The end-to-end testbench contains a small scheduler that does its job for the test program;
- the earlier register-file variant, with 32 LUT registers, one adder and one multiplier. It was only a first attempt.

## Files

| file | contents |
|---|---|
| `rtl/vs_pkg.sv` | row field positions, select struct, ALU-stage control struct, FCM space codes, delays |
| `rtl/fp_pkg.sv` | binary32 struct, rounding and packing helper |
| `rtl/pipe_delay.sv` | register chain used behind every unit |
| `rtl/fp_mul.sv`, `fp_add.sv`, `fp_div.sv`, `fp_i2f.sv`, `fp_f2i.sv`, `rsq_seed.sv` | arithmetic units |
| `rtl/vs_alu.sv` | sign stage, unit network, output select |
| `rtl/reg_array.sv`, `instr_mem.sv`, `output_mem.sv` | memories |
| `rtl/vs_sequencer.sv` | program counter, instruction register, run control |
| `rtl/fcm_controller.sv` | CPU port |
| `rtl/vertex_shader_top.sv` | top level |
| `tb/fp_ref_pkg.sv` | binary32 reference model for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_mesh_workload` |

The top has no parameters. The unit latencies are parameters of `vs_alu` and the units. Memory sizes are parameters of the memory modules. The row format is fixed by the 9-bit fields.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. The packages must come first. Verilator finds the other modules by name with `-y`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fp_pkg.sv rtl/vs_pkg.sv tb/fp_ref_pkg.sv tb/tb_vertex_shader_top.sv \
    --top-module tb_vertex_shader_top -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` to run another testbench.

- **`tb_vertex_shader_top`** drives the full-size design as the CPU would. Each vertex goes through a shader with these steps:
  - a 4×4 matrix transform;
  - the diffuse term of a directional light, using a negated light vector and clamping by slt;
  - perspective division and screen scaling, then rounding to integer pixels;
  - normalising with rsq plus one Newton step;
  - an int-to-float conversion.

  The testbench schedules this into 146 rows for four interleaved vertices. It runs two batches and compares 96 outputs bit for bit with the reference model. It checks that a run lasts `last + 3` cycles, and that every ALU command, inversion, write-back, output write, page switch and a held CPU write each happen at least once. It runs in a few seconds.
- **`tb_mesh_workload`** is the point-rendering workload. It runs a transform plus directional-light shader over a 20000-vertex mesh. Each vertex takes eight scalar results: four dot4 for the position, one dot4 for n·l and three slt for the clamped colour. The testbench runs 16 vertices per batch and 1250 batches, and checks every output bit for bit. The greedy scheduler packs the 128 operations of a batch into 208 rows. That is 13.1 ALU cycles per vertex, or about 0.13 µs at 100 MHz. Most of the time per batch goes to moving vectors over the CPU port: about 40 cycles per vertex with the bus model used here. The testbench runs in about a second.
- The unit testbenches feed one random operand set per cycle. Each result must appear exactly its delay later and match the reference bit for bit. The ALU testbench rotates through all nine selects, including the delayed e..h of slt.
- The memory testbenches compare against shadow models, including read-during-write.
- The sequencer and controller testbenches check the cycle timing of every field, and the held-write behaviour.
