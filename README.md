# SyncPro — a VLIW vector processor for OFDM packet detection

Burst-mode OFDM receivers (IEEE 802.11a/g/n, IEEE 802.16e) have to look for the
start of a packet all the time, even when no data is being received. Packet
detection and coarse time synchronization therefore run at a far higher duty
cycle than the rest of the modem and set its standby power. SyncPro is a small
programmable core made only for this task. It is fast enough to follow a
20 Msample/s stream in real time at a 200 MHz clock, and kept as small and
quiet as possible otherwise. It stays programmable so that one core can serve
several standards.

The detection algorithms are delayed autocorrelations of the complex input
stream, followed by a peak search. All of it fits in 16-bit signed fixed point.
The core therefore has these parts:

* Vectors of **four complex samples** (4 × (16-bit real, 16-bit imaginary) =
  128 bit), with complex arithmetic in hardware.
* A **vector accumulation** scheme that keeps every partial sum of a running
  sum. The peak search needs the correlation value of every single sample, not
  one total per vector.
* A **5-slot VLIW** bundle: two scalar slots and three vector slots, each with
  its own small set of operations.
* **Clustered register files** instead of one shared multi-ported file.
* A **blocking input port**. The core simply stops while it waits for the next
  input vector.

This repository holds synthesizable SystemVerilog for the whole core: the
register files, both interconnects, every function unit, fetch, decode, the two
single-port memories and the I/O. It also holds one self-checking testbench per
unit. Four testbenches run the assembled core:
* three detection kernels, whose results and cycle counts are checked;
* random programs checked against an instruction-level model.

## Machine organization

```
             Scalar1            Scalar2          Vector1      Vector2        Vector3
          salu, smul,        vload, spread,     valu, vext   vaccu, valign  vcmul_1 | vcmul_2
          vst, eval_vec,     pinld
          branch, pinst
              |  ^               |  ^             |  ^          |  ^          |  ^
  SRF 16x16 (4R/2W) shared       |               VRF1 4x128    VRF2 4x128    VRF3 4x128
                                  \__ vector result write interconnect (to all VRFs) __/
                      vector operand read interconnect (local ports + one broadcast per VRF)
```

| slot | units | operations |
|------|-------|------------|
| Scalar1 | `sync_salu`, `sync_veval`, vector store, branch, output port | mov, movi, add, addi, sub, mul, lsl, asr, and, or, xor, modi, vst, rgrep, igrep, rmax, imax, pinst, beqz, bnez, bltz, bgez, jmp |
| Scalar2 | `sync_scalar2` | vld, vldp, spread, pinld |
| Vector1 | `sync_valu` | vmov, vadd, vsub, vasr, vlsl, vand, vor, vcon, vreal, vimag |
| Vector2 | `sync_vaccu`, `sync_valign` | vtriang, vlevel, vrot |
| Vector3 | `sync_vcmul` | vcml |

**Scalar register file** (`sync_srf`): 16 × 16 bit with 4 read and 2 write ports.
Scalar1 uses read ports 0/1 and write port 0. Scalar2 uses read ports 2/3 and
write port 1.

**Vector register files** (`sync_vrf`, three instances): 4 × 128 bit each. Every
file has two local read ports for its own vector slot, one *broadcast* read
port and one write port. A vector register is named by 4 bits
`{cluster, reg}`: clusters 0, 1 and 2 are VRF1, VRF2 and VRF3, and cluster 3
means "no register".

**Read interconnect** (`sync_vrd_xbar`). A vector slot reads its own cluster
through the local ports. Every other read goes through the broadcast port of
the file that holds the register. This covers a vector slot reading another
cluster, and Scalar1 reading a vector for `vst` or `rgrep`/`rmax`. Each file
has one broadcast port, so **a bundle may read only one register of each file
across clusters**. Several operands may name that same register. If a bundle
breaks this rule, the first requester wins (Scalar1, V1.A, V1.B, V2.A, …),
`conflict` is raised and a simulation assertion fires.

**Write interconnect** (`sync_vwr_xbar`). Vector1, Vector2, Vector3 and Scalar2
can each write any vector file. Two writers on the same file in one cycle is a
program error: V1 > V2 > V3 > Scalar2 priority applies, and an assertion fires.

## Pipeline and what the program must respect

This section matters most for anyone who writes code for the core. The hardware
has **no interlocks and no forwarding**. Scheduling is entirely up to the
program.

| stage | what happens |
|-------|--------------|
| FE1 | PC addresses the program memory |
| FE2 | memory delivers the 96-bit bundle; latched into the instruction register at the end |
| DE  | decode; all register files read; data memory addressed (stores write at the end of DE); branches resolved; operands captured in the DE/EX pipeline registers |
| EX  | function units compute; SRF and VRFs written at the end of EX |
| EX2 | complex multiplier only (second stage); VRF written at the end of EX2 |

Rules that follow from this:

* **Result latency.** Bundle *i* writes its result at the end of its EX cycle.
  Bundle *i+1* reads its registers in DE during that same cycle, so it still
  sees the old value. The result is first visible to **bundle *i+2***. For
  `vcml` it is first visible to **bundle *i+3***. Scratchpad loads follow the
  same rule (address in DE, data written to the VRF at the end of EX).
* **Store then load.** A `vst` writes the scratchpad at the end of its DE
  cycle, so a `vld` in the next bundle already reads the new data.
* **One scratchpad access per bundle.** The scratchpad is single-ported, so
  `vst` (Scalar1) and `vld`/`vldp` (Scalar2) may not share a bundle.
* **Branches** are resolved in DE. A taken branch squashes the two bundles
  fetched behind it, so it costs two cycles. There are no delay slots. A branch
  tests one scalar register (`== 0`, `!= 0`, `< 0`, `>= 0`) or is
  unconditional. The target is an absolute 8-bit address.
* **Waiting for input.** A `pinld` in DE with no input vector offered
  (`in_valid = 0`) freezes FE1, FE2 and DE and sends empty bundles into EX.
  Older bundles still complete, so the latency rules above hold across a stall.
  This is the core's idle state between input vectors: it runs one kernel
  iteration per input vector and then waits in `pinld`.

The DE/EX operand registers load only when their slot uses them. This is the
RTL stand-in for operand isolation and clock gating. In this architecture those
wide operand registers take about as much power as all the register files
together.

## Vector accumulation

A correlation is a running sum of products, but the peak search needs the sum
at **every sample**, and one vector holds four samples. Two Vector2 operations
handle this:

```
vtriang C, A, B :  C[i] = A[0] + ... + A[i] + B[i]      (prefix sum plus offset)
vlevel  B, C, 3 :  B[i] = C[3]                          (carry the last sum into all lanes)
```

Use `vtriang(A_k, B_k)` on vector *k* of products, then
`B_{k+1} = vlevel(C_k, 3)`. `C_k` then holds the running sum at each of the
four samples. A windowed (moving) sum is the difference of two such running
sums. `rmax` / `rgrep` then move the values to the scalar side for the
threshold and peak logic. `sync_vaccu_tb` checks this identity over a long
random stream.

`vrot X` (`sync_valign`) returns lanes X..X+3 of the eight-lane pair
`{b, a}`. With `a == b` it is a plain rotation. With two consecutive input
vectors it gives the window that starts X samples into `a`, which is how a
delay that is not a multiple of four samples is built.

## Arithmetic details

* Every component is 16-bit two's complement and arithmetic wraps (no
  saturation). In memory and on the ports, lane *i* of a vector sits at bits
  `[32i+31:32i]`, with the real part in the low half.
* `vcml` computes `(a.re·b.re − a.im·b.im) + j(a.re·b.im + a.im·b.re)` at full
  precision. It then shifts right arithmetically by `15 − 4·aux` (15, 11, 7 or
  3) and keeps 16 bits. Stage 1 registers the four partial products per lane;
  stage 2 adds them and scales.
* `mul` keeps the low 16 bits of the product. `modi rd, ra, rb` wraps `ra`
  into `[0, rb)` with one add or subtract, which is the index step of a
  circular buffer.
* `vmov` fills the real parts with an 8-bit signed immediate and clears the
  imaginary parts. `vreal` / `vimag` keep one part and clear the other. `spread`
  fills all four lanes with `ra + j·rb`.
* `rmax` / `imax` return the largest value. `rgrep` / `igrep` return one lane
  (`imm[1:0]`).

## Instruction encoding

A bundle is 96 bits, one program-memory word:

| bits | slot | fields |
|------|------|--------|
| 95:75 | Scalar1 | `op[4:0] rd[3:0] ra[3:0] imm[7:0]` (second register `rb` = `imm[3:0]`) |
| 74:54 | Scalar2 | same |
| 53:36 | Vector1 | `op[3:0] d[3:0] a[3:0] b[3:0] aux[1:0]` |
| 35:18 | Vector2 | same |
| 17:0  | Vector3 | same |

Opcode values are the enums in `rtl/syncpro_pkg.sv`, where each line also
gives the operation's semantics and its use of the fields. Points that are
easy to miss:

* `movi` takes a 12-bit signed immediate `{ra, imm}`.
* `addi`, `vld` offsets and `vldp` increments are 8-bit signed.
* `vst` names its source vector in the `rd` field. `rgrep`/`rmax` name theirs
  in `ra`. `vld`/`vldp`/`spread`/`pinld` name their destination vector in `rd`.
* `vldp vd, ra, imm` loads from address `ra` and writes `ra + imm` back to
  `ra` through the second SRF write port.
* The shift amount of `vasr`/`vlsl` is in the `b` field. The lane of `vlevel`,
  the X of `vrot` and the scaling of `vcml` are in `aux`.
* Opcode 0 is a nop in every slot. Undefined opcodes also decode as nop.

`tb/syncpro_tb.sv` contains a small assembler (SystemVerilog functions `S`, `V`
and `emit`) and a complete example program.

## Memories and I/O

* Program memory `sync_pmem`: 256 × 96 bit, single port, synchronous read.
  While `run = 0` it is written through `pm_we/pm_waddr/pm_wdata`. Raising
  `run` starts execution at address 0.
* Scratchpad `sync_dmem`: 256 vectors × 128 bit (4 KiB), single port. It holds
  the delay lines of the correlators.
* Input stream: `in_data`/`in_valid`/`in_ready`. A vector is transferred in a
  cycle where both `in_valid` and `in_ready` are high. `in_ready` is high only
  while a `pinld` sits in DE. `waiting` shows the stall.
* Output: each `pinst` produces a one-cycle `out_valid` pulse with the 16-bit
  value on `out_data`.

Both memories are plain arrays, written so that synthesis can map them to
single-port SRAM macros. Registers use an asynchronous active-low reset to 0.
The memory arrays are not reset.

## Performance against the target standards

At 200 MHz and 20 Msample/s there are **40 cycles per input vector**.

* **802.11a kernel, per vector:** the instruction mix puts 19 operations on
  Scalar1, which is the busiest slot. So a kernel needs at least 19 bundles,
  plus two cycles for each taken branch.
* **802.16e kernel, per vector:** the larger 802.16e mix needs at least 18
  bundles (Vector1 and Scalar1 each carry 18 operations).
* **Example kernels:** the correlation kernel in `syncpro_tb` runs at 23
  cycles per vector. The full detector (correlate, normalize, find the peak)
  in `syncpro_11a_tb` and `syncpro_16e_tb` runs at 35. The testbenches check
  both figures against the budget of 40.

Scalar2 executes no scalar ALU operations in this design, so all scalar
bookkeeping lands on Scalar1. A schedule that spreads that work over both
scalar slots would be shorter: about 14 cycles for the 802.11a kernel.

## What is this design's own choice

The overall structure follows the published SyncPro architecture:

* the slots and which unit sits in which slot;
* the 16 × 16 SRF with 4R/2W ports;
* three 4 × 128 VRFs with 2 local read ports, 1 broadcast read port and 1
  write port each;
* the all-to-all write interconnect;
* the 256 × 96 program memory and 256 × 128 scratchpad, both single-port;
* the FE1/FE2/DE/EX/EX2 pipeline with operands latched at the end of DE;
* the vtriang/vlevel accumulation;
* the blocking input port.

The following were not specified there and were chosen here:

* the whole binary encoding and the opcode numbers;
* the immediates;
* the vcml output scaling;
* the exact semantics of `modi`, `mul`, `vmov`, `vreal`/`vimag`, `spread` and
  the two-vector form of `vrot`;
* a selectable lane for `vlevel`;
* branch resolution in DE with two squashed bundles;
* the `vldp` post-increment, which is the one use of the SRF's second write
  port;
* the valid/ready input handshake and the single `pinst` output port;
* the program-load port;
* the interconnect priorities on conflicting requests.

The gate-level power techniques (clock gating, operand isolation) are
represented only by the operand-register load enables described above.

## Files and simulation

`rtl/`: `syncpro_pkg.sv` (types, opcodes, bundle layout), `syncpro.sv` (top),
and one file per unit (`sync_*.sv`). `tb/`: one self-checking testbench per
unit (`<module>_tb.sv`), and `syncpro_tb.sv`, `syncpro_11a_tb.sv`,
`syncpro_16e_tb.sv` and `syncpro_isa_tb.sv` for the whole core. Each testbench
prints `TB_RESULT checks=N failures=M`.

Simulate any testbench with Verilator 5. The package comes first; `-Irtl` lets
Verilator find the other modules:

```
verilator --binary --timing --assert -Irtl rtl/syncpro_pkg.sv tb/syncpro_tb.sv \
          --top-module syncpro_tb -o sim && ./obj_dir/sim
verilator --binary --timing --assert -Irtl rtl/syncpro_pkg.sv tb/sync_vaccu_tb.sv \
          --top-module sync_vaccu_tb -o sim && ./obj_dir/sim
```

`syncpro_tb` uses the top's default sizes. It runs 160 input vectors of an
802.11a-style kernel:

* Delayed autocorrelation with 16- and 32-sample delays, using a ring buffer in
  the scratchpad.
* `vcml` against the conjugated current samples, then running accumulation with
  `vtriang`/`vlevel`.
* `rmax`, a threshold test with `bltz`, and `pinst` of the results.

It feeds the stream with random gaps and compares every output value with a
reference model inside the testbench. It also counts input stalls, taken and
not-taken branches, broadcast reads, multiplier EX2 writes, `vldp` and `vst`,
and fails if any of them never happens. Finally it checks that a continuous
stream is processed within the 40-cycle budget per vector.

`syncpro_11a_tb` runs a fuller 802.11a detector: delayed autocorrelation,
power normalization (the squared correlation is compared with the scaled
squared power, so no division is needed) and a trailing-edge search that
reports a peak only after it has stayed the maximum for three vectors. The
stream is quiet noise, then a preamble that repeats every 16 samples, then
noise again. The testbench checks every output value against its own model. It
also checks that the peak is reported at the end of the preamble, and that a
continuous stream takes no more than 40 cycles per vector (the program takes
35).

`syncpro_16e_tb` runs the same detector with the longer distances of
802.16e: delays of 512 and 1024 samples (128 and 256 vectors). The ring
buffer of past inputs then takes the whole 256-vector scratchpad, and a
program loop clears it before the stream starts. The kernel again takes 35
cycles per vector. It is not the full 802.16e algorithm: it has the
distances and memory footprint of 802.16e, but not its mix of operations.

`syncpro_isa_tb` checks the instruction set as a whole. It builds random
straight-line programs from every opcode of every slot, with operands in any
cluster, and runs 30 of them in turn. An instruction-level model inside the
testbench runs the same bundles. After each program the scalar and vector
registers and the whole scratchpad are compared with the model, and so is
every `pinst` value. A random bundle that breaks a crossbar or port rule (see
"Pipeline and what the program must respect") is repaired by dropping the
offending slot. Three empty bundles follow each random one, so this test
checks results but not latencies; the other two top-level testbenches depend
on the exact latencies.

Coverage limits:

* No full 802.16e kernel has been run. Per input vector it needs about three
  times the multiplications of the 802.11a kernel. Counting its operations
  per slot gives at least 18 bundles per vector, well inside the budget of
  40, but no program has measured that.
* No test checks which slot wins when a program breaks a crossbar rule. The
  assertions in the crossbars report such a program as an error.
