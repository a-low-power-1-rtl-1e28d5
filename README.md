# Merge-split vector cluster

Small embedded systems such as drones and rovers run two kinds of work at once. One kind is
data-parallel: filters, transforms and linear algebra. The other is scalar: supervision, state
machines and control loops. A cluster of independent vector cores fits the first kind. It does
badly on the second: either the scalar work waits, or a whole vector-capable core sits on scalar
code while its vector unit stays idle.

This cluster can switch between two configurations at run time:

* **Split mode.** Each of the two scalar cores (SC) drives its own vector core (VC). The result is
  two independent vector machines, each with a VLEN of 512 bits.
* **Merge mode.** SC0 drives both VCs, which act as one vector machine with a VLEN of 1024 bits.
  SC1 is detached from vector work and runs scalar code on its own.

Only a little hardware makes the switch possible:

* one merge interface (MIF) per SC/VC pair;
* one mode bit, written through the hardware barrier;
* a fixed rule for how a 1024-bit register is divided between the two 512-bit register files.

A mode switch takes 5 cycles.

This repository holds synthesizable SystemVerilog for that mechanism and for the cluster around
it: the vector cores (integer subset), their banked register files, the L1 interconnect and the
L1 banks. It is a working model of the architecture, not the fabricated chip's RTL. The
"Departures and gaps" section lists what is missing.

## Block diagram

```
            SC0 (external)                      SC1 (external)
         vreq | data | barrier              vreq | data | barrier
              v      |     \               /     |      v
           +------+  |   +------------------+    |  +------+
           | MIF0 |<-+---| mode CSR + HW    |----+->| MIF1 |
           |      |==link==> barrier        |       |      |
           +------+  |   +------------------+    |  +------+
              |      |                            |     |
           +------+  |                            |  +------+
           | VC0  |  |                            |  | VC1  |
           | VRF 4x64b banks, 4 IPU lanes,        |  | ...  |
           | VLSU (4 x 64b ports), VSLDU          |  |      |
           +------+  |                            |  +------+
             4x64b   | 64b                   64b  |   4x64b
              v      v                            v     v
           +---------------------------------------------------+
           |  L1 TCDM interconnect: 10 ports -> 16 banks x 64b |
           +---------------------------------------------------+
              16 x l1_bank (1024 x 64b each = 128 KiB)
```

`buckbeak_cluster` is the top module. The scalar cores are not part of this design. Their three
connections are brought out as top-level ports:

* the vector-instruction port into each MIF;
* a 64-bit data port into the L1;
* a barrier request/acknowledge pair.

## The merge interface

Each MIF is purely combinational. It decodes its state from the mode bit and its core ID:

| mode CSR | core ID | state       | what the MIF does                                         |
|----------|---------|-------------|-----------------------------------------------------------|
| 0        | any     | SPLIT       | SC to own VC; the link is unused                          |
| 1        | 0       | MANAGER     | SC to own VC **and**, over the link, to the other VC      |
| 1        | 1       | SUBORDINATE | link to own VC; the SC sees `ready = 0` (detached)        |

A manager must never let one VC take an instruction that the other VC has not taken. It therefore
raises `valid` towards its own VC only while the partner VC is ready, and the reverse for the link.
The SC sees `ready` only when both VCs are ready, so both take the instruction in the same cycle.
This works because a VC's `ready` does not depend on `valid`, and the assertions check that rule.
Scalar results, i.e. the `vl` returned by `vsetvli`, go back to the SC from its own VC. The
subordinate's copy of the same value is dropped.

## Switching modes

Both scalar cores call the barrier with `kind = 1`. The listing that drives the switch uses one
call both to enter and to leave merge mode, so a mode request toggles the bit. `mode_csr_barrier`
then runs a fixed sequence that starts in the cycle in which the last request is present:

1. arrivals registered
2. synchronisation detected
3. CSR write request
4. mode CSR updated (the MIFs route the new way from this cycle on)
5. acknowledge to both cores

Before it starts, the switch also waits until both VCs are idle, so no instruction is in flight
when the routing changes. With `kind = 0` the block is a plain barrier and runs the same
5-cycle sequence without writing the CSR. After reset the cluster is in split mode.

## Register layout in merge mode

This is the key idea of the design. In merge mode no data moves between the two register files.
Register *i* of the merged machine is 1024 bits wide:

* VC0's register *i* holds bytes 0-63;
* VC1's register *i* holds bytes 64-127.

A register group (LMUL > 1) repeats this split for every 128-byte slice. Take VL = 24, LMUL = 2,
SEW = 64:

```
            VC0 (lower half)        VC1 (upper half)
  v0        elements  0 ..  7       elements  8 .. 15
  v1        elements 16 .. 23       (24 .. 31, tail)
```

Each core sees this as a contiguous local vector of "its" bytes. If the merged vector holds T
bytes, the core with half h ∈ {0, 1} holds

```
local_bytes = (T / 128) * 64 + clamp(T % 128 - 64*h, 0, 64)
```

Element-wise instructions therefore need no change at all. Both cores run the same instruction
over their local bytes. Loads and stores need only an address map: local 64-bit word *w* of core
*h* is global word `(w/8)*16 + 8h + w%8` of the vector in memory. Both cores receive the
`vsetvli`, compute `vl` against the doubled VLMAX and keep their local share. A change of SEW or
LMUL never requires reshuffling.

Instructions that move elements across the halves are not supported in merge mode. These include
slides and mixed-width operations, which in the original design read operands from both register
files. The core flags slides as illegal in merge mode.

## Vector core

`vector_core` executes one instruction at a time. `ready` is high only when the core is idle.

| unit | module | what it does |
|------|--------|--------------|
| control, CSRs | `vector_core` | decodes the RVV 1.0 encoding; holds `vl`, SEW and LMUL; computes the merge-mode share |
| VRF | `vrf` | 32 × 512 b in 4 banks of 64-bit words; 3 read ports and 1 write port per bank; byte write enables; word *w* of register *v* is in bank *w*%4, row 2*v* + *w*/4 |
| IPU | `ipu` (×4) | one 64-bit lane per bank; add, sub, and, or, xor, sll, srl, min, max, mul, macc at SEW 8/16/32/64 |
| VLSU | `vlsu` | unit-stride loads and stores; memory port *p* moves the words of bank *p* |
| VSLDU | `vsldu` | vslideup/vslidedown, one element per cycle |

Supported instructions:

* `vsetvli`, `vsetivli`, `vsetvl` (LMUL 1–8);
* `vle8/16/32/64.v`, `vse8/16/32/64.v`;
* `vadd`, `vsub`, `vand`, `vor`, `vxor`, `vsll`, `vsrl`, `vmin`, `vmax` in the `.vv`, `.vx` and
  `.vi` forms;
* `vmul`, `vmacc` in the `.vv` and `.vx` forms;
* `vslideup` and `vslidedown` in the `.vx` and `.vi` forms.

The core pulses `illegal_o` for anything else, for masked forms and for fractional LMUL, and does
nothing else with the instruction. Loads and stores move `vl` elements of the current SEW.

Timing:

* An arithmetic instruction takes ceil(local bytes / 32) cycles. Each cycle the three read ports
  of all four banks feed vs2, vs1 and the old vd to the four lanes, and 256 bits are written
  back. Byte enables protect the tail beyond `vl`.
* A `vsetvli` answers on `rsp_valid_o` in the cycle after acceptance.
* A load or store holds the core until its last word is written or granted.

## Memory system

The L1 has 16 banks of 1024 × 64 bits, 128 KiB in all, interleaved by 64-bit word: bank =
`addr[6:3]`. `tcdm_interconnect` is a full crossbar from ten ports to the banks:

* ports 0 and 1: SC0 and SC1;
* ports 2–5: VC0;
* ports 6–9: VC1.

Each bank grants one port per cycle, round robin. A port that loses keeps its request, which is
how bank conflicts stall a VC or an SC. Read data returns one cycle after the grant, and writes
get no response. Addresses above 128 KiB wrap around.

## Departures and gaps

* **No floating point.** The original vector cores have four 64-bit FPUs each, supporting FP64,
  FP32, FP16, BF16 and FP8. They are not modelled, so none of the FP benchmarks (matrix multiply,
  FFT, convolution, particle filter) can run here. The integer path has the same data flow:
  `vle`, `vmacc` and `vse` work in both modes.
* **No scoreboard or chaining.** The core executes in order, one instruction at a time. The
  FPU sequencer, scoreboard and reorder buffers of the original are not modelled.
* **No mixed-width merge operations and no merge-mode slides.**
* **Not included:** the scalar cores (RV32IMAFD), the instruction cache, the DMA, the AXI crossbars
  and the cluster ROM/control. The host domain (RV32IMC core, L2 memories, peripherals, FLLs) is
  not included either.
* **Barrier access.** The barrier is reached through dedicated request/ack ports, not through a
  memory-mapped address.
* **Design choices.** The following are choices of this design; the architecture does not fix
  them:
  * the instruction and response formats (`vreq_t` carries the 32-bit instruction plus rs1/rs2
    values);
  * the valid/ready handshakes;
  * the split of the 5-cycle switch into steps;
  * round-robin arbitration;
  * resetting the VRF to zero.

## Files

* `rtl/buckbeak_pkg.sv`: shared types (instruction and memory requests, MIF states, IPU
  operations) and sizes.
* `rtl/buckbeak_cluster.sv`: the top.
* `rtl/mif.sv`, `rtl/mode_csr_barrier.sv`: the reconfiguration logic.
* `rtl/vector_core.sv`, `rtl/vrf.sv`, `rtl/ipu.sv`, `rtl/vlsu.sv`, `rtl/vsldu.sv`: the vector core.
* `rtl/tcdm_interconnect.sv`, `rtl/l1_bank.sv`: the L1.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_rvv_pkg.sv`: RVV instruction encoders for the testbenches.
* `tb/tb_mem_model.sv`: a memory with random stalls.
* `tb/tb_matmul_modes.sv`: a matrix-multiply benchmark of both modes on the whole cluster.

`tb_buckbeak_cluster` runs the whole cluster at its default size. It covers a split-mode phase
with both pairs working at once, a barrier, a switch to merge mode, and merge-mode vector work
with VL = 24 and LMUL = 2 while SC1 runs scalar accesses. It then switches back to split mode and
runs a slide. Along the way it checks:

* every result in memory;
* the merged register layout shown above;
* the 5-cycle switch.

It also counts bank conflicts, back-pressure, broadcasts and the detached SC1, and fails if any
of them never happens.

`tb_matmul_modes` is a small benchmark: a 32-bit integer matrix multiply C = A·B, the integer
counterpart of the original's FP matmul kernel. Each row of C is built with `vle` of a row of B
and `vmacc.vx` with an element of A, then stored with `vse`. It runs the same matrices two ways:

* split mode: both SC/VC pairs each compute one product at the same time;
* merge mode: SC0 computes the two products one after the other on the 1024-bit machine.

Every element of C is checked against a software model. The cycle counts, measured from the
first instruction until both cores are idle after the last store, are:

| N  | split, two products at once | merge, two products in turn |
|----|-----------------------------|-----------------------------|
| 8  | 700                         | 1397                        |
| 16 | 2964                        | 5925                        |
| 32 | 14756                       | 23109                       |

For small matrices a row does not even fill a 512-bit register. Merge mode then leaves half of
each core idle and takes twice as long. At N = 32 a row fills the merged register and the gap
shrinks to about 1.6×. This matches the trend reported for the original chip: split mode is
faster on pure vector kernels of this size. Merge mode pays off when SC1 has scalar work of its
own, and this model has no scalar core to show that effect.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/buckbeak_pkg.sv tb/tb_rvv_pkg.sv rtl/buckbeak_cluster.sv tb/tb_buckbeak_cluster.sv \
    --top-module tb_buckbeak_cluster
./obj_dir/Vtb_buckbeak_cluster
```

The other testbenches build the same way: list the package, the module under test and the
testbench. `tb_vector_core`, `tb_vlsu` and `tb_vsldu` also need `tb/tb_rvv_pkg.sv` or
`tb/tb_mem_model.sv`; `-Irtl -Itb` lets Verilator find the remaining files. The whole cluster
test builds in about 20 s and runs in well under a second.

To change the size, use the parameters of `buckbeak_cluster`: `VLEN`, `NR_VREGS`,
`NR_L1_BANKS`, `L1_WORDS` and `RECONF_LAT`. The VRF always has four 64-bit banks per core. `VLEN`
must be a multiple of 256.
