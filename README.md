# Vector multiprocessor for transmission-line-modelling kernels

Transmission Line Modelling (TLM) solves electromagnetic field problems on a 3-D
mesh of nodes. Every time step has two parts. In *scatter*, each node mixes its
incident voltage pulses into reflected pulses. In *connect*, the reflected pulses
move to the neighbouring nodes. The work has two kinds of parallelism:

* **Data level.** The innermost mesh loop applies the same floating-point arithmetic
  to consecutive nodes. A vector unit can do several nodes per instruction.
* **Thread level.** The mesh can be cut into slices along an outer loop. Each
  processor then works on its own slice and meets the others at a barrier before
  the data exchange.

This RTL builds a machine that uses both. Each SPARC V8 integer unit gets a
tightly coupled **vector floating-point coprocessor** (`vcop`). N such
processor/coprocessor pairs share one **AHB** bus to memory. A **hardware barrier
controller** replaces barriers built from atomic instructions. The default
configuration is the 2-way machine:

| parameter | default | meaning |
|---|---|---|
| `NCPU`  | 2  | processor/coprocessor pairs |
| `VRMAX` | 8  | vector registers |
| `VLMAX` | 4  | 32-bit single-precision elements per vector register (128 bits) |
| `SRMAX` | 16 | coprocessor scalar registers |
| VLEN    | 10 bits | vector length register, counted in bytes |

The SPARC integer units, their caches, the SDRAM controller and the peripheral
subsystem are not part of this RTL. The top module brings out their connections
as ports (see [What is outside the RTL](#what-is-outside-the-rtl)).

## Programmer's model of the coprocessor

Each coprocessor holds:

* `VR0..VR(VRMAX-1)`: vector registers of `VLMAX` IEEE 754 single-precision elements.
* `SR0..SR(SRMAX-1)`: 32-bit scalar registers. They hold addresses, values moved in
  from the integer unit, and scalars for `VSPLAT`.
* `VACC0`, `VACC1`: vector accumulators of `VLMAX` elements each.
* `VLEN`: the number of **bytes** that an operation "under VLEN" changes.

Instructions travel to the coprocessor as a 20-bit word. The fields are
`op[19:16] d[15:12] a[11:8] b[7:4] c[3:0]`, defined in `rtl/vcop_pkg.sv`:

| op | mnemonic | effect |
|---|---|---|
| 0  | MVSR2VLEN | `VLEN <= din` |
| 1  | MVSR2CSR  | `SR[d] <= din` |
| 2  | MVCSR2R   | `dout <= SR[a]` |
| 3  | MVSR2CVEL | element `b` of `VR[d]` `<= din` |
| 4  | MVCVEL2R  | `dout <=` element `b` of `VR[a]` |
| 5  | VLDU      | `VR[d]` bytes `0..VLEN-1 <= mem[SR[a]+SR[b] ...]`, any alignment |
| 6  | VSTU      | `mem[SR[a]+SR[b] ...] <= VR[d]` bytes `0..VLEN-1` |
| 7  | VPERM     | byte `i` of `VR[d]` `<=` byte `VR[c].byte[i] mod 2VB` of `{VR[a], VR[b]}` |
| 8  | VSPLAT    | every element of `VR[d]` `<= SR[a]` |
| 9  | VFPADD    | `VR[d] <= VR[a] + VR[b]`, under VLEN |
| 10 | VFPSUB    | `VR[d] <= VR[a] - VR[b]`, under VLEN |
| 11 | VFPMUL    | `VR[d] <= VR[a] * VR[b]`, under VLEN |
| 12 | VFPMAC    | `VACC[c0] <= (c1 ? 0 : VACC[c0]) + VR[a]*VR[b]`; `VR[d] <= VACC[c0]` |

How to read the table:

* Operations marked "under VLEN" change only bytes `0..VLEN-1` of the destination.
  A VLEN above the register size means the whole register. VLEN is counted in bytes,
  so it can stop in the middle of an element: `VFPADD` with VLEN = 10 writes two full
  sums and the first two bytes of the third.
* `VPERM`, `VSPLAT` and `VFPMAC` always write the whole register.
* There is no divide.
* SPARC is big-endian. Vector registers are held in memory byte order: byte `i`
  is the byte stored at address `base+i`. Element `e` is bytes `4e..4e+3`, with
  the most significant byte first. VPERM indices and VLEN both count in this
  byte order.

The thirteen operations are the architecture's own. The bit layout, the opcode
numbers, the address form `SR[a]+SR[b]` and the accumulator-select bits of
`VFPMAC` were chosen for this RTL.

## The coprocessor channel

The integer unit and the coprocessor run in lockstep over a dedicated channel,
not over the integer unit's generic coprocessor port. Each direction is a packed
struct:

* `pcop_in_t`: `cop_no`, `holdn`, `valid`, `opc[19:0]`, `din[31:0]`
* `pcop_out_t`: `holdn`, `dout[31:0]`

The rules:

* **Transfer.** An instruction transfers in a cycle where `valid`, `cop_i.holdn`
  and `cop_o.holdn` are all high and `cop_no` equals the coprocessor's `COP_ID`.
  The integer unit is expected to AND the coprocessor's `holdn` into its own hold
  and pass the result back as `cop_i.holdn`.
* **Moves into the coprocessor** (`MVSR2*`). The scalar arrives on `din` in the
  cycle *after* the instruction, when the integer unit has its operand. A
  following instruction may use the new `SR`/`VLEN` value in that same cycle,
  because it is forwarded.
* **Moves out of the coprocessor** (`MV*2R`). Data is on `dout` in the first
  cycle after the transfer in which `cop_o.holdn` is high. Normally that is the
  next cycle.
* **Hold.** `cop_o.holdn` goes low while an instruction has to wait in decode, and
  for the whole duration of a vector load or store.

This is the reference sequence, which `tb_vcop` checks cycle by cycle:

| cycle | channel | coprocessor |
|---|---|---|
| 1 | `VFPADD v5,v1,v2` | decode |
| 2 | `MVSR2CSR sr3` | add in EXEC |
| 3 | `MVCVEL2R v5[0]`, `din` = value for sr3 | add in EXEC2; read of v5 must wait |
| 4 | `cop_o.holdn` = 0 | add in COMMIT, forwarded to the waiting read |
| 5 | `dout` valid, `holdn` = 1 | |

So a read of a result two cycles after its producer costs exactly one hold cycle.
A read issued three or more cycles after its producer costs none.

## Pipeline and interlocks

```
 DECODE            EXEC              EXEC2                 COMMIT
 read VR/SR        FP stage 1        FP stage 2            intermediate register
 (+ bypass from    (add/sub/mul,     (MAC accumulation)    -> VR write with
  COMMIT), VPERM,   element insert                            byte enables
  VSPLAT, masks     from din)
```

* **Operand reads.** The register files are read combinationally in the decode
  cycle. In the original design this is done on the falling clock edge; the
  cycle-level result is the same.
* **Bypass and stalls.** A result in COMMIT is forwarded to decode byte by byte,
  honouring its write mask. If a source is still in EXEC or EXEC2, the instruction
  waits in decode and `holdn` is dropped. Everything behind decode keeps moving,
  so the hazard always clears.
* **Loads and stores.** `VLDU` and `VSTU` wait until EXEC, EXEC2 and COMMIT are
  empty. They then run alone in the load/store unit. A load writes the register
  file when it ends. Because of this, the pipeline and the load/store unit never
  compete for the single write port. An assertion in `vcop` checks that.
* **Throughput.** Independent instructions issue one per cycle. The results come
  back in the same order the instructions were issued.

## Floating-point lanes

`vfp_lane` is one 32-bit element slice. There are `VLMAX` lanes. Each lane holds
its element of both accumulators.

* **EXEC.** Computes the complete rounded sum, difference or product.
* **EXEC2.** Performs only the accumulation of `VFPMAC`. `VFPMAC` is therefore an
  *unfused* multiply-add: the product is rounded before it is added.
* **Back-to-back MACs.** Two MACs in a row into the same accumulator see each
  other's result, so a MAC never stalls.

Arithmetic rules:

* Rounding is to nearest even.
* Denormal inputs and denormal results are flushed to signed zero.
* An overflow gives infinity.
* A NaN operand, `inf - inf` or `0 * inf` gives `0x7FC00000`.
* There are no exception flags.

These rules are this implementation's choice. The original lanes were taken from
an existing FPU, whose corner-case behaviour is not known.

## Memory pipe

`VLDU` and `VSTU` pass through two units: the vector data cache `vcache`, and
behind it the bus controller `vlsu`. Both have the same `start`/`busy`/`done`
interface. The coprocessor holds the processor (`holdn` low) until `done`.

### Vector cache

`vcache` has 32 sets of 2 ways. Each line is one vector register wide, which is
16 bytes at the default `VLMAX`, so the cache holds 1 KB.

* **Loads.** An unaligned vector touches at most two consecutive lines. Each
  line is looked up in turn (way select). The requested bytes are then put
  together from both lines (block merge). A missing line is fetched from the bus
  as one aligned 16-byte access into the least recently used way.
* **Load timing.** A hit in one line gives `done` 2 cycles after `start`. A hit
  in both of two lines takes 3 cycles. Each miss adds one line fetch.
* **Stores.** Stores are write-through with no allocation. Bytes of lines that
  are present are updated. The store then goes to the bus unchanged, through
  `vlsu`, and the processor waits until it has reached memory.
* **Snooping.** Every AHB write that another master gets accepted invalidates
  the matching line. "Another master" covers the integer units and the other
  coprocessors. So a coprocessor never reads stale data after another processor
  has written.

The original memory pipe also has vector write buffers. They are not built.
The cache size, associativity, line size, write policy and snooping are this
design's choices. The original gives only the block names (cache, way select
and block merge, write buffers).

### Bus controller

`vlsu` moves `VLEN` bytes at any byte address. It does this with AHB single
transfers:

* A word transfer wherever the address is word-aligned and four or more bytes
  remain.
* A byte transfer everywhere else.

So an unaligned 16-byte vector costs three full words plus four bytes. Write data
of a byte transfer is replicated on all four byte lanes. Transfers are not
pipelined, and `hresp` errors are ignored.

Behind the cache, `vlsu` sees aligned 16-byte line fills, which become four word
transfers, and stores at any byte address. The address-update logic of the
original memory pipe (automatic address increment) is not built. A vector
address is always `SR[a] + SR[b]`.

## Multiprocessor

* **`ahb_arbiter`.** An AHB (AMBA 2) arbiter and multiplexer for `NM = 2*NCPU`
  masters:
  * Master `2i` is integer unit `i`. Master `2i+1` is coprocessor `i`.
  * Grants are round-robin. A master keeps the bus while it holds `hbusreq`.
  * Ownership moves only after the owner drops `hbusreq` and drives IDLE.
  * Write data comes from the master that owned the previous address phase.
  * An assertion flags any transfer started without a grant.
* **`barrier_ctrl`.** The hardware barrier:
  * Processor `i` pulses `barrier[i]`. From that cycle it is held by `hold[i]`.
  * The barrier releases when the last participating processor arrives. In that
    cycle nobody is held, so all processors leave together.
  * The last processor to arrive is never held.
  * `barrier_mask` leaves processors out.
* **`tlm_vmp_top`.** Instantiates `NCPU` coprocessors, the arbiter and the barrier
  controller. It also derives the snoop input of each vector cache from the
  shared bus: any accepted write whose `hmaster` is not that coprocessor.

## What is outside the RTL

| part | how the top handles it |
|---|---|
| SPARC V8 integer unit (8 register windows, 4-way 8 KB I-cache, 4-way 16 KB D-cache, write buffers, bus controller) | `cop_i/cop_o`, `cpu_ahb_o/cpu_ahb_i`, `barrier/hold` ports per processor |
| context-ID register of each integer unit | part of the integer unit (it holds the processor index) |
| SDRAM controller and off-chip SDRAM | AHB slave port `ahb_s_i/ahb_s_o` |
| AHB-to-APB bridge, interrupt controller, UART, timers, control registers | behind the same slave port |
| vector write buffers | not built; stores wait for the bus |

In the original system, only processor 0 services interrupts and reaches the
peripherals. That is software and address-map policy, so nothing here enforces it.

## Files

| file | contents |
|---|---|
| `rtl/vcop_pkg.sv` | instruction encoding, channel and AHB structs, default sizes |
| `rtl/tlm_vmp_top.sv` | N-way top |
| `rtl/vcop.sv` | vector coprocessor: decode, interlocks, control pipeline, VLEN |
| `rtl/vfp_lane.sv` | two-stage FP lane with accumulators |
| `rtl/vec_regfile.sv` | vector registers, 3 read / 1 write port, byte enables |
| `rtl/vcop_srf.sv` | scalar registers with write forwarding |
| `rtl/vperm_unit.sv` | byte permute |
| `rtl/vcache.sv` | vector data cache: 2-way, write-through, snooping |
| `rtl/vlsu.sv` | unaligned vector load/store bus controller (AHB master) |
| `rtl/ahb_arbiter.sv` | AHB arbiter/multiplexer |
| `rtl/barrier_ctrl.sv` | hardware barrier |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/fp_ref_pkg.sv` | reference single-precision arithmetic |
| `tb/ahb_mem_model.sv` | behavioural SDRAM controller and memory with random wait states |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
For example, the full-system test at default parameters:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vcop_pkg.sv tb/fp_ref_pkg.sv tb/tb_tlm_vmp_top.sv --top-module tb_tlm_vmp_top
./obj_dir/Vtb_tlm_vmp_top
```

For any other testbench, replace the last file and the top name. The
`vcop_pkg.sv` file (and `fp_ref_pkg.sv` where used) must come first.

What the testbenches establish:

* **`tb_vfp_lane`.** Runs 4000 random operations, one per cycle, against
  double-precision arithmetic rounded to single. It also covers the special
  values and the tie-to-even cases, and checks the three-cycle latency.
* **`tb_vcop`.**
  * Runs the channel sequence above, cycle by cycle.
  * Checks one-per-cycle issue.
  * Runs 3000 random instructions of every kind while the processor side holds
    at random. They are checked against an instruction-level model, covering every
    register and the whole memory image.
* **`tb_vlsu`, `tb_ahb_arbiter`.** Run unaligned loads and stores of 0..20 bytes
  under random grant delays and wait states, and check the transfer count per
  access. The arbiter test runs four competing masters and checks `hmaster`.
* **`tb_vcache`.** Runs random unaligned loads and stores of 0..20 bytes over a
  range that makes lines both reused and evicted. Words are also written into
  memory behind the cache, as another master would, and reported on the snoop
  input. Every load is checked against a memory model. The test also checks the
  hit latencies of 2 and 3 cycles. It requires hits, misses and snoop
  invalidations to occur.
* **`tb_tlm_vmp_top`.** Runs both processors at default size on a small TLM-style
  kernel:
  * Scatter: `y += s*x`, with `x*x` accumulated by `VFPMAC` and one group under
    VLEN = 10.
  * The barrier.
  * Connect: an unaligned load of the other processor's results (whose lines
    the snooping has invalidated), a byte reversal with `VPERM`, and an
    unaligned store.
  * Meanwhile the integer units' bus masters read memory at random.

  It checks the read-backs and the final memory. It also requires each mechanism
  to occur at least once: read-after-write hold, load/store hold, processor hold,
  barrier hold and release, bus contention, wait states, unaligned byte
  transfers, partial VLEN, MAC, VPERM, VSPLAT, and vector cache hits, misses and
  snooped writes.

Not verified: behaviour with AHB error responses, and timing against the real
integer unit's pipeline. Only the channel contract above is modelled.

## Scaling

* `VLMAX` sets the number of lanes and the register width. The architecture was
  evaluated with vectors of up to 16 elements.
* `NCPU` sets the number of pairs. Thread-level results were given for up to 10
  processors.
* `VRMAX` and `SRMAX` set the register file sizes.

The instruction fields allow up to 16 vector and 16 scalar registers and VLEN up
to 1023 bytes.
