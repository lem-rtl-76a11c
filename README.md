# LEM vector unit: a RISC-V "V" unit built from a loop-expanding microsequencer

A RISC-V vector instruction stands for a loop over elements. This unit does not
add a wide vector datapath. Instead, a small **loop-expanding microsequencer
(LEM)** turns each vector instruction into one scalar-sized micro-op per element
(or per element step). The micro-ops then run down a 64-bit pipe whose ALU has
been extended for vector work. The sequencer itself knows nothing about
vectors. It runs two nested counters and asks pluggable **decoder extensions**
what to issue for each counter value. The vector decoder is one such
extension. A custom kernel (for example, sparse matrix-vector multiply written
as microcode) would be another.

The RTL implements RV64 vector extension 1.0 with a 256-bit VLEN, 32 vector
registers, and one lane. It has been checked with Verilator 5 and the slang
front end of Yosys.

## 1. The expander (`lem_expander`)

The expander sits between the instruction front end and the pipe. It works in
two phases.

**Prepare.** When `in_valid` is high and the expander is idle, it broadcasts
the instruction on `ext_req` with `prepare=1` to every extension. Each
extension answers on `ext_resp` through these fields:

| Field | Meaning |
|---|---|
| `recognized` | The extension owns this instruction. |
| `illegal` | The instruction is recognised but not allowed. |
| `wait_hazard` | Hold the instruction (used for scoreboard hazards). |
| `outer_init`, `outer_end` | Range of the outer counter. |
| `inner_end` | Length of the inner counter. |

The expander then acts on the answers:

- If no extension recognises the instruction, it leaves on `pass_valid/pass_instr`, unchanged, for the scalar pipe.
- If the instruction is illegal, `illegal` pulses for one cycle.
- Otherwise the expander accepts it (`in_ready`) and latches it with its scalar operands (`cur_rs1/rs2/frs1`). It loads the outer counter with `outer_init` and the inner counter with 0, and raises `busy`.
- When several extensions recognise the same instruction, the lowest index wins.

**Run.** Each cycle, the expander puts the latched instruction and the two
counters on `ext_req`. The owning extension returns the micro-op for that
point. The expander forwards it on `uop_valid/uop` with a `uop_ready`
handshake, and stamps `first` and `last` on it. After each accepted micro-op:

1. The inner counter steps. The extension can instead request a `branch` to `branch_target`, or set `next_outer` to leave the inner loop early.
2. When the inner loop ends, the outer counter steps and the inner counter returns to 0.
3. The sequence ends after the last outer value. It also ends at once when `terminate` is raised (a fault-only-first load that trimmed `vl`) or on `flush`.

An instruction whose outer range is empty (`vl = 0`) produces no micro-ops. An
inner length of 0 counts as 1.

While `busy` is high, no other instruction is taken. The one pipe is reserved
for the vector instruction until it finishes.

## 2. The vector decoder extension (`vdec_common` + five modules)

`vdec_common` is the single extension that the vector unit plugs into the
expander. It runs five decode modules in parallel, each combinational, each
producing a `vdec_sub_t` (defined in `vdec_pkg`):

| Module | Instructions |
|---|---|
| `vdec_mem` | Unit-stride, fault-only-first, strided and indexed loads and stores (EEW 8–64). One micro-op per element. The address is formed in the ALU from an accumulator. Unit stride adds the constant 1 shifted left by log2(EEW/8), using the ALU's operand pre-shift. |
| `vdec_int` | Integer element ops, compares into mask bits, `vadc/vsbc/vmadc/vmsbc`, merge and move, saturating and averaging add and subtract, scaling shifts (`vssrl/vssra`), fractional multiply `vsmul`, integer reductions, mask-register logicals, multiplies and multiply-adds. |
| `vdec_fp` | `vfadd/vfsub/vfmul/vfmacc/vfmin/vfmax` (`.vv` and `.vf`) and the ordered and unordered sum reductions. SEW=64 only. |
| `vdec_perm` | `vrgather` (`.vv/.vx/.vi`), `vslideup/vslidedown`, `vid`, `viota`, `vmv.x.s`, `vmv.s.x`, `vcpop`, `vfirst`, `vmsbf/vmsif/vmsof`. |
| `vdec_vsetvl` | `vsetvli`, `vsetivli`, `vsetvl`. Produces one CSR micro-op. |

The counters carry the loop:

- The outer counter is the element index, from `vstart` to `vl`. For mask-register logicals it is the 64-bit word index instead.
- The inner counter numbers the steps within one element. For example, `vrgather.vv` first reads the index element into an index register, then reads the source through it.
- Reductions run one extra micro-op at the end to write the accumulator to `vd[0]`.

`vdec_common` adds the checks that every module shares:

- register-group alignment for LMUL > 1;
- forbidden source/destination overlaps, for the modules that request the check;
- a masked instruction may not write `v0`;
- every instruction except `vsetvl` is illegal while `vtype.vill` is set.

It also builds a 32-bit **scoreboard bitmap** (`sboard_check`) of every register
the instruction reads or writes, with `v0` included when the instruction is
masked. It keeps `wait_hazard` high until the scoreboard reports all of those
registers clear.

Elements below `vstart` still produce micro-ops, marked `skip`. They only
advance the ALU state (the address accumulator, for example) and write nothing.

## 3. The pipe: RR → EX → WB, and the second write port

Each micro-op (`uop_t` in `lem_pkg`) carries everything the pipe needs:

- three operand sources (vector element, `rs1`, `rs2`, `frs1`, immediate, 0, 1, element number, or index register);
- a write-back request, either an element, a single mask bit, or a whole 64-bit mask double word;
- the ALU controls, the functional unit, and the mask and index-unit controls.

**RR (register read).** Three things happen here:

- `vregfile` reads up to three operands.
- Each operand request names a register, a 64-bit double word, a byte offset and an element width. The operand is extracted and sign- or zero-extended to 64 bits.
- `vsetvl` micro-ops update the CSRs in this stage, and the scoreboard counter of the destination register increments.

**EX.** The micro-op goes to one of four destinations:

| Destination | Latency |
|---|---|
| The extended ALU (`ext_alu`) | Combinational |
| The multiply-add unit (`vmul_add`) | Pipelined, 3 cycles by default |
| The memory request port | Returns later |
| The FP request port | Returns later |

A memory or FP request that is not accepted stalls EX and RR. So does an FP
reduction waiting on its queue.

**WB.** ALU results go through register-file write port 1. They can also go to
the scalar destination on `xwb_*`, used for `vsetvl`, `vmv.x.s`, `vcpop` and
`vfirst`.

**RD tags.** Long-latency units do not hold the micro-op. They carry a compact
write request, the **RD tag** (`rdtag_t`): register, double word, byte offset,
element width, element number and flags. The result returns with its tag and is
written through **write port 2**.

Only one long-latency result can use port 2 per cycle, so there is a fixed
priority:

1. the multiplier, which cannot be held;
2. the FP response, back-pressured with `fp_resp_ready`;
3. the memory response, back-pressured with `mem_resp_ready`.

When port 1 and port 2 write the same double word in one cycle, port 2 is
applied on top.

**Scoreboard (`vsboard`).** The scoreboard keeps one counter per vector
register. A counter goes up when a micro-op that writes the register enters
the pipe. It goes down when that write lands on either port, or when the
micro-op is killed. The count is needed, not a single pending bit, because
several loads to one register can be outstanding.

The counter width is `SB_CNT_W` (default 6) and the number of decrement ports is
3. These are this design's own choices.

## 4. Register file details (`vregfile`)

The register file is built from flip-flops: 32 × 256 bits, with three read
ports and two write ports. The extra structures around it do most of the work
for mask and permutation instructions:

- **v0 copy.** A private copy of `v0` gives the mask bit of the current element without a fourth read port. A micro-op can instead take its mask bit from its operand-2 register (`mask_src2`). The decoders here do not use that option, because their mask-source instructions read whole 64-bit words. Masked-off micro-ops are killed in RR, so nothing is written, no memory or FP request is sent, and nothing is multiplied. Memory micro-ops still advance the address accumulator.
- **Mask-bit write.** Compares and `vmadc` write one bit. A 64-bit buffer holds the rest of the destination double word. The first bit of a double word merges into the word as read from the register file, and later bits merge into the buffer, so a whole mask double word is written without a read-modify-write per element.
- **Merge by bit select.** For mask logicals, `mdw_sel` builds a 64-bit select from `vl` (tail bits) so that only the body bits of the last word change.
- **Index unit.**
  - Two 16-bit index registers, an adder and a comparator.
  - The adder takes each input from an index register, the current mask bit, or a decoder constant.
  - Its sum can address an operand element ("read by index"), which is used for `vrgather`, the slides and `viota`.
  - The comparator replaces the control bit, so gather and slide sources outside `VLMAX` produce 0, and slides stay within range.

## 5. The extended ALU (`ext_alu`, `custom_alu`)

`custom_alu` is a 64-bit scalar ALU that works at the element width (SEW). It
provides:

- add and subtract with carry-in, carry/borrow out, and signed overflow;
- shifts that also return the bits shifted out, for rounding;
- compares, min and max, and logic operations.

Operands arrive already extended to 64 bits by the register file, so the shifts
and compares work on 64 bits.

`ext_alu` wraps it with the extensions needed to express vector operations as
scalar steps. The operand path is applied in this order:

1. exchange operands 1 and 2 (for `vrsub`, for example);
2. invert operand 2 after the exchange;
3. shift operand 2 left by 0–3;
4. invert the result.

Around that path sit:

- **Accumulator registers** (`N_ACC = 2`). An operand can be replaced by an accumulator, and the result can be saved into one. These provide reductions and the running memory address.
- **Control-bit select.** The control bit (the mask bit, or the index comparator result) picks between the ALU result and an operand. This gives merge, masked-off undisturbed elements, and the carry-in of `vadc`.
- **Fixed point.**
  - Saturating unsigned and signed add and subtract, which set `vxsat`.
  - Averaging add and subtract (`vaadd[u]`/`vasub[u]`): the exact sum or difference, one bit wider, halved and rounded by `vxrm`.
  - Rounding right shifts, using the four `vxrm` modes (round-to-nearest-up, round-to-nearest-even, round-down, round-to-odd).
- **LSB unit.** It works on `in2 & in3` (data and bit mask):
  - population count, accumulated across double words;
  - a one-hot priority encoder for `vfirst`;
  - set-before-first, set-including-first and set-only-first (`vmsbf/vmsif/vmsof`);
  - a **seen-1 flag** that carries "a 1 was already found" from one double word to the next.
- **Mask output.** The mask output is the compare result or the carry/borrow.
- **Replay.** `replay` restores the accumulators and the seen-1 flag from a one-deep backup, so a squashed micro-op leaves no trace.

`vmul_add` is a pipelined multiplier at SEW. It computes the low half and the
three high-half forms, and adds a third operand after the product (`vmacc`,
`vnmsac`, `vmadd`, `vnmsub`). For `vsmul` it shifts the double-width product
right by SEW-1, rounds by `vxrm` with the same rules as the ALU, and clips to
the signed range. Only (-2^(SEW-1))² clips, and it sets `vxsat` when its result
leaves the pipe.

## 6. FP and the reduction queue (`fp_reduce_queue`)

The FPU itself is outside the unit, behind `fp_req_*`/`fp_resp_*`. It takes a
function, three 64-bit operands and an RD tag. Its results return tagged and
are written through port 2.

An FP reduction cannot keep its running sum in an ALU accumulator, because
the FPU has a multi-cycle latency. Instead, each partial result is tagged
"reduce" and pushed into `fp_reduce_queue`, a small FIFO (`REDQ_DEPTH = 2`).
The next reduction micro-op takes the queue head in place of its operand. If
the queue is empty, it waits in EX. The final micro-op writes the head to
`vd[0]`.

## 7. CSRs, fault-only-first and traps (`vcsr`)

`vcsr` holds `vtype`, `vl`, `vstart`, `vxrm` and `vxsat`.

- **vsetvl family.** Computes VLMAX from SEW and LMUL, applies the AVL rules (a register, an immediate, VLMAX when `rs1 = x0` and `rd ≠ x0`, or keep `vl`), and sets `vill` for unsupported settings. The new `vl` is returned to `rd`.
- **Fault-only-first.** A load response with `mem_resp_error` on element `i > 0` sets `vl = i` and raises `terminate` to the expander. Responses for later elements are dropped.
- **Precise trap.** An error on element 0 of an ff load, or on any element of a normal access, sets `vstart` to that element, raises `trap`, and terminates the sequence.
- **Reset on completion.** `vstart` is reset when an instruction completes.

## 8. Interface summary (`lem_vector_unit`)

| Group | Signals |
|---|---|
| Front end | `in_valid`, `in_instr`, `in_rs1`, `in_rs2`, `in_frs1`, `in_ready`; `pass_valid/pass_instr` for non-vector instructions; `illegal`; `busy` |
| Scalar write-back | `xwb_valid`, `xwb_rd`, `xwb_data` |
| Memory | `mem_req_valid/ready/addr/store/size/data/tag`; `mem_resp_valid/ready/tag/data/error`. Responses are in order. |
| FPU | `fp_req_valid/ready/fn/a/b/c/tag`; `fp_resp_valid/ready/tag/data` |
| Control | `flush`, `replay`, `vstart_we/wdata`, `vxrm_we/wdata` |
| Status | `csr`, `vxsat`, `trap`, `sb_stall`, `dbg_vreg` (all 32 registers, for inspection) |

Notes on these signals:

- Reset is asynchronous and active low.
- All handshakes are valid/ready, and a transfer happens on a clock edge where both are high.
- Shared types are in three packages: `lem_pkg` (sizes, micro-op, RD tag), `lem_ext_pkg` (the expander ↔ extension bundles) and `vdec_pkg` (the decode-module bundle).

Default sizes:

| Parameter | Value |
|---|---|
| `XLEN` | 64 |
| `VLEN` | 256 |
| `NVREG` | 32 |
| `MUL_LATENCY` | 3 |
| `REDQ_DEPTH` | 2 |
| `SB_CNT_W` | 6 |
| Accumulators | 2 |
| Index registers | 2 |
| Counter width | 16 |

VLEN and XLEN match the main configuration of the original design: a 2-issue,
64-bit core with one FPU lane and a 256-bit vector length. The others are this
design's own choices.

## 9. What departs from the original design, and what is missing

**Present, but chosen here.** The original describes these parts only by what
they do, so their details are this design's own:

- the three-stage pipe;
- the port-2 priority;
- the field layout of the micro-op and of the RD tag;
- the scoreboard counter width;
- the queue depth;
- the number and width of the index registers;
- how the decode tables are written (as `case` statements, not pattern rows);
- the one-deep replay backup in the ALU (the original keeps copies in every later stage).

**Narrower than the original:**

- Indexed loads and stores add the index element, read as an ordinary operand, to the base address. The original says the index registers can also serve as indices for memory requests. Here those registers are used only for permutations.

**Not implemented:**

- **Instruction families.** Widening and narrowing operations, division, `vzext/vsext`, `vcompress`, `vslide1up/down`, FP moves, conversions, FP compares and square root. FP at SEW below 64. Segment, whole-register and mask-register loads and stores, which decode as illegal.
- **FP estimate tables.** The reciprocal and reciprocal-square-root estimate tables, whose contents are not defined here.
- **SpMV decoder.** The original shows a custom decoder that runs sparse matrix-vector multiply as microcode on the expander, with index registers and accumulators as kernel variables. It is not built. The expander supports it (branches, `next_outer`, more than one extension), but the decoder itself is missing.
- **External parts.** The FPU, data cache, instruction cache, scalar register file and other scalar pipes are outside the unit and appear only as ports.

**Trust.** Every block has a randomised self-checking testbench, and each
testbench was confirmed to catch a deliberately broken copy of its block. The
end-to-end test runs a mixed program with randomised memory latency,
back-pressure and faults, and compares every register against a reference
model. It is not a compliance suite. Behaviour outside the tested programs,
particularly LMUL > 1 corner cases and masked forms of rarely used
instructions, has seen less checking.

## 10. Simulating

Every testbench is a top-level module in `tb/` that prints
`TB_RESULT checks=N failures=M` and calls `$finish`. The packages must be
compiled first:

```sh
PKGS="rtl/lem_pkg.sv rtl/lem_ext_pkg.sv rtl/vdec_pkg.sv"
SRCS=$(ls rtl/*.sv | grep -v _pkg.sv)
verilator --binary --timing -Wno-fatal $PKGS $SRCS tb/tb_lem_vector_unit.sv \
          --top-module tb_lem_vector_unit -Mdir obj_top
./obj_top/Vtb_lem_vector_unit +verilator+seed+7
```

The same pattern runs the block testbenches. Each one is named after its block:

| Testbench | Covers |
|---|---|
| `tb_lem_expander` | Expander |
| `tb_vdec_common` | Common decoder, memory and integer decode |
| `tb_vregfile` | Register file |
| `tb_vsboard` | Scoreboard |
| `tb_ext_alu` | Extended ALU, including the custom ALU |
| `tb_vmul_add` | Multiply-add unit |
| `tb_fp_reduce_queue` | FP reduction queue |
| `tb_vcsr` | CSRs |

`tb_lem_vector_unit` is the end-to-end test, at the default parameters. It
contains:

- a memory model with random 2–9 cycle latency, random back-pressure and an error address;
- an FPU model with 4-cycle latency, which uses `real` arithmetic.

It runs a mixed vector program that covers every decode module. It also counts how often each mechanism occurred, and fails if any
never did:

- scoreboard waits;
- masked-off kills;
- memory stalls;
- reduction-queue waits;
- write-port-2 conflicts;
- fault-only-first truncation;
- a trap;
- saturation in the ALU and in the multiplier;
- pass-through;
- an illegal instruction;
- out-of-range gather.

Three more testbenches run the benchmark kernels at their usual sizes on the
full unit, with the same memory and FPU models. Each compares every output bit
for bit with a double-precision reference evaluated in the same order:

| Testbench | Kernel | Cycles (one run) |
|---|---|---|
| `tb_dgemv` | y = A·x, 50×100, column-strip kernel with strided loads | ≈15,100 |
| `tb_dgemm` | C = A·B, 43×43, row-strip kernel | ≈247,600 |
| `tb_conv2d_dw` | depthwise 3×3 convolution, 4 channels, 56×56 output | ≈365,200 |

All three use `vsetvli` strip-mining at SEW=64 and LMUL=8 (32 elements per
instruction), `vmv.v.i` to clear the accumulator group, and `vfmacc.vf`. They
alternate two load destination groups so that a load can overlap the previous
multiply-add. The cycle counts depend on the memory model's latency, and one
element per cycle is the upper bound of the single pipe.

To change a size, override the top's parameters, or edit the constants in
`lem_pkg` (VLEN, accumulators, index registers, counter width).
