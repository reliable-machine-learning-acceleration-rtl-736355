# Machine-learning acceleration for space processors: a SWAR unit and a binary neural network engine

Radiation-tolerant space processors are small in-order cores with no vector
hardware, so neural-network inference on them is slow. This RTL provides two
independent ways to speed it up:

1. **A SIMD-within-a-register (SWAR) unit** for a SPARC V8 integer pipeline
   such as LEON3. It treats every 32-bit integer register as four signed or
   unsigned 8-bit components. It adds no new register file. It has two
   pipeline stages:
   - a per-component operation that runs beside the integer ALU;
   - an optional reduction across the four components, such as the sum that
     ends a dot product.
2. **A binary neural network (BNN) accelerator** for an FPGA next to the
   host processor. In a BNN, weights and activations are ±1 and stored as
   one bit (0 stands for −1). A neuron then needs only XNOR, a population
   count and a sign test, with no multiply-accumulate.

The two designs have no connection. The top level, `ml_accel_top`, places
them side by side and brings out each one's ports.

## The SWAR unit

### Datapath

```
 rs1 ─┬──────────────────────────────┐ (unswizzled component, for masked lanes)
      │   ┌──────────┐   ┌─────┐   ┌─┴─┐
      └──►│ swizzle  ├──►│ALU 0│──►│P0 │──► C'0 ┐
 opB ────►│ network  │   │ ... │   │...│        ├─ pipeline register ─► A'3..A'0
          └──────────┘   │ALU 3│──►│P3 │──► C'3 ┘
                         └─────┘   └───┘
 stage 2:  (A'3 ∘ A'2) ∘ (A'1 ∘ A'0)  →  broadcast to C3..C0, or bypass (C = A')
```

Stage 1 works in the execute stage:

- **Swizzle (`simd_swizzle`).** For each operand and each lane, a 3-bit
  selector `{zero, sel[1:0]}` picks any of the four source components or a
  zero. This reorders, duplicates or blanks components.
- **Lane ALUs (`simd_lane_alu`).** Four 8-bit ALUs, one per lane, on the
  swizzled operands.
- **Predicate multiplexers.** For each lane, mask bit `Pi` chooses between
  the ALU result (1) and the *unswizzled* rs1 component (0). With
  `rd = rs1`, a masked lane of the destination therefore keeps its old value.

Stage 2 works in the memory stage:

- **Reduction tree (`simd_reduce`).** Three 8-bit reduction ALUs combine the
  components as `(3,2)`, `(1,0)`, then those two results. The result is
  copied to all four lanes.
- **Bypass.** A stage-2 opcode of 0 passes the stage-1 result through
  unchanged.

`simd_unit` holds both stages and the pipeline register between them. The
pipeline register holds its value while `hold_i` is high.

### Operations

| stage-1 code | op | | stage-2 code | op |
|---|---|---|---|---|
| 0 | pass A (no operation) | | 0 | bypass |
| 1 / 2 / 3 | ADD wrapping / signed-saturating / unsigned-saturating | | 1 | SUM (wrapping) |
| 4 / 5 / 6 | SUB, the same three forms | | 2 | SUMS (saturating at every tree node) |
| 7 / 8 / 9 | MUL (low 8 bits) / signed-saturating / unsigned-saturating | | 3 / 4 | MAX / MIN (signed) |
| 10 / 11 | MAX / MIN (signed) | | 5 | XOR |
| 12–15 | AND, OR, XOR, XNOR | | 6, 7 | bypass (reserved) |

Signed saturation clamps to [−128, 127]; unsigned saturation clamps to
[0, 255]. A dot product of four byte pairs takes one instruction: MULS in
stage 1 and SUMS in stage 2. A following ADDS accumulates across chunks.
`tb_simd_matmul` builds a full matrix multiplication this way.

### Instruction encoding

SIMD instructions use a SPARC V8 format-3 slot with `op = 2` and
`op3 = 0x2D`. This op3 value is unused in SPARC V8, so existing binaries are
unaffected.

| bits | 31:30 | 29:25 | 24:19 | 18:14 | 13 | 12:9 | 8:6 | 5 | 4:0 |
|---|---|---|---|---|---|---|---|---|---|
| field | `10` | rd | `101101` | rs1 | i | stage-1 op | stage-2 op | 0 | rs2, or immediate code |

With `i = 1`, bits 4:0 are not a register. They encode one of 24 common
constants, which is copied to all four components:

- bits 4:3 give the kind: `00` = 2^k, `01` = 2^k − 1, `10` = 2^k + 1,
  `11` = 0;
- bits 2:0 give k, from 0 to 7;
- the result is truncated to 8 bits, so 2^7 + 1 = 0x81.

This keeps the common multipliers and masks out of the registers.

An instruction with any other op3 decodes with both stage opcodes forced to
0. The unit then stays idle, and the processor uses its own ALU.

### The SIMD control register `%scr`

`%scr` holds the predicate mask and both swizzle vectors (`simd_scr`):

| bits | 31:28 | 27:16 | 15:4 | 3:0 |
|---|---|---|---|---|
| field | unused | swizzle B, lanes 3..0 | swizzle A, lanes 3..0 | mask P3..P0 |

- It is written with the SPARC `WR` instruction (WRASR, `op3 = 0x30`) to
  ancillary state register 22.
- As for every `WR`, the value written is `rs1 XOR operand2`.
- After reset it holds the identity swizzle with all four lanes enabled, so
  SIMD instructions need no set-up.
- A write takes effect for the next instruction.

### Pipeline integration and hazards

`simd_exec` is the part that a processor's integer unit instantiates. In the
execute stage:

- it decodes the instruction, selects operand B and runs stage 1;
- `ex_is_simd_o` tells the processor to take `ex_result_o` instead of its ALU
  result.

Results come out at two points:

- **Stage 2 bypassed.** The result is final in the execute stage, and
  `ex_fwd_valid_o` is set. The processor forwards it like any ALU result, so
  a bypassed stage 2 costs nothing.
- **Stage 2 used.** The result exists only one cycle later, on
  `wb_valid_o` / `wb_rd_o` / `wb_data_o`.

If the next instruction reads that register, `ex_dep_stall_o` asks for a
one-cycle stall. The stall rule is: the execute stage is valid, a reduction
is in the memory stage, its `rd` is not `%g0`, and it matches `rs1` or a
register `rs2`. While the stall is raised, the SIMD unit does not advance and
`%scr` is not written. The processor's `hold_i` freezes the unit the same
way.

## The BNN accelerator

### A fully connected layer

A binary neuron with input vector `x` and weights `w`, both of n bits,
computes:

- p = popcount(XNOR(x, w)), the number of positions where input and weight
  agree;
- the activation, which is 1 when 2p − n ≥ 0 and 0 otherwise.

A result of exactly 0 gives 1, that is, +1.

`bnn_fc_layer` computes a whole layer with **one** such cell, used by every
neuron in turn:

- `start_i` copies the input vector into the layer's feature register.
- An address counter walks the weight block RAM (`bnn_weight_mem`) one W-bit
  word at a time. The address of word k of neuron j is `j*ceil(N_IN/W) + k`,
  and bit b of that word weighs input `k*W + b`.
- Each word takes two cycles:
  1. the address goes to the synchronous RAM;
  2. the returned word and the matching feature word go through
     `bnn_xnor_popcount`.
- `vmask` removes the padding bits of a final partial word.
- `bnn_accumulator` adds the per-word counts for a neuron. On the neuron's
  last word it applies the sign test and stores the neuron's bit in the
  activation vector.

A layer takes **2·N_OUT·ceil(N_IN/W) + 2 cycles** from `start_i` to
`finish_fc`. For the default 512×512 layer with 8-bit words, that is
2·512·64 + 2 = 65 538 cycles. Weights are loaded through the write port
while the layer is idle. They then stay in the RAM and are reused by every
inference.

### The accelerator

`bnn_accelerator` wraps the layers for a host bus:

```
data_in ─► input FIFO ─► loader ─► layer 0 ─► layer 1 ─► … ─► output words ─► data_out
(64 bit)   (bnn_fifo)             (bnn_fc_layer chain)        (op_ready, finish_accelerator)
```

An inference runs in five steps:

1. The host writes the input feature vector as `BUS_W`-bit words. Word k
   carries feature bits `[k*BUS_W +: BUS_W]`.
   - The write strobe is `data_in_valid`.
   - `buf_full` reports a full FIFO, and a write to a full FIFO is lost.
   - The host may write before or during an inference.
2. `start_accelerator` starts the inference. The loader pops
   `ceil(LAYER_N[0]/BUS_W)` words from the FIFO, waiting while it is empty.
3. The layers run one after the other. Each layer's activation vector
   becomes the next layer's input.
4. The last layer's activation bit-vector is sent out on `data_out`, one word
   per cycle, while `op_ready` is high. The host turns this vector into a
   class.
5. `finish_accelerator` pulses for one cycle.

If the input is already in the FIFO, an inference takes this many cycles
from the start cycle to the finish pulse:

    1 + IN_WORDS + Σ_layers (2·N_out·ceil(N_in/W) + 2) + 1 + OUT_WORDS

For the defaults this is 65 556 cycles.

The weight port selects a layer with `wt_layer`, then addresses it as
described above. Weight writes take effect only while the accelerator is
idle; writes during an inference are ignored. `bnn_fifo` is a first-word-fall-through FIFO with
synchronous reset. It also has almost-empty and almost-full flags, which the
accelerator does not use; they are there for a bus interface.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `bnn_accelerator` | `NUM_LAYERS` | 1 | number of fully connected layers |
| | `LAYER_N` | `'{512, 512}` | input width, then the neuron count of each layer |
| | `W` | 8 | weight word width, i.e. the bits handled per two cycles |
| | `BUS_W` | 64 | host bus width |
| | `FIFO_DEPTH` | 16 | input FIFO words |
| | `WT_ADDR_W` | 16 | weight address width; each layer needs N_out·ceil(N_in/W) ≤ 2^16 words |
| `ml_accel_top` | `BNN_*` | as above | passed to the accelerator |

The SWAR unit's lane count and width (four lanes of 8 bits) are fixed by
its 32-bit registers. They are constants in `simd_pkg`.

Raising `W` to the layer's input width gives one weight word per neuron. A
layer then takes two cycles per neuron, at the cost of a wider RAM and a
wider popcount.

## Choices made in this RTL

The following are this design's own choices, not fixed by the architecture
it implements:

- **SWAR unit:**
  - the binary encoding: opcode numbers, field positions and immediate code;
  - the `%scr` register number and bit layout;
  - the exact list of lane operations;
  - signed comparison for MAX and MIN;
  - mask polarity, and masked lanes keeping the unswizzled rs1 component;
  - the interface to the host pipeline and the one-cycle stall after a
    reduction;
  - the reset values.
- **Reduction stage:** the result is copied to all four lanes, and the
  saturating sum saturates at every tree node.
- **BNN accelerator:**
  - the 8-bit weight word, chosen so that a 512×512 layer takes about
    65 000 cycles;
  - 2p − n = 0 gives activation 1;
  - layers run one after the other, with one cell per layer;
  - `data_in_valid`, the weight-loading port, `busy`, and the order of words
    on the bus;
  - the FIFO depth and its flag thresholds.
- **Not included:** the processor cores and the generated bus interface.
  - The host's load/store, register file and forwarding network are outside
    `simd_exec`.
  - `ml_accel_top` exposes the accelerator's native ports where a generated
    host-bus bridge would connect.
  - No RISC-V (custom-opcode) encoding of the SWAR instructions is provided.

## Simulation

Each module sits in its own file. Packages are `simd_pkg`, `bnn_pkg` and,
for the testbenches only, `tb_simd_ref_pkg` and `tb_bnn_ref_pkg`. With
Verilator 5:

```sh
verilator --binary --timing -j 0 \
  rtl/simd_pkg.sv rtl/bnn_pkg.sv tb/tb_simd_ref_pkg.sv tb/tb_bnn_ref_pkg.sv \
  -y rtl -y tb --top-module tb_ml_accel_top tb/tb_ml_accel_top.sv
./obj_dir/Vtb_ml_accel_top
```

Every testbench checks itself and ends with the line
`TB_RESULT checks=<n> failures=<n>`. Each also has a watchdog that counts a
failure if the simulation hangs.

| testbench | what it covers |
|---|---|
| `tb_simd_swizzle`, `tb_simd_lane_alu`, `tb_simd_reduce`, `tb_simd_scr`, `tb_simd_decoder` | each SWAR block, exhaustively or at random, against reference functions |
| `tb_simd_unit` | both stages, masking, bypass, hold, one-cycle latency |
| `tb_simd_exec` | directed and random programs through a model host pipeline (`tb_simd_host`): forwarding, dependency stalls, `%scr` writes, holds |
| `tb_simd_matmul` | signed 8-bit matrix multiplication, 4×4 to 32×32, using MULS+SUMS and ADDS |
| `tb_bnn_fifo`, `tb_bnn_weight_mem`, `tb_bnn_xnor_popcount`, `tb_bnn_accumulator` | each BNN block |
| `tb_bnn_fc_layer` | a 20→6 layer with W=8 and a 3→3 layer with W=3, including the exact cycle count |
| `tb_bnn_accelerator` | a 100→24→16→3 network with a 2-word FIFO, so the FIFO fills and the loader waits; eight inferences |
| `tb_bnn_workloads` | classification-sized networks: a 32→16→3 network (four features in 8-bit thermometer code, three classes) and a 784→256→10 network (a binarised 28×28 image, ten classes) |
| `tb_ml_accel_top` | both designs at reduced size, counting every mechanism: forwarding, reduction, dependency stall, hold, `%scr` write, masking, swizzling, immediates, saturating operations, FIFO full, loader wait, two-layer inference |
| `tb_ml_accel_top_full` | the top at its defaults: four 512×512 inferences, each checked for its 65 556-cycle latency |

The BNN reference model (`tb_bnn_ref_pkg::layer_ref`) computes 2p − n
directly from the bit vectors. The SWAR reference (`tb_simd_ref_pkg`) uses
plain integer arithmetic with explicit clamping. Random weights and inputs
come from `$urandom`, so no data files are needed.
