# A vector unit that doubles as a systolic array

A vector processing unit (VPU) already has most of what a small systolic array (SA)
needs. It has several lanes, each with a wide packed-SIMD datapath, and a large register
file to hold the operands. This design keeps a RISC-V-style VPU intact and adds a few
parts so that its functional units can be re-wired, for one instruction, into an
output-stationary `LANES x SC` array that computes a tile of a matrix product
(GEMM, `C += A*B`). The added parts are:

- an accumulator per lane;
- operand multiplexers;
- a ring between the lanes;
- one new instruction, `vsa`.

The same hardware therefore runs GEMM two ways:

- **Vector mode:** one row of C at a time, with vector-scalar multiply-accumulate.
- **Systolic mode:** 4x4 tiles of C, one `vsa` per tile.

Neither mode wins everywhere. Systolic mode wins when the depth K is large. Vector mode
wins when K is small or when the matrix shapes pad badly into tiles. Software picks the
mode per GEMM call.

Feeding the array is the hard part. Systolic mode needs data in register layouts that
ordinary vector loads do not produce. Indexed (gather) loads can build those layouts,
but they are slow. The design therefore adds **lane loads and lane stores**. These are
the normal unit-stride, strided and indexed memory instructions, except that they
transfer data to or from a single lane. This RTL implements the unit with those
instructions, plus a small on-chip generator that issues the whole systolic-mode GEMM
instruction stream.

Default configuration (all in `rtl/xpu_pkg.sv`):

| parameter | value | meaning |
|---|---|---|
| `LANES` | 4 | lanes = rows of the array (SR) |
| `SC` | 4 | 32-bit subwords per lane word = columns of the array |
| `D` | 32 | element width in bits |
| `W` | 128 | lane datapath / word width, `SC*D` |
| `MVL` | 16384 | bits per vector register |
| `NVREG` | 32 | vector registers |

Derived values:

- Each lane holds `WPL = MVL/(LANES*W) = 32` words of every register.
- A register holds 512 32-bit elements.
- One `vsa` can be at most `P = 128` deep, that is, use 128 rows of B.

## Register layout

The design only works if every element sits in a known place, so the layout comes
first. An element with index `e` of a register is stored as follows:

| access | lane | word in the lane's slice | subword |
|---|---|---|---|
| all lanes, 32-bit elements | `(e/SC) % LANES` | `e/(SC*LANES)` | `e % SC` |
| all lanes, W-bit elements | `e % LANES` | `e/LANES` | whole word |
| one lane (`nf`), 32-bit | `nf` | `e/SC` | `e % SC` |
| one lane (`nf`), W-bit | `nf` | `e` | whole word |

So with all lanes, elements 0–3 go to lane 0, elements 4–7 to lane 1, and so on, and
elements 16–19 go to lane 0 again. A vector instruction processes one "word row" per
cycle, meaning word `w` in every lane, which is 16 elements. A *W-bit element* is a
whole 128-bit lane word. It holds 4 neighbouring 32-bit values, which is how a strided
load fetches 4 columns of one matrix row in one access.

## Systolic mode: how one `vsa` computes a 4x4 tile

`vsa vd, vs2, vs1` computes `C_tile += A_strip * B_strip`. Before it runs, software
places the operands like this:

- **A (`vs2`):** lane `i` holds row `i` of the A strip, as 32-bit elements `A[i][0..P-1]`
  in its own slice (a lane load with `nf = i`).
- **B (`vs1`):** row `k` of the B strip is one packed word (4 columns). Rows 0–31 sit in
  lane 0, rows 32–63 in lane 1, and so on: row `k` is in lane `k/WPL`, word `k % WPL`.
  Each lane is filled with a strided W-bit lane load.
- **C (`vd`):** word 0 of lane `i` holds row `i` of the tile (a strided W-bit load over
  all lanes with `vl = 4`).

The depth is `P = vl/LANES`, where `vl` counts 32-bit elements (at most 128). `vsa`
runs as follows (`rtl/xpu_ctrl.sv`, `rtl/xpu_lane.sv`, `rtl/xpu_interlane_net.sv`):

1. **Cycle 0.** Every lane loads its accumulator, which holds SC = 4 values, from its
   row of C.
2. **Streaming.** For `k = 0 .. P-1`, the lane that holds row `k` of B (the *source*)
   reads it and uses it. It then puts a token `{k, row}` on the ring. The ring is a
   register per lane, feeding lane `(i+1) mod LANES`, so the row reaches one further
   lane per cycle. Each lane that receives the token:
   - reads its own element `A[i][k]`;
   - copies it to all four subwords;
   - multiplies it with the four values of row `k`;
   - adds the result into its accumulator;
   - forwards the token.

   A token is dropped after `LANES-1` hops, once every lane has used it.
3. **Rotating source.** When lane 0's rows run out, lane 1 becomes the source, then lane
   2, and so on. Tokens wrap from the last lane to the first, so the lane *before* the
   source acts as the sink. This lets B fill the register slices of all lanes, not just
   the first. When the source changes, the control inserts one idle cycle, so that no
   lane receives two rows in the same cycle (`ev_src_switch` pulses).
4. **Drain and write-back.** The control waits `LANES+2` cycles for the farthest lane,
   then writes every accumulator back to word 0 of `vd`.

Each lane is one row of the array, and its four subwords are the columns. Inside a lane
the A element is broadcast to the four subwords in the same cycle. It is not passed
along a chain of registers. A `vsa` of depth P takes about `P + (sources-1) + LANES + 4`
cycles. For example, `P = 128` takes 139 cycles for 128·16 multiply-accumulates.

Depths above 128 are split by software (or by the generator) into several `vsa`
instructions, all accumulating into the same C tile.

## Vector mode

Arithmetic instructions issue one word-row uop per cycle to all lanes. Each uop takes
two cycles: the register read, then the ALU and write-back. A tail mask disables the
subwords whose element index is `>= vl`. In the `.vx` forms, the scalar is captured
when the instruction is accepted and held for the whole instruction; it is not copied
into a register first. GEMM in this mode loops over rows `i` of C and columns `k` of A,
issuing `vmacc.vx vC, A[i][k], vB_row_k`.

## Memory unit and lane instructions

`rtl/xpu_vlsu.sv` handles three access modes: unit-stride, strided and indexed. Each
works across all lanes, or on the one lane named by the instruction's `nf` field. The
memory port is 128 bits wide:

- requests use a valid/ready handshake, with byte strobes on writes;
- responses come back in order, one per request;
- one request is outstanding at a time.

A unit-stride 32-bit access whose base address is aligned to a 128-bit line moves up to
4 elements per request. Every other access moves one element per request. An indexed
access first reads its index from the register file, which is why lane loads beat
gathers. In the end-to-end test, a 4x4x32 GEMM took 453 cycles with lane loads and
5223 cycles with indexed loads.

## Instruction encodings

Field positions follow the RISC-V vector memory format: `nf[31:29] mew[28] mop[27:26]
vm[25] rs2/vs2[24:20] rs1[19:15] width[14:12] vd[11:7] opcode[6:0]`.

| instruction | encoding |
|---|---|
| `vsetvli` | OP-V (1010111), funct3 111. `vsew` 010 = 32-bit elements, 100 = 128-bit (W) elements. LMUL must be 1. `vl = min(AVL, MVL/SEW)`. |
| `vadd`, `vsub` | OP-V, funct6 000000 / 000010, `.vv` (OPIVV) or `.vx` (OPIVX) |
| `vmul`, `vmacc` | OP-V, funct6 100101 / 101101, `.vv` (OPMVV) or `.vx` (OPMVX) |
| vector load / store | LOAD-FP / STORE-FP, `mop` 00 unit, 10 strided, 01/11 indexed; `width` 110 = 32-bit, `mew`=1 `width` 000 = W-bit; `nf` = 0 |
| **lane load** | same fields, opcode custom-0 (0001011); `nf` = lane number |
| **lane store** | same fields, opcode custom-1 (0101011); `nf` = lane number |
| **`vsa`** | opcode custom-2 (1011011), funct3 010; `vs2` = A, `vs1` = B, `vd` = C |

Any other encoding is rejected with a one-cycle `illegal` pulse and does nothing. This
includes masked forms (`vm = 0`), lane numbers `>= LANES`, and the floating-point forms.

## Top level and its interfaces

`rtl/xpu_top.sv` connects the following blocks:

| block | file |
|---|---|
| decoder | `xpu_decoder` |
| control | `xpu_ctrl` |
| memory unit | `xpu_vlsu` |
| inter-lane ring | `xpu_interlane_net` |
| `LANES` lanes (register slice, ALU, accumulator) | `xpu_lane`, `xpu_vrf_slice`, `xpu_simd_alu` |
| GEMM instruction generator | `xpu_gemm_seq` |

Its interfaces:

- **Instruction issue.** `insn_valid`/`insn_ready` with `insn`, plus `rs1_val` and
  `rs2_val`, the scalar operands: AVL, base address, stride, or the `.vx` scalar.
  - One instruction runs at a time, with no chaining. `insn_ready` is high only when
    the unit is idle.
  - `busy`, `vl`, `sew_wide` and `sa_mode` show the state.
- **GEMM generator.** Pulse `gemm_start` while the unit is idle, with `gemm_m/n/k` and
  the byte addresses of row-major `A[M][K]`, `B[K][N]` and `C[M][N]`.
  - The generator then drives the issue port itself, and `insn_ready` stays low, until
    `gemm_done`.
  - It issues the lane-load GEMM loop: lane loads of the A rows, strided W-bit lane
    loads of B per lane, a strided load of the C tile, `vsa`, and a strided store.
    Depth is cut into chunks of at most 128.
  - It uses registers v1 (A), v2 (B) and v3 (C).
  - M must be a multiple of 4 and N a multiple of 4.
- **Memory.** `mem_req_*` and `mem_rsp_*`, as described above.
- **Events.** `ev_src_switch`, `ev_mac[l]` (lane `l` accumulated a row) and
  `ev_mem_beat`, for performance counting.

Reset is asynchronous and active low. The register file is not reset.

## Simulating

Every testbench is self-checking. The RTL also carries assertions, which Verilator checks
with `--assert`:
- the memory port and the generator's issue port hold a request that is not taken;
- responses arrive only while a request is outstanding;
- at most one lane is the B source in any cycle;
- no lane gets a ring row in the same cycle it reads its own row.

Every testbench ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/xpu_pkg.sv tb/tb_xpu_top.sv \
          --top-module tb_xpu_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_xpu_top` with any other testbench in `tb/`.

| testbench | what it checks |
|---|---|
| `tb_xpu_top` | Full default size, end to end, with the memory model `tb_xpu_mem` (random stalls, 1–3 cycle latency). Covers: systolic GEMMs with lane loads (8x8x128, 4x4x40); lane loads against indexed loads, including their cycle counts; a vector-mode GEMM; vadd/vsub/vmul with a partial last word; an unaligned access; a lane store; an illegal encoding; an 8x8x200 GEMM run by the generator. It counts 16 mechanisms (source switches, ring wrap, tail words, stalls, ...) and fails if any never occurs. |
| `tb_xpu_workloads` | GEMM shapes from typical application classes, run in both modes and checked. Results below. |
| `tb_xpu_configs` | Generator GEMMs on 2x2, 8x8 and 8x4 arrays with other register lengths (harness `tb_xpu_cfg_run`). |
| `tb_xpu_simd_alu`, `tb_xpu_vrf_slice`, `tb_xpu_interlane_net`, `tb_xpu_lane`, `tb_xpu_vlsu`, `tb_xpu_decoder`, `tb_xpu_ctrl`, `tb_xpu_gemm_seq` | One block each, against reference models written in the testbench. The memory-unit test also checks the number of memory transfers. |

Results of `tb_xpu_workloads` at the default size:

| workload | systolic mode (cycles) | vector mode (cycles) |
|---|---|---|
| finite-element solver, 8x32x16 | 2877 | 7295 |
| Linpack slice, 8x8x129 | 8331 | 18458 |
| ResNet18 slice, 8x16x147 | 13788 | 33796 |
| DeepBench slice, 4x8x256 | 4978 | 18194 |
| AlexNet slice, 4x4x363 | 8817 | 17964 |

The vector-mode numbers include the host's instruction issue, one instruction at a
time, so they overstate that mode's cost for small N.

## What follows the reference design and what is this implementation's choice

These follow the reference design:

- the lane structure (register slice, two multiplexers, ALU, accumulator);
- the inter-lane network;
- the mapping of lanes to rows and subwords to columns;
- the register layouts of A, B and C;
- the rotating B source, with wrap-around and the lane before the source as sink;
- the lane load/store instructions using `nf` as the lane number;
- packed strided loads of B;
- the GEMM loop of the generator;
- the vector-scalar operand held for the whole instruction.

The following are this implementation's choices:

- all opcode values (lane loads/stores, `vsa`) and the 128-bit element-width code;
- the issue and memory port protocols, and one request outstanding;
- 32 vector registers, and three read ports plus one write port per register slice;
- every latency: 2-cycle vector uops, one ring register per hop, the idle cycle when the
  source changes, and `LANES+2` drain cycles;
- broadcasting A to the subwords of a lane;
- the depth rule `P = vl/LANES`;
- the depth-chunk loop in the generator, and its interface;
- rejecting masked instructions.

## Limits

- Integer only. The floating-point forms (`vfsa`, `vfmacc`) are not built.
- No caches or DRAM. The memory port is brought out and the testbenches use a
  behavioural model.
- Choosing between the two modes per GEMM call is left to software. The hardware offers
  both modes, and the generator produces only the systolic-mode stream. The vector-mode
  stream needs A's elements as scalars, so the host issues it.
- Other array sizes and register lengths are set with `LANES_P`, `SC_P` and `MVL_P`.
  `tb_xpu_configs` runs generator GEMMs on a 2x2 array with 2048-bit registers, an 8x8
  array with 16384-bit registers and 8x4 with 4096-bit registers. The lane number in
  `nf` limits `LANES_P` to 8, and `MVL_P` must be a multiple of `LANES_P*SC_P*32`.
- One instruction executes at a time. There is no chaining, masking, segment access or
  misaligned element access.
