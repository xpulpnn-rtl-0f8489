# XpulpNN execute-stage extension: multi-precision dot products and Mac&Load

Quantized neural networks run well with 4-bit ("nibble") and 2-bit ("crumb")
weights and activations. A small 32-bit RISC-V core, though, can usually do SIMD
arithmetic only down to 8-bit elements. It also spends most of its issue slots
loading operands rather than multiplying them. This RTL is the part of a
RI5CY-class core (4-stage, in-order, single-issue, RV32IMC plus the XpulpV2 DSP
extensions) that the XpulpNN ISA extension adds. It rests on two ideas:

1. **A multi-precision dot-product (Dotp) unit.** One instruction multiplies
   two 32-bit registers element by element, as 2×16, 4×8, 8×4 or 16×2 bits,
   and adds all the products to a 32-bit accumulator. The result is ready in
   one cycle. An 8-bit operation is 4 MACs per cycle, a 4-bit one 8, and a
   2-bit one 16.
2. **Mac&Load instructions.** A dot product is fused with the load of its
   next operand. The load does not go into the general-purpose register file
   (GP-RF). It goes into a small Neural Network Register File (NN-RF) of
   4 weight and 2 activation registers, which feeds the Dotp unit directly.
   The inner loop of a matrix multiplication then issues almost nothing but
   multiply-accumulates.

The host core's fetch, decode, GP-RF, load-store unit and the 8-core cluster
it sits in are not part of this RTL. They connect through the ports of
`xpnn_ex_unit` (see "What is not here").

## The Dotp unit (`xpnn_dotp_unit`, `xpnn_dotp_region`)

The unit has four regions side by side, one per element width. They do not
share a multiplier array:

| region | multipliers | product | adder tree |
|---|---|---|---|
| 16-bit | 2 × (17b × 17b) | 32b (34b internally) | 2 × 32b → 32b |
| 8-bit  | 4 × (9b × 9b)   | 18b | 4 × 18b → 32b |
| 4-bit  | 8 × (5b × 5b)   | 10b | 8 × 10b → 32b |
| 2-bit  | 16 × (3b × 3b)  | 6b  | 16 × 6b → 32b |

- **Extension bit.** Each N-bit element is widened to N+1 bits, either by
  sign extension or by zero extension. One signed multiplier then serves the
  three operand interpretations:
  - `up`: both operands unsigned.
  - `usp`: operand A signed, operand B unsigned.
  - `sp`: both operands signed.
- **Accumulate.** The scalar operand C, which is the accumulator rD or 0,
  enters at the root of each adder tree. An output multiplexer picks the
  region of the current width. The sum wraps modulo 2^32.
- **Why the regions are replicated.** Sharing multipliers across widths would
  put operand-splitting multiplexers on a path that is already close to
  critical. Replication costs area. To keep the power down, each region has
  its own operand registers, and they load only when an operation of that
  width issues. This is the enable of a clock gate, so the idle regions do
  not toggle.
- **Timing.** The operand registers double as the ID/EX pipeline registers.
  An operation captured at clock edge *t* has its result during cycle *t+1*.
  There is no register between the multipliers and the adder tree, so
  back-to-back dot products never stall.

## Mac&Load, the NN-RF and the inner loop

### Why fuse loads

Take a dot product whose two operands come from memory. Without reuse it
costs three instructions: load, load, MAC. The fraction of issued
instructions that do MACs is then 1/3. The PULP-NN "4×2" MatMul kernel reuses
data in registers: it keeps 4 weight words and 2 activation words per
iteration and computes 4 filters × 2 output pixels. It needs 6 loads per
8 dot products. The two Mac&Load forms remove most of those loads.

### Compute&Update (C&U)

`pv.cusdot{up,usp,sp}.{h,b,n,c}.<i>  rD, rs1, rs2`

    rD        += dotp(NN-RF.w[i], rs2)
    NN-RF.w[i] <= mem[rs1]
    rs1       += 4

- The NN-RF index `i` is part of the opcode.
- The weight read from `w[i]` is always replaced by the next word. To use a
  weight with two activations, a kernel has to fetch it twice, through two
  address registers.
- Every C&U instruction makes a memory access.

### nn_sdotp

`pv.nnsdot{up,usp,sp}.{h,b,n,c}  rD, rs1, Imm5`

    rD += dotp(NN-RF.w[Imm[2:1]], NN-RF.a[Imm[0]])
    if Imm[4]: NN-RF.w[Imm[2:1]] <= mem[rs1]; rs1 += 4
    if Imm[3]: NN-RF.a[Imm[0]]   <= mem[rs1]; rs1 += 4

- Both operands come from the NN-RF.
- The immediate says which registers to read and whether to reload the weight
  or the activation. It cannot reload both, because there is only one
  load-store port. The decoder rejects an immediate with bits 3 and 4 both set.
- An operand can stay in the NN-RF for as long as the kernel needs it. This
  removes the duplicate weight fetches of C&U and their memory traffic.
- The GP-RF is left free for accumulators. That makes room for a "4×4" layout
  (4 filters × 4 pixels, 16 accumulators).

### Datapath in `xpnn_ex_unit`

1. **Issue.** The instruction arrives with its three GP-RF values: rs1, rs2
   and rD (the accumulator). The NN-RF is read in the same cycle. Operand A of
   the Dotp unit is either rs1 or the addressed weight register. Operand B is
   either rs2 (replicated element 0 for `.sc`) or the addressed activation
   register.
2. **EX.** The dot product is computed. The result goes out on write port 1
   (rD). A Mac&Load also sends rs1 to memory as the word address, and sends
   rs1+4 out on write port 2. The two writes use the two write ports the host
   GP-RF already has.
3. **Load return.** The loaded word comes back with `rvalid`, one or more
   cycles after the grant. It is written into the NN-RF. If an instruction
   being issued in that same cycle reads that register, it gets the word
   directly (write-through).

With an ideal memory the unit completes one instruction per cycle, Mac&Load
included.

### Stalls

- **Memory.** A Mac&Load waits in EX until its request is granted. Issue is
  held meanwhile (`stall_mem_o`).
- **NN-RF load-use.** An instruction that reads an NN-RF register whose load
  has not yet returned is held until it does (`stall_nnrf_o`). If the load was
  granted in the previous cycle, the data is forwarded and nothing is lost.
  When a Mac&Load reloads a register and the very next instruction reads that
  register, there is one bubble. A kernel avoids it by placing one
  instruction in between.
- **Read and reload in one instruction.** An instruction may read and reload
  the same register. It uses the old value.

### Measured inner loops

The end-to-end testbench runs MatMul kernels on 32 iterations of
memory-resident data, with an ideal memory. The prologue instructions that
fill the NN-RF are included in the count. Explicit loads are modelled as
one-cycle host `p.lw` instructions.

| kernel | instructions / iteration | cycles per SIMD dot product |
|---|---|---|
| 4×2, plain `pv.sdotusp` + 6 loads | 14 | 1.750 |
| 4×2, C&U + 2 loads                 | 10 | 1.266 |
| 4×2, nn_sdotp (5 fused loads + 1 load-only nn_sdotp) | 9 | 1.148 |
| 4×4, nn_sdotp (7 fused + 1 load-only)                | 17 | 1.074 |

- **C&U over plain SIMD:** 1.38×.
- **nn_sdotp over C&U:** 1.10×.
- **4×4 over 4×2:** 1.07×.

The counts are the same at 8, 4 and 2 bits. Narrower elements do 2× or 4× the
MACs per instruction.

A 4×2 iteration always needs one load that cannot be fused. The last dot
product of an iteration is the last use of both its weight and its
activation, and only one of the two can be reloaded. The kernels therefore
spend one `nn_sdotp` with rD = x0 as a load-only instruction.

### Eight cores on a shared, banked memory

Fusing loads into the MAC does not reduce memory traffic. C&U reloads a
weight register on every instruction. An iteration of the 4×2 C&U kernel
therefore makes 10 memory accesses. The nn_sdotp kernel makes 6, and loads
only what changes. On a single core with a one-cycle memory this costs
nothing. When eight cores share a word-interleaved memory, each extra access
is another chance to collide with another core on a bank.

`tb_xpnn_cluster` measures this. It builds eight copies of the unit, each
inside a small behavioural host (`xpnn_core_model`). The host:

- issues the kernel in order;
- runs the explicit loads itself;
- shares one memory port between its own loads and the unit's.

The memory is a behavioural model:

- word address *a* is in bank *a* mod *N*;
- each bank grants one request per cycle;
- a round-robin pointer per bank picks among competing cores;
- read data arrives one cycle after the grant.

Each core gets its own four filter streams and two pixel streams. Each stream
starts at a random word, so cores collide on banks the way they would with an
arbitrary data layout.

The testbench runs 60 iterations of each kernel. Each figure is averaged
over eight layouts. Per-core cycles per SIMD dot product, 8-bit:

| kernel | 16 banks (2 per core) | 32 banks (4 per core) |
|---|---|---|
| plain SIMD + 6 loads | 1.87 | 1.81 |
| C&U + 2 loads        | 1.62 | 1.47 |
| nn_sdotp             | 1.28 | 1.15 |

Compare each row with the single-core figures above: 1.75, 1.27 and 1.15.

- **C&U** loses about a quarter of its single-core efficiency at 16 banks.
  Doubling the banks recovers about half of that loss.
- **nn_sdotp** loses about 11% at 16 banks. It is back at its single-core
  figure with 32 banks.

The 4-bit and 2-bit runs give the same picture.

The exact numbers depend on the data layout and on this idealized memory.
The trend is the point, not the decimals. Every core's accumulators are
checked against the matrix product.

## SIMD ALU (`xpnn_simd_alu`)

The ALU works element by element, with no carry between elements, on
16/8/4/2-bit elements:

- `add`, `sub`, `abs`: these wrap.
- `avg`, `avgu`: computed as (a+b)>>1 on N+1 bits, with an arithmetic shift
  for `avg` and a logical one for `avgu`.
- `max`, `maxu`, `min`, `minu`: these are what pooling and ReLU use.
- `srl`, `sra`, `sll`: the shift amount is the low log2(N) bits of the
  matching element of rs2.

Every operation also has a `.sc` form, which uses element 0 of rs2 for all
lanes. The ALU's operand registers load only for ALU instructions, which
isolates the operands.

## Instruction encoding

| group | [31:25] | [24:20] | [19:15] | [14:12] | [11:7] | [6:0] |
|---|---|---|---|---|---|---|
| SIMD ALU  | `000` op[3:0] | rs2 | rs1 | sc, dt | rD | `1010111` |
| dot product | `001` acc `0` sign | rs2 | rs1 | sc, dt | rD | `1010111` |
| C&U       | sign `000` idx[1:0] | rs2 | rs1 | `0` dt | rD | `0001011` |
| nn_sdotp  | sign `00000` | Imm | rs1 | `0` dt | rD | `0101011` |

Codes:

- **dt:** h=0, b=1, n=2, c=3.
- **sign:** up=0, usp=1, sp=2.
- **ALU op:** add=0, sub=1, avg=2, avgu=3, max=4, maxu=5, min=6, minu=7,
  srl=8, sra=9, sll=10, abs=11.

Some of this follows the XpulpNN instruction formats:

- The fields of C&U and nn_sdotp: sign selector on top, NN-RF index or 5-bit
  immediate, rs1, data type, rD.
- The immediate in bits [24:20].
- The meaning of each immediate bit.

The rest is this implementation's own choice:

- The opcode values.
- The SIMD function codes.
- The numeric dt and sign codes.

There are no `.sci` (immediate operand) forms.

## Interface of `xpnn_ex_unit`

| port | dir | meaning |
|---|---|---|
| `issue_valid_i`, `issue_ready_o` | in/out | issue handshake; ready is low during either stall |
| `instr_i` | in | instruction word; non-XpulpNN words are accepted and ignored |
| `rs1_val_i`, `rs2_val_i`, `rd_val_i` | in | GP-RF values, already forwarded by the host |
| `illegal_o` | out | `instr_i` is a malformed XpulpNN word |
| `wb_rd_*` | out | write port 1: result (the host discards writes to x0) |
| `wb_rs1_*` | out | write port 2: rs1+4 after a Mac&Load access |
| `data_req_o`, `data_addr_o`, `data_gnt_i`, `data_rvalid_i`, `data_rdata_i` | | read port in TCDM style: the request holds until granted, data follows with `rvalid`, one access outstanding |
| `stall_mem_o`, `stall_nnrf_o` | out | stall causes, for observation |

- **Writeback timing.** Both writeback ports are combinational from the EX
  registers. They are valid in the cycle the instruction leaves EX, and the
  host must forward them into the operands it issues in that cycle.
- **When rD equals rs1.** If a Mac&Load names the same register as rD and
  rs1, both ports write it. The host should let the result port win.
- **Reset.** It is asynchronous and active low, and clears every register.

Assertions in the unit check two handshake rules:

- `rvalid` only comes for a granted request.
- A waiting request keeps its address.

They also check that at most one Dotp region is enabled at a time.

## Where this departs from, or adds to, the original design

- **Order of the mixed-sign operands.** The text of the original describes
  the mixed mode as "first operand signed, second unsigned". The `usp`
  mnemonic suggests the reverse. This RTL makes operand A signed. Operand A is
  rs1, or the NN-RF weight for Mac&Load. So in Mac&Load kernels the weights
  are signed and the activations unsigned. A plain `pv.sdotusp` must be given
  the weight in rs1.
- **Clock gating.** It is written as register load enables, not gate cells.
- **The adder tree.** It is a plain pairwise reduction. The carry-save
  internals of the original multipliers are left to synthesis.
- **16-bit adder tree input.** The original block diagram draws C entering
  only the 16-bit adder tree. Here C enters every region.
- **Own choices.** None of the following comes from the original:
  - the forwarding of returning load data into the operand registers;
  - the one-outstanding memory protocol;
  - the rule that an nn_sdotp without an update bit neither loads nor
    increments rs1;
  - the rounding of `avg`;
  - the shift-amount field;
  - 16/8-bit support in the same ALU.

## What is not here

Each of the following is used by the design but not designed in it. None of
it is modelled in `rtl/`.

- **The host RI5CY core:** fetch, decode, GP-RF, hardware loops, load-store
  unit, CSR, debug.
- **The 8-core PULP cluster:** the 128 kB, 16-bank TCDM, the logarithmic
  interconnect, DMA, the synchronization unit, the instruction cache and the
  AXI port.
- **The microcontroller system** around the cluster.

The testbenches replace the core and the memory with behavioural models:

- **`tb_xpnn_ex_unit`:** models memory contention as a random grant delay.
- **`tb_xpnn_cluster`:** models it with eight cores and a banked memory.

## Files

`rtl/`:

- `xpnn_pkg.sv`: shared types.
- `xpnn_dotp_region.sv`, `xpnn_dotp_unit.sv`: the Dotp unit.
- `xpnn_simd_alu.sv`: the SIMD ALU.
- `xpnn_nn_rf.sv`: the NN-RF.
- `xpnn_decoder.sv`: the instruction decoder.
- `xpnn_ex_unit.sv`: the top.

`tb/`:

- `xpnn_asm_pkg.sv`: an instruction assembler.
- `xpnn_ref_pkg.sv`: reference arithmetic.
- One self-checking testbench per block.
- `xpnn_core_model.sv`: the behavioural host core used by `tb_xpnn_cluster`.
- `tb_xpnn_cluster.sv`: the eight-core contention test.

`tb_xpnn_ex_unit` runs the whole unit:

- a random instruction mix, with and without memory contention;
- the MatMul kernels above at 8, 4 and 2 bits, checked against a directly
  computed matrix product;
- a cycle-exact check that the kernels run at one instruction per cycle.

It also counts each mechanism (every width and sign mode, every ALU op,
`.sc`, C&U, each nn_sdotp load kind, both stall kinds, load forwarding) and
fails if one never happened. Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_xpnn_ex_unit \
        -y rtl -y tb +libext+.sv rtl/xpnn_pkg.sv tb/xpnn_asm_pkg.sv \
        tb/xpnn_ref_pkg.sv tb/tb_xpnn_ex_unit.sv
    ./obj_dir/Vtb_xpnn_ex_unit

Replace the top module and drop unused packages to run the other
testbenches: `tb_xpnn_dotp_unit`, `tb_xpnn_simd_alu`, `tb_xpnn_nn_rf`, and
`tb_xpnn_decoder`, which needs `xpnn_asm_pkg`. `tb_xpnn_cluster` needs both
packages, like `tb_xpnn_ex_unit`. The unit has no parameters, so
every test runs at full size. Each finishes in well under a second.
