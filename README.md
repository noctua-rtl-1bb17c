# NOCTUA: a NoC-based transformer accelerator in SystemVerilog

Transformer layers alternate large matrix products, where the same input rows
and weight columns are needed by many compute units at once, with nonlinear
steps (softmax, layer normalisation, GELU) that are expensive to do exactly in
hardware. NOCTUA handles both with sixteen processing elements (PEs) on a 4x4
mesh network-on-chip. The network can multicast, so one flit carrying a shared
block reaches every PE that needs it in one send. The nonlinear functions
use cheap integer and bfloat16 approximations. Only the four PEs of the
leftmost column carry them, because those PEs sit next to the activation
memory.

This repository is a synthesizable RTL model of that architecture. Each PE has
a 32x32 INT8 systolic array, so the mesh has 16384 MACs: 32.8 TOPS at 1 GHz if
every array runs every cycle. A central controller tiles matrix products
into 32x32 output blocks, sends the operands out with multicast, and collects
the results.

```
            weight memory (4 banks, one per column)
              |        |        |        |
 data   -- [T 0]  -- [T 1]  -- [T 2]  -- [T 3]
 memory -- [T 4]  -- [T 5]  -- [T 6]  -- [T 7]
 (4     -- [T 8]  -- [T 9]  -- [T10]  -- [T11]
 banks) -- [T12]  -- [T13]  -- [T14]  -- [T15]
   ^
   central controller (reads both memories, injects flits, counts completions)

 T = tile: router + network interface + PE.  T0, T4, T8, T12 also hold
 the softmax and layer-normalisation units.
```

## Operations

The host loads the memories and then issues one `cmd_t`
(`rtl/noctua_pkg.sv`) on `host_cmd`. `host_busy` stays high until the
operation is finished. The memories are 4 banks x 2560 words x 256 bits each
(320 KB data, 320 KB weight). The three 8 KB SRAMs in each of the 16 PEs add
another 384 KB, which brings the chip to 1024 KB.

| op | input | result |
|----|-------|--------|
| `OP_MATMUL` | A: `m_tiles`*32 x `k_len` INT8 in data memory; W: `k_len` x `n_tiles`*32 INT8 in weight memory | C = A*W. Each INT32 sum is shifted right by `shift`, saturated to INT8, and optionally passed through GELU (`post`) |
| `OP_SOFTMAX` | `m_tiles`*32 rows of `k_len` INT8 scores | unsigned 8-bit probabilities, where 256 means 1.0 |
| `OP_LAYERNORM` | `m_tiles`*32 rows of `k_len` INT8 values; gamma/beta as bf16 pairs in weight memory | INT8 result scaled by 2^`shift` |

### Memory layout

Everything is stored as 32-lane vectors. Each lane is one INT8 value.

- **A block.** Block `mi` holds rows `mi*32 .. mi*32+31`. It is stored column
  by column: word `a_base + mi*k_len + k` holds `A[mi*32+i][k]` in lane `i`.
- **W block.** Block `nj` is stored row by row: word `w_base + nj*k_len + k`
  holds `W[k][nj*32+j]` in lane `j`.
- **Result C.** Written in A's layout with K = N: word
  `o_base + mi*N + nj*32 + j` holds column `j` of output tile (mi, nj). A
  result can therefore be the A operand of the next product.
- **Softmax and layer normalisation.** They use A's layout too. Each lane is
  one row, and word k is element k of all 32 rows. For layer normalisation,
  weight word `w_base + k` holds gamma[k] in bits [15:0] and beta[k] in bits
  [31:16].

## Network and flits

Every packet is one flit (`flit_t`, 298 bits). It carries:

- a 16-bit destination mask, one bit per tile;
- a `to_mem` flag and a data-memory bank number;
- the packet type: data, weight, command, result or done;
- the source tile;
- a 16-bit address;
- a 256-bit payload.

Each router (`rtl/router.sv`) has five ports with 2-flit input FIFOs, and
uses valid/ready handshakes on every link. Multicast works by splitting the
mask:

1. For each destination bit, the router works out the output port that
   dimension-ordered (X first, then Y) routing would take.
2. Each output port gets a copy of the flit whose mask holds only the
   destinations reached through that port.
3. The copies may leave in different cycles. The input buffer is freed only
   when the last copy has gone.

As a result, a flit from the controller travels as a tree and is copied only
where paths part. Outputs use round-robin arbitration.

Memory-bound flits (results and done reports) ignore the mask. They first go
West to column 0, then North or South to the row of their bank, then leave
through that router's West port into the data memory. Because of this the
outer North, East and South links of the mesh are never used as outputs.

Operands enter at fixed points. Data memory bank b is injected at the West
port of mesh row b. Weight memory bank b is injected at the North port of
mesh column b.

## Controller: tiling and rounds

`rtl/central_controller.sv` numbers the output tiles of C row-major and hands
them out in rounds of 16, one tile per PE. A round has three steps:

1. For each distinct A block `mi` in the round, stream its `k_len` words once.
   Each word goes out as a single flit whose mask names every PE in the round
   that uses `mi`.
2. Do the same for each distinct W block `nj`.
3. Send each PE a `PKT_CMD`, then wait for one `PKT_DONE` per PE.

The number of flits sent is therefore (distinct A blocks + distinct W blocks)
x K, instead of 2 x 16 x K without multicast.

A K larger than the PE SRAM depth (256) is split into chunks of 256. Each
chunk repeats the three steps. The command flags `acc_first` and `acc_last`
make each PE keep its accumulators between chunks, so partial sums add up
inside the array and results leave the PE only once, after the last chunk.

Softmax and layer-normalisation row blocks are sent only to the four
leftmost PEs, four blocks per round. For layer normalisation the gamma/beta
words are multicast to all four.

The controller spends two cycles per flit: one to read memory, one to inject.
This single injection point limits the sustained rate. A 128x64x160 product
(20 output tiles, two rounds) takes about 5300 cycles including host I/O. The arrays are busy for only a small part of that time.

## Processing element

`rtl/pe.sv` contains a Data SRAM, a Weight SRAM and an Output SRAM (256 x 256
bits each), the systolic array, the result path and a small controller. The
network interface (`rtl/depacketizer.sv`, `rtl/packetizer.sv`) writes
incoming data and weight flits straight into the SRAMs. It holds command
flits back until the PE is idle.

**Matrix product.** The array (`rtl/systolic_array.sv`) is output-stationary:

- Cell (i, j) accumulates A[i][k]*W[k][j] in 32 bits.
- Row i of A enters with a delay of i cycles and column j of W with a delay
  of j cycles, so matching operands meet in the right cell.
- A product of K steps takes K + 2*32 + 3 cycles.
- The result is then read out one column per cycle. Each value is shifted,
  saturated and optionally passed through GELU into the Output SRAM, and the
  32 result vectors are sent as flits.
- Latency from command to first result flit is at most K + 3*32 + 8 cycles.
  `tb_pe` checks this bound.

**GELU** (`rtl/gelu_unit.sv`) works on INT8 values with 4 fractional bits
(Q4.4), with 32 lanes in parallel:

- Inputs in [-4, 2) read a 96-entry table holding round(16*GELU(q/16)).
- Inputs from 2 upward pass unchanged (ReLU).
- Inputs below -4 give 0.

Because the table uses the Q4.4 grid, the error is at most half an LSB
(1/32).

**Softmax** (`rtl/softmax_unit.sv`) handles 32 rows in parallel and avoids
both exponentials and a per-element divide. It makes three passes over the
row:

1. Find the row maximum and minimum. The range (max - min) selects a
   factor alpha from {8, 4, 2, 1}, for ranges below 32, 64, 128 and above.
2. For each score x, compute a shift s = (max - x) >> (5 - log2 alpha) and a
   weight 2^15 >> s. Sum the weights to get the denominator.
3. One 24-cycle restoring division gives inv = 2^23 / sum. Each output is
   inv >> s.

In effect, e^(x-max) is replaced by a power of two whose resolution follows
the row's range. A narrow row keeps more fractional resolution than a wide
one.

**Layer normalisation** (`rtl/layernorm_unit.sv`) also handles 32 rows in
parallel:

1. The first pass accumulates exact integer sums of x and x^2.
2. The mean and variance are formed in bfloat16, using a 1/len supplied with
   the command: V = E[x^2] - mean^2 + delta.
3. 1/sqrt(V) is estimated in two stages:
   - V is written as M * 2^(2h) with M in [1, 4).
   - A 16-segment piecewise-linear table gives the first estimate
     (a + b*M) * 2^-h.
   - `NR_ITERS` (default 2) Newton-Raphson steps s = s*(3 - V*s^2)/2 refine
     it.
4. The second pass computes ((x - mean)*s*gamma + beta)*2^shift and rounds it
   to INT8.

The bfloat16 operators (`bf16_mul`, `bf16_add`, `int_to_bf16`,
`bf16_to_int8`) round to nearest even and flush subnormals to zero. The
table's entries are computed by the formula given in the unit's header
comment.

## Where this model departs from the architecture it follows

- **Partial-sum aggregation.** Partial sums of a long K are accumulated in
  the array of the PE that owns the output tile. The tile never gathers
  partial sums from several PEs over the network.
- **Activation unit.** The architecture block diagram names the activation
  unit ReLU, while its description is a hybrid GELU with a ReLU outer branch.
  The GELU form is built.
- **GELU placement.** GELU sits in every PE's result path. It is a small
  table, and this lets any PE apply it to its own product. Softmax and layer
  normalisation exist only in the leftmost column, as intended.
- **Nonlinear inputs.** Softmax and layer normalisation read their rows from
  the PE's Data SRAM, not directly from the systolic array output. A row is
  generally longer than one 32-wide tile.
- **Memory split.** How the 1024 KB is divided, the flit format, the routing
  algorithm, the command set, the number formats (Q4.4 for GELU, INT8 with a
  power-of-two scale after normalisation) and the host interface are all this
  model's own choices.
- **Row length limit.** No softmax row masking is provided. Nonlinear
  operations are limited to rows of at most 256 elements, which is the PE
  SRAM depth set by `PDEPTH`. A 768-wide layer normalisation needs
  `PDEPTH = 1024`.
- **Throughput.** Sustained throughput is far below the 32.8 TOPS peak,
  because of the single 2-cycle-per-flit controller injection described
  above.
- **Timing.** 1 GHz is the intended clock. No timing constraints come with
  the RTL.

## Files

`rtl/` holds one module per file. The package `noctua_pkg` must be compiled
first. The hierarchy is:

- `noctua_top`
  - `central_controller`, `data_memory`, `weight_memory`
  - `tile` (x16)
    - `router`
    - `network_interface`: `depacketizer` and `packetizer`
    - `pe`
      - `sram` (x3), `systolic_array`, `gelu_unit`
      - `softmax_unit`, `layernorm_unit` (with `bf16_*`, `int_to_bf16`,
        `bf16_to_int8`)

`fifo` and `sram` are generic helpers.

`tb/` holds one self-checking testbench per block. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_noctua_top` runs the full-size design at its default parameters. It
runs these operations, checking every result word against a software model:

- three matrix products (128x64x160, a 32x32x512 one with GELU, and
  a 32x320x64 one that needs two K chunks);
- a softmax over 6 row blocks of 40;
- a layer normalisation over 2 blocks of 64.

It also counts each mechanism and fails if any never occurs. The mechanisms
are: multicast copies, link stalls, multi-round schedules, K-chunk commands,
negative GELU outputs, all 16 PEs used, and all four softmax alpha buckets.

`tb_bert_slice` runs a cut-down encoder at sequence length 128 on the
full-size design. It chains five operations, and each one reads the
previous result straight from the data memory:

1. the Q projection;
2. the attention scores Q*K^T;
3. softmax over the score rows;
4. layer normalisation;
5. a GELU feed-forward product.

It prints the cycles each step takes. The slice uses one 64-wide attention
head and narrower hidden and feed-forward layers than the real model.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -j 8 rtl/noctua_pkg.sv \
    $(ls rtl/*.sv | grep -v noctua_pkg) tb/tb_noctua_top.sv \
    --top-module tb_noctua_top -o sim
./obj_dir/sim
```

Replace `tb_noctua_top` with any other testbench to test one block. The
full-size run builds and simulates in about a minute. The unit testbenches
take seconds.

To change the size, edit the parameters. `PDEPTH` on `noctua_top` sets the
PE SRAM depth and the K chunk. `DDEPTH` and `WDEPTH` set the memory bank
depth. `NR_ITERS` on `layernorm_unit` sets the number of Newton-Raphson
steps. The mesh size `MESH` and the vector width `VEC` are package constants.
