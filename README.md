# A two-layer min-sum LDPC encoder and decoder

This RTL implements both ends of a small LDPC-coded link: a systematic
encoder that turns 16 message bits into a 32-bit codeword, and a layered
min-sum decoder that turns 32 noisy soft values back into a codeword. The
decoder splits the check rows of the parity check matrix into two layers. It
updates one layer per clock, makes two passes over both layers, then
thresholds the result. The design follows the decoding procedure of
"Implementation of Decoder Using LDPC Codes on FPGA". That description gives
the algorithm step by step but no hardware architecture. The scheduling,
number formats and interfaces are this design's own, and the sections below
say which is which.

## The code

The parity check matrix has the form `H = [A | I]`. There are K check rows,
K message columns and K parity columns. Check row `m` (counting from 0) has
ones in three columns:

- message column `m - 1 (mod K)`;
- message column `m`;
- parity column `K + m`.

For K = 6 this is the 6 x 12 example matrix of the source description
(C1 = V1 + V6 + V7, C2 = V1 + V2 + V8, ... C6 = V5 + V6 + V12). The default
build uses K = 16, the size of the source's encoder results. Every row has
three ones. Every message column has two ones and every parity column has
one.

It follows that parity bit `m` is `msg[m] ^ msg[m-1 mod K]`, that is,
`parity = msg ^ rotate_left(msg, 1)`. The codeword is `{message, parity}`,
with the message in the upper half. Message bit 0 (the LSB) is variable node
V1. Two published encodings pin down this bit order, and the testbench checks
both:

| message | codeword |
|---|---|
| `16'hb9ab` | `32'hb9abcafc` |
| `16'hb9a8` | `32'hb9a8caf9` |

`rtl/ldpc_pkg.sv` holds this structure as small functions. `edge_col` gives
the column of each edge of a row. The `slot_*` functions give the rows of
each column. The encoder and the decoder are both wired from these
functions, so changing `K` changes the whole code consistently.

## Layered min-sum decoding

Soft values use the log-likelihood sign convention: positive means "probably
0". The decoder keeps two kinds of state:

- **column sums**, one per codeword bit: the received value plus every check
  message currently stored for that column;
- **layer values** (check messages), one per one of H: the last message each
  row sent to each of its columns.

At the start, the sums are loaded with the received values and all layer
values are cleared. Rows 0..K/2-1 form layer 1 and rows K/2..K-1 form layer
2. Processing one layer takes three steps:

1. Every column subtracts the layer values this layer stored on its previous
   pass: `q = sum - old`.
2. Every row of the layer runs the min-sum rule on the `q` of its three
   columns. It finds the smallest magnitude (min1) and the second smallest
   (min2), ignoring signs. The edge that holds min1 gets min2. The other
   edges get min1. The sign of each output is the XOR of the signs of the
   row's other two inputs.
3. Every column adds the new layer values back: `sum = q + new`. The new
   values replace the old ones.

The default schedule is layer 1, layer 2, layer 1, layer 2. In the source's
terms this produces sum_1 through sum_6. Finally each sum is compared with
a threshold (default 0): a sum above it gives bit 0, and any other sum gives
bit 1.

One detail of this code matters here. Rows `m` and `m+1` share message
column `m`, and both usually sit in the same layer. So a layer can send two
messages to one column. Following the source procedure, both are subtracted
in step 1 and both are added in step 3. Every row of the layer therefore
sees the same `q` for that column. Within one layer this is a flooding update
rather than a strictly sequential one.

## Decoder hardware

`rtl/ldpc_decoder.sv` builds the algorithm directly:

- **Check node units** (`ldpc_check_node`): there are K/2 of them, shared by
  the layers. Unit `j` serves row `j` in layer 1 and row `K/2 + j` in layer
  2. A small multiplexer picks its three column inputs by layer.
- **Variable node units** (`ldpc_variable_node`): one per column. Each has up
  to two message slots. A slot whose row is not in the current layer is
  driven with zero, so the same unit handles both layers.
- **State**: 2K sum registers and a K x 3 register array of layer values,
  all `LLR_W` bits wide. At the defaults that is 32 + 48 words of 32 bits.
- **Final decision** (`ldpc_decision`): one comparator per column.
- **Controller** (`ldpc_layer_ctrl`): an IDLE / RUN / DONE state machine. It
  asserts `load` with the start request, then `run` for NL x ITER clocks
  with the current `layer` and `iter`, then `decide` for one clock.

The whole layer update (subtract, min-sum, add) is one combinational path
from the sum and message registers back into them. This is the critical
path. It was chosen for simplicity, and nothing in the source calls for
pipelining.

### Timing

| event | clock |
|---|---|
| `in_valid` while `in_ready` (load) | 0 |
| layer updates | 1 .. NL x ITER (1..4 at the defaults) |
| `decide` | NL x ITER + 1 |
| `out_valid` pulse, outputs updated | NL x ITER + 2 (6 at the defaults) |

`in_ready` is low from the load until the decision cycle, and load requests
in that window are ignored. The decoded outputs hold their value until the
next decode finishes. The encoder registers its output, so its codeword
appears one clock after `in_valid`.

## Top level

`ldpc_top` puts the encoder and the decoder side by side. Everything between
them is outside this RTL and is left to the user: modulation, the noisy
channel, the receiver and demodulation. The encoder's codeword leaves on
`enc_codeword`. Soft values come back on `dec_llr`, indexed by codeword bit
in the same `{message, parity}` order.

## Parameters

| parameter | default | origin |
|---|---|---|
| `K` (message bits; codeword is 2K) | 16 | source |
| `NL` (layers) | 2 | source |
| `ITER` (passes over all layers) | 2 | source procedure (each layer is processed twice) |
| `LLR_W` (soft value width) | 32 | this design; matches the 32-bit values in the source's simulation plots |
| `THRESHOLD` (decision threshold) | 0 | this design; the source gives no value |

`K` must be a multiple of `NL`.

## Where this design goes beyond the source

- The source does not give the number format, clocking, handshakes, reset or
  architecture. Everything in "Decoder hardware" and "Timing" is this
  design's choice. Reset is asynchronous and active low.
- The step that prepares the second pass of layer 1 says to subtract the
  "layer 2" values. This design subtracts the layer 1 values instead, as
  layered decoding requires. This mirrors the later step that subtracts layer
  2 before layer 2 is processed again.
- The source states the decision rule twice, and the two statements
  disagree. This design follows "greater than threshold gives 0, less gives
  1". A sum exactly at the threshold gives 1.
- The check node uses plain min-sum, with no scaling or offset.
- The arithmetic does not saturate. Keep input magnitudes well below 2^28 at
  the default width: each column sum grows by at most a few message
  magnitudes.
- There is no early stop on a satisfied syndrome. Every decode runs all
  `NL x ITER` layer updates.
- Source coding, modulation, the channel and the receiver are not
  implemented.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line:

- `tb_ldpc_encoder` checks the two published encodings, 200 random messages
  and the syndrome of every codeword. It also checks all 64 messages of a
  K = 6 instance against the example matrix written out row by row.
- `tb_ldpc_check_node` compares every output with the extrinsic minimum and
  sign, on 3000+ random rows of small, medium and large magnitudes.
- `tb_ldpc_variable_node` and `tb_ldpc_decision` test against direct
  arithmetic. The decision test also covers sums equal to the threshold and
  a non-zero threshold.
- `tb_ldpc_layer_ctrl` checks the layer order, the decide cycle and that
  requests are ignored while busy, for (NL, ITER) = (2, 2) and (3, 1).
- `tb_ldpc_decoder` decodes random noisy codewords at several noise levels.
  It uses the default decoder and a K = 6, three-iteration decoder. Every
  result must match `tb/ldpc_ref_pkg.sv` bit for bit. That package is a
  separate reference written over an explicit H matrix. The test also checks
  the latency.
- `tb_ldpc_top` runs the whole link at default parameters: encoder, a BPSK
  plus Gaussian-noise channel model, then the decoder. It counts how often
  each mechanism was exercised and fails if one never was. The mechanisms
  are: layer 1 and layer 2 passes, the second iteration, min2 substitution,
  negative check messages, both decision outcomes, corrected channel errors
  and ignored busy requests.

The channel model maps bit 0 to +8 and bit 1 to -8 and adds noise made from
a sum of 12 uniform variables.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_top.sv \
    --top-module tb_ldpc_top -o sim
./obj_dir/sim
```

Replace `tb_ldpc_top` with any other testbench name to run it. Every
testbench finishes in well under a second.
