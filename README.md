# Density-feature word recognizer for handwritten Arabic

This RTL recognizes a handwritten Arabic word from a closed list of 50 words
(Tunisian town names). Its input is a binarized, thinned image of 64 x 256
pixels. The image is reduced to 44 **density features**: counts of black
pixels over a fixed set of rectangular windows. A small neural network then
scores the features: 44 inputs, 80 hidden neurons with a tanh-shaped
("tansig") activation, and 50 linear outputs. The largest output names the
word.

Two Avalon-MM peripherals do the work. A soft processor would normally drive
them; here that role is an external host port.

- **Feature extractor.** Walks the image in on-chip memory and writes the
  44 features into a shared features-and-weights memory. It takes 591
  clocks.
- **Recognition engine.** Evaluates the network with a single physical
  neuron that has all its multipliers in parallel. It reuses that neuron
  for each of the 130 neurons in turn. On a 32-bit bus it takes 7906
  clocks, which is 176 us at the 45 MHz clock the design was sized for.
  Wider memory buses bring this down to 523 clocks.

All arithmetic is 16-bit signed fixed point with 9 fraction bits ("Q9": 1
sign, 6 integer, 9 fraction bits).

## System and address map

`ocr_system` is the top module. It holds:

- a 2 KB image memory;
- the feature extractor;
- a 32 KB features-and-weights memory;
- the recognition engine;
- a tansig table ROM;
- a two-master arbiter in front of the features memory's narrow port.

One clock (`clk`) and one synchronous, active-high `reset` drive everything.

| Base address | Size | What | Reached by |
|---|---|---|---|
| `0x0400_1000` | 2 KB | image memory | host (port A), feature extractor (port B, reads) |
| `0x0400_4000` | 1 KB | feature extractor registers | host |
| `0x0400_8000` | 1 KB | recognition registers | host |
| `0x0401_0000` | 32 KB | features-and-weights memory | host and feature extractor through the arbiter (32-bit port A); recognition (wide port B, reads) |
| `0x0404_0000` | 1985 words (7940 bytes at 32 bits) | tansig table | recognition only |

The host port (`host_address` is a byte address, plus `host_read`,
`host_write`, `host_byteenable`, `host_writedata`, `host_readdata`,
`host_readdatavalid` and `host_waitrequest`) follows Avalon-MM rules:

- Every slave returns read data exactly one cycle after it accepts the read,
  flagged by `readdatavalid`.
- Only the features memory can stall the host. It raises `host_waitrequest`
  when the feature extractor holds the arbiter.
- A read of an unmapped address returns 0.
- `fe_busy` and `rec_busy` mirror the two start bits.

One word is processed as follows:

1. Load the network once. Write the weights to the features memory (layout
   below). If the default scaling does not suit the training data, also
   write one normalization constant per feature to recognition register
   words 64..107.
2. Write the 2048-byte image to the image memory. Row `r` starts at byte
   `32*r`. Pixel `x` of a row is bit `x%32` of the row's 32-bit word `x/32`.
   A 1 is a black pixel.
3. Write 1 to feature extractor register 0. Poll it until it reads 0.
4. Write 1 to recognition register 0. Poll it until it reads 0.
5. Read the 50 signed 32-bit output sums at recognition register words
   128..177. Pick the largest.

## Density features and the block walk

The image is cut into sixteen 32 x 32 blocks, 2 rows by 8 columns. They are
numbered down each column first: block `b` sits in block row `b%2` and block
column `b/2`. The black-pixel count of block `b` is feature `b+1`. The other
28 features are coarser windows, and every one of them is a sum of block
counts or half-block counts:

| Features | Window | Numbering | How it is formed |
|---|---|---|---|
| 1..16 | 32 x 32 | `1 + b` | count of block `b` |
| 17..32 | 16 x 64 (4 bands x 4 column groups) | `17 + 4*group + band` | upper band: the upper 16 rows of two blocks; lower band: the two block counts minus that |
| 33..40 | 32 x 64 | `33 + 2*group + row` | two block counts |
| 41..44 | 32 x 128 | `41 + 2*group + row` | two 32 x 64 features |

So the extractor only needs two numbers per block: the count of its upper
16 rows and its total.

- `block_half_sums` produces both from the 32 row words. It is a
  combinational population count.
- After the last block, `density_feature_derive` forms features 17..44 in
  one combinational step.

`density_feature_extract` is the controller around them. For each block:

- It issues 32 reads back to back through its master. Block `b` starts at
  image byte `(b%2)*1024 + (b/2)*4`, and its rows are 32 bytes apart.
- It keeps each returned row in a register. Reads are pipelined: a new
  address goes out every cycle while earlier data return.
- Once the 32nd row is in, it counts in one cycle.

Per block that is 32 read cycles, one cycle for the last data and one for
the count: 34 cycles. After the derive cycle the 44 features are written
one per 32-bit word, zero-extended, to `0x0401_0000 + 4*k`. The module then
clears its start bit. The total from the start write to the bit clearing is
1 + 16 x 34 + 1 + 44 + 1 = 591 cycles. Extra wait states on either bus
stretch this, because the master honours `waitrequest` on every transfer.

For the wide-bus variants (below), the extractor is built with
`FEAT_STRIDE = 2`. It then packs features as 16-bit halves using byte
enables.

## The recognition engine

This is the hardest part to read in the RTL. `nn_recognition` is one FSM
around one "neuron":

- `neuron_dot` multiplies up to 80 value pairs at once and adds the
  products.
- A set of registers holds the normalized features and, later, the hidden
  activations.

### Fixed-point rules

- **Products.** A Q9 x Q9 product is 32 bits with 18 fraction bits. Each
  product keeps bits `[24:9]`, giving Q9 again. Products are truncated, and
  bits above bit 24 are dropped. The sum of the 44 or 80 truncated products
  is kept at full width: 16 + log2(N) bits.
- **Normalization.** Features arrive as raw pixel counts (0 to 4096). Each is
  mapped to the range [-1, 1] as it arrives from memory:

  `x_nrm = ((x * P) >> 14) - 512`, with `P = round(1023 / Xmax * 2^14)`.

  `Xmax` is the largest value of that feature in the training set. `P` is an
  18-bit constant per feature, so the product fits one 18 x 18 multiplier.
  The reset value of every `P` is 16384, which means `Xmax = 1023`. The host
  may overwrite the constants (`feature_normalizer`).
- **Hidden activation.** The activation is tanh. `tansig_lut` stores only
  its positive half: `round(512 * tanh(i/512))` for i = 0..1984, that is
  inputs 0 to 3.875. The engine looks up the magnitude of the neuron sum and
  puts the sign back:
  - for |sum| > 1984 the result is +-512 (+-1.0) without using the table
    value;
  - otherwise it is +- the table entry.

  The table is computed from `$tanh` during elaboration, so no data file is
  needed.
- **Outputs.** The output layer has no activation. Output sums are kept as
  32-bit signed values.

### Memory layout

The features and all the weights share one memory, read `VALS` values per
bus word of `DATA_W = 16*VALS` bits; value `v` of a word is bits
`16v+15..16v`. The default is a 32-bit bus with one value per word, in the
low 16 bits.

Every vector starts on a word boundary. Its tail is padded up to a whole
number of words: NF = ceil(44/VALS) and NH = ceil(80/VALS).

| Words | Contents |
|---|---|
| `0 .. NF-1` | the 44 raw features (written by the feature extractor) |
| `NF + j*NF ..` | the 44 weights of hidden neuron `j`, j = 0..79 |
| `NF + 80*NF + k*NH ..` | the 80 weights of output neuron `k`, k = 0..49 |

At the default this is (44 + 3520 + 4000) x 4 = 30256 bytes of the 32 KB.
There are no bias terms.

### Schedule and cycle count

1. Read the NF feature words and normalize each as it arrives: NF+1 cycles.
2. For each hidden neuron, read its NF weight words: NF+1 cycles. Its dot
   product is formed in the following cycle, overlapped with the next
   neuron's reads. One extra cycle finishes the last hidden sum.
3. Two cycles per hidden neuron for the activation: one to issue the table
   read, one to store the signed result.
4. For each output neuron, read its NH weight words (NH+1 cycles). Form its
   sum in one more cycle.

From the start write to the clearing of the busy bit, a run takes

`(NF+1)*(80+1) + 2*80 + 1 + (NH+2)*50` cycles.

| Bus width | Values/word | Cycles | At 45 MHz |
|---|---|---|---|
| 32 (default) | 1 | 7906 | 175.7 us |
| 64 | 4 | 2233 | 49.6 us |
| 128 | 8 | 1328 | 29.5 us |
| 256 | 16 | 835 | 18.6 us |
| 512 | 32 | 654 | 14.5 us |
| 1024 | 64 | 523 | 11.6 us |

The 32-bit case stores one value per word. From 64 bits up, the words are
packed.

To build a wide variant, set `REC_DATA_W` and `REC_VALS = REC_DATA_W/16` on
`ocr_system`, for example `-GREC_DATA_W=256 -GREC_VALS=16`. The features
memory's port B and the tansig ROM follow the width. The extractor packs
its output to match. The host still loads weights 32 bits at a time, and
the packed image of the memory is its own job. The layout fits the 32 KB
memory at every width.

### Recognition registers (word addresses)

| Word | Access | Meaning |
|---|---|---|
| 0 | R/W | bit 0: write 1 to start, reads 1 while busy |
| 64..107 | R/W | normalization constant `P` of feature 0..43 (18 bits) |
| 128..177 | R | output sum of neuron 0..49, 32-bit signed |

## Interconnect details

- **Arbiter.** `avmm_arbiter2` arbitrates the features memory's 32-bit port
  between the host and the feature extractor. Grants are round-robin, one
  transfer at a time. A one-cycle routing register sends each read
  response to the master that issued it.
- **Recognition master.** It never sees wait states. It is the only master
  on port B and on the table.
- **Memories.** `image_ram` and `fw_ram` are true on-chip memories with
  registered reads. Port A of `fw_ram` takes byte offsets and maps 32-bit
  writes onto lanes of the wide word.

## Where this design departs from the source

- **One clock.** The original system runs recognition on its own 45 MHz
  clock from a PLL, with clock-crossing bridges. Here everything shares
  `clk`. The cycle counts above are what the 45 MHz figures are based on.
- **No processor.** The soft processor, SDRAM controller, SD card
  interface, JTAG UART, timer, system ID and performance counter are not
  included. The `host_*` port takes the processor's place. The arbiter and
  the unmapped-read response belong to this design.
- **Host software.** Picking the largest output and mapping it to a zip
  code are left to host software, as in the original.
- **Half tansig table, one entry per word.** The source describes a table
  that uses tanh's odd symmetry to halve its size. It also quotes a 3970-entry
  size, which would be the full two-sided table. This design keeps the half
  table, 1985 entries, and puts each entry in its own bus word.
- **32-bit words at the narrowest.** The source also built a 16-bit
  system bus and sized its memory for 16-bit words, which holds the network
  in 15128 bytes. Here the narrowest variant is the default 32-bit bus with
  one value in the low half of each word. It has the same cycle count and
  needs 30256 bytes, which still fits the 32 KB memory.
- **No bias terms.** The source's neuron equation allows a bias, but its
  memory sizing counts 44 values per hidden neuron, so none is stored.
- **Fixed cycle budgets.** The extractor takes 34 cycles per block, against
  roughly 36 in the original's timing trace. The recognition engine meets
  the original's cycle equation exactly. The 32-bit result (175.7 us)
  matches the reported 175 us within rounding.
- **Register maps.** Only the start/busy bits come from the source. The
  rest of each register map is this design's, as are the reset values of
  `P` and the 32-bit output width.
- **No trained network.** Weights and normalization constants come from
  offline training and are not part of the RTL. The testbenches use random
  weights checked against a bit-exact reference model. Recognition accuracy
  is therefore not reproduced.

## Verification

Each module has a self-checking testbench in `tb/`. It compares the RTL
against independent models in `tb/ocr_ref_pkg.sv`:

- a pixel-level window count;
- a bit-exact normalizer, neuron and network model;
- tanh computed directly.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_ocr_system` runs the whole system at its default parameters:
  - It loads weights, including two neurons built to saturate the tansig
    table and to give negative sums.
  - It runs three images end to end through the host port.
  - It checks the features, the outputs and the recognition cycle count.
    The extractor's 591-cycle count is checked by its own testbench.
  - While the extractor runs, the host reads the features memory in
    bursts, so that the host and the extractor collide on the arbiter.
  - It counts each mechanism: arbiter stalls on both masters, saturation,
    negative activations and the unmapped-address read.
- `tb_nn_recognition` runs the engine through `tb/nn_run_harness.sv`, a
  harness with its own memory and table models. One instance has random
  wait states.
- `tb_nn_bus_widths` runs all six bus widths and checks each cycle count
  against the equation above.

## Simulating with Verilator

List the two packages first, let `-y` find the modules, and build a binary:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb \
  rtl/ocr_pkg.sv tb/ocr_ref_pkg.sv -y rtl -y tb \
  tb/tb_ocr_system.sv --top-module tb_ocr_system -Mdir obj_sys
./obj_sys/Vtb_ocr_system
```

Any other testbench builds the same way: replace the file and
`--top-module` with, for example, `tb_nn_bus_widths` or
`tb_density_feature_extract`. The system test builds in under a minute and
runs in under a second.
