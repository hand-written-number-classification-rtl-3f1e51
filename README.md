# Perceptron digit classifier in SystemVerilog

This design classifies 28x28 hand-written digit images (0 to 9) with ten
single-layer perceptrons, one per digit. Each perceptron gives the image a
score, a weighted sum of its 784 pixels plus a bias:

    score_k = b_k + sum_{i=0}^{783} w_k[i] * x[i]        k = 0..9

The digit with the largest score wins. Training is done offline. The hardware
only holds the trained weights and runs inference: it streams the pixels of an
image one per clock cycle through ten multiply-accumulate units that work in
parallel. A tree of comparators then picks the winning index. Consecutive
images overlap: while the comparators finish one image, the next image's
pixels are already being multiplied.

There are two build variants:

* **Grayscale** (`BINARY = 0`, the default). Pixels are 8-bit brightness values
  and each class has its own multiplier.
* **Binary** (`BINARY = 1`). Each pixel is first reduced to one bit (1 if
  brighter than 128). A weight is then added to the score only where the
  pixel is 1, so the ten multipliers go away. The cycle timing is the same.
  The price is some accuracy on images whose fine strokes vanish when
  thresholded.

## Datapath

```
            wr_en/wr_class/wr_idx/wr_data (19-bit)
                        |
                        v
   +-------------------------------------------+
   | weight_mem: 10 banks x 784 weights (24 b) |--- bias[10] (24 b)
   |             + 10 bias registers           |        |
   +-------------------------------------------+        |
            ^ pix_idx_next        | rd_weight[10]       |
            |                     v                     v
 pix_valid  |      +--------------------------------------------+
 --------> classifier_ctrl ---> 10 x mac_unit (multiply | accumulate)
 pix_ready  <-     first/last   +--------------------------------------------+
            |                     ^                     | score[10] (32 b)
 pix_data --+--> pixel_frontend --+ pix_gray (8 b),     v
   (10 b)                           pix_bin (1 b)   argmax_tree (9 comparators, 4 layers)
                                                        |
                                          res_valid, res_digit (4 b), res_score (32 b)
```

| module | role |
|---|---|
| `nn_pkg` | Shared constants (class and pixel counts, all widths) and types. |
| `weight_mem` | Holds the 10 x 785 received entries. Entry 784 of each class is the bias and is kept in its own register. The pixel weights are read for all ten classes at once. |
| `pixel_frontend` | Brings a 10-bit pixel to the 8-bit processing width, and computes the binarised bit. |
| `classifier_ctrl` | Counts pixels, marks the first and last pixel of each image, and inserts the one bias cycle per image. |
| `mac_unit` | Two pipeline stages: multiply, then accumulate. Ten are instantiated. |
| `argmax_tree` | Finds the index of the largest of the ten scores in four registered layers. |
| `image_classifier` | The top level. It wires the blocks together. |

## Number formats

Weights arrive as signed 19-bit values. They are sign-extended to a 32-bit
reception width and then cut to the 24-bit width used by the multipliers.
This keeps the value, because 19 bits fit in 24. Pixels arrive as unsigned
10-bit values. They are zero-extended to 24 bits and then reduced to their
low 8 bits, the 0..255 brightness range. A product is therefore 24 x 8 bits.
Scores are accumulated in 32-bit two's complement (`ACC_W`) and wrap on
overflow. With trained weights the sums stay well inside that range. If they
did not, the hardware would still rank the wrapped values exactly as a
32-bit reference model does. The testbenches check that case.

## Timing: 785 cycles per image, 789 cycles latency

This is the part that needs the most care, because three things overlap.

1. **Pixels.** Pixel *i* of an image is accepted in cycle *t+i* (*i* = 0..783).
   `weight_mem` is read with the index of the pixel that will be current after
   the coming clock edge (`pix_idx_next`). Its synchronous output therefore
   holds the weight of the pixel present in the same cycle.
2. **Multiply, then accumulate.** Each `mac_unit` registers `weight * pixel` at
   the end of the pixel's cycle. In the next cycle it adds that product to the
   accumulator. The first product of an image overwrites the accumulator
   rather than adding to it, so no clear cycle is needed.
3. **Bias.** The bias can be seen as the weight of a 785th input fixed at 1.
   It needs no multiplier. It is added in the same accumulation that takes
   the last pixel's product. That cycle is the one in which the controller
   holds `pix_ready` low. So the stream of each image occupies 785 input
   cycles, and the 32-bit score is complete at the end of cycle *t+784*:
   785 cycles after the first pixel.
4. **Comparison.** `argmax_tree` registers one comparator layer per cycle. The
   result therefore appears 4 cycles later, with `res_valid` high in cycle
   *t+789*. During those 4 cycles the next image's first pixels already enter
   the MAC units.

With a source that never pauses, images start 785 cycles apart and results
come out 785 cycles apart. *N* images take `785*N + 4` cycles from the first
pixel to the last result. For ten images that is 7854 cycles, or
157,080 ns at a 20 ns clock. The source may also pause (`pix_valid` low). The
controller then just waits, and the results are unchanged.

## Comparator tree

Nine two-input comparators in four layers:

| layer | comparisons | passed on unchanged | survivors |
|---|---|---|---|
| 1 | (0,1) (2,3) (4,5) (6,7) (8,9) | | 5 |
| 2 | (w01,w23) (w45,w67) | w89 | 3 |
| 3 | (w0123,w4567) | w89 | 2 |
| 4 | final | | 1 |

Each comparator forwards the larger signed score together with its index. On
equal scores the lower index wins: the left operand always carries the lower
index, and it wins ties. A linear search with one comparator would need
nine sequential steps. The tree needs four, and it accepts a new set of
scores every cycle.

## Interface and use

`image_classifier` parameters: `BINARY` (0 or 1) and `AW` (score width,
default 32).

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock, and synchronous active-low reset. |
| `wr_en`, `wr_class`, `wr_idx`, `wr_data` | in | 1, 4, 10, 19 | Write one weight entry. `wr_idx` 0..783 is a pixel weight and 784 is the bias. Out-of-range writes are ignored. |
| `pix_valid`, `pix_data`, `pix_ready` | in, in, out | 1, 10, 1 | Pixel stream in row-major order. A pixel is taken when `pix_valid` and `pix_ready` are both high. |
| `res_valid`, `res_digit`, `res_score` | out | 1, 4, 32 | One-cycle pulse carrying the winning digit and its score. Results come in image order. |
| `busy` | out | 1 | High while an image is partly received. |

Operation:

1. Load all 7850 entries: 10 classes x 785, one per cycle, in any order.
2. Wait one cycle, so the weight read-ahead picks up pixel 0's weights.
3. Stream images.

Weights should not be rewritten while images are in flight.

## Simulation

Each module in `rtl/` has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end. For example, the end-to-end test
of both variants:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/nn_pkg.sv tb/image_classifier_tb.sv --top-module image_classifier_tb
./obj_dir/Vimage_classifier_tb
```

| testbench | what it checks |
|---|---|
| `pixel_frontend_tb` | All 1024 inputs: the width reduction and the threshold (128 maps to 0). |
| `weight_mem_tb` | Random writes of all entries, including the 19-bit extremes. Read-ahead reads in sequence and in random order. Bias separation. Ignored writes. |
| `mac_unit_tb` | Grayscale and binary units against a reference sum. The 785-cycle latency. Gaps inside an image. Overflow wrap. |
| `argmax_tree_tb` | 2000 score sets: random, many ties, all equal, extremes. The 4-cycle latency, at one set per cycle. |
| `classifier_ctrl_tb` | Cycle-by-cycle comparison with a reference counter, with a continuous source and with a random one. The 785-cycle image period. |
| `image_classifier_tb` | Both variants side by side. Ten generated digit images back to back, then ten with source pauses. Every result is checked against a reference model of all ten scores. Also checks the 789-cycle latency, the 785-cycle period and 7854 cycles for ten images. Counts that bias cycles, overlap with the comparison and source stalls all occur. |
| `image_classifier_full_tb` | The same run as `image_classifier_tb`, for the default build only, with no parameter overrides. |

No trained weights or real digit images ship with the design. The
testbenches build their own perceptrons: each class gets a random stroke
pattern inside the central 20x20 region. Its weights are positive on that
pattern and negative off it. Each test image is a noisy copy of one pattern.
The checks compare the hardware against a reference model of the same
arithmetic, bit for bit. The label agreement the testbench prints shows only
that the data is sensible; it says nothing about accuracy on real hand-written
digits.

## What is specified and what was chosen here

The design follows the published design in these points:

* ten classes and 784 pixels;
* 785 entries of 19 bits per class, the last being the bias;
* the 32 to 24 bit weight width and the 24 to 8 bit pixel width;
* serial pixel input with ten parallel multiply-accumulate units;
* multiply in one cycle and accumulate in the next;
* the bias added at the end of the sum;
* the nine-comparator, four-layer tree;
* the 785/789-cycle timing, with the comparison overlapping the next image;
* the greater-than-128 binary variant, without multipliers.

The following are this implementation's own choices:

* All port protocols: the address-based weight write port, the valid/ready
  pixel stream and the one-cycle result pulse.
* The synchronous active-low reset.
* The 32-bit accumulator and its wrap-around behaviour.
* Signed weights and unsigned pixels.
* Keeping the low 8 bits of a pixel, and mapping a pixel of exactly 128 to 0
  in the binary variant.
* The pairing of the comparators in the tree, and ties going to the lower
  index.
* Placing the bias in the accumulation of the last pixel, during the one
  cycle the input pauses.
* One memory bank per class, with a synchronous read-ahead port.
* Selecting the binary variant at build time (a parameter), not at run time.

`argmax_tree` is written for exactly ten inputs.
