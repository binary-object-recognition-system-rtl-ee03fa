# bSOM: a tri-state binary self-organising map for object identification

This design identifies objects in a video scene by their appearance. A
tracker on the host turns each moving object into a 768-bit **binary
signature**: a 768-bin colour histogram (256 bins each for R, G and B),
with each bin set to 1 if it holds at least the mean bin count. The FPGA
holds a self-organising map of 40 neurons. Each neuron stores a 768-position
weight vector whose entries are *trits*: `0`, `1` or `#` (don't care). The
map is trained on signatures, each neuron is labelled with the object it
responds to most often, and new signatures are then identified by the label
of the nearest neuron.

All of this needs only bit operations. The distance between a signature and a
neuron is the Hamming distance counted over the non-`#` positions. Learning
moves trits between `0`, `#` and `1`. This makes the map cheap on an FPGA:
one clock handles one bit position for all 40 neurons at once. A 768-bit
signature takes 768 clocks to compare and another 768 clocks to learn.

The SystemVerilog here follows the published bSOM FPGA architecture. It
keeps its sizes and cycle counts: 40 neurons, 768-bit vectors, 10-bit
distances, initialisation in 768 clocks, distance in 768 clocks, a seven-clock
winner search, a neighbourhood of at most 4, VGA display of the weights, and
25,000 training patterns per second at 40 MHz. Some details are not
published, such as the exact update rule and the host interface. Those are
filled in as listed under *Design choices* below.

## The trit and the two operations on it

| code  | trit | adds 1 to the distance when the input bit is | one training step towards input `x` |
|-------|------|----------------------------------------------|-------------------------------------|
| `2'b00` | 0  | 1                                            | `x=0`: stays 0; `x=1`: becomes `#`  |
| `2'b01` | 1  | 0                                            | `x=1`: stays 1; `x=0`: becomes `#`  |
| `2'b10` | #  | never                                        | becomes `x`                         |
| `2'b11` | (unused, treated as `#`) | never                 | becomes `x`                         |

`bsom_pkg::trit_mismatch` and `bsom_pkg::trit_step` implement the two
columns. A neuron made only of `#` is at distance 0 from everything. The
update rule therefore never jumps straight from 0 to 1. It first passes
through `#`, so one contradicting sample does not fully overwrite a bit
that was learned before.

## Memory organisation: one word per bit position

The key to the architecture is how the weights are laid out. `weight_mem`
stores **word k = bit k of every neuron**: 768 words of 80 bits (40 trits).
Each pass over the map walks the addresses 0..767, one per clock:

* **initialisation** (`weight_init`) writes a random word to every address.
  Every neuron gets a new random trit in every clock, so the whole map is
  ready after 768 clocks.
* **distance** (`hamming_array`) reads one word per clock. The input bit for
  that position comes from a rotating copy of the signature. Forty 10-bit
  counters add up the mismatches in parallel.
* **update** reads each word and passes it through `neighbourhood_update`.
  The result is written back one clock later. Only neurons inside the
  neighbourhood have their write enables set.

The memory has one write port and two synchronous read ports. The second
read port serves the VGA display, so the display never has to wait for
training. On an FPGA this means two copies of a simple dual-port block RAM.

## Life of one signature

```
 clock  0        take the vector from pattern_input (copy into controller)
        1..768   read word k, k = 0..767            (S_DIST)
        2..769   Hamming counters add position k    (one clock behind the read)
        770      distances complete -> WTA tree     (S_WTA)
        771..777 7-level comparator tree            (S_WTA_WAIT)
 train  778..1545 read word k, write back updated word one clock later (S_UPDATE)
        1546     drain, iteration count +1
        1547     result strobe                      -> 1,548 clocks per pattern
 label  778      count win of (winner, label); 779 result
 recog  778      result with label / unknown        -> 779 clocks per signature
```

At 40 MHz that is 25,840 training patterns per second and 51,300
recognitions per second. The 25,000 patterns per second of the original
design is met. `pattern_input` assembles the next signature one bit per
clock while the current one is being processed. It needs 768 clocks, so input
is hidden behind training completely and almost completely behind recognition.

## Winner-take-all tree

`wta_tree` is a pipelined binary tree of minimum comparators, one clock per
level. Ties go to the lower neuron index. The original design states two
things: the search takes seven clocks for 40 neurons, and the first level
has fifty comparators. Both hold for a tree sized for 100 leaves (50, 25, 13,
7, 4, 2, 1 comparators). 100 is the largest map the design was evaluated
with. The tree is therefore built with `TREE_LEAVES = 100`, and leaves above
`NEURONS` are tied off as empty. Synthesis removes their logic, and the
latency stays seven clocks for any map of up to 100 neurons. With
`TREE_LEAVES = NEURONS` it would be six clocks for 40.

## Training schedule and neighbourhood

The neurons form a one-dimensional chain by index. The neighbourhood of size
`s` is every neuron `j` with `|j - winner| < s`. Size 1 is the winner alone,
and size 4 is the winner plus three neurons on each side, clipped at the ends
of the chain. The size shrinks with the iteration count:

    nsize = MAX_NEIGH - floor(iter * MAX_NEIGH / num_iters)   (at least 1)

For `MAX_NEIGH = 4` and 100 iterations this is 4 for iterations 0-24, 3 for
25-49, 2 for 50-74 and 1 for 75-99. One trained pattern counts as one
iteration. To schedule over several passes of a data set, set `num_iters` to
passes times set size. `iter` and `nsize` are visible on the top.

## Labelling and recognition

After training, the training signatures are presented again in
`MODE_LABEL`, each with its object label (sent with the first bit). For every
signature, `node_labeller` counts one win for the pair (winning neuron,
label). It keeps 40 × 9 counters of 16 bits in a small memory.
`cmd_finalize` scans the counters, one per clock (360 clocks). It gives each
neuron its most frequent label, the lower label on a tie. A neuron that never
won gets the code 15 (unknown).

In `MODE_RECOG` every signature produces a result. It carries the winner, its
distance and the winner's label. `res_unknown` is set when the distance is
above `unknown_thresh` or when the winner has no label. `unknown_thresh` is
programmed by the host. The original design sets this threshold during
training, but it does not say how.

## VGA display

`vga_display` draws all 40 neurons as 32×24 images. They are laid out as 8
tiles per row, each bit drawn as 2×2 pixels: 0 black, 1 white, `#` grey, on
a dark blue background. Timing is VESA 800×600 at 60 Hz. Its 40 MHz pixel
clock equals the system clock, so the display needs no second clock domain.
The syncs and colour come out two clocks after the internal pixel counters,
aligned with each other.

## Modules

| file | role |
|------|------|
| `bsom_pkg.sv` | trit encoding, mode enum, label width, the two trit functions |
| `bsom_top.sv` | top level: wires all blocks, muxes the memory write port between initialisation and update |
| `bsom_ctrl.sv` | sequencer: start-up and commanded initialisation, the passes above, results |
| `pattern_input.sv` | serial-to-parallel signature input with valid/ready and back-pressure |
| `weight_mem.sv` | 768 × 80-bit weight memory, per-neuron write enables, two read ports |
| `weight_init.sv` | 127-bit LFSR (x^127+x+1) advanced 127 steps per clock, random trit per neuron per clock |
| `hamming_array.sv` | 40 bit-serial distance counters |
| `wta_tree.sv` | 7-level pipelined minimum tree |
| `neighbourhood_update.sv` | iteration counter, size schedule, mask, trit update |
| `node_labeller.sv` | win counters, label assignment, label table |
| `vga_display.sv` | 800×600 60 Hz timing and weight rendering |

## Using the top level

1. Release `rst_n`. The map initialises itself: `busy` is high for about 770
   clocks. Set `num_iters` (planned training patterns) and `unknown_thresh`.
2. Set `mode = MODE_TRAIN` and stream the training signatures on
   `in_valid`/`in_bit`/`in_ready`, pixel 0 first. Each one yields a
   `res_valid` pulse.
3. Wait until `busy` is low. Set `mode = MODE_LABEL` and stream the labelled
   signatures with `in_label` valid on their first bit. Then pulse
   `cmd_finalize`.
4. Set `mode = MODE_RECOG` and stream signatures. Read `res_label` and
   `res_unknown` at each `res_valid`.

`mode` is sampled when a complete signature is taken. Change it only when no
signature is waiting. `cmd_init` re-randomises the map and clears the labels
and the iteration count.

Parameters of `bsom_top`: `NEURONS` (40), `VEC_BITS` (768), `DIST_W` (10),
`TREE_LEAVES` (100), `MAX_NEIGH` (4), `NUM_LABELS` (9), `IMG_W` (32; the
image height is `VEC_BITS / IMG_W`). The defaults are the published
configuration.

Synthesis at the defaults gives about 2,400 flip-flops and 69,000 memory
bits: 61,440 weight bits plus 5,760 counter bits, with the weight memory
counted once. The second read copy of the weight memory adds another 61,440
bits of block RAM on an FPGA.

## Design choices beyond the published description

* Trit encoding, the one-step update rule (above), and using the same rule for
  the winner and its neighbours. The published text says only that the winner
  and its neighbourhood are updated.
* The chain topology and the meaning of "neighbourhood size", and one pattern
  counting as one iteration.
* The initial weight distribution: `#` with probability 1/4, otherwise 0 or
  1 with equal probability. The generator seed is the `SEED` parameter of
  `weight_init`.
* Labelling runs on chip (`node_labeller`). The ties, the unknown code 15
  and the counter width are also choices of this design.
* The unknown threshold is a host-programmed input.
* The host interface: a serial bit stream with valid/ready, command pulses, a
  mode input and a result strobe. It stands in for the original USB/camera
  link, whose protocol is not described.
* VGA resolution, layout and colours.
* An active-low asynchronous reset throughout, and a single clock.
* Automatic initialisation after reset, plus `cmd_init` to restart.

Not included: the host-side signature extraction (histogram and
thresholding), the tracker, and the USB link. They run on the host PC in the
original system.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently in the testbench and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `weight_mem_tb` | masked writes, both read ports, read-during-write, against a shadow copy |
| `weight_init_tb` | 768 writes in order, done timing, LFSR words against a bit-serial model, trit statistics |
| `pattern_input_tb` | bit order, label capture, completion on the last bit, back-pressure |
| `hamming_array_tb` | distances against the definition, all-`#` and complement neurons, clear |
| `wta_tree_tb` | winner and tie-break against a linear search, latency of exactly 7, one input per clock |
| `neighbourhood_update_tb` | the 4/3/2/1 schedule over 100 iterations, masks at the chain ends, every trit transition |
| `node_labeller_tb` | argmax labels against reference counts, ties, unknown, pass lengths |
| `bsom_ctrl_tb` | pass addresses and timing, enables, result fields, 1,548 / 779 clocks per pattern, start-up init |
| `vga_display_tb` | full-frame sync timing and every pixel of one frame |
| `bsom_top_tb` | whole design at default size: init, training, labelling, recognition, all results and the full weight memory against a behavioural model, cycle counts, back-pressure, every neighbourhood size, unknown by distance and by missing label, a VGA frame |
| `bsom_workload_tb` | the identification experiment at full size with synthetic signatures: 9 objects, ten training passes over 2,248 signatures, labelling with the same set, 1,139 test signatures; prints the identification rate and requires at least 85% |

The synthetic signatures are random prototypes with two appearance variants
and 8% bit noise. On them the map identifies almost all test signatures.
That rate says nothing about real tracker data, for which about 85% was
reported originally.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/bsom_pkg.sv tb/bsom_top_tb.sv --top-module bsom_top_tb
    ./obj_dir/Vbsom_top_tb

`bsom_top_tb` takes under a second. `bsom_workload_tb` simulates about 40
million clocks in a little over a minute. The simulator should be two-state with
random initial values (`+verilator+rand+reset+2`). Everything that is read is
reset or written before use.
