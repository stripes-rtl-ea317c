# Stripes: a bit-serial convolution accelerator in SystemVerilog

Deep neural networks do not need 16-bit neurons everywhere. How many bits a
layer's input neurons need changes from network to network and from layer to
layer. Many convolutional layers keep their accuracy with 5 to 10 bits.
A bit-parallel accelerator cannot use this. Its multipliers take 16 bits
whatever the data.

This design sends neurons **one bit per cycle**. Each multiplication becomes
an AND of one neuron bit with a 16-bit synapse, followed by a shift-and-add.
A layer whose neurons need `p` bits therefore takes `p` cycles per input
brick rather than 16. To keep the overall throughput of a 16-bit design, the
chip gets 16 times more (and much simpler) inner-product units: 16 tiles ×
16 × 16 serial inner-product units (SIPs). The precision is a run-time
per-layer setting. Several precision profiles can be loaded, and one of them
is chosen when a run starts, which trades accuracy for speed without
reloading the network.

The RTL covers the convolutional-layer datapath of the whole chip: neuron
memory, dispatcher, tiles, output path and layer sequencer. It is
parameterised to full size: 16 tiles, 4 MB neuron memory and 2 MB synapse
buffer per tile.

## Data terms

| term | meaning |
|---|---|
| neuron, synapse | 16-bit fixed-point container (`word_t`) |
| brick | 16 consecutive elements along the input-feature dimension `i`, 256 bits (`brick_t`) |
| window | the set of input neurons one output neuron of one filter reads |
| pallet | 16 windows that are consecutive in raster order of the output; a tile computes a pallet × 16 filters at a time |
| phase | one (fy, fx, input brick) step of a window: 16 neurons × 16 filters, lasting `p` cycles |
| group | the 16 input bricks (one per window of a pallet) that one phase needs |
| beat | one cycle of dispatcher output: bit `b` of each of the 256 neurons in a group, plus tags (`beat_t`) |
| `p` | the layer's input precision, 1..16 bits |
| `in_lsb` | lowest container bit carrying information; the `p` bits sent are `in_lsb+p-1 .. in_lsb` |

## The serial inner-product unit (`sip`)

SIP(f, w) sits at row f and column w of its tile. It receives the 16 synapses
of filter lane f (one brick, 256 bits), latched once per phase in its synapse
register. It also receives one bit of each of the 16 neurons of window lane w
per cycle. For one phase it computes

    sum_k  n_k * s_k  =  sum_b  2^b * ( sum_k  bit_b(n_k) * s_k )

The inner sum runs in one cycle: 16 AND gates, then a 16-input adder tree.
The outer sum is the accumulator. Neurons arrive MSB first, so each cycle does

    first cycle of a phase:  acc = tree + i_nbout
    other cycles:            acc = (acc <<< 1) + tree

For two's-complement neurons (`cfg.nsigned`), the MSB has negative weight. On
the sign-bit cycle the 16 terms are therefore negated before the tree, as
`msb_neg` requests.

The accumulator is 32 bits wide (`ACC_W`), so the full 16 × 16-bit
products cannot overflow. The conversion to 16 bits happens once, at the end,
in the reducer.

`i_nbout` is the partial sum of the same output neuron left by the previous
phase. An output shifter (`oshift`, signed, left or right) sits at the SIP
output. The SIP also has a `max` comparator and an accumulate path for
pooling. They take a bit-parallel neuron on `par_in` (modes `SIP_MAX`,
`SIP_AVG`), but the tile does not use them yet (see *Departures*).

### Carrying partial sums between phases

After a phase of `p` cycles, the accumulator holds the phase's partial sum
scaled by `2^(p-1)` relative to one tree sum. That is, it is weighted as if the
next phase's first tree sum were its most significant bit. Each following
phase must first bring the partial sum onto the weight of its own MSB tree
sum. The tile does this with the SIP's output shifter: a partial sum is
written to NBout shifted **right by p-1**, and the next phase simply adds it
on its first cycle. After the window's last phase, the result is instead
shifted **left by `in_lsb`**, back to the 16-bit fixed-point scale of the
neurons.

This is exact for the last phase only. Every carried partial sum loses its
`p-1` least significant bits (arithmetic shift, rounding toward −∞). It is a
choice of this design, which keeps NBout and the adder at accumulator width
without a separate alignment stage. The testbenches' reference models use the
same rule (`stripes_ref_pkg::phase_step`). Each carried partial sum loses less
than `2^(p-1)` units of the integer sum of products. Over a window of `K`
phases, the result can therefore be low by up to `(K-1)·(2^(p-1)-1)` units,
before the reducer's own rounding to the output precision. For `p = 1`,
nothing is lost. An exact variant would keep carried sums unshifted and scale
each phase's tree output by its position instead. That costs a wider shifter
per SIP.

## Tile (`str_tile`)

```
 dispatcher beat ─► NBin reg ─┬─► column bus w (16 bits) ─► SIP(·,w)
                              │
 SB (row = beat.sb_row) ──────┴─► row bus f (16 synapses) ─► SIP(f,·)
                                                       │
                         NBout (4 entries / column) ◄──┘
                               │ finished pallets
                        activation unit ─► reducer ─► NM write port
```

The pipeline has three stages.

1. **A:** the beat is taken into NBin. On the first bit of a phase, the SB
   row of that phase is read (one-cycle synchronous read).
2. **B:** the SIPs consume the bits and, on the first bit, the synapses.
3. **C:** one cycle after the last bit, all 256 SIP results are written to
   NBout together.

NBout has 4 entries per SIP column:

- Entry 0 holds partial sums between phases. A write-to-read forwarding path
  lets a phase that starts in the very next cycle read the fresh value.
- Entries 2 and 3 hold finished pallets, double-buffered for the reducer.

Phases run back to back: a tile takes one beat per cycle. While both pallet
entries still wait for the reducer, `in_ready` falls on the last beat of a
pallet. That stalls the broadcast to all tiles, which the top counts as *tile
hold*.

Tiles with `tile_id >= cfg.nb_out` take the beats but write nothing. A layer
with fewer than 256 filters uses only the first `nb_out` tiles.

### Reducer

The reducer drains a finished pallet one brick per cycle (column by column),
through the activation unit (ReLU when `cfg.relu`). It converts each neuron
for the next layer in four steps:

1. saturate to 16 bits;
2. arithmetic right shift by `out_lsb`;
3. saturate to `out_prec` bits, unsigned after ReLU and signed otherwise;
4. shift back left by `out_lsb`.

The result stays in a 16-bit container. The next layer can then read it at
`in_lsb = out_lsb`, `p = out_prec`.

Bricks are written with a valid/ready handshake through `nm_write_arbiter`.
Per NM bank, host writes come first, then the lowest-numbered tile. Each
refusal is counted as a bank conflict.

## Neuron memory layout

NM holds 8192 rows of 16 bricks (4 MB) in 16 banks. Bank `a[3:0]` holds the
brick with address `a`, at row `a >> 4`.

- Input brick `(x, y, i)` of a layer sits at `in_base + (y*IB + i)*Nx + x`.
  Here `IB` is the input depth in bricks and `Nx` the input width.
- Consecutive x positions are therefore consecutive addresses. A
  stride-1 group of 16 windows usually lies in one row, or at most two.
- Output brick `(x, y, f)` goes to `out_base + (y*nb_out + f)*Ox + x`, which
  is the same layout with `IB = nb_out`. A layer's output is directly the next
  layer's input.
- Synapses: tile `t`, SB row `sb_base + (fy*Fx + fx)*IB + i`, filter lane `f`
  holds the synapse brick of filter `16t+f` at `(fx, fy, i)`.

Zero padding is not generated in hardware. An input that needs padding must be
stored padded, with `nx`/`ny` set to the padded size.

## Dispatcher: address generator, shuffler, transposer

The dispatcher turns the layer descriptor into a stream of beats for all
tiles. The loops run pallet (16 output positions in raster order), then fy,
then fx, then input brick, the last one fastest. For each phase it computes
the 16 brick addresses. Window `w` at output `(ox, oy)` reads
`(ox*S + fx, oy*S + fy, i)`, so any stride `S` up to 15 is handled.
Windows past the end of the output array are masked.

**Shuffler.** The 16 bricks of a group lie in `R` distinct NM rows.
`R` is 1 or 2 for stride 1, and grows up to about `S+1` for larger strides.
Each cycle the shuffler reads the row of the lowest-numbered window lane whose
brick is still missing. Every lane whose brick lies in that row captures it
through its 16-to-1 brick multiplexer. The last row read is passed straight
through the multiplexers to the transposer. The first read is issued in the
very cycle the request is accepted, its row taken straight from the request's
addresses. With a one-cycle NM read, a group is therefore ready `R` cycles
after it was accepted. The next group is collected while the transposer is
still sending the current one.

**Transposer.** It holds the 256 16-bit neurons of a group and sends bit
`in_lsb+p-1`, then the next lower bit, down to `in_lsb`: one beat per cycle,
`p` beats per group. The first beat is tagged `first` and the last `last`.
Each beat also carries the phase's SB row and whether the phase is the first
or the last of its windows. A new group can be loaded in the same cycle the
last beat of the previous one leaves.

**Stalls.** The tiles are starved (*dispatcher stall*) when collecting a group
takes longer than sending the previous one, i.e. when `R > p`, and then for
`R - p` cycles per group. Small precisions with larger strides do this, e.g.
`p = 2` and `S = 2`, where a group can span 3 or more rows. The
dispatcher counts these cycles (`stat_disp_stall`), together with the number
of groups and the largest `R` seen.

## Controller and layer descriptor

`str_controller` stores up to 16 layer descriptors (`layer_cfg_t`) and
4 precision profiles × 16 layers of `p`. `run_go` with `run_nlayers` and
`run_profile` runs the layers in order. For each layer it does three things:

1. pulse `layer_start` with the descriptor and the profile's `p`;
2. wait for the dispatcher to finish;
3. wait for every tile and reducer to drain.

Only then does the next layer start, because it reads what this one wrote.

| field | meaning |
|---|---|
| `nx, ny, ib` | input width, height, depth in bricks |
| `fx_m1, fy_m1, stride` | filter size − 1, stride |
| `ox, oy, nb_out` | output width, height, depth in bricks (= tiles used) |
| `in_base, out_base` | NM brick addresses of the input and output arrays |
| `sb_base` | first SB row of the layer |
| `relu, nsigned` | activation on/off; input neurons signed |
| `in_lsb` | lowest input bit sent (with `p` from the profile) |
| `out_lsb, out_prec` | output precision written by the reducers |

## Top (`stripes_top`) and its interface

All ports are plain signals:

- `nm_wr_*`: host brick writes.
- `nm_rd_*`: host brick reads while idle, with a one-cycle latency.
- `sb_wr_*`: synapse rows per tile.
- `cfg_wr_*`, `prec_wr_*`: descriptors and profiles.
- `run_*`: start and status.
- `stat_*`: counters. The stall, hold and group counters restart at each
  layer.

A beat is delivered only when every tile is ready. Off-chip memory is not part
of the design: the host ports are where it would connect.

## Simulating

All files in `rtl/` are one module or package each. The package
`stripes_pkg` must be compiled first. Each block has a self-checking
testbench `tb/tb_<block>.sv` that prints `TB_RESULT checks=N failures=M` and
has a cycle watchdog. `tb/stripes_ref_pkg.sv` holds the shared reference
arithmetic. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/stripes_pkg.sv tb/stripes_ref_pkg.sv tb/tb_str_tile.sv \
    --top-module tb_str_tile -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_sip` | random signed/unsigned inner products for every `p`, partial-sum chaining, shifter, max and average modes |
| `tb_transposer`, `tb_shuffler` | bit order and `in_lsb`, group capture from random address sets, read count and latency `R` |
| `tb_dispatcher` | every beat of whole layers against a model walk, several strides and precisions; the exact stall count (`R - p` per group spanning `R > p` rows) and unbroken streaming at `S=1, p=8` |
| `tb_str_tile` | full layers against a reference convolution using the phase rule, cycle counts, backpressure |
| `tb_nbout`, `tb_reducer`, `tb_activation_unit`, `tb_synapse_buffer`, `tb_neuron_memory`, `tb_nm_write_arbiter`, `tb_str_controller` | each block against its own model |
| `tb_stripes_top` | 2 tiles, three chained layers (stride 1 and 2, signed and ReLU) run with two precision profiles; checks every output brick and that a dispatcher stall, a tile hold, a bank conflict and a profile switch each happened |
| `tb_stripes_top_full` | the top at its default parameters (16 tiles, 4 MB NM, 2 MB SB per tile): a three-layer network whose first layer has 256 filters, so all 16 tiles work, and whose second layer reads 256 input channels; every output brick is checked under two precision profiles |

The full-size build has 4096 SIPs. Verilator needs about two minutes to
compile it, and the run itself takes seconds.

## Departures from the published architecture, and what is missing

- **Partial-sum alignment** drops `p-1` low bits of each carried partial sum
  (see above). The published text only says that a shifter aligns the partial
  sum and that the amount depends on the precision.
- **Accumulator width** is 32 bits. The published tile speaks of 16-bit
  partial outputs.
- **Pooling layers** are not scheduled. The SIP has the max comparator and
  the accumulate mode, and the activation unit has the scaling shift. The
  bit-parallel 4096-bit/cycle delivery from NM and its control are not built.
- **Fully connected layers** can run only as a convolution with a single
  window, i.e. 1/16 of the window lanes busy. The round-robin synapse loading
  with staggered neuron streams is not built.
- **Local response normalisation** is not built.
- **Padding** must be stored in NM; the descriptor has no padding field.
- **Memories** (NM, SB) are written as synchronous arrays. A real chip would
  use eDRAM macros.
- **Write interconnect** is a per-bank fixed-priority arbiter, a choice of
  this design.
