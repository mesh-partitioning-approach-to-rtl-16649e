# Row-switching-aware data layout: tile address generator, shape search and a compress kernel

In a CMOS memory cell array a word is selected by driving one row select line and one
column select line. The row lines are long and heavily loaded, so a switch from one row to
another costs much more energy than a switch between columns of the same row. If the
accesses an application makes in quick succession land in the same memory row, the row
lines switch less and the memory uses less energy.

The method implemented here (from "Mesh Partitioning Approach to Energy Efficient Data
Layout", S. Hettiaratchi and P. Y. K. Cheung) places a two-dimensional `k x k` array in a
memory of `q` columns by cutting the array's index space into equal rectangles of exactly
`q` elements, `m` wide and `n` tall (`m*n = q`), and storing each rectangle in one memory
row. Which rectangle is best depends on the access pattern. There are only as many
candidates as `q` has divisors (6 for `q = 32`), so all of them are tried and the one with
the fewest row transitions wins. Because the shape of every partition is the same
rectangle, the address generator stays a few divisions, multiplications and additions.

This repository holds synthesizable SystemVerilog for:

* the tile layout **address generator** (`tile_addr_gen`),
* a single-port **memory cell array** (`mem_cell_array`),
* a **row transition counter** that measures the energy metric (`row_transition_counter`),
* a hardware **shape search** that evaluates every rectangle shape on an access stream
  (`layout_shape_search`),
* the **compress kernel** used as the running example (`compress_engine` with
  `compress_datapath`), with its optional **two-register reuse layer** (`reuse_buffer`),
* a top level that wires them together (`mesh_layout_top`).

On the compress kernel with a 32-column memory, the design's 8 x 4 rectangles cut the
row transitions of a 1000 x 1000 array from 2,057,939 (row major) to 839,003. Averaged
over array sides 10 to 1000, the best rectangle saves 58.06% against row major.

## Rectangles, rows and columns: the layout function

Notation: `x` is the column index of the array element and `y` its row index. A shape
`m x n` is `m` elements along `x` and `n` along `y`. So `q x 1` is one line of the array
per memory row (row major when `q` divides `k`), and `1 x q` is a vertical strip.

For an element `(y, x)` of an array of side `k`:

```
by = y / n      oy = y % n          rectangle row, and row inside the rectangle
bx = x / m      ox = x % m          rectangle column, and column inside the rectangle
RW = ceil(k/m)  RH = ceil(k/n)      rectangles across, and down

memory row     = by*RW + bx         rectangles numbered row major
               = bx*RH + by         rectangles numbered column major
memory column  = oy*m + ox          elements row major inside the rectangle
               = ox*n + oy          elements column major inside the rectangle
```

The two orders are independent, which gives four layouts. They all put the same elements
in the same row, so they all give the same row transition count. The choice between them
only affects the address generator, and `tile_addr_gen` takes it as the parameters
`RECT_ORDER` and `ELEM_ORDER`.

With rectangles row major and elements column major, and when `n` and `m` divide `k`, the
flat address `row*q + column` reduces to the closed form

```
addr(y, x) = y*k + x*n - (k-1)*(y mod n)
```

The address generator testbench checks this form.

**Peripheral rectangles.** When `m` or `n` does not divide `k`, the rectangles along the
right and bottom edges are cut short. In this design each of them still gets a memory
row of its own, and it stores its elements row major with the clipped width as the
stride. This follows the method's formulation, in which every partition is one memory
row of at most `q` words. The cost is that some rows are partly empty: the memory needs
`ceil(k/m)*ceil(k/n)` rows, not `ceil(k*k/q)`. For 1000 x 1000 with 8 x 4 rectangles that
is 31,250 rows of 32 words, exactly full. The closed form above holds only where no
rectangle is clipped.

`tile_addr_gen` is combinational. The shape and orders are parameters, because an
address generator is built for one layout. The array side `k_size` is an input up to
`K_MAX`, so one instance serves every array size. All divisions are by constants, and the
two multiplications by `RW` or `RH` are the only run-time products.

## Counting row transitions

`row_transition_counter` remembers the row of the previous access and counts each access
that goes to a different row. The first access after a clear has no predecessor and is
not counted, so `N` accesses give at most `N-1` transitions. This is the energy figure
the method minimises. It is deliberately unweighted: a transition counts the same
whichever two rows it connects and whatever the memory's size.

## Choosing the rectangle: `layout_shape_search`

The search holds one address generator and one row transition counter per divisor of `q`,
all fed the same stream of symbolic accesses `(y, x)`. Candidate `s` has width
`shape_w[s]`. The candidates are ordered from the widest (`q x 1`) to the narrowest
(`1 x q`). After the stream, the candidate with the lowest count wins. On a tie the
earlier candidate wins, so row major beats any other shape. This matches the method's
preference for the simpler address generator. Among other shapes the wider one wins,
which is this design's own rule.

The method builds a weighted "transition mesh" (array elements as points, edge weights =
number of consecutive accesses between two elements) and minimises the weight of edges
cut by the partition. Counting the row changes of the stream directly gives the same
number without storing the mesh, and that is what the hardware does.

Worked example (4 x 4 array, 4 columns, compress accesses, no reuse layer): `4 x 1` gives
15 transitions, `2 x 2` gives 15 and `1 x 4` gives 29, and `4 x 1` is chosen. The shape
search and top-level testbenches reproduce these numbers.

## The compress kernel and its reuse registers

The example application walks the array with two nested loops, `i` and `j` from 1 to
`k-1`, and replaces each element by its prediction error:

```
pred    = 2*a[i-1][j-1] + a[i-1][j] + a[i][j-1]
a[i][j] = a[i][j] - pred
```

`compress_datapath` holds this arithmetic: 16-bit words, wrapping. `compress_engine` is
the loop controller. It issues one access per cycle in program order:

| mode | accesses per iteration | order |
|---|---|---|
| no reuse (`mh_en = 0`) | 5 | read `a[i-1][j-1]`, `a[i-1][j]`, `a[i][j-1]`, `a[i][j]`; write `a[i][j]` |
| reuse (`mh_en = 1`), first iteration of a row | 5 | as above |
| reuse, other iterations | 3 | read `a[i-1][j]`, `a[i][j]`; write `a[i][j]` |

When the 2x2 window moves one step right, `a[i-1][j]` becomes the next upper-left operand
and the freshly written `a[i][j]` becomes the next left operand. `reuse_buffer` keeps
these two words in registers. It is cleared at the start of every array row, where the
window jumps back to the left edge.

The registers do more than save accesses: they change which pairs of elements are
accessed back to back. The best shape therefore moves from 8 x 4 without them to 4 x 8
with them. Run length is `5*(k-1)^2` cycles without the reuse layer and
`(k-1)*(5 + 3*(k-2))` with it.

The memory returns read data one cycle after the request. The engine takes the operand
of the read issued in the previous cycle, so it never stalls.

## Top level: `mesh_layout_top`

```
compress_engine --(y,x)--+--> tile_addr_gen --(row,col)--> mem_cell_array
host port -------(y,x)---+          |
                                    +--> row_transition_counter  (rtc)
engine accesses, or trace port --(y,x)--> layout_shape_search    (cand_rtc[], best_*)
```

| port group | use |
|---|---|
| `start`, `mh_en`, `k_size`, `busy`, `done` | start a kernel run on a `k_size x k_size` array, with or without the reuse layer. `done` pulses at the end. |
| `host_en/we/y/x/wdata`, `host_rdata` | load and read back the array by array index while idle. Read data comes one cycle later. |
| `trace_valid/y/x`, `search_clear` | feed any symbolic access sequence to the shape search while idle. |
| `rtc`, `accesses`, `iterations`, `reuse_hits` | results of the last run. `rtc` counts the real memory's row switches. |
| `cand_rtc`, `cand_w`, `cand_h`, `best_*` | shape search results. A run clears and feeds the search automatically. |

Defaults: `K_MAX = 1000`, `Q = 32`, `W = 16`, `RECT_W x RECT_H = 8 x 4`, rectangles row
major, elements column major, `P = 31250` rows. `k_size` also sets the layout seen by the
host port, so it must stay fixed while an array is held. Host accesses are not counted as
row transitions. The search result is reported, not applied: the built layout is a
parameter, so applying it means rebuilding with the winning `RECT_W`/`RECT_H`.

## How far it can be trusted

Reproduced in simulation:

* The worked example: 29 / 15 / 15 transitions and the row major tie break.
* The compress results for a 32-column memory, averaged over array sides 10 to 1000 in
  steps of 10:

  | comparison | this design | published |
  |---|---|---|
  | best shape against row major | 58.06% fewer row transitions | 58.10% |
  | reuse registers on a row major layout | 3.05% fewer | 3.1% |
  | best shape with the reuse registers against plain row major | 76.52% fewer | 74.9% |

  The last gap comes from which shape is picked at each size: this design picks the best
  shape after the registers are added.

  For a 34-column memory (shapes 34x1, 17x2, 2x17, 1x34) the agreement is looser:

  | comparison | this design | published |
  |---|---|---|
  | best shape against row major | 42.89% | 44.1% |
  | reuse registers on a row major layout | 2.93% | 2.9% |
  | best shape with the reuse registers against plain row major | 70.33% | 67.5% |

  34 has no divisor between 2 and 17, so most array sides leave clipped rectangles. How
  clipped rectangles are stored is where this design is least sure to match the
  published layouts (see "Peripheral rectangles" above).
* Kernel results are bit-exact against a software model at every tested size, including
  1000 x 1000.

Not covered:

* The other kernels the method was evaluated on (convolution, DCT, Gauss-Seidel, lowpass,
  SOR) have no engine here, because their code is not given. Their access traces can be
  fed to the shape search through the trace port.
* A 34-column memory needs `Q = 34` at build time; the top is not built that way by
  default. `tb_compress_sweep_q34` builds and runs it.
* Block select lines of large memories, and the energy of the address generator itself,
  are outside the model.

Own choices, not taken from the method:

* the 16-bit word;
* the one-cycle synchronous read;
* one row per peripheral rectangle, stored row major;
* the access order inside a reuse iteration;
* the shape search as hardware rather than a design-time program;
* the host and trace ports;
* `k_size` as a run-time input.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/layout_pkg.sv tb/tb_mesh_layout_top.sv --top-module tb_mesh_layout_top -o sim
./obj_dir/sim
```

| testbench | what it runs | time |
|---|---|---|
| `tb_tile_addr_gen` | all four orders, clipped rectangles, closed form | < 1 s |
| `tb_mem_cell_array`, `tb_row_transition_counter`, `tb_compress_datapath`, `tb_reuse_buffer` | unit tests | < 1 s |
| `tb_compress_engine` | kernel controller against a memory model, access sequence and cycle counts | < 1 s |
| `tb_layout_shape_search` | worked example; 32-column memory at k = 10, 100; 34-column memory at k = 40 | ~1 s |
| `tb_mesh_layout_top` | end to end, small build (4 columns, 2x2 rectangles); every mechanism exercised and counted | < 1 s |
| `tb_mesh_layout_full` | default build, one 1000 x 1000 array, both modes, full read-back | ~10 s |
| `tb_compress_sweep` | default build, k = 10 ... 1000, both modes, average reductions | ~3 min |
| `tb_compress_sweep_q34` | the same on a 34-column build with 17 x 2 rectangles | ~3 min |

To change the layout, set `RECT_W`, `RECT_H`, `RECT_ORDER` and `ELEM_ORDER` on
`mesh_layout_top`. `RECT_W*RECT_H` must not exceed `Q`, and elaboration stops with an
error if it does. `P` follows automatically.
