# Circular pattern recognition for binary edge images, coarse to fine

This RTL finds the best circle in a binary edge image of up to 256 x 256
pixels, such as the outline of a watermelon among leaves and stalks seen by a
harvesting robot. It returns the circle's centre (p, q), its radius r and
how well the circle is supported by black pixels. The design follows a
published FPGA design for a PCI board with two external SRAMs.

The basic method is a radius histogram. Take a candidate centre and sort
every pixel of the image by its rounded distance from that centre. For each
radius, count the black pixels and all the pixels. The ratio is the
*matching degree to a circle* (MDC). The circle is the centre and radius
with the highest ratio. Trying every pixel as a centre at full resolution
costs 2^32 pixel visits. So the search runs coarse to fine. It finds the
best centre on a 32 x 32 reduction of the image, then refines it at 64, 128
and 256 pixels, each time trying only the doubled centre and its 8
neighbours.

## The search in detail

**Distance and histograms.** For a candidate centre (p, q) and a pixel
(x, y), the radius is

    r = floor( sqrt((p-x)^2 + (q-y)^2) + 0.5 )

For each r in the searched range, the histogram generator counts

* `N_r`: the image pixels at distance r. Pixels outside the image do not
  count, so `N_r` is smaller for centres near the border.
* `n_r`: the black pixels among them.

`MDC_r = n_r / N_r`. A one-pixel ring drawn exactly at radius r gives 1.0.

**Radius range.** At 32 x 32 the radii searched are 5 to 15. The range
doubles at each finer level: 10-30 at 64, 20-60 at 128 and 40-120 at 256.
So the smallest circle found at full size has a radius of about 40 pixels,
and the largest one 120.

**Coarsening.** A level is half the size of the level above it. Each 2 x 2
square of the finer image becomes one pixel, which is black if any of the
four is black. An edge drawn one pixel wide therefore stays connected.

**Search sequence** (`LEVELS` = 3, a 256 x 256 input):

1. Coarsen 256 -> 128 -> 64 -> 32.
2. Global search: every one of the 32 x 32 pixels is a candidate, scanned
   row by row (q outer, p inner).
3. Check the level's best MDC. If it is below 0.5, stop and report this
   level's best. Otherwise go one level finer. The candidates there are
   (2p, 2q) and its 8 neighbours, scanned row by row. Candidates outside
   the image are skipped.
4. Step 3 repeats until the 256 x 256 level has been searched. Its best
   centre and radius are the result.

**Keeping the maximum.** The MDC calculator never divides. It compares
`n/N > n_best/N_best` as `n * N_best > n_best * N`. Ties keep the earlier
candidate: the smaller radius, then the earlier position in the scan order.
A radius with no black pixels never becomes the best. The 0.5 threshold is
tested as `2*n >= N`.

**Reading the result.** The host gets p, q, r, n and N. A run that reached
full resolution has `2*n >= N`. A run that stopped early has `2*n < N`, and
its p, q, r are in the units of the level where it stopped. Nothing else
marks a failed recognition.

## Data in the SRAMs

The two 8-bit SRAMs share one address and are used as a single memory of
16-bit words. SRAM1 holds bits 7:0 and SRAM2 holds bits 15:8. Images are
stored row by row, 16 pixels per word. Pixel x of a row is bit x % 16 of
word x / 16, and 1 means black. `cpr_pkg` computes every region below from
`LEVELS`.

| words        | contents (LEVELS = 3)                   |
|--------------|-----------------------------------------|
| 0 - 4095     | 256 x 256 input image, written by the host |
| 4096 - 5119  | 128 x 128 coarse copy                    |
| 5120 - 5375  | 64 x 64 coarse copy                      |
| 5376 - 5439  | 32 x 32 coarse copy                      |
| 5440 - 5567  | n_r table, indexed by r                  |
| 5568 - 5695  | N_r table, indexed by r                  |

The histogram tables live in the SRAM, not in the FPGA. That costs SRAM
accesses but no on-chip RAM.

## Host view (PCI9052 local bus)

The FPGA looks like 15-bit word-addressed memory:

| address        | access                                                        |
|----------------|---------------------------------------------------------------|
| 0 - 13842      | SRAM (image and work area)                                    |
| 13843          | resets the recognition circuit; reads 0x1111                   |
| 13844          | starts the recognition circuit; reads 0x2222                   |
| 13845          | N (N_r at the found radius)                                    |
| 13846          | n (n_r at the found radius)                                    |
| 13847          | r                                                              |
| 13848          | q                                                              |
| 13849          | p                                                              |
| 13850          | out_ena: 1 when the result is valid                            |

A run:

1. Write the 4096 image words.
2. Access 13843 to reset the circuit.
3. Access 13844 to start it.
4. Poll 13850 until it reads 1.
5. Read 13845-13849.

The start is a level. It stays set until the next reset access, and the
result holds until then. The host may read or write the SRAM while the
circuit runs. The SRAM selector serves the two sides in turn when both are
waiting, so the host's access takes a few cycles longer.

**Bus handshake.** The bus master holds `local_rd` or `local_wr`, with
`local_addr` and `local_wdata`, until `local_ready` is high for one cycle.
It drops the request after that cycle. Read data is valid with
`local_ready`, and `local_rdata_oe` is high at the same time. The bus is
sampled on the 16.5 MHz `local_clk` that the FPGA brings out. A write to a
register address acts like a read. Addresses above 13850 read 0. The PCI9052
bridge's real local-bus timing is not modelled; a small glue layer would
adapt it.

## Hardware structure

```
cpr_fpga_top
├── local_clock_gen        33 MHz PCI clock / 2 -> 16.5 MHz circuit clock
├── interface_block        address decoder, selector 1, output mux, data selector
│   └── sram_selector      "selector 2": SRAM pins <- host or recognition circuit
└── recognition_circuit    controller + shared memory port
    ├── coarsening_block
    ├── histogram_gen
    └── mdc_calc
cpr_pkg                    types, address map, image placement, rounded sqrt
```

**Internal memory port** (`mem_req_t` / `mem_rsp_t` in `cpr_pkg`). The
requester drives `re` or `we`, `addr` and `wdata` and holds them until
`ack` is high for one cycle. On a read, `rdata` is valid in that cycle.
`sram_selector` answers every access in two cycles. It registers the SRAM
pins in the first cycle and returns the data with `ack` in the second. The
enables then drop while the address and data stay, so every write ends with
stable address and data. At 16.5 MHz that is 60 ns per access, against the
SRAMs' 7.5 ns access time.

The controller starts one sub-block at a time with a one-cycle start pulse,
waits for its one-cycle `done`, and connects the memory port to the busy
block.

**Per-block cost**, with two-cycle memory accesses:

| block | work | cycles |
|-------|------|--------|
| `coarsening_block` | per 16 output pixels: 4 reads, OR in pairs, 1 write | `10 * words_out + 1` per pass |
| `histogram_gen` | clear the range, then scan all S x S pixels. 1 cycle per pixel, one read per 16 pixels, a read-modify-write of N_r per in-range pixel and of n_r per black in-range pixel | `2*(2R + W + 2I + 2B) + S*S + 1` |
| `mdc_calc` | per radius: 2 reads and 1 compare | `5R + 1` |

In the histogram formula, R is the number of radii, W the number of image
words, I the in-range pixels and B the black in-range pixels.

The rounded square root (`cpr_pkg::round_sqrt`) is a combinational
digit-by-digit integer root. It adds one when the remainder `v - s*s`
exceeds `s`, which is exactly `v >= (s + 0.5)^2` for integers. It sits in
the one-cycle-per-pixel path of `histogram_gen`. This is the longest
combinational path of the design: a 10-step root after two squarers.

## Performance

One full-size run is measured in `tb_cpr_fpga_top`. The image is a
one-pixel ring of radius 56 at (195, 172) with three clutter lines. The
circuit finds (195, 172), r = 56, n = N = 340. It takes 5,449,072 cycles
from start to result, 330 ms at 16.5 MHz. The published circuit reports the
same centre and radius on a real field image, with 21,672,490 steps through
its interface and 9,326,045 without. Most of the time goes into the global
search: 1024 candidates x 1024 pixels. A clutter-only image stops after the
64 x 64 level, after about 3.1 million cycles.

## Where this RTL departs from or adds to the published design

* The published description gives the algorithm, the block diagram and the
  host address map. The following are this design's own:
  * the schedules inside each block
  * the memory port protocol and the word packing
  * the SRAM placement of the coarse images and the histograms
  * the arbitration between host and circuit
  * the local-bus handshake
* The radius range beyond 32 x 32 (doubling per level) is inferred. Only the
  5-15 range at 32 x 32 is shown.
* The order of the outputs at 13845-13850 (N, n, r, q, p, out_ena) follows
  the order of the output multiplexer's inputs in the block diagram.
* Stopping on MDC < 0.5 and reporting that level's values is this design's
  rule. The published algorithm describes only the success path.
* The published sources disagree on which of n_r and N_r is the black count.
  This RTL uses n_r = black, N_r = all pixels, so MDC is at most 1.
* Bidirectional pins are split into in, out and drive enable. A `sys_rst`
  board reset is added.
* Every candidate scans the whole image. There is no window around the
  candidate.
* Cycle counts differ from the published ones. The microarchitecture is not
  the same.

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cpr_pkg.sv tb/cpr_ref_pkg.sv rtl/*.sv tb/tb_async_sram.sv \
  tb/tb_cpr_fpga_top.sv --top-module tb_cpr_fpga_top -o sim
./obj_dir/sim
```

Use the same pattern for the other testbenches. Add `tb/tb_mem_model.sv` for
the block testbenches that use it.

| testbench | what it shows |
|-----------|---------------|
| `tb_cpr_fpga_top` | Full size (defaults), two operations: ring plus clutter, then clutter only. Runs through the local bus and SRAM models and checks against the software reference `cpr_ref_pkg`. Counts coarsening passes, global and local candidates, register reads, host SRAM reads during a run, a host access that waited, and a stop on MDC < 0.5. About 15 s. |
| `tb_recognition_circuit` | The whole search at 128 x 128 (LEVELS = 2) on a memory model. One image reaches full resolution; one stops early. Two more instances run 32 x 32 (LEVELS = 0, global search only) and 64 x 64 (LEVELS = 1) ring images. |
| `tb_coarsening_block` | Two passes, 128 -> 64 -> 32, word by word against the reference, plus the cycle count. |
| `tb_histogram_gen` | n_r / N_r tables for centres at corners, edges and random points at two levels, plus the cycle formula above. |
| `tb_mdc_calc` | Running maximum against real-valued division, the 0.5 flag, clear, and the cycle count. |
| `tb_sram_selector` | Two random requesters with contention, byte lanes, the two-cycle access, and alternation. |
| `tb_interface_block` | Reset and enable words, the output map, and SRAM paths from both sides. |
| `tb_local_clock_gen` | Divide by two, 50 % duty cycle, and reset. |

`cpr_ref_pkg` is an independent software model. It uses real-valued square
roots and plain bit arrays, and the testbenches compare against it.
`tb_async_sram` models one SRAM: reads are combinational, and a write
happens on the falling edge of write enable. `tb_mem_model` is a two-cycle
word memory for the block tests.

To change the image size, set `LEVELS` (0 to 3) on `cpr_fpga_top`: the
input side is `32 << LEVELS`. Everything else derives from it. With
`LEVELS` = 0 there is no coarsening and no local search. `LEVELS` = 4 (512 x 512)
would need 21,824 image words, which no longer fits below the register
addresses. The default is 3.
