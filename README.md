# Streaming 256-bin histogram at 256 pixels per clock

This is the RTL of a histogram accelerator for 8-bit data, such as image pixels. It reads the
data from several off-chip memory banks at full bus width. It counts every byte into one of 256
fixed-width bins, then writes the 256 32-bit counts back to memory. At its default size it
takes four 512-bit words per clock cycle, one from each memory bank. That is 256 pixels, all
counted in the same cycle.

A histogram is hard to speed up because it is a read-modify-write on a small table at a
data-dependent address. Two consecutive pixels can hit the same bin, so the second update must
wait until the first one has written its result. The design removes that dependency instead of
detecting it: every pixel position gets private bin tables, and the private tables are added
together once at the end. For that reason the speed does not depend on the data. A black image
whose pixels all fall in bin 0 runs exactly as fast as random noise.

The structure follows the two-kernel pipeline of an HLS/OpenCL histogram: a reader per memory
port, a pipe per port, and one counting kernel. Everything here is plain synthesizable
SystemVerilog.

## Dataflow

```
 memory bank 0 ──► rdata_kernel ──► pipe_fifo ──┐
 memory bank 1 ──► rdata_kernel ──► pipe_fifo ──┤      hist_kernel
 memory bank 2 ──► rdata_kernel ──► pipe_fifo ──┼──►  512 x bin_bank ──► bin_merge ──► result_copy ──► memory
 memory bank 3 ──► rdata_kernel ──► pipe_fifo ──┘     (256 x 32 bit each)
```

| module | role |
|---|---|
| `hist_top` | Top level. Four readers, four pipes and the kernel. One `start` launches everything. |
| `rdata_kernel` | The *R_Data* reader. It issues burst reads (up to 64 beats) for `num_beats` consecutive 512-bit words and forwards the returned words into its pipe, one per cycle. A full pipe holds `r_ready` low. |
| `pipe_fifo` | The pipe: a 16-deep blocking FIFO of 512-bit words. |
| `hist_kernel` | The *Hist* kernel. It controls the phases, pops the pipes, hands vectors to the hardware threads, then merges the tables and starts the copy. |
| `bin_bank` | One hardware thread's bin table: 256 x 32-bit block RAM with a two-cycle read-modify-write. |
| `bin_merge` | Adds bin *i* of all 512 tables, one bin per cycle. |
| `result_copy` | Packs 16 counts per 512-bit word and writes the histogram as an `int[256]` array at `res_base`. |
| `hist_pkg` | Shared sizes and the kernel-phase enum `hist_state_e`. |

## Why one table is not enough: the initiation interval

A bin update in `bin_bank` takes two cycles. In the first, the RAM reads the addressed counter
(R_BRAM). In the second, the value read is incremented and written back (INC/W_BRAM). A
following update may read the RAM only after that write, because it may address the same bin.
A single table can therefore accept one pixel every **other** cycle: its initiation interval
(II) is 2. The bank does not forward the write to the next read. An assertion in `bin_bank`
fires if two updates arrive on consecutive cycles.

The kernel reaches one pixel per cycle per pixel position by giving each position
`THREADS = 2` tables. Successive vectors alternate between them: vector 0 goes to thread 0,
vector 1 to thread 1, vector 2 to thread 0 again, and so on. A pipe stall only delays the
alternation, so each table still sees at most one update every two cycles. The tables are
disjoint, so the updates of different threads and different pixel positions never conflict.

At the defaults this gives 4 ports x 64 pixel positions x 2 threads = **512 bin tables**, each
256 x 32 bits: 4 Mbit of on-chip RAM in total. A `bin_bank` has one read port and one write
port, so it maps to a simple dual-port block RAM (one 18 Kb RAM on a Xilinx FPGA).

Setting `THREADS = 1` gives the single-table kernel. It then takes a vector only every other
cycle, at half the rate.

## Phases of a run

`hist_kernel` steps through `hist_state_e`:

1. **CLEAR** (256 cycles). Every table writes zero into bin `clr_cnt`. The readers are already
   running, so the pipes fill meanwhile and then hold the memory off.
2. **ACCUM** (`num_beats` cycles if nothing stalls). The kernel pops one vector from *every*
   pipe in the same cycle, or from none. This is lock-step, like a single loop reading all
   pipes. The vectors are registered (the R_pipe stage), and the next cycle each byte `l` of
   pipe `p` updates table `(p, l, thread)`.
3. **DRAIN** (1 cycle). The last write-backs land, and `result_copy` is armed.
4. **MERGE** (about 256 cycles). The kernel reads bin *i* of all 512 tables at once. The next
   cycle `bin_merge` sums them through an adder tree into its output register. `result_copy`
   collects 16 sums per bus word and writes each full word. Backpressure on the write channel
   stalls the reads: the RAM outputs hold while `rd_en` is low.
5. **DONE** (1 cycle). `done` pulses, and the kernel returns to IDLE.

With memory and the write channel never stalling, one run takes
`256 + num_beats + 256 + 8` cycles. The 33,554,432-pixel data set (131,072 beats per port)
takes 131,592 cycles. At 190 MHz that is 0.69 ms, or 48 G bin updates per second, and the
update rate is the same for random data and for a black image. A real DDR system delivers
somewhat less than four 64-byte words per cycle, and the rate then follows the memory. The
published measurement for such a four-bank board is 0.75 ms for the counting kernel, or
38.6 G updates/s end to end.

## Interfaces and timing

`hist_top` ports, all synchronous to `clk`, with an asynchronous active-low `rst_n`:

* **Control.** `start` is a one-cycle pulse, taken while `busy` is low. It samples `rd_base[p]`
  (byte address of bank *p*'s data, preferably 64-byte aligned), `num_beats` (512-bit words per
  bank, the same for every bank) and `res_base` (byte address of the `int[256]` result).
  `done` pulses when the last result word has been accepted. `state` shows the kernel phase.
* **Read ports** (one per bank), AXI-like. The read-address channel is `ar_valid/ar_ready`,
  `ar_addr` and `ar_len` (beats - 1, bursts of at most `MAX_BURST`). Read data returns in order
  on `r_valid/r_ready/r_data`. A request stays stable until it is accepted (asserted). The data
  is taken as little-endian: byte *b* of a beat is the pixel at address `ar_addr + 64*k + b`.
* **Write port.** `wr_valid/wr_ready/wr_addr/wr_data`, one full 512-bit word per transfer.
  Word *k* holds bins 16k ... 16k+15, and bin *i* sits in bits `32*(i%16) +: 32`.

Every handshake moves data on a clock edge where valid and ready are both high. Each block's
header comment gives its own timing.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_PORTS` | 4 | memory banks, readers and pipes |
| `BUS_W` | 512 | bus word (an int16 vector); `BUS_W/PIX_W` pixel positions per port |
| `PIX_W` | 8 | pixel width; the pixel value is the bin index |
| `THREADS` | 2 | bin tables per pixel position (must be at least the RAM's II of 2 for full rate) |
| `BIN_SIZE` | 256 | bins |
| `BIN_SHIFT` | 0 | bins are 2^`BIN_SHIFT` pixel values wide; the bin index is `pixel >> BIN_SHIFT` |
| `COUNT_W` | 32 | counter width; a run may add at most 2^32-1 to a bin |
| `ADDR_W`, `LEN_W`, `BEATS_W` | 64, 8, 32 | address, burst-length and beat-count widths |
| `PIPE_DEPTH` | 16 | pipe depth |
| `MAX_BURST` | 64 | longest read burst in beats (4 KiB) |

The number of bin tables, and so the RAM use, grows as `NUM_PORTS * BUS_W/PIX_W * THREADS`.
The merge adder tree has that many inputs.

## What is taken from the published design, and what is this implementation's own choice

Taken from the design: the reader/pipe/counter split with one reader and pipe per memory bank;
512-bit (int16) reads on four ports; 8-bit pixels as bin indices into 256 bins of 32-bit
counters; the two-cycle read-modify-write of a bin table; two private tables per pixel stream to
hide it; the final bin-by-bin sum of the private tables; and the copy of the result to memory.

Chosen here, where the published description stops at the kernel level:

* Valid/ready handshakes, an AXI-like read port with 64-beat bursts, and a combined
  address/data write channel.
* Every byte of a 512-bit word is one pixel, so four ports give 256 pixels per cycle. The
  published text sizes the word as sixteen 32-bit ints, and it also states a rate of 256 items
  per cycle and gives run times that only fit one-byte items.
* A pipe depth of 16.
* An asynchronous active-low reset.
* Clearing the tables with a 256-cycle loop at the start of every run.
* The number of tables in the vector design, 2 per pixel position (512 in all). The published
  text only says that the vector kernel uses "more hardware threads" in the same way as the
  two-table kernel.
* Reading all pipes in lock step, with equal data per bank.
* The merge as one combinational adder tree and one register. It has about 9 adder levels of
  32 bits, and at several hundred MHz it will want pipelining.
* Packing the result into full bus words.

Other limits:

* Only fixed-width bins are built. By default the bin index is the pixel value (256 bins of
  width one). `BIN_SHIFT = 2` with `BIN_SIZE = 64` gives 64 bins of width four, with the index
  computed by `hist_pkg::find_index`. Variable-width bins would need a search in front of the
  tables and are not built.
* The published baselines are not built as separate designs. They are the unoptimised kernel
  and the single-port or scalar variants. `THREADS = 1` and smaller `NUM_PORTS` or `BUS_W`
  reproduce their structure.
* The memory banks, their controllers and the host are outside the RTL.

## Verification

Each block has a self-checking testbench in `tb/`. It prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

| testbench | what it checks |
|---|---|
| `tb_pipe_fifo` | order, full/empty flags and level under random traffic; one-cycle latency |
| `tb_bin_bank` | counts after random updates at the maximum legal rate, including repeated bins (the read-after-write case); clearing; read-port hold |
| `tb_bin_merge` | 512-input sums with input gaps and output backpressure; one bin per cycle |
| `tb_result_copy` | memory image of the result, alignment, one `done`; 257 cycles for 256 bins |
| `tb_rdata_kernel` | data and order against a memory model with stalls and a stalling sink; burst limit; one beat per cycle when nothing stalls |
| `tb_hist_kernel` | full histograms for uniform, dark and constant data; clearing between runs; `512 + num_beats + 8` cycles |
| `tb_hist_top` | end to end at the default size, with stalling memories and write channel. It counts lock-step stalls on an empty pipe, full-pipe backpressure into memory, memory stalls, split bursts, the use of each thread, write stalls, and the clear and merge phases, and fails if any of them never happened. |
| `tb_hist_full` | the default design on the full 33,554,432-pixel data set, once random and once a dark image; every bin and the cycle count (about 8 s of simulation) |

`tb_hist_boards` runs the same random data set on a one-port and a two-port build side by side
(through the helper `tb_hist_run`). They need 524,808 and 262,664 cycles, 64 and 128 pixels
per cycle. A third build counts 1,048,576 pixels into 64 bins of width four. A fourth build has
`THREADS = 1` and must take two cycles per vector: 33,287 cycles for 1,048,576 pixels on one
port.

`tb/ddr_model.sv` is a behavioural model of one memory bank's read side. It is not
synthesizable. It queues burst requests and returns one word per cycle, with random stalls, and
computes every byte from its address with a hash (`tb/tb_data_pkg.sv`). The testbenches can
therefore compute the expected histogram on their own, without storing the image.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_hist_top \
    rtl/hist_pkg.sv tb/tb_data_pkg.sv tb/tb_hist_top.sv
./obj_dir/Vtb_hist_top
```

The two packages are named first. Verilator finds the modules by file name in `rtl/` and `tb/`.
Any other testbench runs the same way with its own name.
