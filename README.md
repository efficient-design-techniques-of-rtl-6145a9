# Switch buffering for optical data centres, and a streamline CNN accelerator

This repository holds two independent hardware designs. They are placed side by side in one
top module (`design_top`) and share only the clock and reset.

1. **ToR switch upstream path (`tor_south_extension`).** A top-of-rack switch in an optically
   switched data centre collects Ethernet frames from its servers. It may send them only in its
   TDMA time slots, each slot to one destination rack. Frames must be held per destination until
   that destination's slot comes. A full set of virtual output queues (VOQs), one per
   destination (up to 2048), would be far too large. The design instead keeps only **K = 4
   active destination queues** on chip, and lends them to whichever destinations are receiving
   traffic right now. Each queue collects frames into large bursts. The bursts are written into
   a **paged shared buffer**, where every destination owns a linked list of pages. At each slot
   of the schedule, one page of the slot's destination is read out.
2. **Vessel-detection CNN accelerator (`cnn_accelerator`).** It decides whether an 80x80 RGB
   patch of a satellite image contains a ship. All layers of a small CNN exist in hardware at
   once, as a pipeline of layer modules ("streamline" architecture). It uses fixed-point
   arithmetic and on-chip memory only.

Everything is synthesizable SystemVerilog, on a single clock, with an active-low asynchronous
reset.

---

## Part 1 — the ToR switch upstream path

```
 64-bit frames ─► mac_id_lut ─► voq_controller ──bursts──► shared_buffer ──pages──► m_* (512-bit)
 (s_*)          MAC → 11-bit   2 input queues,              Memory Map, page lists,
                tag            BRAM, K active               Unused Pages, Write/Read
                               queues, packers              FSMs, Lock, memory
 schedule words ─► command_interpreter ──"read head page of destination d"──┘
 (rx_*)            80-slot table, slot timer  ─► slot_start / slot / vlan / wavelength
```

### Tagging (`mac_id_lut`)
The destination MAC address of a frame (bytes 0..5 of its first beat) is looked up in a
2048-entry table. The control side writes the table through `cfg_*`, and the entry index *is*
the 11-bit destination tag. A frame whose MAC is not in the table gets tag 0 and raises `miss`
for one cycle. The tag stays with every beat of the frame.

### Queue assignment (`voq_controller`) — the core idea
Frames alternate between two **input frame queues** (odd/even). Each queue has a side FIFO of
tags ("IP ID") and of frame lengths in beats ("SIZE"). A dispatcher serves the two queues in
turn. For the frame at the head, it uses the tag to address a 2048-entry **BRAM** holding
`{flag, queue id}`:

* **flag = 1**: the destination already owns an active queue, so the frame goes there.
* **flag = 0**: a queue id is taken from the **Empty Queues** FIFO. It is written into the BRAM
  with flag 1, and the tag is written into the **Queue-ID Memory** (queue → tag, needed on
  release). The look-up is then repeated, and now hits.
* **No free queue**: the dispatcher stalls (`stall`). It goes back to its idle state so that
  pending releases can run and free a queue.

A frame moves one 64-bit beat per cycle into its queue's **packer**, which builds 512-bit
words. A frame's partial last beat is already padded with 0xFF bytes when it enters the input
queue. A queue asks for a **burst** to the buffer in two cases:

* it holds `BURST_WORDS` (64) words;
* no frame has arrived for `FLUSH_CYCLES` (1024) cycles. This flush timer stands in for the
  burst time window of the original scheme.

The unused 64-bit lanes of a partial packer word are filled with 0xFF. When the burst has been
written and the queue is empty, the queue is **released**: its BRAM entry is cleared, and its id
goes back to Empty Queues. A frame enters a queue only if the whole frame fits
(`need_room`). Otherwise the dispatcher waits.

The burst request carries the queue, the destination tag, the number of 512-bit words, and the
number of useful 8-byte beats. The buffer then pops the words straight out of the queue
(`wq_sel/wq_pop/wq_data`).

### Paged shared buffer (`shared_buffer`, `shared_memory`, `lock_arbiter`)
The buffer is a single-port memory of `PAGES` (64) pages, each `PAGE_WORDS` (256) words of 512
bits. The **Memory Map** keeps these fields per destination tag:

* valid
* first page (being read)
* last page (being written)
* writing position
* reading position
* useful size in beats
* size in words

Per page it keeps the next page of the list, the words written, and the useful beats. Free
pages wait in the **Unused Pages** FIFO.

* **Write FSM**: stores a burst one word per cycle at the writing position of the
  destination's last page. When the destination has no page, or its last page is full, it takes
  a page from Unused Pages and links it behind the last page. If no page is free, it waits
  (`no_page`), and the VOQ controller backs up into the input.
* **Read FSM**: a command names a destination and reads its **first page** from the reading
  position on, one word per cycle. The word that reaches the page's written count closes the
  page:
  * `m_last` is raised, and `m_useful` gives the page's useful beats;
  * the page goes back to Unused Pages, and the list advances (or becomes empty).

  A destination with no data answers with a one-cycle `slot_empty`. A head page that is still
  being filled is read up to what it holds and then closed, so the next burst opens a new page.
* **Lock**: the memory port belongs to writing or to reading in windows of `T_L` (64) cycles.
  At the end of a window, the port passes to the other side if that side is waiting. It passes
  at once if the owner is idle. Only the owner of the port touches the Memory Map, so a list
  can be written and read in alternate windows without conflict. Reading positions are stored,
  so a page read that a write window interrupts resumes where it stopped.

Burst padding stays in the page: a page is a sequence of 512-bit words in which all-0xFF 64-bit
beats are filler. `m_useful` counts the beats that are not filler.

### Schedule (`command_interpreter`)
The host sends the TDMA schedule as 32-bit words, most significant byte first. The interpreter
swaps the byte order and decodes `{timeslot[6:0], destination[10:0], vlan[5:0],
wavelength[7:0]}`. It stores up to 80 entries indexed by timeslot. `rx_last` closes the table.
The period is the highest timeslot plus one, and execution restarts at slot 0. Every
`SLOT_CYCLES` (2048) cycles, a slot begins: `slot_start` pulses, `slot`, `vlan` and
`wavelength` show the entry, and a read command for the slot's destination goes to the Read
FSM. Slots without an entry stay idle.

### Where this part departs from the original description
* **One clock.** The original runs the input side at 156 MHz and the rest at 200 MHz. No clock
  crossing is built.
* **Memory.** The buffer memory is an on-chip array (8 Mbit at the defaults) instead of an
  external DDR3 DRAM with its controller. Page size and page count are not given in the
  original, so 256 words and 64 pages are choices.
* **Useful size granularity.** Useful size is kept in 8-byte beats, not bytes, because a
  frame's tail beat is padded. It is kept in the Memory Map only; the original also writes it
  into a page header.
* **Queue assignment takes two extra cycles.** In the original, the BRAM output and the head
  of Empty Queues are read in the same cycle, and a multiplexer picks one of them. Here, a miss
  first writes the BRAM and then repeats the look-up. Frames to a destination that already has a
  queue are not affected.
* **Queue sizes.** Active queues hold two bursts (128 words) rather than one, so that a
  maximum-size frame fits behind a nearly complete burst.
* **Frame padding.** Every frame's partial tail beat is padded with 0xFF, as well as the last
  word of each burst. The original mentions only the burst padding.
* **Choices where the original gives no rule:**
  * the flush timer;
  * the table-miss rule (tag 0);
  * the schedule word layout and the slot length;
  * the lock's early hand-over when the owner is idle.
* **Not built:** the north-side TDMA framing, buffer status reporting, the Ethernet switch and
  the vendor cores (10G MAC, PCIe DMA, DRAM controller). Their signals are the ports of
  `tor_south_extension`.

---

## Part 2 — the vessel-detection CNN

### Network and data flow
```
80x80x3 ─► conv1 5x5x3, 32 filters, ReLU ─► maxpool 4 ─► conv2 4x4x32, 32 filters, ReLU ─► maxpool 4 ─► FC 512→128, ReLU ─► output 128→2
           (76x76x32)                     (19x19x32)    (16x16x32)                       (4x4x32)
```

The layers are chained as follows:

* **Input / first convolution (`conv1_layer`).** The image sits in three row-organised RAMs,
  one per colour channel. Each feeds a **window generator**. Its loader FSM fills one of two
  sets of 5 row shift registers while the other set shifts out one 5x5 window per cycle.
  The three channel windows go to three **convolution blocks** (`conv_block`), each with 25
  multipliers, a weight ROM for the 32 filters, and a pipelined adder tree. Their sums are
  added, the filter bias is added, and ReLU is applied.
  The layer computes **one filter at a time** over the whole image: 32 passes of 76x76
  windows, one result per cycle.
* **First pooling (`pooling_block`).** Results arrive map by map in raster order. A row FSM
  takes the max of every 4 values into one of 4 FIFOs (one per row of the 4x4 pool). When all
  FIFOs hold a value, a column stage takes the max across them. No map is ever buffered
  whole.
* **Second input layer (`feature_map_input`).** It collects each pooled row (19 values) and
  writes it into a two-bank feature-map RAM. When a 19x19 map is complete, it starts a 4x4
  window generator on that bank while the next map fills the other bank.
* **Second convolution (`conv2_layer`).** 32 convolution blocks, one per output filter, see the
  same window of input map *m*. Each block adds its result into its own 16x16 accumulator RAM:
  map 0 writes, maps 1..31 add. When the last map is done, the RAMs are read out filter by
  filter, adding the bias and applying ReLU. This is the 32-to-1 multiplexer of the original
  architecture.
* **Second pooling**: the same `pooling_block`, for 16-wide maps. It yields the 512 flattened
  values in filter-major order.
* **Fully connected (`fc_layer`).** 128 **vector multipliers** run in parallel. Each holds its
  512 weights in a ROM and accumulates one product per input value as the values arrive.
  A clock enable stops them between images. Each neuron then adds its bias, and ReLU follows.
* **Output (`output_block`).** 128 multipliers and an adder tree compute one class per cycle,
  with the class weights and biases from ROMs. `is_ship` is `score[1] > score[0]`.

### Arithmetic
| quantity | format |
|---|---|
| pixels | 8-bit unsigned |
| weights and biases | Q2.6, 8-bit signed |
| feature values, sums, scores | Q11.6, 17-bit signed (`cnn_pkg::act_t`) |

A conv1 product (pixel x weight) already has 6 fractional bits and is used as is. Every other
product (Q11.6 x Q2.6) is arithmetically shifted right by 6, which truncates back to Q11.6.
Sums wrap at 17 bits: there is no saturation.

**Weights.** No trained model is included. Every ROM is filled at elaboration from
`cnn_pkg::cnn_weight(table, a, b, c)`, an integer hash whose result is mapped to
{-4..4}/64. To load real weights, replace that one function, for example with a
`$readmemh` of a small table or a case statement. Keep the index meaning each ROM uses (see
the ROM comments in each module).

### Timing
The first convolution layer sets the pace: 32 x 76 x 76 = 184,832 cycles of one window per
cycle. Image processing ends with these phases:

* the last map's trip through the second layer;
* the 8,192-cycle readout of the accumulator RAMs;
* the pipeline tails.

In simulation this gives **193,331 cycles from `start` to `done`**, or 0.716 ms at 270 MHz. The
original reports 0.687 ms at 270 MHz, about 185,500 cycles. The difference is the readout of
the accumulator RAMs, which this implementation does not overlap with other work. Only one
image is processed at a time.

### Where this part departs from the original description
* Weights are synthetic (see above).
* The accumulator RAM width. The original describes the RAMs once as holding 13-bit values and
  elsewhere states that results are Q11.6. This design uses 17-bit (Q11.6) words throughout.
* Clock gating of the vector multipliers is a clock enable, not a gated clock.
* The original notes that the accelerator can be set up to hold two images at once: the FC
  layer finishes one image while the convolution layers start the next. That option is not
  built. A new `start` is accepted only after `done`.

---

## Files

| file | contents |
|---|---|
| `rtl/design_top.sv` | both designs side by side |
| `rtl/tor_south_extension.sv` | ToR switch upstream path |
| `rtl/mac_id_lut.sv` | MAC → tag table |
| `rtl/voq_controller.sv` | input queues, BRAM, Empty Queues, active queues, bursts |
| `rtl/sync_fifo.sv` | first-word-fall-through FIFO used by the VOQ controller |
| `rtl/shared_buffer.sv` | Memory Map, page lists, Write/Read FSMs |
| `rtl/shared_memory.sv` | single-port page memory |
| `rtl/lock_arbiter.sv` | write/read windows |
| `rtl/command_interpreter.sv` | schedule table and slot timer |
| `rtl/cnn_pkg.sv` | number formats, weight function |
| `rtl/cnn_accelerator.sv` | CNN chain |
| `rtl/conv1_layer.sv`, `conv2_layer.sv`, `feature_map_input.sv`, `fc_layer.sv` | layers |
| `rtl/window_generator.sv`, `conv_block.sv`, `pooling_block.sv`, `vector_multiplier.sv`, `output_block.sv`, `relu.sv` | building blocks |
| `tb/tb_tor_south_extension.sv` | switch path test at reduced sizes |
| `tb/tb_cnn_accelerator.sv` | CNN test with a bit-accurate reference model, full size |
| `tb/tb_design_top.sv` | both designs at full default size |

Each file starts with a comment giving its function, interface, timing, and which parts are
design choices.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=<n> failures=<n>`. Each has a
watchdog.

* **`tb_cnn_accelerator`** (full size, two images) computes every layer independently in a
  behavioural reference model, using the same weight function and the same fixed-point rules.
  It compares these values against the hardware:
  * every value leaving conv1, the first pooling layer, conv2 and the FC layer;
  * both scores and the decision;
  * the start-to-done cycle count.
* **`tb_tor_south_extension`** runs at reduced sizes: 16 pages of 32 words, 8-word bursts,
  16-cycle lock windows, 700-cycle slots. Seven destinations share the 4 queues; one is
  reachable only through a table miss. Traffic starts before the schedule exists, so the pages
  run out. The page stream is attributed to each slot's destination. After dropping the filler
  beats, it must equal, in order, the beats sent to that destination. The testbench also checks:
  * page useful sizes;
  * slot VLAN and wavelength;
  * total volume per destination;
  * the return of every page;
  * that no contested lock window exceeds `T_L`.

  Each mechanism must occur at least once:
  * queue assignment and release;
  * stall for lack of a queue;
  * timer flush and full burst;
  * page allocation and running out of pages;
  * lock hand-over;
  * empty slot;
  * table miss.
* **`tb_design_top`** runs both designs together with every parameter at its default. It
  repeats the switch checks above at full size (2048-entry table, 64 x 256-word pages, 2048-cycle
  slots). The CNN classifies one image twice, and the testbench checks:
  * the exact number of values leaving every layer;
  * identical results and cycle counts for both runs;
  * a latency between 184,832 cycles and 110% of the original's figure.

  The run simulates about 390,000 cycles.

Simulate with Verilator 5, for example:

```sh
verilator --binary --timing -Wno-fatal rtl/cnn_pkg.sv rtl/*.sv tb/tb_design_top.sv \
          --top-module tb_design_top -Mdir obj && ./obj/Vtb_design_top
```

(`rtl/cnn_pkg.sv` must come first; listing it twice is harmless in Verilator, otherwise list the
other `rtl/` files explicitly.) The same command with `tb_cnn_accelerator` or
`tb_tor_south_extension` runs the other tests. Each takes seconds to build and to run.

## Parameters worth changing
* `voq_controller`: `K` (active queues), `BURST_WORDS`, `FLUSH_CYCLES`.
* `shared_buffer`: `PAGES` (a power of two), `PAGE_WORDS`, `T_L`.
* `command_interpreter`: `SLOTS`, `SLOT_CYCLES`.
* `mac_id_lut`: `ENTRIES`.
* CNN: image size and filter counts are parameters of `cnn_accelerator` (`IMG`, `NF`, `FC_N`,
  `N_CLASS`). The pool and kernel sizes (5, 4, 4, 4) are fixed by the chain's wiring. The input
  size must keep each convolution output divisible by the pool size that follows it.
