# SINTULF node chain: a linear processor array for video-rate image processing

Image operations are split over many small, independent processors. Each
processor works on a vertical band of the image. The processors are not
connected by a bus or a crossbar. Each one has a *communication node*, and
the nodes are strung into one chain that behaves as a byte-wide shift
register. Pixels enter at one end in ordinary raster order, one per clock,
and every pixel passes every node.

- **Broadcast and pick.** Each node copies the pixels of its own band (its
  *window*) out of the passing stream into a small ring buffer. Only the
  last few rows are kept.
- **Exchange.** Some window pixels are needed by no node further down. The
  node overwrites those slots with results that its processor computed from
  earlier rows. The output stream therefore has the same shape as the input
  stream, and the chain always runs at full capacity.
- **Pipeline stages.** A group of nodes doing the same job is one stage of
  a pipeline. The next group, further down the same chain, works on the
  first group's results.

This repository holds synthesizable SystemVerilog for the chain:

- the pixel feeder;
- the communication node, with its window ring buffer, result buffer and
  the processor's program memory;
- the boards of nodes, with their bypass multiplexers;
- a result tap at the end of the chain.

The processors themselves are not included. The RTL defines the interface a
processor must meet. A behavioural processor model drives that interface in
the testbenches.

## The chain word

Every chain slot holds a 12-bit `chain_word_t` (see `rtl/sintulf_pkg.sv`):

| field   | bits | meaning |
|---------|------|---------|
| `kind`  | 2    | `TK_IDLE` empty slot, `TK_HEAD` head tag, `TK_DATA` pixel or result, `TK_CTRL` control byte |
| `level` | 2    | for data: how many stages have produced it. 0 is a supply pixel from the feeder, 1 a first-stage result, and so on. For control bytes: 0 (`CTRL_CFG`) is a configuration record byte, 1 (`CTRL_PROG`) a program byte. |
| `data`  | 8    | the byte |

A **head tag** precedes every image row and takes one slot of its own. The
`level` field lets supply pixels and results of several stages share the
chain. Each stage reads one level and writes the next. Levels wrap after 3.
Twelve lines in and twelve lines out fit a 28-pin package, with clock, reset
and supplies on the remaining pins.

## How a node finds its window

This is the part of the design that most needs explaining.

Each node has a configuration record: `in_level`, `skip`, `width` and
`xchg`. After each head tag the node counts passing data words of level
`in_level`. It ignores idle slots, head tags and words of other levels. It
lets the first `skip` words pass. It picks the next `width` words into its
ring buffer at columns 0 to width-1.

Of the picked words, the first `xchg` are **exchanged**. Word j of them is
replaced by result j of the node's processor, tagged with level
`in_level+1`. The last `width - xchg` words, the *overlap*, pass on
unchanged. The next node's window needs them too.

Exchanged words no longer carry the input level, so the downstream nodes of
the same stage do not count them. With `skip = 0`, every node in a stage
therefore takes the first window not yet claimed:

```
image row:   | 0 ... 15 | 16 ... 31 | 32 ... 47 | ... |
node 0 picks   0 .. 17,  exchanges  0 .. 15, leaves 16,17 as level 0
node 1 sees   16 .. as its first level-0 words: picks 16 .. 33, exchanges 16 .. 31
node 2 ...
```

So every node of a stage loads the same record, and no node needs to know
the image width or its own position in the chain. Adding nodes adds
columns. Each overlap pixel crosses the chain once. Exchange happens in one
node at a time, and this point moves down the chain as the row passes.

With `skip > 0` the node instead counts a fixed distance from the head tag.
That is plain counting, useful when nodes do not exchange.

The words left after the last node of a stage (the final overlap) stay in
the stream at level 0. Later stages ignore them.

## Results, data reduction and row timing

Results reach the chain through a double-buffered `result_buffer`:

1. The head tag that ends row *r* reaches the node. Row *r* becomes the
   newest complete row in the ring, and `proc_row_ready` pulses.
2. The processor reads the rows it needs during row *r+1*. It writes its
   results and pulses `proc_res_commit` with their number, before the next
   head tag arrives.
3. At that head tag the committed bank is swapped in. The results are then
   exchanged into row *r+2*'s slots.

If a processor commits fewer than `xchg` results, the remaining exchanged
slots become **idle**. This is data reduction. For example, a stage that
reduces each window to one statistic leaves one data word and `xchg-1` idle
slots per node. If a processor commits nothing for a row, all its exchanged
slots for that row are idle. This is also what happens while the ring is
still filling.

Delays for a three-row neighbourhood, as measured end to end:

- A 3x3 transform stage puts its first results in row 4. The result centred
  on image row *c* appears in row *c+3*.
- A reduction stage that uses only the newest row adds 2 rows.
- The processor has one row period (`width` + 1 + blanking clocks) for each
  row's work.

The chain itself adds one clock per node.

## Configuration and programs over the chain

After reset, every node is unconfigured and passes everything. The host
sends 4-byte records as `TK_CTRL` words through the feeder's free slots:

| byte | contents |
|------|----------|
| 0 | bit 7 active, bit 6 load program, bits 1:0 input level |
| 1 | skip |
| 2 | width |
| 3 | xchg (width - overlap) |

The first unconfigured node takes the first four control words and replaces
them with idle slots. It then ignores control words, so the next record
reaches the next unconfigured node. Records are handed out in chain order
without addresses. A record with `active = 0` makes a **passive spare**,
which passes every word. Node `cfg` outputs carry the loaded record to the
processor. To reconfigure, reset the chain.

**Programs are sent once per stage.** A node whose record has the
load-program bit set waits for a program. The host sends the program as
control bytes with `host_prog` high, which gives them level `CTRL_PROG`.

- Every waiting node copies the program bytes into its own program memory,
  from address 0 upward. The bytes pass on unchanged, so one copy reaches
  the whole stage.
- The program ends at the next configuration byte or head tag.
  `proc_prog_loaded` then rises and `proc_prog_len` gives the length.

The usual order is:

1. the records of stage 1;
2. the program of stage 1;
3. the records of stage 2;
4. the program of stage 2;
5. the video.

Nodes of stage 2 are not yet configured while program 1 passes, so they do
not copy it. Stage-1 nodes already have a program and ignore program 2.

## Boards and bypass

`chain_board` puts `NODES` subsystems in series. Its input multiplexer takes
either the previous board's output or the output of the board before that.
Setting `bypass_sel[b]` in `sintulf_top` therefore cuts board *b-1* out of
the chain, as for a board with a fault in its chain path. `out_bypass`
does the same for the last board.

A bypassed board is still fed, so it takes copies of the same records and
programs as the board after it. Its output is discarded, so this does no
harm, and the host needs no extra records. Bypass settings should be made
before configuration. Records are handed out by chain position, so a
change of bypass afterwards shifts which board holds which record.

## Module map

```
sintulf_top
├── pixel_feeder        video + host bytes -> chain words, head tags
├── chain_board × N_BOARDS
│   └── subsystem × NODES_PER_BOARD
│       ├── node_ctrl       pick / exchange / free / configuration, 1 register stage
│       ├── window_ring     RING_ROWS × WIN_MAX bytes, read by the processor
│       ├── result_buffer   2 × WIN_MAX bytes, written by the processor
│       └── program_memory  PROG_MAX bytes, loaded from the chain, read by the processor
└── result_tap          one level of the chain output as a packed stream
sintulf_pkg             chain_word_t, node_cfg_t, constants
```

Processor ports are brought out of `sintulf_top` as packed arrays
`proc_*[N_SUB]`, indexed by chain position. Index 0 is nearest the feeder.

## The processor interface

Per subsystem:

- `proc_row_ready`: a one-clock pulse when a picked row is complete.
- `proc_rows_avail`: the number of complete rows held, at most
  `RING_ROWS-1`.
- `proc_rd_row` (0 = newest) and `proc_rd_col`: the read address.
  `proc_rd_data` is combinational.
- `proc_res_wr_en`, `proc_res_wr_addr` and `proc_res_wr_data`: write one
  result.
- `proc_res_commit` and `proc_res_count`: hand over a row of results.
- `proc_res_ready`: low between a commit and the head tag that takes it.
  Writes are ignored while it is low.
- `proc_prog_loaded` and `proc_prog_len`: the program has been copied,
  and its length.
- `proc_pm_addr`: the program memory read address. `proc_pm_data` is
  combinational.

`tb/proc_model.sv` is a behavioural model of this interface. Once its
program is loaded, bit 0 of program byte 0 selects one of two built-in jobs:

- a 3x3 grey-level maximum (bit 0 = 0);
- a count of pixels at or above a threshold (bit 0 = 1).

The model reads one byte per clock.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `DATA_W` | 8 | package; a byte-wide chain |
| `N_BOARDS` | 4 | top |
| `NODES_PER_BOARD` | 8 | top, `chain_board.NODES` |
| `WIN_MAX` | 64 | largest window width, result buffer size |
| `RING_ROWS` | 4 | rows in the ring: a 3-row neighbourhood plus the row in transit |
| `PROG_MAX` | 256 | bytes of program memory per subsystem |
| `COL_W` | 12 | width of the tap's column count |

Only the byte width comes from the original design. The other sizes are
choices made here. The window fields of the record are 8 bits wide, and the
per-row word count saturates at 511.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=M`.
For example, the end-to-end test at full default size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_sintulf_top rtl/sintulf_pkg.sv tb/tb_sintulf_top.sv
./obj_dir/Vtb_sintulf_top
```

The end-to-end test (`tb_sintulf_top`) takes about 4,000 clocks and runs in
about a second. It uses 32 subsystems with board 1 bypassed. It sets up an
11-node 3x3-maximum stage and an 11-node reduction stage, with one passive
spare and one unconfigured node. One copy of each stage's program is sent,
and the test checks which subsystems loaded which program. It checks every
result against a reference computed from the image, including the row in
which the first result appears. It then cuts out the last board and reads
level 0 at the tap.

`tb_two_transforms` chains two 3x3-maximum stages on a reduced chain. The
second stage works on the first stage's results. Two 3x3 maxima make one
5x5 maximum, so every output is checked against that reference. The test
also checks that the total delay is the sum of the two stages' delays:
first results in row 8, centred on row *c* in row *c+6*.

Unit tests cover:

- `tb_pixel_feeder`
- `tb_window_ring`
- `tb_result_buffer`
- `tb_node_ctrl`
- `tb_subsystem`
- `tb_chain_board`
- `tb_result_tap`
- `tb_program_memory`

## Where this design departs from, or goes beyond, the original

- **Window selection.** The original design names plain counting from the
  head tag and says a better principle replaced it, without describing it.
  Claiming windows by level (above) is this design's reading.
- **Chosen here.** The tag encoding, the level field, the record layout,
  configuration by first-unconfigured-node, the framing of programs, and
  the result double buffer with its commit handshake.
- **Processor.** Not designed: no instruction set or datapath is given. Its
  program memory is byte-wide and is loaded from the chain. What the bytes
  mean is left to the processor.
- **Multi-byte pixels and 3-D neighbourhoods.** Not supported in the node;
  a processor must assemble them from consecutive bytes.
- **Host interface.** Control bytes enter through the feeder, and bypass
  selects are plain inputs.
- **Output multiplexer.** The multiplexer that can cut out the last board
  is an addition.
