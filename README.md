# EICROC pixel matrix readout (SystemVerilog)

## Design idea

A 32 x 32 pixel matrix is read without any per-hit bus traffic until a hit is
really there. Pixels are grouped four by four into 256 clusters (16 columns x
16 rows). When a pixel's front end starts converting, its busy line rises. The
cluster ORs the four busy lines into one busy bit per cluster. The periphery
samples the 256 busy bits every bunch crossing. A rising edge on any of them
marks an event, and the event is stamped with the 12-bit bunch-crossing
counter (BCID). The periphery then turns the busy word into the list of hit
cluster addresses and asks those clusters for their data, one after another.
The data comes back down a daisy chain of clusters in each column, through a
column multiplexer (the hub). It is stored as pixel words tagged with the
event's BCID.

The matrix side is double buffered:
- Each pixel holds its converted ADC/TDC word.
- The cluster arbiter copies all four pixel words of the cluster at once.

So a pixel is ready for a new hit a few cycles after its conversion ends, even
while its previous data still waits to be read.

## Blocks (`rtl/`)

| File | Block |
|---|---|
| `eicroc_pkg.sv` | Widths (ADC 8, TDC 10, cluster address 8, pixel address 10, BCID 12 bits), matrix size, word types. |
| `eicroc_pixel.sv` | Pixel control FSM (ready → busy → valid → read). Detects the falling edge of the front-end busy line and keeps two copies of the ADC/TDC data. `ready_o` gates the front end. |
| `eicroc_cluster_arbiter.sv` | Waits until every pixel that was busy has valid data, then loads the four words. It latches a read request addressed to its row and sends four words, one per cycle, on the column bus. Otherwise it passes on the data of the cluster above it. |
| `eicroc_cluster.sv` | Four pixels plus the arbiter. Also produces the cluster busy bit and the cluster ready. |
| `eicroc_cluster_column.sv` | 16 clusters chained from row 15 down to row 0. The read enable is gated by the column address, and the column index is prefixed to the address. |
| `eicroc_pixel_matrix.sv` | 16 columns, with the busy and ready signals indexed by cluster address `{col, row}`. |
| `eicroc_sync_fifo.sv` | Synchronous FIFO with fall-through read and pointers one bit wider than the address. |
| `eicroc_hub.sv` | Column multiplexer selected by the upper four address bits. |
| `eicroc_fifos_periphery.sv` | Busy-word edge detector and BCID counter. Contains the busy FIFO (8 events) and the address FIFO (256 entries). Per event it counts the hit clusters and pushes their addresses, lowest address first, at one per cycle (2N+2 cycles per event). |
| `eicroc_read_matrix_handler.sv` | Request queue (256 entries) and read FSM. Stores each word in the 32-entry pixel word FIFO as `{bcid, last, adc, tdc, pixel address}` (41 bits). It prefetches the next address during the third word, so a cluster takes 6 cycles. |
| `eicroc_digital_periphery.sv` | Hub + FIFOs periphery + read matrix handler. |
| `eicroc_readout_top.sv` | Matrix + periphery. Inputs are the 1024 front-end busy/ADC/TDC signals; outputs are the cluster ready lines and the pixel word FIFO read port. |

## Timing summary

- Dead time: a pixel's ready returns 3 clock cycles after the first edge that
  sees its busy low.
- An event with N hit clusters needs 2N+2 cycles in the FIFOs periphery before
  all its addresses are queued.
- Reading takes 6 cycles per cluster: four words plus one cycle of request and
  one of pipeline, with the next request overlapped.
- The pixel word of an event carries the BCID of the bunch crossing in which
  the cluster busy bits rose.

## Own choices and deviations

- **Pixel word.** The word is 41 bits; the spare bit is a "last word of event"
  flag.
- **Request queue.** The queue stores the BCID with each entry (29 bits instead
  of 17). Otherwise a queued event would get the BCID of a later one.
- **Full request queue.** When the request queue is full, the FIFOs periphery
  stops decoding (back-pressure) instead of losing addresses.
- **Busy FIFO full.** An event arriving while the busy FIFO is full is dropped
  and flagged on `busy_overflow_o`. The clusters of a dropped event keep their
  data until a later event of theirs reads it.
- **Pixel word FIFO full.** Words arriving while this FIFO is full are dropped
  and flagged on `pw_overflow_o`.
- **Cluster word counter.** The counter advances only while sending, so four
  words are sent whether the read request comes before or after the data. The
  state chart shows an extra count on one transition, which would skip
  pixel 0.
- **Hub input register.** The hub output is registered in the read matrix
  handler before storing.
- **Read enable timing.** `read_enable` is registered and changes together
  with the read address.
- **Missing read word.** If a word is missing after the last-word state, the
  read FSM waits in the address state instead of writing the last word twice.
- **Left out.** Wishbone configuration ports, slow control, fast commands,
  PLL, bias, formatting and serialiser are not implemented, because they are
  not described. The pixel word FIFO read port stands in for the formatter.
  The analog front end exists only as a behavioural model in `tb/`.

## Testbenches (`tb/`)

Each block has a self-checking testbench `tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb_eicroc_readout_top.sv` runs the full-size design with one behavioural
front end (`eicroc_afe_model.sv`) per pixel. It predicts every pixel word,
including its BCID and last flag. It also counts these mechanisms and fails if
any of them never happens:
- double hits
- read request before or after the data
- address prefetch
- several queued events
- request queue full
- both overflows

Example with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/eicroc_pkg.sv tb/tb_eicroc_readout_top.sv --top-module tb_eicroc_readout_top
./obj_dir/Vtb_eicroc_readout_top
```
