// eicroc_pkg: constants and types shared by the EICROC digital readout.
//
// The matrix is 32 x 32 pixels grouped in 2 x 2 clusters, 16 clusters per
// column and 16 columns. A cluster address is 8 bits, {column[3:0], row[3:0]},
// and a pixel address is 10 bits, {cluster address, pixel index[1:0]}. The
// ADC word is 8 bits, the TDC word 10 bits and the bunch crossing counter 12
// bits, all as specified for the chip. The record types below are the words
// that travel between the periphery blocks; their field order follows the
// chip's FIFO layouts (BCID in the most significant bits).
package eicroc_pkg;

  localparam int unsigned ADC_W     = 8;   // ADC (energy) word
  localparam int unsigned TDC_W     = 10;  // TDC (time) word
  localparam int unsigned PIX_IDX_W = 2;   // pixel index inside a cluster
  localparam int unsigned ROW_W     = 4;   // cluster position inside a column
  localparam int unsigned COL_W     = 4;   // column index
  localparam int unsigned MATRIX_ROWS = 16;  // clusters per column
  localparam int unsigned MATRIX_COLS = 16;  // columns
  localparam int unsigned CL_ADDR_W = ROW_W + COL_W;              // 8
  localparam int unsigned PIX_ADDR_W = CL_ADDR_W + PIX_IDX_W;     // 10
  localparam int unsigned BCID_W    = 12;
  localparam int unsigned NB_HIT_W  = 9;   // 0..256 hit clusters

  // One pixel measurement as it leaves a pixel.
  typedef struct packed {
    logic [ADC_W-1:0] adc;
    logic [TDC_W-1:0] tdc;
  } pix_data_t;

  // One pixel record on a column bus (28 bits).
  typedef struct packed {
    logic [ADC_W-1:0]      adc;
    logic [TDC_W-1:0]      tdc;
    logic [PIX_ADDR_W-1:0] addr;
  } col_word_t;

  // One decoded hit cluster of an event (29 bits): address_array word.
  typedef struct packed {
    logic [BCID_W-1:0]    bcid;
    logic [NB_HIT_W-1:0]  nb_hit;
    logic [CL_ADDR_W-1:0] addr;
  } cluster_req_t;

  // One word of the output pixel FIFO (41 bits).
  typedef struct packed {
    logic [BCID_W-1:0]     bcid;
    logic                  last;   // last pixel word of the event
    logic [ADC_W-1:0]      adc;
    logic [TDC_W-1:0]      tdc;
    logic [PIX_ADDR_W-1:0] addr;
  } pixel_word_t;

endpackage
