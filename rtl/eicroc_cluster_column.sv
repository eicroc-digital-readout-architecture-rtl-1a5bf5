// eicroc_cluster_column: one column of clusters with its end-of-column (EOC).
//
// N_ROWS clusters are chained through their "previous cluster" inputs: the
// top cluster (row N_ROWS-1) sees an idle bus, and each cluster either puts
// its own pixel words on the bus or forwards what comes from above, so the
// bottom cluster (row 0) drives the column bus. Cluster r of the column is
// hard wired to row address r.
//
// The EOC termination does two things: it passes read_enable only when the
// column field rd_cluster_address_i[7:4] equals COL, so that only the
// addressed column answers, and it prefixes COL to the 6-bit {row, pixel}
// address so that the column bus carries the 10-bit pixel address
// {col, row, pixel}. Both are this implementation's choices; the chaining
// order follows the chip specification.
//
// Pixel p of cluster r is at flat index 4*r+p of the pixel arrays.
// Interface: 40 MHz clock, synchronous active-low reset, no added latency.
module eicroc_cluster_column
  import eicroc_pkg::*;
#(
  parameter int unsigned N_ROWS = MATRIX_ROWS,
  parameter logic [3:0]  COL    = 4'd0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              read_enable_i,
  input  logic [7:0]        rd_cluster_address_i,
  input  logic [4*N_ROWS-1:0] busy_adc_pix_i,
  input  logic [ADC_W-1:0]  adc_pix_i [4*N_ROWS],
  input  logic [TDC_W-1:0]  tdc_pix_i [4*N_ROWS],
  output logic [N_ROWS-1:0] ready_o,
  output logic [N_ROWS-1:0] busy_cluster_o,
  output logic              valid_o,
  output col_word_t         word_o
);

  logic             valid_c [N_ROWS+1];
  logic [ADC_W-1:0] adc_c   [N_ROWS+1];
  logic [TDC_W-1:0] tdc_c   [N_ROWS+1];
  logic [5:0]       addr_c  [N_ROWS+1];
  logic             col_read_enable;

  assign col_read_enable = read_enable_i && (rd_cluster_address_i[7:4] == COL);

  // Idle bus above the top cluster.
  assign valid_c[N_ROWS] = 1'b0;
  assign adc_c[N_ROWS]   = '0;
  assign tdc_c[N_ROWS]   = '0;
  assign addr_c[N_ROWS]  = '0;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_cl
    logic [ADC_W-1:0] adc_r [4];
    logic [TDC_W-1:0] tdc_r [4];
    for (genvar j = 0; j < 4; j++) begin : g_p
      assign adc_r[j] = adc_pix_i[4*r+j];
      assign tdc_r[j] = tdc_pix_i[4*r+j];
    end
    eicroc_cluster u_cluster (
      .clk                  (clk),
      .rst_n                (rst_n),
      .cluster_addr_i       (4'(r)),
      .read_enable_i        (col_read_enable),
      .rd_cluster_address_i (rd_cluster_address_i[3:0]),
      .busy_adc_pix_i       (busy_adc_pix_i[4*r +: 4]),
      .adc_pix_i            (adc_r),
      .tdc_pix_i            (tdc_r),
      .ready_o              (ready_o[r]),
      .busy_cluster_o       (busy_cluster_o[r]),
      .adc_data_prev_i      (adc_c[r+1]),
      .tdc_data_prev_i      (tdc_c[r+1]),
      .pix_addr_prev_i      (addr_c[r+1]),
      .valid_prev_i         (valid_c[r+1]),
      .valid_o              (valid_c[r]),
      .adc_data_o           (adc_c[r]),
      .tdc_data_o           (tdc_c[r]),
      .pix_addr_o           (addr_c[r])
    );
  end

  // EOC termination.
  assign valid_o     = valid_c[0];
  assign word_o.adc  = adc_c[0];
  assign word_o.tdc  = tdc_c[0];
  assign word_o.addr = {COL, addr_c[0]};

endmodule
