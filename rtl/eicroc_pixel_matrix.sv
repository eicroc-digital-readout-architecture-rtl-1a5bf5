// eicroc_pixel_matrix: the 32 x 32 pixel matrix, N_COLS columns of N_ROWS
// clusters of four pixels.
//
// Flat pixel numbering: pixel index = 4*(N_ROWS*col + row) + p, i.e. four
// times the cluster address {col,row} plus the pixel index inside the
// cluster. Cluster ready and busy signals are numbered by cluster address.
// Each column returns its own column bus (valid + 28-bit word); the
// read_enable/rd_cluster_address pair from the periphery goes to every
// column and only the addressed one answers. No logic of its own.
module eicroc_pixel_matrix
  import eicroc_pkg::*;
#(
  parameter int unsigned N_COLS = MATRIX_COLS,
  parameter int unsigned N_ROWS = MATRIX_ROWS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       read_enable_i,
  input  logic [7:0]                 rd_cluster_address_i,
  input  logic [4*N_ROWS*N_COLS-1:0] busy_adc_pix_i,
  input  logic [ADC_W-1:0]           adc_pix_i [4*N_ROWS*N_COLS],
  input  logic [TDC_W-1:0]           tdc_pix_i [4*N_ROWS*N_COLS],
  output logic [N_ROWS*N_COLS-1:0]   ready_o,
  output logic [N_ROWS*N_COLS-1:0]   busy_cluster_o,
  output logic [N_COLS-1:0]          valid_cols_o,
  output col_word_t                  word_cols_o [N_COLS]
);

  localparam int unsigned PPC = 4 * N_ROWS;  // pixels per column

  for (genvar c = 0; c < N_COLS; c++) begin : g_col
    logic [ADC_W-1:0] adc_c [PPC];
    logic [TDC_W-1:0] tdc_c [PPC];
    for (genvar k = 0; k < PPC; k++) begin : g_p
      assign adc_c[k] = adc_pix_i[PPC*c+k];
      assign tdc_c[k] = tdc_pix_i[PPC*c+k];
    end
    eicroc_cluster_column #(.N_ROWS(N_ROWS), .COL(4'(c))) u_column (
      .clk                  (clk),
      .rst_n                (rst_n),
      .read_enable_i        (read_enable_i),
      .rd_cluster_address_i (rd_cluster_address_i),
      .busy_adc_pix_i       (busy_adc_pix_i[PPC*c +: PPC]),
      .adc_pix_i            (adc_c),
      .tdc_pix_i            (tdc_c),
      .ready_o              (ready_o[N_ROWS*c +: N_ROWS]),
      .busy_cluster_o       (busy_cluster_o[N_ROWS*c +: N_ROWS]),
      .valid_o              (valid_cols_o[c]),
      .word_o               (word_cols_o[c])
    );
  end

endmodule
