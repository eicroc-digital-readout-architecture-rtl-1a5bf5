// eicroc_readout_top: EICROC digital readout, pixel matrix plus periphery.
//
// 1024 pixels (N_COLS x N_ROWS clusters of four) record the ADC and TDC
// words of their analog front ends; the digital periphery finds the clusters
// that started a conversion in each 40 MHz bunch crossing, reads them column
// by column and delivers one 41-bit word per pixel of each hit cluster:
// {bcid[11:0], last-of-event, adc[7:0], tdc[9:0], pixel address[9:0]}.
//
// Ports: per pixel, the busy line and ADC/TDC words of its front end, flat
// index 4*cluster_address + pixel with cluster_address = 16*col + row; per
// cluster, the ready line back to its four front ends (a front end must not
// start a conversion while it is low); the read port of the pixel word FIFO;
// the running BCID; two overflow pulses (a word or a busy vector lost). 40 MHz clock,
// synchronous active-low reset. Slow control, fast commands, clocking and the
// serializer of the chip are outside this module.
module eicroc_readout_top
  import eicroc_pkg::*;
#(
  parameter int unsigned N_COLS = MATRIX_COLS,
  parameter int unsigned N_ROWS = MATRIX_ROWS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [4*N_ROWS*N_COLS-1:0] busy_adc_pix_i,
  input  logic [ADC_W-1:0]           adc_pix_i [4*N_ROWS*N_COLS],
  input  logic [TDC_W-1:0]           tdc_pix_i [4*N_ROWS*N_COLS],
  output logic [N_ROWS*N_COLS-1:0]   ready_o,
  input  logic                       pw_rd_en_i,
  output pixel_word_t                pw_word_o,
  output logic                       pw_empty_o,
  output logic [BCID_W-1:0]          bcid_o,
  output logic                       busy_overflow_o,
  output logic                       pw_overflow_o
);

  logic                     read_enable_s;
  logic [7:0]               rd_cluster_address_s;
  logic [N_ROWS*N_COLS-1:0] busy_cluster_s;
  logic [N_ROWS-1:0]        busy_cluster_cols_s [N_COLS];
  logic [N_COLS-1:0]        valid_cols_s;
  col_word_t                word_cols_s [N_COLS];

  for (genvar c = 0; c < N_COLS; c++) begin : g_busy
    assign busy_cluster_cols_s[c] = busy_cluster_s[N_ROWS*c +: N_ROWS];
  end

  eicroc_pixel_matrix #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_matrix (
    .clk                  (clk),
    .rst_n                (rst_n),
    .read_enable_i        (read_enable_s),
    .rd_cluster_address_i (rd_cluster_address_s),
    .busy_adc_pix_i       (busy_adc_pix_i),
    .adc_pix_i            (adc_pix_i),
    .tdc_pix_i            (tdc_pix_i),
    .ready_o              (ready_o),
    .busy_cluster_o       (busy_cluster_s),
    .valid_cols_o         (valid_cols_s),
    .word_cols_o          (word_cols_s)
  );

  eicroc_digital_periphery #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_periphery (
    .clk                  (clk),
    .rst_n                (rst_n),
    .read_enable_o        (read_enable_s),
    .rd_cluster_address_o (rd_cluster_address_s),
    .word_cols_i          (word_cols_s),
    .valid_cols_i         (valid_cols_s),
    .busy_cluster_cols_i  (busy_cluster_cols_s),
    .pw_rd_en_i           (pw_rd_en_i),
    .pw_word_o            (pw_word_o),
    .pw_empty_o           (pw_empty_o),
    .bcid_o               (bcid_o),
    .busy_overflow_o      (busy_overflow_o),
    .pw_overflow_o        (pw_overflow_o)
  );

endmodule
