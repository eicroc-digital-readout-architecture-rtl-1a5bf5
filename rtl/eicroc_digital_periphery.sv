// eicroc_digital_periphery: hub, FIFOs periphery and read matrix handler.
//
// The periphery turns the cluster busy bits of the matrix into a list of hit
// clusters per bunch crossing (FIFOs periphery), asks those clusters for
// their data one after the other (read matrix handler: read_enable_o and
// the 8-bit cluster address {col,row}), selects the answering column through
// the hub and stores BCID-tagged pixel words in the pixel word FIFO, whose
// read port stands in for the formatting and serializer stage.
//
// Interface: 40 MHz clock, synchronous active-low reset; column buses as
// valid + col_word_t per column, busy bits per column. The split into three
// sub-blocks and their connections follow the chip specification; the
// Wishbone configuration port of the chip is not part of this module.
module eicroc_digital_periphery
  import eicroc_pkg::*;
#(
  parameter int unsigned N_COLS = MATRIX_COLS,
  parameter int unsigned N_ROWS = MATRIX_ROWS
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              read_enable_o,
  output logic [7:0]        rd_cluster_address_o,
  input  col_word_t         word_cols_i [N_COLS],
  input  logic [N_COLS-1:0] valid_cols_i,
  input  logic [N_ROWS-1:0] busy_cluster_cols_i [N_COLS],
  input  logic              pw_rd_en_i,
  output pixel_word_t       pw_word_o,
  output logic              pw_empty_o,
  output logic [BCID_W-1:0] bcid_o,
  output logic              busy_overflow_o,
  output logic              pw_overflow_o
);

  localparam int unsigned N_CL = N_COLS * N_ROWS;

  col_word_t         word_hub_s;
  logic [N_COLS-1:0] valid_s;
  logic [N_CL-1:0]   busy_cluster_s;
  logic              send_cluster_address_s, rcf_full_s;
  cluster_req_t      rd_cluster_address_bcid_s;

  eicroc_hub #(.N_COLS(N_COLS), .N_ROWS(N_ROWS)) u_hub (
    .rd_column_i          (rd_cluster_address_o[7:4]),
    .word_cols_i          (word_cols_i),
    .valid_cols_i         (valid_cols_i),
    .busy_cluster_cols_i  (busy_cluster_cols_i),
    .word_hub_o           (word_hub_s),
    .valid_o              (valid_s),
    .busy_cluster_o       (busy_cluster_s)
  );

  eicroc_fifos_periphery #(.N_CL(N_CL)) u_fifos_periphery (
    .clk                    (clk),
    .rst_n                  (rst_n),
    .busy_cluster_i         (busy_cluster_s),
    .rcf_full_i             (rcf_full_s),
    .send_cluster_address_o (send_cluster_address_s),
    .cluster_req_o          (rd_cluster_address_bcid_s),
    .bcid_o                 (bcid_o),
    .busy_overflow_o        (busy_overflow_o)
  );

  eicroc_read_matrix_handler #(.N_COLS(N_COLS)) u_read_matrix_handler (
    .clk                    (clk),
    .rst_n                  (rst_n),
    .send_cluster_address_i (send_cluster_address_s),
    .cluster_req_i          (rd_cluster_address_bcid_s),
    .rcf_full_o             (rcf_full_s),
    .read_enable_o          (read_enable_o),
    .rd_cluster_address_o   (rd_cluster_address_o),
    .word_hub_i             (word_hub_s),
    .valid_i                (valid_s),
    .pw_rd_en_i             (pw_rd_en_i),
    .pw_word_o              (pw_word_o),
    .pw_empty_o             (pw_empty_o),
    .pw_overflow_o          (pw_overflow_o)
  );

endmodule
