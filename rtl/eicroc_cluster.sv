// eicroc_cluster: digital cluster of four pixels and their shared arbiter.
//
// Each of the four eicroc_pixel channels talks to its own ADC/TDC; their
// ready signals are ANDed into ready_o (sent back to all four ADC/TDCs) and
// into all_pixels_ready, so that the four pixels of a cluster take hits only
// together. The arbiter collects the four pixel words and places them on the
// column bus when the periphery reads this cluster; otherwise the column bus
// inputs from the cluster above pass through.
//
// Interface: 40 MHz clock, synchronous active-low reset. The column bus is a
// valid bit and a 28-bit word {adc[7:0], tdc[9:0], addr[5:0]} here, where
// addr = {row, pixel index}; the column end adds the column index. The
// structure follows the chip specification; the Wishbone configuration ports
// of the chip are not part of this module.
module eicroc_cluster
  import eicroc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [3:0]        cluster_addr_i,
  input  logic              read_enable_i,
  input  logic [3:0]        rd_cluster_address_i,
  input  logic [3:0]        busy_adc_pix_i,
  input  logic [ADC_W-1:0]  adc_pix_i [4],
  input  logic [TDC_W-1:0]  tdc_pix_i [4],
  output logic              ready_o,
  output logic              busy_cluster_o,
  input  logic [ADC_W-1:0]  adc_data_prev_i,
  input  logic [TDC_W-1:0]  tdc_data_prev_i,
  input  logic [5:0]        pix_addr_prev_i,
  input  logic              valid_prev_i,
  output logic              valid_o,
  output logic [ADC_W-1:0]  adc_data_o,
  output logic [TDC_W-1:0]  tdc_data_o,
  output logic [5:0]        pix_addr_o
);

  logic [3:0]       ready_s, valid_s, read_s;
  logic [ADC_W-1:0] adc_s  [4];
  logic [TDC_W-1:0] tdc_s  [4];
  logic [1:0]       addr_s [4];
  logic             all_pixels_ready_s, arbiter_ready_s, all_pixels_read_s;

  assign all_pixels_ready_s = &ready_s;
  assign ready_o            = all_pixels_ready_s;

  for (genvar j = 0; j < 4; j++) begin : g_pix
    eicroc_pixel #(.ADC_W(ADC_W), .TDC_W(TDC_W), .PIX_IDX(2'(j))) u_pixel (
      .clk                (clk),
      .rst_n              (rst_n),
      .busy_adc_pix_i     (busy_adc_pix_i[j]),
      .arbiter_ready_i    (arbiter_ready_s),
      .all_pixels_read_i  (all_pixels_read_s),
      .all_pixels_ready_i (all_pixels_ready_s),
      .adc_pix_i          (adc_pix_i[j]),
      .tdc_pix_i          (tdc_pix_i[j]),
      .pixel_ready_o      (ready_s[j]),
      .pixel_valid_o      (valid_s[j]),
      .pixel_read_o       (read_s[j]),
      .adc_data_o         (adc_s[j]),
      .tdc_data_o         (tdc_s[j]),
      .addr_pix_o         (addr_s[j])
    );
  end

  eicroc_cluster_arbiter u_arbiter (
    .clk                  (clk),
    .rst_n                (rst_n),
    .cluster_addr_i       (cluster_addr_i),
    .read_enable_i        (read_enable_i),
    .rd_cluster_address_i (rd_cluster_address_i),
    .pixels_valid_i       (valid_s),
    .pixels_read_i        (read_s),
    .pixels_ready_i       (all_pixels_ready_s),
    .busy_adc_pix_i       (busy_adc_pix_i),
    .adc_pix_i            (adc_s),
    .tdc_pix_i            (tdc_s),
    .addr_pix_i           (addr_s),
    .adc_pix_prev_i       (adc_data_prev_i),
    .tdc_pix_prev_i       (tdc_data_prev_i),
    .addr_prev_i          (pix_addr_prev_i),
    .cluster_valid_prev_i (valid_prev_i),
    .valid_o              (valid_o),
    .adc_reg_o            (adc_data_o),
    .tdc_reg_o            (tdc_data_o),
    .addr_pix_o           (pix_addr_o),
    .arbiter_ready_o      (arbiter_ready_s),
    .all_pixels_read_o    (all_pixels_read_s),
    .busy_cluster_o       (busy_cluster_o)
  );

endmodule
