// eicroc_cluster_arbiter: readout arbiter shared by the four pixels of a cluster.
//
// The arbiter keeps the 4-bit busy word of the cluster (which pixels started
// a conversion, sampled while all four pixels are ready). Once a pixel is
// valid it waits until the valid pixels equal the busy word, copies the four
// pixel words into adc_mem/tdc_mem/addr_mem and acknowledges the pixels with
// all_pixels_read_o so that they can take a new hit. A read request from the
// periphery (read_enable_i with a matching row address) is kept in a
// register; when it is present the arbiter sends the four pixel words, one
// per cycle, with valid_o high (send_pixel_st, counter cnt_out_reg 0..3).
// While it is not sending, its column-bus outputs forward the inputs coming
// from the cluster above, so a column is a chain of multiplexers.
//
// Interface: 40 MHz clock, synchronous active-low reset. The FSM is of Mealy
// type: all_pixels_read_o, cnt_out_enab, cluster valid and the read request
// clear are produced on the transitions. The data of a cluster leaves two
// cycles after the read request was latched if the data was already loaded.
// States, outputs, register loads and multiplexers follow the chip
// specification; the busy_cluster_o logic (OR of the four busy inputs) and the
// 6-bit address width are this implementation's reading of it.
module eicroc_cluster_arbiter
  import eicroc_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [3:0]       cluster_addr_i,
  input  logic             read_enable_i,
  input  logic [3:0]       rd_cluster_address_i,
  input  logic [3:0]       pixels_valid_i,
  input  logic [3:0]       pixels_read_i,
  input  logic             pixels_ready_i,
  input  logic [3:0]       busy_adc_pix_i,
  input  logic [ADC_W-1:0] adc_pix_i  [4],
  input  logic [TDC_W-1:0] tdc_pix_i  [4],
  input  logic [1:0]       addr_pix_i [4],
  input  logic [ADC_W-1:0] adc_pix_prev_i,
  input  logic [TDC_W-1:0] tdc_pix_prev_i,
  input  logic [5:0]       addr_prev_i,
  input  logic             cluster_valid_prev_i,
  output logic             valid_o,
  output logic [ADC_W-1:0] adc_reg_o,
  output logic [TDC_W-1:0] tdc_reg_o,
  output logic [5:0]       addr_pix_o,
  output logic             arbiter_ready_o,
  output logic             all_pixels_read_o,
  output logic             busy_cluster_o
);

  typedef enum logic [2:0] {
    IDLE_ST, WAIT_ALL_PIXELS_ST, LOAD_PIXELS_ST, BUS_BUSY_ST, SEND_PIXEL_ST
  } arb_state_e;

  arb_state_e state_q, state_d;

  logic [ADC_W-1:0] adc_mem_s  [4];
  logic [TDC_W-1:0] tdc_mem_s  [4];
  logic [1:0]       addr_mem_s [4];
  logic [3:0] busy_word_reg;
  logic [1:0] cnt_out_reg;
  logic       read_request;
  logic       read_enab;
  logic       load_mem;
  logic       cnt_out_reset, cnt_out_enab, read_request_reset, cluster_valid_int;

  assign busy_cluster_o = |busy_adc_pix_i;
  assign read_enab = read_enable_i && (rd_cluster_address_i == cluster_addr_i);
  assign load_mem  = (pixels_valid_i == busy_word_reg) && arbiter_ready_o;

  // Control unit (Mealy).
  always_comb begin
    state_d            = state_q;
    arbiter_ready_o    = 1'b0;
    all_pixels_read_o  = 1'b0;
    cnt_out_reset      = 1'b0;
    cnt_out_enab       = 1'b0;
    read_request_reset = 1'b0;
    cluster_valid_int  = 1'b0;
    unique case (state_q)
      IDLE_ST: begin
        cnt_out_reset   = 1'b1;
        arbiter_ready_o = 1'b1;
        if (pixels_valid_i != 4'd0) state_d = WAIT_ALL_PIXELS_ST;
      end
      WAIT_ALL_PIXELS_ST: begin
        arbiter_ready_o = 1'b1;
        if (pixels_valid_i == busy_word_reg) state_d = LOAD_PIXELS_ST;
      end
      LOAD_PIXELS_ST: begin
        arbiter_ready_o = 1'b1;
        if (read_request) begin
          all_pixels_read_o = 1'b1;
          state_d           = SEND_PIXEL_ST;
        end else if (pixels_read_i == busy_word_reg) begin
          all_pixels_read_o = 1'b1;
          state_d           = BUS_BUSY_ST;
        end
      end
      BUS_BUSY_ST: begin
        all_pixels_read_o = 1'b1;
        if (read_request) begin
          read_request_reset = 1'b1;
          state_d            = SEND_PIXEL_ST;
        end
      end
      SEND_PIXEL_ST: begin
        cnt_out_enab      = 1'b1;
        cluster_valid_int = 1'b1;
        if (cnt_out_reg == 2'd3) begin
          if (pixels_valid_i != 4'd0) state_d = WAIT_ALL_PIXELS_ST;
          else begin
            all_pixels_read_o = 1'b1;
            state_d           = IDLE_ST;
          end
        end else begin
          all_pixels_read_o  = 1'b1;
          read_request_reset = 1'b1;
        end
      end
      default: state_d = IDLE_ST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= IDLE_ST;
    else        state_q <= state_d;
  end

  // Data path.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_word_reg <= '0;
      read_request  <= 1'b0;
      cnt_out_reg   <= '0;
      for (int j = 0; j < 4; j++) begin
        adc_mem_s[j]  <= '0;
        tdc_mem_s[j]  <= '0;
        addr_mem_s[j] <= '0;
      end
    end else begin
      if (pixels_ready_i) busy_word_reg <= busy_adc_pix_i;
      if (read_request_reset) read_request <= 1'b0;
      else if (read_enab)     read_request <= 1'b1;
      if (cnt_out_reset)     cnt_out_reg <= '0;
      else if (cnt_out_enab) cnt_out_reg <= cnt_out_reg + 2'd1;
      if (load_mem) begin
        for (int j = 0; j < 4; j++) begin
          adc_mem_s[j]  <= adc_pix_i[j];
          tdc_mem_s[j]  <= tdc_pix_i[j];
          addr_mem_s[j] <= addr_pix_i[j];
        end
      end
    end
  end

  // Output multiplexers: own data while sending, else the cluster above.
  // The counter only advances in send_pixel_st, so both entries into
  // send_pixel_st (from load_pixels_st and from bus_busy_st) send the four
  // words 0..3.
  always_comb begin
    if (state_q == SEND_PIXEL_ST) begin
      adc_reg_o  = adc_mem_s[cnt_out_reg];
      tdc_reg_o  = tdc_mem_s[cnt_out_reg];
      addr_pix_o = {cluster_addr_i, addr_mem_s[cnt_out_reg]};
      valid_o    = cluster_valid_int;
    end else begin
      adc_reg_o  = adc_pix_prev_i;
      tdc_reg_o  = tdc_pix_prev_i;
      addr_pix_o = addr_prev_i;
      valid_o    = cluster_valid_prev_i;
    end
  end

endmodule
