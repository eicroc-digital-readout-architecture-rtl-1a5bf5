// eicroc_pixel: digital part of one pixel readout channel.
//
// The pixel watches the busy line of its ADC/TDC. A rising edge (start of
// conversion) moves the FSM from pixel_ready_st to pixel_busy_st; the falling
// edge (ADC result ready, the TDC result being ready earlier) latches the ADC
// and TDC words into adc_reg_q/tdc_reg_q and moves to pixel_valid_st, where
// pixel_valid_o is raised towards the cluster arbiter. When the arbiter is
// ready (ready/valid handshake) the words are copied into the output
// registers adc_data_o/tdc_data_o and the FSM waits in pixel_read_st until
// the arbiter signals that all hit pixels of the cluster have been read.
// Because of this second register stage the pixel can accept a new hit while
// the arbiter still holds the previous one.
//
// Interface: single 40 MHz clock, synchronous active-low reset. The busy edge
// detector compares the input with busy_adc_pix_reg_q, a register that only
// follows the input while all_pixels_ready_i is 1, so the four pixels of a
// cluster sample new hits together. Timing: valid is raised one cycle after
// the busy falling edge is sampled; the state chart, the edge detector and the
// register loads follow the chip specification. Gating the ready->busy step
// with all_pixels_ready_i, the reset style and the constant pixel index
// output are this implementation's choices.
module eicroc_pixel #(
  parameter int unsigned ADC_W   = 8,
  parameter int unsigned TDC_W   = 10,
  parameter logic [1:0]  PIX_IDX = 2'd0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             busy_adc_pix_i,
  input  logic             arbiter_ready_i,
  input  logic             all_pixels_read_i,
  input  logic             all_pixels_ready_i,
  input  logic [ADC_W-1:0] adc_pix_i,
  input  logic [TDC_W-1:0] tdc_pix_i,
  output logic             pixel_ready_o,
  output logic             pixel_valid_o,
  output logic             pixel_read_o,
  output logic [ADC_W-1:0] adc_data_o,
  output logic [TDC_W-1:0] tdc_data_o,
  output logic [1:0]       addr_pix_o
);

  typedef enum logic [1:0] {
    PIXEL_READY_ST, PIXEL_BUSY_ST, PIXEL_VALID_ST, PIXEL_READ_ST
  } pix_state_e;

  pix_state_e state_q, state_d;
  logic busy_reg_q;
  logic busy_re, busy_fe;
  logic [ADC_W-1:0] adc_reg_q;
  logic [TDC_W-1:0] tdc_reg_q;

  // Edge detection against the gated busy register.
  assign busy_re = busy_adc_pix_i & ~busy_reg_q;
  assign busy_fe = ~busy_adc_pix_i & busy_reg_q;

  always_ff @(posedge clk) begin
    if (!rst_n)                  busy_reg_q <= 1'b0;
    else if (all_pixels_ready_i) busy_reg_q <= busy_adc_pix_i;
  end

  // Moore outputs.
  assign pixel_ready_o = (state_q == PIXEL_READY_ST);
  assign pixel_valid_o = (state_q == PIXEL_VALID_ST) || (state_q == PIXEL_READ_ST);
  assign pixel_read_o  = (state_q == PIXEL_READ_ST);
  assign addr_pix_o    = PIX_IDX;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      PIXEL_READY_ST: if (busy_re && all_pixels_ready_i)      state_d = PIXEL_BUSY_ST;
      PIXEL_BUSY_ST:  if (busy_fe)                            state_d = PIXEL_VALID_ST;
      PIXEL_VALID_ST: if (arbiter_ready_i && pixel_valid_o)   state_d = PIXEL_READ_ST;
      PIXEL_READ_ST:  if (all_pixels_read_i)                  state_d = PIXEL_READY_ST;
      default:                                                state_d = PIXEL_READY_ST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= PIXEL_READY_ST;
    else        state_q <= state_d;
  end

  // Double register buffering of the ADC/TDC words.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      adc_reg_q  <= '0;
      tdc_reg_q  <= '0;
      adc_data_o <= '0;
      tdc_data_o <= '0;
    end else begin
      if (busy_fe) begin
        adc_reg_q <= adc_pix_i;
        tdc_reg_q <= tdc_pix_i;
      end
      if (arbiter_ready_i && pixel_valid_o) begin
        adc_data_o <= adc_reg_q;
        tdc_data_o <= tdc_reg_q;
      end
    end
  end

  // Handshake rule: once raised, valid stays up until the transfer.
  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    (pixel_valid_o && !pixel_read_o && !arbiter_ready_i) |=> pixel_valid_o);

endmodule
