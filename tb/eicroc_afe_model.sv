// eicroc_afe_model: behavioural model of one pixel's analog front end
// (ADC + TDC) for the testbenches; not synthesizable logic.
//
// A pulse on hit_i asks for a conversion. If ready_i is high the model
// raises busy_o at the next clock edge, keeps it high for conv_cycles_i
// cycles, then drops it and shows the TDC and ADC words (hit_tdc_i, hit_adc_i
// sampled with the hit) on tdc_o/adc_o, where they stay until the next
// conversion. A hit while ready_i is low, or while converting, is lost and
// counted in lost_o. While converting, the outputs show changing garbage, so
// a readout that samples them too early is caught.
module eicroc_afe_model (
  input  logic       clk,
  input  logic       hit_i,
  input  logic [7:0] hit_adc_i,
  input  logic [9:0] hit_tdc_i,
  input  int         conv_cycles_i,
  input  logic       ready_i,
  output logic       busy_o,
  output logic [7:0] adc_o,
  output logic [9:0] tdc_o,
  output int         lost_o
);
  int         remaining = 0;
  logic [7:0] adc_hold = '0;
  logic [9:0] tdc_hold = '0;

  initial begin
    busy_o = 1'b0;
    adc_o  = '0;
    tdc_o  = '0;
    lost_o = 0;
  end

  always @(posedge clk) begin
    if (remaining > 0) begin
      remaining <= remaining - 1;
      adc_o     <= 8'($urandom);
      tdc_o     <= 10'($urandom);
      if (remaining == 1) begin
        busy_o <= 1'b0;
        adc_o  <= adc_hold;
        tdc_o  <= tdc_hold;
      end
      if (hit_i) lost_o <= lost_o + 1;
    end else if (hit_i) begin
      if (ready_i) begin
        busy_o    <= 1'b1;
        remaining <= (conv_cycles_i < 1) ? 1 : conv_cycles_i;
        adc_hold  <= hit_adc_i;
        tdc_hold  <= hit_tdc_i;
      end else begin
        lost_o <= lost_o + 1;
      end
    end
  end
endmodule
