// tb_eicroc_pixel: self-checking test of one pixel channel.
//
// A behavioural ADC/TDC raises busy, holds it for a random time and drops it
// with fresh random words; a behavioural arbiter answers with random delays.
// Checked: ready/valid/read flags in each phase, that valid is held until
// the handshake, that the output registers take the words exactly at the
// handshake (double buffering: a second hit does not overwrite them), that
// the pixel returns to ready only on all_pixels_read_i, and the latency from
// the busy falling edge to valid (1 cycle).
`timescale 1ns/1ps
module tb_eicroc_pixel;
  logic clk = 1'b0, rst_n = 1'b0;
  logic busy = 1'b0, arb_ready = 1'b0, all_read = 1'b0;
  logic [7:0] adc = '0;
  logic [9:0] tdc = '0;
  logic ready, valid, rd;
  logic [7:0] adc_o;
  logic [9:0] tdc_o;
  logic [1:0] addr_o;
  int checks = 0, failures = 0;
  int cycle = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  eicroc_pixel #(.PIX_IDX(2'd2)) dut (
    .clk(clk), .rst_n(rst_n), .busy_adc_pix_i(busy), .arbiter_ready_i(arb_ready),
    .all_pixels_read_i(all_read), .all_pixels_ready_i(ready),
    .adc_pix_i(adc), .tdc_pix_i(tdc), .pixel_ready_o(ready), .pixel_valid_o(valid),
    .pixel_read_o(rd), .adc_data_o(adc_o), .tdc_data_o(tdc_o), .addr_pix_o(addr_o));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] a_prev;
    logic [9:0] t_prev;
    tick(3);
    rst_n = 1'b1;
    tick();
    check(ready && !valid && !rd, "idle after reset");
    check(addr_o == 2'd2, "pixel index");
    a_prev = '0;
    t_prev = '0;
    for (int it = 0; it < 40; it++) begin
      logic [7:0] a;
      logic [9:0] t;
      int wait_ready, busy_len;
      a = 8'($urandom);
      t = 10'($urandom);
      busy_len = 1 + int'($urandom_range(0, 6));
      wait_ready = int'($urandom_range(0, 4));
      // Conversion.
      busy = 1'b1;
      adc = 8'($urandom);  // garbage while converting
      tdc = 10'($urandom);
      tick();
      check(!ready && !valid, "busy: not ready, not valid");
      tick(busy_len);
      check(!valid, "no valid while busy");
      busy = 1'b0;
      adc = a;
      tdc = t;
      tick();
      check(valid && !rd, "valid one cycle after busy falls");
      check(adc_o == a_prev && tdc_o == t_prev, "output registers hold previous words before handshake");
      // Arbiter not ready for a while: valid must be held.
      repeat (wait_ready) begin
        tick();
        check(valid && !rd && !ready, "valid held while arbiter not ready");
      end
      arb_ready = 1'b1;
      tick();
      arb_ready = 1'b0;
      check(rd && valid, "read after handshake");
      check(adc_o == a && tdc_o == t, "output registers loaded at handshake");
      // Stay in read until all pixels read.
      repeat (int'($urandom_range(0, 3))) begin
        tick();
        check(rd && !ready, "wait for all_pixels_read");
      end
      all_read = 1'b1;
      tick();
      all_read = 1'b0;
      check(ready && !rd && !valid, "ready again after all_pixels_read");
      // Double buffering: new words at the ADC do not reach the outputs.
      adc = ~a;
      tdc = ~t;
      tick(2);
      check(adc_o == a && tdc_o == t, "outputs stable while idle");
      a_prev = a;
      t_prev = t;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
