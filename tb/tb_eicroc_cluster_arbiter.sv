// tb_eicroc_cluster_arbiter: self-checking test of the cluster arbiter.
//
// The four pixels are played by the testbench, which drives the valid, read,
// ready and busy lines as the pixel channels would. Scenarios:
//   A  data loaded first, read request later (bus_busy_st path);
//   B  read request latched before the data (load_pixels_st -> send path);
//   C  a new hit waiting at the end of a send (back to wait_all_pixels_st);
//   D  read enable for another row is ignored; the bus of the cluster above
//      passes through while the cluster does not send.
// Each read must give exactly four consecutive valid words, pixel 0..3, with
// the loaded ADC/TDC words and address {row, pixel}.
`timescale 1ns/1ps
module tb_eicroc_cluster_arbiter;
  import eicroc_pkg::*;
  localparam logic [3:0] ROW = 4'd9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic       read_enable = 1'b0;
  logic [3:0] rd_addr = '0;
  logic [3:0] pv = '0, pr = '0, busy = '0;
  logic       pready = 1'b1;
  logic [ADC_W-1:0] adc [4];
  logic [TDC_W-1:0] tdc [4];
  logic [1:0]       pa  [4];
  logic [ADC_W-1:0] adc_prev = '0;
  logic [TDC_W-1:0] tdc_prev = '0;
  logic [5:0]       addr_prev = '0;
  logic             valid_prev = 1'b0;
  logic valid_o, arb_ready, all_read, busy_cl;
  logic [ADC_W-1:0] adc_o;
  logic [TDC_W-1:0] tdc_o;
  logic [5:0] addr_o;
  int checks = 0, failures = 0, cycle = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  eicroc_cluster_arbiter dut (
    .clk(clk), .rst_n(rst_n), .cluster_addr_i(ROW), .read_enable_i(read_enable),
    .rd_cluster_address_i(rd_addr), .pixels_valid_i(pv), .pixels_read_i(pr),
    .pixels_ready_i(pready), .busy_adc_pix_i(busy), .adc_pix_i(adc), .tdc_pix_i(tdc),
    .addr_pix_i(pa), .adc_pix_prev_i(adc_prev), .tdc_pix_prev_i(tdc_prev),
    .addr_prev_i(addr_prev), .cluster_valid_prev_i(valid_prev), .valid_o(valid_o),
    .adc_reg_o(adc_o), .tdc_reg_o(tdc_o), .addr_pix_o(addr_o),
    .arbiter_ready_o(arb_ready), .all_pixels_read_o(all_read), .busy_cluster_o(busy_cl));

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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Pixel-side sequence for one hit on the pixels of 'pattern'; the pixels
  // deliver their words and wait for all_pixels_read like the real channels.
  task automatic hit(input logic [3:0] pattern, input logic [ADC_W-1:0] a [4],
                     input logic [TDC_W-1:0] t [4]);
    busy   = pattern;      // conversions start while all pixels are ready
    pready = 1'b1;
    tick();
    check(busy_cl == (pattern != 0), "busy_cluster_o is the OR of the busy lines");
    pready = 1'b0;         // pixels now busy
    tick(2);
    busy = '0;
    for (int j = 0; j < 4; j++) begin
      adc[j] = a[j];
      tdc[j] = t[j];
    end
    // Pixels become valid one after the other (lowest first).
    for (int j = 0; j < 4; j++) begin
      if (pattern[j]) begin
        pv[j] = 1'b1;
        tick();
        if (pv != pattern) check(arb_ready && !all_read, "waiting for all hit pixels");
      end
    end
  endtask

  // Handshake completes (arbiter ready): pixels move to read and wait.
  task automatic pixels_wait_read(input logic [3:0] pattern);
    int n = 0;
    while (!arb_ready && n < 100) begin tick(); n++; end
    pr = pattern;
    n = 0;
    while (!all_read && n < 100) begin tick(); n++; end
    check(all_read, "all_pixels_read_o given");
    tick();
    pv = '0;
    pr = '0;
    pready = 1'b1;
  endtask

  task automatic expect_words(input logic [ADC_W-1:0] a [4], input logic [TDC_W-1:0] t [4]);
    int n = 0;
    while (!valid_o && n < 100) begin tick(); n++; end
    for (int j = 0; j < 4; j++) begin
      check(valid_o, $sformatf("valid for word %0d", j));
      check(adc_o == a[j] && tdc_o == t[j], $sformatf("data of word %0d", j));
      check(addr_o == {ROW, 2'(j)}, $sformatf("address of word %0d", j));
      tick();
    end
  endtask

  task automatic request(input logic [3:0] row);
    rd_addr     = row;
    read_enable = 1'b1;
    tick();
    read_enable = 1'b0;
  endtask

  initial begin
    logic [ADC_W-1:0] a [4];
    logic [TDC_W-1:0] t [4];
    for (int j = 0; j < 4; j++) begin
      adc[j] = '0; tdc[j] = '0; pa[j] = 2'(j);
    end
    tick(3);
    rst_n = 1'b1;
    tick();
    check(arb_ready && !valid_o && !all_read, "idle after reset");

    for (int rep = 0; rep < 6; rep++) begin
      logic [3:0] pat;
      pat = 4'($urandom_range(1, 15));
      for (int j = 0; j < 4; j++) begin a[j] = 8'($urandom); t[j] = 10'($urandom); end
      // Scenario A: data first, request later.
      hit(pat, a, t);
      pixels_wait_read(pat);
      check(!arb_ready, "bus_busy: arbiter not ready");
      // Scenario D: wrong row ignored, previous cluster passes through.
      request(ROW + 4'd1);
      valid_prev = 1'b1; adc_prev = 8'hA5; tdc_prev = 10'h15A; addr_prev = 6'h2C;
      tick(3);
      check(valid_o && adc_o == 8'hA5 && tdc_o == 10'h15A && addr_o == 6'h2C,
            "bus of the cluster above passes through");
      valid_prev = 1'b0;
      tick();
      check(!valid_o, "no send without matching request");
      request(ROW);
      expect_words(a, t);
      check(!valid_o, "exactly four words");
      check(arb_ready, "back to idle");

      // Scenario B: request first, then data.
      for (int j = 0; j < 4; j++) begin a[j] = 8'($urandom); t[j] = 10'($urandom); end
      request(ROW);
      tick(2);
      check(!valid_o, "request alone sends nothing");
      hit(pat, a, t);
      fork
        pixels_wait_read(pat);
        expect_words(a, t);
      join
      check(!valid_o, "exactly four words (B)");
    end

    // Scenario C: a new hit waits in valid during the send.
    for (int j = 0; j < 4; j++) begin a[j] = 8'($urandom); t[j] = 10'($urandom); end
    hit(4'b0101, a, t);
    pixels_wait_read(4'b0101);
    busy = 4'b0010;
    tick();
    pready = 1'b0;
    busy = '0;
    tick();
    pv = 4'b0010;  // new pixel data valid while arbiter is in bus_busy
    request(ROW);
    expect_words(a, t);
    check(arb_ready && !all_read, "back to wait_all_pixels with new data pending");
    pr = 4'b0010;
    tick();
    check(all_read, "second hit acknowledged");
    tick();
    pv = '0; pr = '0; pready = 1'b1;
    tick(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
