// tb_eicroc_cluster: self-checking test of a digital cluster (four pixels
// and the arbiter) driven by four behavioural front ends.
//
// Hits on random pixel patterns, with random conversion times per pixel,
// arrive as soon as the cluster is ready. A behavioural periphery reads the
// cluster with random delays, so hits are often read long after the next hit
// was taken (double hit, the pixel double buffering at work). Each read must
// give four consecutive words in pixel order: hit pixels with the words of
// that hit, the other pixels with the last words they delivered. Also
// checked: when the arbiter is free, ready_o rises at most 3 cycles after the
// first clock edge that sees the last busy line low, so less than 4 cycles
// after an asynchronous busy fall (the specification's dead time bound), no hit is lost while ready_o is respected, and double hits
// do occur.
`timescale 1ns/1ps
module tb_eicroc_cluster;
  import eicroc_pkg::*;
  localparam logic [3:0] ROW = 4'd5;
  localparam int N_HITS = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic read_enable = 1'b0;
  logic [3:0] rd_addr = '0;
  logic [3:0] busy;
  logic [ADC_W-1:0] adc [4];
  logic [TDC_W-1:0] tdc [4];
  logic ready, busy_cl, valid_o;
  logic [ADC_W-1:0] adc_o;
  logic [TDC_W-1:0] tdc_o;
  logic [5:0] addr_o;
  logic [3:0] hit = '0;
  logic [7:0] hit_adc [4];
  logic [9:0] hit_tdc [4];
  int conv [4];
  int lost [4];
  int checks = 0, failures = 0, cycle = 0;
  int double_hits = 0, deadtime_checks = 0, reads_done = 0, hits_done = 0;

  typedef struct {
    logic [ADC_W-1:0] adc [4];
    logic [TDC_W-1:0] tdc [4];
  } exp_t;
  exp_t expq [$];

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar j = 0; j < 4; j++) begin : g_afe
    eicroc_afe_model u_afe (
      .clk(clk), .hit_i(hit[j]), .hit_adc_i(hit_adc[j]), .hit_tdc_i(hit_tdc[j]),
      .conv_cycles_i(conv[j]), .ready_i(ready), .busy_o(busy[j]),
      .adc_o(adc[j]), .tdc_o(tdc[j]), .lost_o(lost[j]));
  end

  eicroc_cluster dut (
    .clk(clk), .rst_n(rst_n), .cluster_addr_i(ROW), .read_enable_i(read_enable),
    .rd_cluster_address_i(rd_addr), .busy_adc_pix_i(busy), .adc_pix_i(adc),
    .tdc_pix_i(tdc), .ready_o(ready), .busy_cluster_o(busy_cl),
    .adc_data_prev_i('0), .tdc_data_prev_i('0), .pix_addr_prev_i('0), .valid_prev_i(1'b0),
    .valid_o(valid_o), .adc_data_o(adc_o), .tdc_data_o(tdc_o), .pix_addr_o(addr_o));

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Hit generator.
  initial begin : gen
    logic [ADC_W-1:0] last_adc [4];
    logic [TDC_W-1:0] last_tdc [4];
    for (int j = 0; j < 4; j++) begin
      last_adc[j] = '0; last_tdc[j] = '0; hit_adc[j] = '0; hit_tdc[j] = '0; conv[j] = 1;
    end
    wait (rst_n);
    for (int h = 0; h < N_HITS; h++) begin
      exp_t e;
      logic [3:0] pat;
      bit fresh;
      int dt;
      while (!ready) tick();
      if (h % 4 == 0) while (expq.size() != 0 || reads_done != hits_done) tick();
      tick(int'($urandom_range(0, 3)));
      while (!ready) tick();
      pat = 4'($urandom_range(1, 15));
      if (expq.size() > 0) double_hits++;
      fresh = (expq.size() == 0) && (reads_done == hits_done);
      for (int j = 0; j < 4; j++) begin
        hit_adc[j] = 8'($urandom);
        hit_tdc[j] = 10'($urandom);
        conv[j]    = int'($urandom_range(2, 9));
        if (pat[j]) begin
          last_adc[j] = hit_adc[j];
          last_tdc[j] = hit_tdc[j];
        end
        e.adc[j] = last_adc[j];
        e.tdc[j] = last_tdc[j];
      end
      expq.push_back(e);
      hits_done++;
      hit = pat;
      tick();
      hit = '0;
      check(busy == pat, "front ends started");
      tick();
      check(!ready, "cluster not ready while converting");
      // Dead time: from the last busy falling edge to ready_o.
      while (busy != 0) tick();
      dt = 0;
      while (!ready && dt < 1000) begin tick(); dt++; end
      if (fresh) begin
        deadtime_checks++;
        // dt counts clock edges from the first edge that sees busy low.
        check(dt <= 4, $sformatf("ready_o %0d edges after busy fell, at most 4 expected", dt));
      end
    end
  end

  // Behavioural periphery: reads one hit after the other.
  initial begin : periphery
    wait (rst_n);
    forever begin
      exp_t e;
      int n;
      while (expq.size() == 0) tick();
      tick(int'($urandom_range(0, 25)));
      rd_addr = ROW;
      read_enable = 1'b1;
      tick();
      read_enable = 1'b0;
      rd_addr = $urandom_range(0, 1) ? ROW : ~ROW;  // address may move on
      n = 0;
      while (!valid_o && n < 1000) begin tick(); n++; end
      e = expq.pop_front();
      for (int j = 0; j < 4; j++) begin
        check(valid_o, "four consecutive valid words");
        check(addr_o == {ROW, 2'(j)}, "pixel address");
        check(adc_o == e.adc[j] && tdc_o == e.tdc[j],
              $sformatf("word %0d: got %h/%h expected %h/%h", j, adc_o, tdc_o, e.adc[j], e.tdc[j]));
        tick();
      end
      check(!valid_o, "no fifth word");
      reads_done++;
    end
  end

  initial begin
    tick(3);
    rst_n = 1'b1;
    wait (reads_done == N_HITS);
    tick(5);
    for (int j = 0; j < 4; j++) check(lost[j] == 0, "no hit lost while ready is respected");
    check(double_hits > 0, "double hits happened");
    check(deadtime_checks > 0, "dead time measured");
    $display("double hits %0d, dead time checks %0d", double_hits, deadtime_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
