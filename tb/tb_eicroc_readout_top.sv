// tb_eicroc_readout_top: end-to-end test of the complete readout at its
// default size (32 x 32 pixels, 256 clusters, all FIFOs at full depth).
//
// Every pixel has a behavioural front end. Random bunch crossings hit random
// sets of clusters on random pixel patterns; each set is one event. The
// testbench predicts, for every event, the pixel words that must leave the
// pixel word FIFO: the hit clusters in ascending cluster address, four words
// each (pixel address 4*cluster+p), the ADC/TDC words of the hit (or the
// last words of pixels that were not hit), the BCID of the bunch crossing
// in which the cluster busy rose, and the last flag on the event's final
// word. Phases:
//   1  sparse random events, clusters often hit again before being read
//      (double hits);
//   2  two events hitting all 256 clusters (the request queue fills);
//   3  the reader stops during an event: the pixel word FIFO keeps 32 words
//      and flags the rest;
//   4  a burst of one-cluster events on consecutive bunch crossings: the
//      busy FIFO overflows (words are no longer predicted after this).
// Each mechanism is counted (double hit, read request before the data,
// data waiting for the request, address prefetch, several events queued,
// request queue full, both overflows); one that never happens is a failure.
`timescale 1ns/1ps
module tb_eicroc_readout_top;
  import eicroc_pkg::*;
  localparam int NC = MATRIX_COLS, NR = MATRIX_ROWS;
  localparam int NCL = NC * NR, NP = 4 * NCL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NP-1:0] busy;
  logic [ADC_W-1:0] adc [NP];
  logic [TDC_W-1:0] tdc [NP];
  logic [NCL-1:0] ready;
  logic pw_rd = 1'b0, pw_empty, busy_ovf, pw_ovf;
  pixel_word_t pw_word;
  logic [BCID_W-1:0] bcid;
  logic [NP-1:0] hit = '0;
  logic [7:0] hit_adc [NP];
  logic [9:0] hit_tdc [NP];
  int conv [NP];
  int lost [NP];
  logic [ADC_W-1:0] last_adc [NP];
  logic [TDC_W-1:0] last_tdc [NP];
  int unread [NCL];
  int checks = 0, failures = 0, cycle = 0, tb_bcid = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) tb_bcid <= tb_bcid + 1;
  end

  for (genvar p = 0; p < NP; p++) begin : g_afe
    eicroc_afe_model u_afe (
      .clk(clk), .hit_i(hit[p]), .hit_adc_i(hit_adc[p]), .hit_tdc_i(hit_tdc[p]),
      .conv_cycles_i(conv[p]), .ready_i(ready[p/4]), .busy_o(busy[p]),
      .adc_o(adc[p]), .tdc_o(tdc[p]), .lost_o(lost[p]));
  end

  eicroc_readout_top dut (
    .clk(clk), .rst_n(rst_n), .busy_adc_pix_i(busy), .adc_pix_i(adc), .tdc_pix_i(tdc),
    .ready_o(ready), .pw_rd_en_i(pw_rd), .pw_word_o(pw_word), .pw_empty_o(pw_empty),
    .bcid_o(bcid), .busy_overflow_o(busy_ovf), .pw_overflow_o(pw_ovf));

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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanisms
  int n_req_first [NCL];   // read request already there when the data is loaded
  int n_data_first [NCL];  // data waits in bus_busy_st for the request
  for (genvar c = 0; c < NC; c++) begin : g_mc
    for (genvar r = 0; r < NR; r++) begin : g_mr
      initial begin
        n_req_first[NR*c+r] = 0;
        n_data_first[NR*c+r] = 0;
      end
      always @(posedge clk) begin
        if (32'(dut.u_matrix.g_col[c].u_column.g_cl[r].u_cluster.u_arbiter.state_q) == 2 &&
            dut.u_matrix.g_col[c].u_column.g_cl[r].u_cluster.u_arbiter.read_request)
          n_req_first[NR*c+r]++;
        if (32'(dut.u_matrix.g_col[c].u_column.g_cl[r].u_cluster.u_arbiter.state_q) == 3 &&
            dut.u_matrix.g_col[c].u_column.g_cl[r].u_cluster.u_arbiter.read_request)
          n_data_first[NR*c+r]++;
      end
    end
  end
  int n_prefetch = 0, n_queued = 0, n_rcf_full = 0, n_busy_ovf = 0, n_pw_ovf = 0, n_double = 0;
  always @(posedge clk) begin
    if (32'(dut.u_periphery.u_read_matrix_handler.state_q) == 2 &&
        dut.u_periphery.u_read_matrix_handler.latch_pop_s) n_prefetch++;
    if (32'(dut.u_periphery.u_fifos_periphery.state_q) != 0 &&
        !dut.u_periphery.u_fifos_periphery.busy_fifo_empty_s) n_queued++;
    if (dut.u_periphery.u_read_matrix_handler.rcf_full_o) n_rcf_full++;
    if (busy_ovf) n_busy_ovf++;
    if (pw_ovf) n_pw_ovf++;
  end

  // ------------------------------------------------------------ scoreboard
  pixel_word_t expq [$];
  int  words_in = 0;
  bit  reader_on = 1, compare_on = 1;
  always @(negedge clk) pw_rd = reader_on && !pw_empty;
  always @(posedge clk) begin
    if (rst_n && pw_rd && !pw_empty && compare_on) begin
      pixel_word_t e;
      check(expq.size() > 0, "unexpected pixel word");
      if (expq.size() > 0) begin
        e = expq.pop_front();
        check(pw_word == e, $sformatf("word %h, expected %h", pw_word, e));
      end
      words_in++;
    end
  end
  // Words not yet read per cluster, counted down when its fourth word leaves.
  always @(posedge clk) begin
    if (rst_n && pw_rd && !pw_empty && compare_on && pw_word.addr[1:0] == 2'd3)
      unread[pw_word.addr[9:2]]--;
  end

  // Hit a set of clusters in one bunch crossing and predict the words.
  task automatic event_hit(input logic [NCL-1:0] set);
    int nb, k;
    int ev_bcid;
    nb = $countones(set);
    // Busy rises at the next edge and is seen by the periphery in the cycle after.
    ev_bcid = (tb_bcid + 1) % 4096;
    k = 0;
    for (int cl = 0; cl < NCL; cl++) begin
      if (set[cl]) begin
        logic [3:0] pat;
        pat = 4'($urandom_range(1, 15));
        check(ready[cl], "hit only on a ready cluster");
        if (unread[cl] > 0) n_double++;
        unread[cl]++;
        for (int j = 0; j < 4; j++) begin
          int p;
          p = 4 * cl + j;
          hit_adc[p] = 8'($urandom);
          hit_tdc[p] = 10'($urandom);
          conv[p]    = $urandom_range(2, 10);
          if (pat[j]) begin
            hit[p] = 1'b1;
            last_adc[p] = hit_adc[p];
            last_tdc[p] = hit_tdc[p];
          end
          expq.push_back('{bcid: 12'(ev_bcid), last: (k == nb - 1) && (j == 3),
                           adc: last_adc[p], tdc: last_tdc[p], addr: 10'(p)});
        end
        k++;
      end
    end
    tick();
    hit = '0;
  endtask

  function automatic logic [NCL-1:0] ready_set(input int max_n);
    logic [NCL-1:0] s;
    int n;
    s = '0;
    n = $urandom_range(1, max_n);
    for (int i = 0; i < n; i++) begin
      int cl;
      cl = $urandom_range(0, NCL - 1);
      if (ready[cl]) s[cl] = 1'b1;
    end
    return s;
  endfunction

  task automatic drain();
    int n = 0;
    while ((expq.size() > 0 || !pw_empty) && n < 20000) begin tick(); n++; end
    check(expq.size() == 0, "all predicted words arrived");
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin
      hit_adc[p] = '0; hit_tdc[p] = '0; conv[p] = 1; last_adc[p] = '0; last_tdc[p] = '0;
    end
    for (int cl = 0; cl < NCL; cl++) unread[cl] = 0;
    tick(3);
    rst_n = 1'b1;
    tick(3);
    // Phase 1: sparse random events, repeated hits on a small region so
    // that clusters are hit again before being read.
    for (int it = 0; it < 120; it++) begin
      logic [NCL-1:0] s;
      s = ready_set(6);
      if (it % 3 == 0) s = s & NCL'(256'hFF_0000_00FF);  // crowd two areas
      if (s != 0) event_hit(s);
      tick(int'($urandom_range(1, 30)));
    end
    drain();
    // Phase 2: two events on the whole matrix.
    event_hit('1);
    tick(4);
    while (ready != '1) tick();
    tick(2);
    event_hit('1);
    drain();
    // Phase 3: reader stopped, one event of 12 clusters = 48 words.
    reader_on = 0;
    tick(2);
    begin
      logic [NCL-1:0] s;
      s = '0;
      for (int i = 0; i < 12; i++) s[20 * i + 3] = 1'b1;
      event_hit(s);
    end
    tick(600);
    check(n_pw_ovf == 16, $sformatf("16 words dropped by the pixel word FIFO, %0d flagged", n_pw_ovf));
    while (expq.size() > 32) void'(expq.pop_back());
    reader_on = 1;
    drain();
    for (int p = 0; p < NP; p++) if (lost[p] != 0) check(0, $sformatf("no hit lost while ready is respected (pixel %0d)", p));
    // Phase 4: one-cluster events on consecutive bunch crossings.
    compare_on = 0;
    for (int i = 0; i < 14; i++) begin
      hit[4 * (16 * i + 7)] = 1'b1;
      tick();
      hit = '0;
    end
    tick(400);
    // Mechanism counts.
    begin
      int rq = 0, df = 0;
      for (int cl = 0; cl < NCL; cl++) begin rq += n_req_first[cl]; df += n_data_first[cl]; end
      $display("double hits %0d, request-before-data %0d, data-before-request %0d", n_double, rq, df);
      $display("prefetches %0d, queued-event cycles %0d, request-queue-full cycles %0d", n_prefetch, n_queued, n_rcf_full);
      $display("busy FIFO overflows %0d, pixel word FIFO overflows %0d, words %0d", n_busy_ovf, n_pw_ovf, words_in);
      check(n_double > 0, "double hit happened");
      check(rq > 0, "read request before the data happened");
      check(df > 0, "data waiting for the read request happened");
      check(n_prefetch > 0, "address prefetch happened");
      check(n_queued > 0, "several events queued in the busy FIFO");
      check(n_rcf_full > 0, "request queue full happened");
      check(n_pw_ovf > 0, "pixel word FIFO overflow happened");
      check(n_busy_ovf > 0, "busy FIFO overflow happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
