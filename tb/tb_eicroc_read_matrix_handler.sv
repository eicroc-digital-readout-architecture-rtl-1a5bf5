// tb_eicroc_read_matrix_handler: self-checking test of the read matrix
// handler against a behavioural matrix.
//
// Events (BCID, list of hit cluster addresses in ascending order) are pushed
// into the handler's request queue, respecting its full flag. The
// behavioural matrix answers a read_enable for a cluster by sending four
// random pixel words on that cluster's column, two or more cycles later,
// like a cluster arbiter. Checked: clusters are read in event order; every
// sent word comes out of the pixel word FIFO once, in order, with the
// event's BCID and the last flag on the final word of each event; with
// clusters that answer at once, consecutive clusters start 6 cycles apart
// (4 words plus the 2-cycle request turnaround, thanks to the prefetch of
// the next address); a full pixel word FIFO drops and flags words; the
// request queue's full flag is reached.
`timescale 1ns/1ps
module tb_eicroc_read_matrix_handler;
  import eicroc_pkg::*;
  localparam int NC = MATRIX_COLS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic send = 1'b0;
  cluster_req_t req = '0;
  logic rcf_full, read_enable;
  logic [7:0] rd_addr;
  col_word_t bus [NC];
  col_word_t word_hub;
  logic [NC-1:0] valid = '0;
  logic pw_rd = 1'b0, pw_empty, pw_ovf;
  pixel_word_t pw_word;
  int checks = 0, failures = 0, cycle = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  assign word_hub = bus[rd_addr[7:4]];

  eicroc_read_matrix_handler dut (
    .clk(clk), .rst_n(rst_n), .send_cluster_address_i(send), .cluster_req_i(req),
    .rcf_full_o(rcf_full), .read_enable_o(read_enable), .rd_cluster_address_o(rd_addr),
    .word_hub_i(word_hub), .valid_i(valid), .pw_rd_en_i(pw_rd), .pw_word_o(pw_word),
    .pw_empty_o(pw_empty), .pw_overflow_o(pw_ovf));

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected read order and output words.
  typedef struct { int addr; int bcid; bit last_cl; } rd_t;
  rd_t rdq [$];
  pixel_word_t outq [$];

  // Behavioural matrix.
  int  max_delay = 8;
  bit  hold = 0;
  bit  pend = 0, sending = 0;
  int  pend_addr = 0, start_at = 0, widx = 0, cur_addr = 0;
  rd_t cur;
  int  last_start = -100, spacing_checks = 0, min_spacing = 1000;
  always @(posedge clk) begin
    if (rst_n && read_enable) begin
      if (!(sending && int'(rd_addr) == cur_addr) && !(pend && int'(rd_addr) == pend_addr)) begin
        check(!pend, "one request at a time");
        pend      = 1;
        pend_addr = int'(rd_addr);
        start_at  = cycle + 2 + int'($urandom_range(0, max_delay));
      end
    end
  end
  always @(negedge clk) begin
    valid = '0;
    if (!sending && pend && !hold && cycle >= start_at) begin
      check(rdq.size() > 0, "request expected");
      if (rdq.size() > 0) begin
        cur = rdq.pop_front();
        check(pend_addr == cur.addr, $sformatf("cluster %0d read, %0d expected", pend_addr, cur.addr));
      end
      if (max_delay == 0 && last_start >= 0) begin
        spacing_checks++;
        if (cycle - last_start < min_spacing) min_spacing = cycle - last_start;
        check(cycle - last_start == 6, $sformatf("clusters %0d cycles apart, 6 expected", cycle - last_start));
      end
      last_start = (max_delay == 0) ? cycle : -100;
      cur_addr = pend_addr;
      pend = 0;
      sending = 1;
      widx = 0;
    end
    if (sending) begin
      col_word_t w;
      pixel_word_t p;
      w.adc  = 8'($urandom);
      w.tdc  = 10'($urandom);
      w.addr = 10'({cur_addr[7:0], 2'(widx)});
      bus[cur_addr[7:4]] = w;
      valid[cur_addr[7:4]] = 1'b1;
      p = '{bcid: 12'(cur.bcid), last: cur.last_cl && (widx == 3), adc: w.adc, tdc: w.tdc, addr: w.addr};
      outq.push_back(p);
      widx++;
      if (widx == 4) sending = 0;
    end
  end

  // Reader of the pixel word FIFO.
  bit reader_on = 1;
  int words_out = 0;
  always @(negedge clk) begin
    pw_rd = reader_on && !pw_empty && ($urandom_range(0, 9) != 0);
  end
  always @(posedge clk) begin
    if (rst_n && pw_rd && !pw_empty) begin
      pixel_word_t e;
      check(outq.size() > 0, "unexpected pixel word");
      if (outq.size() > 0) begin
        e = outq.pop_front();
        check(pw_word == e, $sformatf("pixel word %h, expected %h", pw_word, e));
      end
      words_out++;
    end
  end

  // Push one event into the request queue.
  task automatic push_event(input int bcid, input int nb, input bit back_to_back);
    int addrs [$];
    logic [255:0] used;
    used = '0;
    while (addrs.size() < nb) begin
      int a;
      a = $urandom_range(0, 255);
      if (!used[a]) begin used[a] = 1'b1; addrs.push_back(a); end
    end
    addrs.sort();
    for (int k = 0; k < nb; k++) begin
      while (rcf_full) tick();
      rdq.push_back('{addr: addrs[k], bcid: bcid, last_cl: (k == nb - 1)});
      req  = '{bcid: 12'(bcid), nb_hit: 9'(nb), addr: 8'(addrs[k])};
      send = 1'b1;
      tick();
      send = 1'b0;
      if (!back_to_back) tick(int'($urandom_range(0, 2)));
    end
  endtask

  int fulls = 0;
  always @(posedge clk) if (rcf_full) fulls++;

  initial begin
    for (int c = 0; c < NC; c++) bus[c] = '0;
    tick(3);
    rst_n = 1'b1;
    tick(2);
    // Random events, random answer delays.
    for (int e = 0; e < 60; e++) push_event(int'($urandom_range(0, 4095)), int'($urandom_range(1, 10)), 0);
    while (rdq.size() > 0 || outq.size() > 0) tick();
    // Clusters answering at once: check the 6-cycle cadence.
    max_delay = 0;
    tick(5);
    push_event(77, 12, 1);
    while (rdq.size() > 0 || outq.size() > 0) tick();
    check(spacing_checks >= 10, "cadence measured");
    // A full event of 256 clusters plus one more: the request queue fills.
    max_delay = 2;
    hold = 1;  // the matrix does not answer while the queue fills
    fork
      begin
        push_event(1234, 256, 1);
        push_event(1235, 3, 1);
      end
      begin
        int n = 0;
        while (fulls == 0 && n < 1000) begin tick(); n++; end
        tick(10);
        hold = 0;
      end
    join
    while (rdq.size() > 0 || outq.size() > 0) tick();
    check(fulls > 0, "request queue full reached");
    // Pixel word FIFO overflow: stop reading, 10 clusters = 40 words.
    reader_on = 0;
    tick(2);
    begin
      int ovf = 0;
      fork
        push_event(4000, 10, 1);
        begin
          repeat (400) begin
            @(posedge clk);
            if (pw_ovf) ovf++;
          end
        end
      join
      check(ovf == 8, $sformatf("8 words dropped, %0d flagged", ovf));
      // The FIFO keeps the first 32 words.
      while (outq.size() > 32) void'(outq.pop_back());
    end
    reader_on = 1;
    while (outq.size() > 0) tick();
    tick(5);
    check(pw_empty, "all words read");
    $display("words %0d, min spacing %0d", words_out, min_spacing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
