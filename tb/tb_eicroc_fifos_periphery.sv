// tb_eicroc_fifos_periphery: self-checking test of the busy word decoder.
//
// Random sets of the 256 cluster busy bits rise together (one event per
// bunch crossing) and fall later; the read matrix handler's queue is
// randomly full. Checked against a model: every event yields exactly its hit
// clusters, lowest address first, each with the event's BCID (the counter
// value of the cycle the busy bits rose) and its hit count; an isolated event
// of N clusters with no back-pressure ends 2N+2 cycles after its busy edge;
// nothing is sent while the queue is full; a ninth event while eight wait in
// busy_fifo is flagged as overflow.
`timescale 1ns/1ps
module tb_eicroc_fifos_periphery;
  import eicroc_pkg::*;
  localparam int NCL = 256;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCL-1:0] busy = '0;
  logic rcf_full = 1'b0;
  logic send, ovf;
  cluster_req_t req;
  logic [BCID_W-1:0] bcid_o;
  int checks = 0, failures = 0, cycle = 0;
  int tb_bcid = 0;
  int overflows = 0, events = 0, sent = 0, timed = 0, stalls = 0;

  typedef struct { int bcid; int nb; int addr; } exp_t;
  exp_t expq [$];
  int last_send_cycle = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) tb_bcid <= tb_bcid + 1;
  end

  eicroc_fifos_periphery dut (
    .clk(clk), .rst_n(rst_n), .busy_cluster_i(busy), .rcf_full_i(rcf_full),
    .send_cluster_address_o(send), .cluster_req_o(req), .bcid_o(bcid_o),
    .busy_overflow_o(ovf));

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

  // Output monitor, sampling what the clock edge sees.
  always @(posedge clk) begin
    if (rst_n) begin
      if (rcf_full) check(!send, "nothing sent while the queue is full");
      if (send) begin
        exp_t e;
        check(expq.size() > 0, "unexpected address");
        if (expq.size() > 0) begin
          e = expq.pop_front();
          check(int'(req.addr) == e.addr && int'(req.nb_hit) == e.nb && int'(req.bcid) == e.bcid,
                $sformatf("got addr %0d nb %0d bcid %0d, expected %0d %0d %0d",
                          req.addr, req.nb_hit, req.bcid, e.addr, e.nb, e.bcid));
        end
        sent++;
        last_send_cycle = cycle;
      end
    end
  end

  // Raise the bits of 'set' now (they were low), return the expected words.
  task automatic raise(input logic [NCL-1:0] set);
    int nb;
    nb = $countones(set);
    for (int i = 0; i < NCL; i++)
      if (set[i]) expq.push_back('{bcid: tb_bcid % 4096, nb: nb, addr: i});
    busy = busy | set;
    events++;
  endtask

  function automatic logic [NCL-1:0] random_set(int max_hits);
    logic [NCL-1:0] s;
    int n;
    s = '0;
    n = $urandom_range(1, max_hits);
    for (int k = 0; k < n; k++) s[$urandom_range(0, NCL - 1)] = 1'b1;
    return s;
  endfunction

  initial begin
    tick(3);
    rst_n = 1'b1;
    tick(2);
    // Isolated events, no back-pressure: check the cycle count.
    for (int it = 0; it < 20; it++) begin
      logic [NCL-1:0] s;
      int t0, n;
      s = random_set(it < 15 ? 12 : 256);
      n = $countones(s);
      t0 = cycle;
      raise(s);
      tick(1);
      busy = '0;
      while (expq.size() > 0 && cycle < t0 + 1000) tick();
      check(last_send_cycle - t0 == 2 * n + 2, $sformatf("event of %0d clusters took %0d cycles",
            n, last_send_cycle - t0));
      timed++;
      tick(3);
    end
    // Overlapping events with random back-pressure.
    fork
      begin
        for (int it = 0; it < 150; it++) begin
          logic [NCL-1:0] s;
          s = random_set(20) & ~busy;
          if (s != 0) raise(s);
          tick();
          busy = busy & NCL'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
          tick(int'($urandom_range(1, 60)));
        end
      end
      begin
        repeat (400) begin
          rcf_full = ($urandom_range(0, 99) < 30);
          if (rcf_full) stalls++;
          tick(int'($urandom_range(1, 20)));
        end
        rcf_full = 1'b0;
      end
    join
    busy = '0;
    while (expq.size() > 0) tick();
    // Overflow: stall the output and send nine events.
    rcf_full = 1'b1;
    tick(2);
    for (int k = 0; k < 10; k++) begin
      logic [NCL-1:0] s;
      s = '0;
      s[k] = 1'b1;
      raise(s);
      #1;
      if (ovf) begin
        overflows++;
        void'(expq.pop_back());  // this event is lost
      end
      tick();
      busy = '0;
      tick();
    end
    check(overflows > 0, "busy_fifo overflow flagged");
    // The first event is being decoded, eight wait: two of the ten are lost.
    check(overflows == 1, $sformatf("one overflow expected, %0d seen", overflows));
    rcf_full = 1'b0;
    tick(200);
    check(sent > 0 && stalls > 0 && timed > 0, "all phases exercised");
    check(expq.size() == 0, "every expected address was sent");
    $display("events %0d, addresses %0d", events, sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
