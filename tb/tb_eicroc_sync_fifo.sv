// tb_eicroc_sync_fifo: self-checking test of the circular-buffer FIFO.
//
// Random writes and reads against a queue model, with phases that fill the
// FIFO to full and drain it to empty. Checked each cycle: empty and full
// flags, the head word, and that writes when full and reads when empty are
// ignored.
`timescale 1ns/1ps
module tb_eicroc_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr = 1'b0, rd = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic empty, full;
  logic [W-1:0] model [$];
  int checks = 0, failures = 0, cycle = 0, fulls = 0, empties = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  eicroc_sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en_i(wr), .wr_data_i(wdata), .rd_en_i(rd),
    .rd_data_o(rdata), .empty_o(empty), .full_o(full));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(rdata == model[0], "head word");
      if (full) fulls++;
      if (empty) empties++;
      bias = ((i / 200) % 2 == 0) ? 75 : 25;  // fill phases and drain phases
      wr = ($urandom_range(0, 99) < bias);
      rd = ($urandom_range(0, 99) >= bias);
      wdata = W'($urandom);
    end
    check(fulls > 0 && empties > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model update with the flags as seen before the edge: a write when full
  // and a read when empty are ignored.
  always @(posedge clk) begin
    if (rst_n) begin
      bit do_rd, do_wr;
      do_rd = rd && (model.size() > 0);
      do_wr = wr && (model.size() < D);
      if (do_rd) void'(model.pop_front());
      if (do_wr) model.push_back(wdata);
    end
  end
endmodule
