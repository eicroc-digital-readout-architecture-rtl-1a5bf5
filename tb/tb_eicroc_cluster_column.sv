// tb_eicroc_cluster_column: self-checking test of one column of 16 clusters
// with its end-of-column logic, a behavioural front end per pixel and a
// behavioural periphery.
//
// Random clusters of the column take hits on random pixel patterns; each
// hit cluster is then read by address {COL,row}. Before that, a read enable
// with the same row but another column is sent and must be ignored.
// Checked: the busy bit of the hit cluster; the column bus carries four
// valid words with pixel addresses 4*{COL,row}+p and the expected ADC/TDC
// words (last words of pixels that were not hit), passing through the
// clusters below; clusters are not ready while converting.
`timescale 1ns/1ps
module tb_eicroc_cluster_column;
  import eicroc_pkg::*;
  localparam int NR = MATRIX_ROWS;
  localparam logic [3:0] COL = 4'd6;
  localparam int NCL = NR, NP = 4 * NCL;

  logic clk = 1'b0, rst_n = 1'b0;
  logic read_enable = 1'b0;
  logic [7:0] rd_addr = '0;
  logic [NP-1:0] busy;
  logic [ADC_W-1:0] adc [NP];
  logic [TDC_W-1:0] tdc [NP];
  logic [NCL-1:0] ready, busy_cl;
  logic valid_col;
  col_word_t word;
  logic [NP-1:0] hit = '0;
  logic [7:0] hit_adc [NP];
  logic [9:0] hit_tdc [NP];
  int conv [NP];
  int lost [NP];
  logic [ADC_W-1:0] last_adc [NP];
  logic [TDC_W-1:0] last_tdc [NP];
  int checks = 0, failures = 0, cycle = 0;

  always #12.5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  for (genvar p = 0; p < NP; p++) begin : g_afe
    eicroc_afe_model u_afe (
      .clk(clk), .hit_i(hit[p]), .hit_adc_i(hit_adc[p]), .hit_tdc_i(hit_tdc[p]),
      .conv_cycles_i(conv[p]), .ready_i(ready[p/4]), .busy_o(busy[p]),
      .adc_o(adc[p]), .tdc_o(tdc[p]), .lost_o(lost[p]));
  end

  eicroc_cluster_column #(.COL(COL)) dut (
    .clk(clk), .rst_n(rst_n), .read_enable_i(read_enable), .rd_cluster_address_i(rd_addr),
    .busy_adc_pix_i(busy), .adc_pix_i(adc), .tdc_pix_i(tdc), .ready_o(ready),
    .busy_cluster_o(busy_cl), .valid_o(valid_col), .word_o(word));

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
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      hit_adc[p] = '0; hit_tdc[p] = '0; conv[p] = 1; last_adc[p] = '0; last_tdc[p] = '0;
    end
    tick(3);
    rst_n = 1'b1;
    tick(2);
    for (int it = 0; it < 150; it++) begin
      int cl, n;
      logic [3:0] pat;
      cl  = $urandom_range(0, NCL - 1);
      pat = 4'($urandom_range(1, 15));
      check(ready[cl], "cluster ready before the hit");
      for (int j = 0; j < 4; j++) begin
        int p;
        p = 4 * cl + j;
        hit_adc[p] = 8'($urandom);
        hit_tdc[p] = 10'($urandom);
        conv[p]    = $urandom_range(2, 8);
        if (pat[j]) begin
          hit[p] = 1'b1;
          last_adc[p] = hit_adc[p];
          last_tdc[p] = hit_tdc[p];
        end
      end
      tick();
      hit = '0;
      tick();
      check(busy_cl[cl] && ($countones(busy_cl) == 1), "busy bit at the cluster address");
      check(!ready[cl], "cluster not ready while converting");
      // Read it, sometimes before its data is complete.
      tick(int'($urandom_range(0, 12)));
      rd_addr = {COL + 4'd1, 4'(cl)};  // same row, other column: ignored
      read_enable = 1'b1;
      tick();
      read_enable = 1'b0;
      tick(12);
      check(!valid_col, "read enable of another column ignored");
      rd_addr = {COL, 4'(cl)};
      read_enable = 1'b1;
      tick();
      read_enable = 1'b0;
      n = 0;
      while (!valid_col && n < 100) begin tick(); n++; end
      for (int j = 0; j < 4; j++) begin
        int p;
        p = 4 * cl + j;
        check(valid_col, "four consecutive valid words");
        check(word.addr == {COL, 4'(cl), 2'(j)}, $sformatf("pixel address %0d", word.addr));
        check(word.adc == last_adc[p] && word.tdc == last_tdc[p], "pixel data");
        tick();
      end
      check(!valid_col, "four words only");
      while (!ready[cl]) tick();
    end
    for (int p = 0; p < NP; p++) if (lost[p] != 0) check(0, "hit lost");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
