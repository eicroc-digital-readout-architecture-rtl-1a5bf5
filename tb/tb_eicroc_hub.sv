// tb_eicroc_hub: self-checking test of the periphery hub.
//
// Random column buses, valids and busy bits; for every column address the
// selected word must be that column's, and every busy bit must land at index
// 16*col + row (the cluster address).
`timescale 1ns/1ps
module tb_eicroc_hub;
  import eicroc_pkg::*;
  localparam int NC = MATRIX_COLS, NR = MATRIX_ROWS;
  logic [3:0]        col = '0;
  col_word_t         words [NC];
  logic [NC-1:0]     valids = '0;
  logic [NR-1:0]     busy [NC];
  col_word_t         word_o;
  logic [NC-1:0]     valid_o;
  logic [NR*NC-1:0]  busy_o;
  int checks = 0, failures = 0;

  eicroc_hub dut (
    .rd_column_i(col), .word_cols_i(words), .valid_cols_i(valids),
    .busy_cluster_cols_i(busy), .word_hub_o(word_o), .valid_o(valid_o), .busy_cluster_o(busy_o));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int c = 0; c < NC; c++) begin
        words[c] = col_word_t'($urandom);
        busy[c]  = NR'($urandom);
      end
      valids = NC'($urandom);
      for (int c = 0; c < NC; c++) begin
        col = 4'(c);
        #1;
        check(word_o == words[c], $sformatf("column %0d selected", c));
        check(valid_o == valids, "valids passed");
        for (int r = 0; r < NR; r++)
          check(busy_o[NR*c + r] == busy[c][r], "busy bit at cluster address");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
