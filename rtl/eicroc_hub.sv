// eicroc_hub: column multiplexer of the digital periphery.
//
// The hub selects, among the N_COLS column buses, the one of the column being
// read; the column is the upper four bits of the cluster address that the
// read matrix handler sends to the matrix. It also gathers the busy bits of
// all clusters into one vector whose bit index is the cluster address
// {col,row}, and the valid bits of the columns.
//
// Interface: rd_column_i is bits [7:4] of the cluster address being read.
// Purely combinational, no clock. The selection rule comes from
// the chip specification; the busy bit ordering is this implementation's.
module eicroc_hub
  import eicroc_pkg::*;
#(
  parameter int unsigned N_COLS = MATRIX_COLS,
  parameter int unsigned N_ROWS = MATRIX_ROWS
) (
  input  logic [3:0]                rd_column_i,
  input  col_word_t                 word_cols_i [N_COLS],
  input  logic [N_COLS-1:0]         valid_cols_i,
  input  logic [N_ROWS-1:0]         busy_cluster_cols_i [N_COLS],
  output col_word_t                 word_hub_o,
  output logic [N_COLS-1:0]         valid_o,
  output logic [N_ROWS*N_COLS-1:0]  busy_cluster_o
);

  logic [3:0] col_sel;
  assign col_sel = rd_column_i;  // upper four bits of the cluster address

  always_comb begin
    word_hub_o = '0;
    if (int'(col_sel) < N_COLS) word_hub_o = word_cols_i[col_sel];
  end

  assign valid_o = valid_cols_i;

  for (genvar c = 0; c < N_COLS; c++) begin : g_busy
    assign busy_cluster_o[N_ROWS*c +: N_ROWS] = busy_cluster_cols_i[c];
  end

endmodule
