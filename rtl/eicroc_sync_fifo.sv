// eicroc_sync_fifo: synchronous circular-buffer FIFO.
//
// DEPTH words of WIDTH bits in a register array. The read and write pointers
// are one bit wider than the array address: the FIFO is empty when the two
// pointers are equal and full when their low bits are equal and their top
// bits differ. This is the pointer scheme the chip uses for busy_fifo,
// address_array, read_cluster_fifo and pixel_word_fifo.
//
// Interface: wr_en_i writes wr_data_i at the next clock edge unless the FIFO
// is full; rd_en_i removes the head word unless the FIFO is empty. rd_data_o
// always shows the head word (first-word fall-through), so a word written at
// one edge can be read in the next cycle. Synchronous active-low reset
// empties the FIFO; the storage itself is not reset. DEPTH must be a power of
// two. Fall-through read and ignoring writes when full are choices of this
// implementation.
module eicroc_sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en_i,
  input  logic [WIDTH-1:0] wr_data_i,
  input  logic             rd_en_i,
  output logic [WIDTH-1:0] rd_data_o,
  output logic             empty_o,
  output logic             full_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wr_ptr_s, rd_ptr_s;

  assign empty_o   = (wr_ptr_s == rd_ptr_s);
  assign full_o    = (wr_ptr_s[AW-1:0] == rd_ptr_s[AW-1:0]) && (wr_ptr_s[AW] != rd_ptr_s[AW]);
  assign rd_data_o = mem[rd_ptr_s[AW-1:0]];

  always_ff @(posedge clk) begin
    if (wr_en_i && !full_o) mem[wr_ptr_s[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr_s <= '0;
      rd_ptr_s <= '0;
    end else begin
      if (wr_en_i && !full_o)  wr_ptr_s <= wr_ptr_s + 1'b1;
      if (rd_en_i && !empty_o) rd_ptr_s <= rd_ptr_s + 1'b1;
    end
  end

endmodule
