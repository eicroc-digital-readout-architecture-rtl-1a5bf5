// eicroc_read_matrix_handler: reads the hit clusters of each event.
//
// Hit-cluster requests {bcid, nb_hit, cluster address} from the FIFOs
// periphery are queued in read_cluster_fifo. A Mealy FSM takes one request
// at a time: it latches the cluster address (and the event's BCID and hit
// count), sends read_enable_o with the address to the matrix, waits for the
// valid bit of that cluster's column, and then stores the four pixel words
// the cluster sends on consecutive cycles into pixel_word_fifo, each tagged
// with the BCID. During the third word it already latches the next cluster
// address of the same event so that the next cluster is asked for its data
// while the current one finishes.
//   idle_st                 wait for a request, latch it;
//   address_new_cluster_st  wait for the column valid, repeating read_enable;
//   store_pixel_word_st     store words 0..2 (prefetch next address at 2);
//   store_last_pixel_word_st store word 3, next cluster or end of event;
//   end_event_st            clear the counters.
//
// Interface: 40 MHz clock, synchronous active-low reset. The column bus
// coming through the hub is registered once (word_q), so a word is stored one
// cycle after it is on the bus. read_enable_o and rd_cluster_address_o are
// registers that change together. The pixel word FIFO has a plain read port
// (pw_rd_en_i / pw_word_o / pw_empty_o) standing in for the data formatting
// block. The state chart, FIFO sizes and counters follow the chip
// specification; the BCID kept per queued request, the input register, the
// registered read_enable, the waiting branch after the last word and the
// overflow flag are this implementation's choices.
module eicroc_read_matrix_handler
  import eicroc_pkg::*;
#(
  parameter int unsigned N_COLS        = MATRIX_COLS,
  parameter int unsigned CL_FIFO_DEPTH = 256,
  parameter int unsigned PW_FIFO_DEPTH = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              send_cluster_address_i,
  input  cluster_req_t      cluster_req_i,
  output logic              rcf_full_o,
  output logic              read_enable_o,
  output logic [7:0]        rd_cluster_address_o,
  input  col_word_t         word_hub_i,
  input  logic [N_COLS-1:0] valid_i,
  input  logic              pw_rd_en_i,
  output pixel_word_t       pw_word_o,
  output logic              pw_empty_o,
  output logic              pw_overflow_o
);

  typedef enum logic [2:0] {
    IDLE_ST, ADDRESS_NEW_CLUSTER_ST, STORE_PIXEL_WORD_ST,
    STORE_LAST_PIXEL_WORD_ST, END_EVENT_ST
  } rmh_state_e;

  rmh_state_e state_q, state_d;

  cluster_req_t        rcf_head_s;
  logic                rcf_empty_s;
  logic [7:0]          clust_addr_q;
  logic [NB_HIT_W-1:0] nb_hit_q, cnt_cluster_q;
  logic [BCID_W-1:0]   bcid_reg;
  logic                have_addr_q;
  logic [1:0]          cnt_pixel_q;
  col_word_t           word_q;
  logic                valid_q;
  logic                col_valid_s, last_cluster_s;
  logic                latch_pop_s, latch_hold_s, fifo_wr_en_s, last_word_s;
  logic                pixel_cnt_enab_s, pixel_cnt_reset_s, cnt_clust_enab_s, cnt_clust_reset_s;
  logic                use_addr_s;
  logic                pw_full_s;
  pixel_word_t         pw_wr_s;

  eicroc_sync_fifo #(.WIDTH($bits(cluster_req_t)), .DEPTH(CL_FIFO_DEPTH)) u_read_cluster_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en_i   (send_cluster_address_i),
    .wr_data_i (cluster_req_i),
    .rd_en_i   (latch_pop_s),
    .rd_data_o (rcf_head_s),
    .empty_o   (rcf_empty_s),
    .full_o    (rcf_full_o)
  );

  assign col_valid_s    = valid_i[clust_addr_q[7:4]];
  assign last_cluster_s = (cnt_cluster_q == nb_hit_q - 1'b1);

  // Control unit (Mealy).
  always_comb begin
    state_d           = state_q;
    latch_pop_s       = 1'b0;
    latch_hold_s      = 1'b0;
    fifo_wr_en_s      = 1'b0;
    last_word_s       = 1'b0;
    pixel_cnt_enab_s  = 1'b0;
    pixel_cnt_reset_s = 1'b0;
    cnt_clust_enab_s  = 1'b0;
    cnt_clust_reset_s = 1'b0;
    use_addr_s        = 1'b0;
    unique case (state_q)
      IDLE_ST: begin
        pixel_cnt_reset_s = 1'b1;
        cnt_clust_reset_s = 1'b1;
        if (!rcf_empty_s) begin
          latch_pop_s = 1'b1;
          state_d     = ADDRESS_NEW_CLUSTER_ST;
        end
      end
      ADDRESS_NEW_CLUSTER_ST: begin
        if (!have_addr_q) begin
          latch_pop_s = !rcf_empty_s;
        end else if (col_valid_s) begin
          use_addr_s = 1'b1;
          state_d    = STORE_PIXEL_WORD_ST;
        end else begin
          latch_hold_s = 1'b1;
        end
      end
      STORE_PIXEL_WORD_ST: begin
        fifo_wr_en_s     = 1'b1;
        pixel_cnt_enab_s = 1'b1;
        if (cnt_pixel_q == 2'd2) begin
          latch_pop_s = !last_cluster_s && !rcf_empty_s;
          state_d     = STORE_LAST_PIXEL_WORD_ST;
        end
      end
      STORE_LAST_PIXEL_WORD_ST: begin
        fifo_wr_en_s      = 1'b1;
        pixel_cnt_enab_s  = 1'b1;
        pixel_cnt_reset_s = 1'b1;
        if (last_cluster_s) begin
          last_word_s = 1'b1;
          state_d     = END_EVENT_ST;
        end else begin
          cnt_clust_enab_s = 1'b1;
          state_d          = ADDRESS_NEW_CLUSTER_ST;
        end
      end
      END_EVENT_ST: begin
        pixel_cnt_reset_s = 1'b1;
        cnt_clust_reset_s = 1'b1;
        state_d           = IDLE_ST;
      end
      default: state_d = IDLE_ST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= IDLE_ST;
    else        state_q <= state_d;
  end

  // Data path.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clust_addr_q  <= '0;
      nb_hit_q      <= '0;
      bcid_reg      <= '0;
      have_addr_q   <= 1'b0;
      read_enable_o <= 1'b0;
      cnt_pixel_q   <= '0;
      cnt_cluster_q <= '0;
      word_q        <= '0;
      valid_q       <= 1'b0;
    end else begin
      word_q  <= word_hub_i;
      valid_q <= col_valid_s;
      read_enable_o <= latch_pop_s || latch_hold_s;
      if (latch_pop_s) begin
        clust_addr_q <= rcf_head_s.addr;
        nb_hit_q     <= rcf_head_s.nb_hit;
        bcid_reg     <= rcf_head_s.bcid;
      end
      if (latch_pop_s)     have_addr_q <= 1'b1;
      else if (use_addr_s) have_addr_q <= 1'b0;
      if (pixel_cnt_reset_s)     cnt_pixel_q <= '0;
      else if (pixel_cnt_enab_s) cnt_pixel_q <= cnt_pixel_q + 2'd1;
      if (cnt_clust_reset_s)     cnt_cluster_q <= '0;
      else if (cnt_clust_enab_s) cnt_cluster_q <= cnt_cluster_q + 1'b1;
    end
  end

  assign rd_cluster_address_o = clust_addr_q;

  // Output pixel word FIFO.
  assign pw_wr_s = '{bcid: bcid_reg, last: last_word_s,
                     adc: word_q.adc, tdc: word_q.tdc, addr: word_q.addr};
  assign pw_overflow_o = fifo_wr_en_s && pw_full_s;

  eicroc_sync_fifo #(.WIDTH($bits(pixel_word_t)), .DEPTH(PW_FIFO_DEPTH)) u_pixel_word_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en_i   (fifo_wr_en_s),
    .wr_data_i (pw_wr_s),
    .rd_en_i   (pw_rd_en_i),
    .rd_data_o (pw_word_o),
    .empty_o   (pw_empty_o),
    .full_o    (pw_full_s)
  );

  // The clusters send four words back to back: every stored word was valid.
  a_store_valid: assert property (@(posedge clk) disable iff (!rst_n)
    fifo_wr_en_s |-> valid_q);

endmodule
