// eicroc_fifos_periphery: busy word decoder of the digital periphery.
//
// Every 40 MHz cycle the 256 cluster busy bits are compared with their value
// of the previous cycle. A non-zero vector of rising edges (clusters that
// started a conversion) is written into busy_fifo together with the bunch
// crossing counter bcid_s of that cycle. A Moore FSM then handles one
// vector at a time:
//   idle_st               wait for busy_fifo to hold a vector;
//   read_busy_st          pop it: busy word, BCID and its count of ones
//                         (number of hit clusters) are latched;
//   address_array_calc_st one hit cluster per cycle: a priority encoder
//                         gives the lowest set bit, the word
//                         {bcid, nb_hit, address} goes into address_array
//                         and the bit is cleared;
//   address_decode_st     one address per cycle is sent to the read matrix
//                         handler (send_cluster_address_o), waiting while its
//                         queue is full.
// An event of N hit clusters therefore takes 2 + 2N cycles.
//
// Interface: 40 MHz clock, synchronous active-low reset. cluster_req_o is
// valid while send_cluster_address_o is 1. busy_overflow_o pulses when a
// rising-edge vector is lost because busy_fifo is full. The FSM, FIFOs,
// counters and encoder follow the chip specification; storing the BCID in
// busy_fifo, the back-pressure input and the overflow flag are this
// implementation's additions.
module eicroc_fifos_periphery
  import eicroc_pkg::*;
#(
  parameter int unsigned N_CL       = MATRIX_ROWS * MATRIX_COLS,
  parameter int unsigned BUSY_DEPTH = 8,
  parameter int unsigned ADDR_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_CL-1:0]   busy_cluster_i,
  input  logic              rcf_full_i,
  output logic              send_cluster_address_o,
  output cluster_req_t      cluster_req_o,
  output logic [BCID_W-1:0] bcid_o,
  output logic              busy_overflow_o
);

  typedef enum logic [1:0] {
    IDLE_ST, READ_BUSY_ST, ADDRESS_ARRAY_CALC_ST, ADDRESS_DECODE_ST
  } fp_state_e;

  typedef struct packed {
    logic [BCID_W-1:0] bcid;
    logic [N_CL-1:0]   busy;
  } busy_entry_t;

  fp_state_e state_q, state_d;

  logic [N_CL-1:0]     busy_q, busy_re_vector_s;
  logic [BCID_W-1:0]   bcid_s, bcid_latched_s;
  busy_entry_t         busy_wr_s, busy_rd_s;
  logic                busy_fifo_empty_s, busy_fifo_full_s, busy_fifo_wr;
  logic [N_CL-1:0]     busy_word_updated_q;
  logic [NB_HIT_W-1:0] nb_hit_clusters_s, ones_s;
  logic [NB_HIT_W-1:0] cnt_clusters_s, cnt_clusters_s_1;
  logic [7:0]          one_hot_address_s;
  logic                found_s;
  logic                end_busy_s;
  logic                read_busy_s, address_array_calc_s, send_s;
  logic                nb_hit_clusters_reset_s, cnt_cluster_reset_s;
  logic                aa_empty_s, aa_full_s;
  cluster_req_t        aa_wr_s;

  // Rising edges of the busy bits.
  assign busy_re_vector_s = busy_cluster_i & ~busy_q;
  assign busy_fifo_wr     = (busy_re_vector_s != '0) && !busy_fifo_full_s;
  assign busy_overflow_o  = (busy_re_vector_s != '0) && busy_fifo_full_s;
  assign busy_wr_s        = '{bcid: bcid_s, busy: busy_re_vector_s};
  assign bcid_o           = bcid_s;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q <= '0;
      bcid_s <= '0;
    end else begin
      busy_q <= busy_cluster_i;
      bcid_s <= bcid_s + 1'b1;
    end
  end

  eicroc_sync_fifo #(.WIDTH($bits(busy_entry_t)), .DEPTH(BUSY_DEPTH)) u_busy_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en_i   (busy_fifo_wr),
    .wr_data_i (busy_wr_s),
    .rd_en_i   (read_busy_s),
    .rd_data_o (busy_rd_s),
    .empty_o   (busy_fifo_empty_s),
    .full_o    (busy_fifo_full_s)
  );

  // Ones counter: number of hit clusters in the word at the FIFO head.
  always_comb begin
    ones_s = '0;
    for (int i = 0; i < N_CL; i++) ones_s = ones_s + NB_HIT_W'(busy_rd_s.busy[i]);
  end

  // Priority encoder ("one_hot" task of the chip): lowest set bit.
  always_comb begin
    one_hot_address_s = '0;
    found_s           = 1'b0;
    for (int i = N_CL - 1; i >= 0; i--) begin
      if (busy_word_updated_q[i]) begin
        one_hot_address_s = 8'(i);
        found_s           = 1'b1;
      end
    end
  end

  assign end_busy_s = (cnt_clusters_s_1 == nb_hit_clusters_s - 1'b1);

  // Control unit (Moore).
  always_comb begin
    state_d                 = state_q;
    read_busy_s             = 1'b0;
    address_array_calc_s    = 1'b0;
    send_s                  = 1'b0;
    nb_hit_clusters_reset_s = 1'b0;
    cnt_cluster_reset_s     = 1'b0;
    unique case (state_q)
      IDLE_ST: begin
        nb_hit_clusters_reset_s = 1'b1;
        cnt_cluster_reset_s     = 1'b1;
        if (!busy_fifo_empty_s) state_d = READ_BUSY_ST;
      end
      READ_BUSY_ST: begin
        read_busy_s = 1'b1;
        state_d     = ADDRESS_ARRAY_CALC_ST;
      end
      ADDRESS_ARRAY_CALC_ST: begin
        address_array_calc_s = 1'b1;
        if (end_busy_s) state_d = ADDRESS_DECODE_ST;
      end
      ADDRESS_DECODE_ST: begin
        send_s = !rcf_full_i && !aa_empty_s;
        if (send_s && (cnt_clusters_s == nb_hit_clusters_s - 1'b1)) state_d = IDLE_ST;
      end
      default: state_d = IDLE_ST;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= IDLE_ST;
    else        state_q <= state_d;
  end

  // Data path registers and counters.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_word_updated_q <= '0;
      bcid_latched_s      <= '0;
      nb_hit_clusters_s   <= '0;
      cnt_clusters_s      <= '0;
      cnt_clusters_s_1    <= '0;
    end else begin
      if (nb_hit_clusters_reset_s) nb_hit_clusters_s <= '0;
      else if (read_busy_s)        nb_hit_clusters_s <= ones_s;

      if (read_busy_s) begin
        busy_word_updated_q <= busy_rd_s.busy;
        bcid_latched_s      <= busy_rd_s.bcid;
        cnt_clusters_s_1    <= '0;
      end else if (address_array_calc_s && (cnt_clusters_s_1 < nb_hit_clusters_s)) begin
        busy_word_updated_q[one_hot_address_s] <= 1'b0;
        cnt_clusters_s_1 <= cnt_clusters_s_1 + 1'b1;
      end

      if (cnt_cluster_reset_s) cnt_clusters_s <= '0;
      else if (send_s)         cnt_clusters_s <= cnt_clusters_s + 1'b1;
    end
  end

  assign aa_wr_s = '{bcid: bcid_latched_s, nb_hit: nb_hit_clusters_s, addr: one_hot_address_s};

  eicroc_sync_fifo #(.WIDTH($bits(cluster_req_t)), .DEPTH(ADDR_DEPTH)) u_address_array (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en_i   (address_array_calc_s && found_s && (cnt_clusters_s_1 < nb_hit_clusters_s)),
    .wr_data_i (aa_wr_s),
    .rd_en_i   (send_s),
    .rd_data_o (cluster_req_o),
    .empty_o   (aa_empty_s),
    .full_o    (aa_full_s)
  );

  assign send_cluster_address_o = send_s;

  // address_array holds at most one event, which never exceeds its depth.
  a_aa_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(address_array_calc_s && found_s && aa_full_s));

endmodule
