// Load balancer (Fig. 3 of the source): the load balancing logic, one packet
// FIFO per network processor, and the output control logic that feeds each
// NP from its FIFO.
//
// Packets enter as a word stream from the packet convert block
// (in_valid/in_word/in_ready, in_ready low = back pressure) and leave
// towards NP #i on np_valid[i]/np_word[i]/np_ready[i], with the header
// control word marked with the NP and flow-table entry numbers. All packets
// of one flow (same IPv4 source address) leave on the same NP port in their
// arrival order. FIFO_DEPTH (words per NP FIFO), FT_DEPTH (flow table
// entries) and PB_DEPTH (pipeline buffer words) are not given in the source
// and are this design's choice. ev_* are one-cycle event strobes.
module load_balancer
  import lb_pkg::*;
#(
  parameter int unsigned N_NP       = 2,
  parameter int unsigned FT_DEPTH   = 16,
  parameter int unsigned PB_DEPTH   = 64,
  parameter int unsigned KEYQ_DEPTH = 4,
  parameter bit          USE_DST    = 1'b0,
  parameter bit          REFRESH    = 1'b0,
  parameter int unsigned FIFO_DEPTH = 512
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  pkt_word_t             in_word,
  output logic                  in_ready,
  output logic      [N_NP-1:0]  np_valid,
  output pkt_word_t [N_NP-1:0]  np_word,
  input  logic      [N_NP-1:0]  np_ready,
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_evict,
  output logic                  ev_stall,
  output logic                  ev_backpressure,
  output logic      [N_NP-1:0]  ev_fifo_full
);

  localparam int unsigned LVL_W = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned IDX_W = (FT_DEPTH > 1) ? $clog2(FT_DEPTH) : 1;

  logic      [N_NP-1:0]             f_push, f_full, f_empty, f_pop;
  pkt_word_t                        f_din;
  pkt_word_t [N_NP-1:0]             f_dout;
  logic      [N_NP-1:0][LVL_W-1:0]  f_level;
  logic      [N_NP-1:0]             rel_valid;
  logic      [N_NP-1:0][IDX_W-1:0]  rel_entry;

  load_balancing_logic #(
    .N_NP(N_NP), .FT_DEPTH(FT_DEPTH), .PB_DEPTH(PB_DEPTH),
    .KEYQ_DEPTH(KEYQ_DEPTH), .USE_DST(USE_DST), .REFRESH(REFRESH),
    .LVL_W(LVL_W)
  ) u_logic (
    .clk, .rst_n,
    .in_valid, .in_word, .in_ready,
    .f_push, .f_din, .f_full, .f_level,
    .rel_valid, .rel_entry,
    .ev_hit, .ev_miss, .ev_evict, .ev_stall, .ev_backpressure
  );

  for (genvar i = 0; i < N_NP; i++) begin : g_np
    sync_fifo #(.WIDTH(PKT_WORD_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push (f_push[i]),
      .din  (f_din),
      .pop  (f_pop[i]),
      .dout (f_dout[i]),
      .full (f_full[i]),
      .empty(f_empty[i]),
      .level(f_level[i])
    );

    output_control #(.DEPTH(FT_DEPTH)) u_output_control (
      .clk, .rst_n,
      .f_empty  (f_empty[i]),
      .f_dout   (f_dout[i]),
      .f_pop    (f_pop[i]),
      .np_valid (np_valid[i]),
      .np_word  (np_word[i]),
      .np_ready (np_ready[i]),
      .rel_valid(rel_valid[i]),
      .rel_entry(rel_entry[i])
    );
  end

  assign ev_fifo_full = f_full;

endmodule
