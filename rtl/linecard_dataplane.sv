// Data path of the 2.5 Gbit/s uplink linecard (Fig. 2 of the source): the
// ingress packet convert block, the per-flow load balancer that spreads
// packets over N_NP network processors, and the egress MUX that merges the
// NPs' output back into one stream.
//
// The network processors, search machine and arbiter, CPU module and the
// PHY/framer are outside this RTL: the NP receive and transmit streams and
// both PHY-side streams are ports. Ingress: PHY rx stream -> packet convert
// (adds header/tail control words) -> load balancer -> np_tx_* per NP.
// Egress: np_rx_* per NP -> MUX (first header first, NP #1 on a tie; strips
// the control words) -> phy_tx_*. An NP is expected to return each packet
// with its header and tail control words in place. ev_* are event strobes.
// USE_DST (flow = source and destination address) and REFRESH (second
// chance for flows hit since the table pointer last passed) select the two
// variants the source's behavioural model describes; both default to the
// hardware description's plain source-address circular table.
module linecard_dataplane
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
  // PHY receive (POS-PHY Level 3 style)
  input  logic                  phy_rx_valid,
  input  logic                  phy_rx_sop,
  input  logic                  phy_rx_eop,
  input  logic      [1:0]       phy_rx_mod,
  input  word_t                 phy_rx_data,
  output logic                  phy_rx_ready,
  // to the network processors
  output logic      [N_NP-1:0]  np_tx_valid,
  output pkt_word_t [N_NP-1:0]  np_tx_word,
  input  logic      [N_NP-1:0]  np_tx_ready,
  // from the network processors
  input  logic      [N_NP-1:0]  np_rx_valid,
  input  pkt_word_t [N_NP-1:0]  np_rx_word,
  output logic      [N_NP-1:0]  np_rx_ready,
  // PHY transmit
  output logic                  phy_tx_valid,
  output logic                  phy_tx_sop,
  output logic                  phy_tx_eop,
  output word_t                 phy_tx_data,
  input  logic                  phy_tx_ready,
  // event strobes
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_evict,
  output logic                  ev_stall,
  output logic                  ev_backpressure,
  output logic      [N_NP-1:0]  ev_fifo_full,
  output logic                  ev_mux_tie
);

  logic      cv_valid, cv_ready;
  pkt_word_t cv_word;

  packet_convert u_packet_convert (
    .clk, .rst_n,
    .rx_valid (phy_rx_valid),
    .rx_sop   (phy_rx_sop),
    .rx_eop   (phy_rx_eop),
    .rx_mod   (phy_rx_mod),
    .rx_data  (phy_rx_data),
    .rx_ready (phy_rx_ready),
    .out_valid(cv_valid),
    .out_word (cv_word),
    .out_ready(cv_ready)
  );

  load_balancer #(
    .N_NP(N_NP), .FT_DEPTH(FT_DEPTH), .PB_DEPTH(PB_DEPTH),
    .KEYQ_DEPTH(KEYQ_DEPTH), .USE_DST(USE_DST), .REFRESH(REFRESH),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_load_balancer (
    .clk, .rst_n,
    .in_valid (cv_valid),
    .in_word  (cv_word),
    .in_ready (cv_ready),
    .np_valid (np_tx_valid),
    .np_word  (np_tx_word),
    .np_ready (np_tx_ready),
    .ev_hit, .ev_miss, .ev_evict, .ev_stall, .ev_backpressure, .ev_fifo_full
  );

  mux_module #(.N_NP(N_NP)) u_mux_module (
    .clk, .rst_n,
    .np_valid (np_rx_valid),
    .np_word  (np_rx_word),
    .np_ready (np_rx_ready),
    .out_valid(phy_tx_valid),
    .out_sop  (phy_tx_sop),
    .out_eop  (phy_tx_eop),
    .out_data (phy_tx_data),
    .out_ready(phy_tx_ready),
    .ev_tie   (ev_mux_tie)
  );

endmodule
