// Load balancing logic: assigns every packet to one of the NP FIFOs on a
// per-flow basis, so that packets of one flow always reach the same network
// processor (and stay in order) while new flows go to the less loaded one.
//
// Structure (after Fig. 4 of the source): incoming packet words enter the
// pipeline buffer and are watched by the flow control logic, which takes the
// IPv4 source address of each packet (with USE_DST, source and destination
// address) and looks it up in the flow table. On a hit the packet follows
// its flow's FIFO; on a miss the FIFO selection compensator picks the FIFO
// with the lower fill level and the new flow is added to the table, over
// the oldest entry with no packets still queued (with REFRESH, entries hit
// since the pointer last passed get a second chance). FIFO control then
// copies the packet out of the
// pipeline buffer into that FIFO, marking NP and entry number in its header,
// and relays back pressure (in_ready) to the packet convert block. Entry
// control counts each entry's packets still queued, using release reports
// from the output control logic of each FIFO.
//
// Interface: in_valid/in_word/in_ready packet stream in; f_push/f_din write
// the NP FIFOs, which report f_full and f_level; rel_valid/rel_entry per FIFO
// report packets that left. ev_* are one-cycle event strobes for monitoring.
// Latency: a packet can start leaving the pipeline buffer about four cycles
// after its source address word arrived (key queue, request, result,
// decision).
module load_balancing_logic
  import lb_pkg::*;
#(
  parameter int unsigned N_NP       = 2,
  parameter int unsigned FT_DEPTH   = 16,
  parameter int unsigned PB_DEPTH   = 64,
  parameter int unsigned KEYQ_DEPTH = 4,
  parameter bit          USE_DST    = 1'b0,
  parameter bit          REFRESH    = 1'b0,
  parameter int unsigned LVL_W      = 10,
  localparam int unsigned IDX_W = (FT_DEPTH > 1) ? $clog2(FT_DEPTH) : 1,
  localparam int unsigned NP_W  = (N_NP > 1) ? $clog2(N_NP) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // from the packet convert block
  input  logic                        in_valid,
  input  pkt_word_t                   in_word,
  output logic                        in_ready,
  // NP FIFO write side
  output logic      [N_NP-1:0]        f_push,
  output pkt_word_t                   f_din,
  input  logic      [N_NP-1:0]        f_full,
  input  logic      [N_NP-1:0][LVL_W-1:0] f_level,
  // packets that left each FIFO
  input  logic      [N_NP-1:0]        rel_valid,
  input  logic      [N_NP-1:0][IDX_W-1:0] rel_entry,
  // event strobes
  output logic                        ev_hit,
  output logic                        ev_miss,
  output logic                        ev_evict,
  output logic                        ev_stall,
  output logic                        ev_backpressure
);

  // ---- pipeline buffer ----
  logic      in_fire;
  logic      pb_empty, pb_full, pb_pop;
  pkt_word_t pb_dout;
  logic      keyq_full;

  assign in_fire = in_valid && in_ready;

  sync_fifo #(.WIDTH(PKT_WORD_W), .DEPTH(PB_DEPTH)) u_pipeline_buffer (
    .clk, .rst_n,
    .push (in_fire),
    .din  (in_word),
    .pop  (pb_pop),
    .dout (pb_dout),
    .full (pb_full),
    .empty(pb_empty),
    .level()
  );

  // ---- entry control ----
  logic [FT_DEPTH-1:0] entry_busy;
  logic                alloc;
  logic [IDX_W-1:0]    alloc_entry;

  entry_control #(.DEPTH(FT_DEPTH), .N_NP(N_NP)) u_entry_control (
    .clk, .rst_n,
    .alloc        (alloc),
    .alloc_entry  (alloc_entry),
    .release_valid(rel_valid),
    .release_entry(rel_entry),
    .busy         (entry_busy)
  );

  // ---- flow table ----
  logic             ft_lookup_valid, ft_result_valid, ft_hit, ft_insert_valid, ft_evict, ft_alloc_ok;
  localparam int unsigned KEY_W = USE_DST ? 2 * WORD_W : WORD_W;
  logic [KEY_W-1:0] ft_lookup_key, ft_insert_key;
  logic [IDX_W-1:0] ft_entry, ft_alloc_entry;
  logic [NP_W-1:0]  ft_np, ft_insert_np;

  flow_table #(
    .DEPTH(FT_DEPTH), .KEY_W(KEY_W), .NP_W(NP_W), .REFRESH(REFRESH)
  ) u_flow_table (
    .clk, .rst_n,
    .lookup_valid(ft_lookup_valid),
    .lookup_key  (ft_lookup_key),
    .result_valid(ft_result_valid),
    .hit         (ft_hit),
    .entry       (ft_entry),
    .np          (ft_np),
    .busy        (entry_busy),
    .alloc_entry (ft_alloc_entry),
    .alloc_ok    (ft_alloc_ok),
    .evict       (ft_evict),
    .insert_valid(ft_insert_valid),
    .insert_key  (ft_insert_key),
    .insert_np   (ft_insert_np)
  );

  // ---- FIFO selection compensator ----
  logic [NP_W-1:0] fifo_sel;

  fifo_select #(.N_NP(N_NP), .LVL_W(LVL_W)) u_fifo_select (
    .level(f_level),
    .sel  (fifo_sel)
  );

  // ---- flow control logic ----
  logic             dec_valid, dec_ready;
  logic [NP_W-1:0]  dec_np;
  logic [IDX_W-1:0] dec_entry;

  flow_control_logic #(
    .DEPTH(FT_DEPTH), .N_NP(N_NP), .KEYQ_DEPTH(KEYQ_DEPTH), .USE_DST(USE_DST)
  ) u_flow_control_logic (
    .clk, .rst_n,
    .in_fire        (in_fire),
    .in_word        (in_word),
    .keyq_full      (keyq_full),
    .ft_lookup_valid(ft_lookup_valid),
    .ft_lookup_key  (ft_lookup_key),
    .ft_result_valid(ft_result_valid),
    .ft_hit         (ft_hit),
    .ft_entry       (ft_entry),
    .ft_np          (ft_np),
    .ft_alloc_entry (ft_alloc_entry),
    .ft_alloc_ok    (ft_alloc_ok),
    .ft_insert_valid(ft_insert_valid),
    .ft_insert_key  (ft_insert_key),
    .ft_insert_np   (ft_insert_np),
    .fifo_sel       (fifo_sel),
    .alloc          (alloc),
    .alloc_entry    (alloc_entry),
    .dec_valid      (dec_valid),
    .dec_ready      (dec_ready),
    .dec_np         (dec_np),
    .dec_entry      (dec_entry),
    .ev_hit         (ev_hit),
    .ev_miss        (ev_miss),
    .ev_stall       (ev_stall)
  );

  // ---- FIFO control ----
  fifo_control #(.N_NP(N_NP), .DEPTH(FT_DEPTH)) u_fifo_control (
    .clk, .rst_n,
    .dec_valid(dec_valid),
    .dec_ready(dec_ready),
    .dec_np   (dec_np),
    .dec_entry(dec_entry),
    .pb_empty (pb_empty),
    .pb_dout  (pb_dout),
    .pb_pop   (pb_pop),
    .pb_full  (pb_full),
    .keyq_full(keyq_full),
    .f_push   (f_push),
    .f_din    (f_din),
    .f_full   (f_full),
    .in_ready (in_ready)
  );

  assign ev_evict        = ft_insert_valid && ft_evict;
  assign ev_backpressure = in_valid && !in_ready;

endmodule
