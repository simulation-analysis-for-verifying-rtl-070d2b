// Flow control logic: classifies each incoming packet by flow and decides
// which NP FIFO it goes to.
//
// It watches the words accepted into the pipeline buffer, counts words from
// the header control word and takes the IPv4 source address (word
// KEY_WORD) as the flow key. With USE_DST set, the key is the source and
// the destination address (word KEY_WORD+1) together, 64 bits. Address
// words a packet is too short to carry count as zero.
// Keys wait in a small key queue, in packet order. A four-state machine,
// named after the document's model (WAIT, CONTROL, REQUEST, RESULT), then
// handles one key at a time:
//   WAIT     take the next key from the key queue
//   CONTROL  send the key to the flow table (request)
//   REQUEST  wait for the flow table's result
//   RESULT   hit: offer the decision {entry's NP, entry}.
//            miss: offer {FIFO chosen by the selection compensator, entry at
//            the table's current pointer}; when the decision is taken, write
//            the new flow into the table. The table picks the oldest entry
//            with no packets in flight; if every entry still has packets
//            in flight (alloc_ok low), wait until one drains.
// A decision is handed to FIFO control with a valid/ready handshake; on
// acceptance the entry's in-flight count is incremented (alloc).
// The key queue, the wait when all entries are busy and the handshakes are this
// design's own; the source gives the key (source IP in its hardware
// description, source and destination IP in its behavioural model, hence
// USE_DST), the hit/miss behaviour and the state sequence.
module flow_control_logic
  import lb_pkg::*;
#(
  parameter int unsigned DEPTH       = 16,
  parameter int unsigned N_NP        = 2,
  parameter int unsigned KEYQ_DEPTH  = 4,
  parameter int unsigned KEY_WORD    = SRC_IP_WORD,
  parameter bit          USE_DST     = 1'b0,
  localparam int unsigned KEY_W = USE_DST ? 2 * WORD_W : WORD_W,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NP_W  = (N_NP > 1) ? $clog2(N_NP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // words accepted into the pipeline buffer
  input  logic             in_fire,
  input  pkt_word_t        in_word,
  output logic             keyq_full,
  // flow table
  output logic             ft_lookup_valid,
  output logic [KEY_W-1:0] ft_lookup_key,
  input  logic             ft_result_valid,
  input  logic             ft_hit,
  input  logic [IDX_W-1:0] ft_entry,
  input  logic [NP_W-1:0]  ft_np,
  input  logic [IDX_W-1:0] ft_alloc_entry,
  input  logic             ft_alloc_ok,
  output logic             ft_insert_valid,
  output logic [KEY_W-1:0] ft_insert_key,
  output logic [NP_W-1:0]  ft_insert_np,
  // FIFO selection compensator and entry control
  input  logic [NP_W-1:0]  fifo_sel,
  output logic             alloc,
  output logic [IDX_W-1:0] alloc_entry,
  // decision to FIFO control
  output logic             dec_valid,
  input  logic             dec_ready,
  output logic [NP_W-1:0]  dec_np,
  output logic [IDX_W-1:0] dec_entry,
  // event strobes for monitoring
  output logic             ev_hit,
  output logic             ev_miss,
  output logic             ev_stall
);

  typedef enum logic [1:0] {S_WAIT, S_CONTROL, S_REQUEST, S_RESULT} state_t;
  state_t state;

  // ---- key extraction ----
  logic [15:0] wcnt;        // index of the next word within the packet
  logic [15:0] widx;        // index of the word now accepted
  logic        key_push;
  logic [KEY_W-1:0] key_din;
  word_t       src_r;       // source address of the packet now arriving
  word_t       src_now;

  // Index of the last word that is part of the key.
  localparam int unsigned LAST_WORD = USE_DST ? KEY_WORD + 1 : KEY_WORD;

  assign widx     = in_word.sof ? 16'd0 : wcnt;
  assign key_push = in_fire && ((widx == 16'(LAST_WORD)) ||
                                (in_word.eof && widx < 16'(LAST_WORD)));
  assign src_now  = (widx == 16'(KEY_WORD)) ? in_word.data :
                    (widx > 16'(KEY_WORD))  ? src_r : '0;

  always_comb begin
    if (USE_DST)
      key_din = KEY_W'({src_now, (widx == 16'(LAST_WORD)) ? in_word.data : word_t'(0)});
    else
      key_din = KEY_W'(src_now);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt  <= '0;
      src_r <= '0;
    end else if (in_fire) begin
      wcnt  <= (widx == 16'hFFFF) ? widx : widx + 1'b1;
      src_r <= USE_DST ? src_now : '0;   // only the two-word key needs it
    end
  end

  logic             keyq_empty, keyq_pop;
  logic [KEY_W-1:0] keyq_dout;

  sync_fifo #(.WIDTH(KEY_W), .DEPTH(KEYQ_DEPTH)) u_keyq (
    .clk, .rst_n,
    .push (key_push),
    .din  (key_din),
    .pop  (keyq_pop),
    .dout (keyq_dout),
    .full (keyq_full),
    .empty(keyq_empty),
    .level()
  );

  // ---- classification state machine ----
  logic [KEY_W-1:0] key_r;
  logic             hit_r;
  logic [IDX_W-1:0] entry_r;
  logic [NP_W-1:0]  np_r;
  logic             no_free;

  assign keyq_pop    = (state == S_WAIT) && !keyq_empty;
  assign no_free     = !ft_alloc_ok;

  always_comb begin
    ft_lookup_valid = (state == S_CONTROL);
    ft_lookup_key   = key_r;
    ft_insert_key   = key_r;
    ft_insert_np    = fifo_sel;
    dec_valid       = 1'b0;
    dec_np          = np_r;
    dec_entry       = entry_r;
    if (state == S_RESULT) begin
      if (hit_r) begin
        dec_valid = 1'b1;
      end else begin
        dec_valid = !no_free;
        dec_np    = fifo_sel;
        dec_entry = ft_alloc_entry;
      end
    end
    ft_insert_valid = (state == S_RESULT) && !hit_r && dec_valid && dec_ready;
    alloc           = dec_valid && dec_ready;
    alloc_entry     = dec_entry;
    ev_hit          = alloc && hit_r;
    ev_miss         = ft_insert_valid;
    ev_stall        = (state == S_RESULT) && !hit_r && no_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_WAIT;
      key_r   <= '0;
      hit_r   <= 1'b0;
      entry_r <= '0;
      np_r    <= '0;
    end else begin
      unique case (state)
        S_WAIT: if (!keyq_empty) begin
          key_r <= keyq_dout;
          state <= S_CONTROL;
        end
        S_CONTROL: state <= S_REQUEST;
        S_REQUEST: if (ft_result_valid) begin
          hit_r   <= ft_hit;
          entry_r <= ft_entry;
          np_r    <= ft_np;
          state   <= S_RESULT;
        end
        S_RESULT: if (alloc) state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
    end
  end

endmodule
