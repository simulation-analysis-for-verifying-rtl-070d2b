// FIFO control: moves each packet from the pipeline buffer into the NP FIFO
// the flow control logic chose for it, and relays back pressure upstream.
//
// For every packet it first takes one decision {np, entry} from the flow
// control logic (valid/ready; decisions arrive in packet order because keys
// are queued in packet order). It then copies the packet word by word from
// the head of the pipeline buffer into FIFO np, writing np and entry into
// the header control word on the way (Fig. 4 of the source shows the NP and
// entry numbers carried at the head of the outgoing packet). Copying pauses
// while the target FIFO is full, so a full FIFO backs up the pipeline buffer,
// and in_ready, the back pressure signal to the packet convert block, drops
// when the pipeline buffer or the key queue is full.
//
// Timing: one word per cycle; one idle cycle between packets while the next
// decision is taken. The handshakes are this design's choice.
module fifo_control
  import lb_pkg::*;
#(
  parameter int unsigned N_NP  = 2,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned NP_W  = (N_NP > 1) ? $clog2(N_NP) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // decision from the flow control logic
  input  logic             dec_valid,
  output logic             dec_ready,
  input  logic [NP_W-1:0]  dec_np,
  input  logic [IDX_W-1:0] dec_entry,
  // head of the pipeline buffer
  input  logic             pb_empty,
  input  pkt_word_t        pb_dout,
  output logic             pb_pop,
  input  logic             pb_full,
  input  logic             keyq_full,
  // NP FIFOs
  output logic [N_NP-1:0]  f_push,
  output pkt_word_t        f_din,
  input  logic [N_NP-1:0]  f_full,
  // back pressure relay to the packet convert block
  output logic             in_ready
);

  logic             active;
  logic [NP_W-1:0]  np_r;
  logic [IDX_W-1:0] entry_r;
  logic             move;

  assign dec_ready = !active;
  assign move      = active && !pb_empty && !f_full[np_r];
  assign pb_pop    = move;
  assign in_ready  = !pb_full && !keyq_full;

  always_comb begin
    f_push = '0;
    f_push[np_r] = move;
    f_din  = pb_dout;
    if (pb_dout.sof)
      f_din.data = mark_header(pb_dout.data, HDR_NP_W'(np_r), HDR_ENT_W'(entry_r));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      np_r    <= '0;
      entry_r <= '0;
    end else if (!active) begin
      if (dec_valid) begin
        active  <= 1'b1;
        np_r    <= dec_np;
        entry_r <= dec_entry;
      end
    end else if (move && pb_dout.eof) begin
      active <= 1'b0;
    end
  end

  // The pipeline buffer and the decisions stay in step: the first word
  // copied for a decision must be a header word.
  logic first;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 first <= 1'b1;
    else if (move)              first <= pb_dout.eof;
  end

  a_starts_on_header: assert property (@(posedge clk) disable iff (!rst_n)
    move && first |-> pb_dout.sof);

endmodule
