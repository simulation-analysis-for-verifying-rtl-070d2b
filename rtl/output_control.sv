// Output control logic of one NP FIFO: presents the FIFO's packets to its
// network processor and reports each packet that has left.
//
// The FIFO head is offered to the NP with a valid/ready handshake, one word
// per cycle. When a header control word leaves, the flow-table entry number
// written into it by FIFO control is kept; when the packet's last word leaves,
// release pulses for one cycle with that entry number, so entry control can
// count the packet as no longer in flight. The document names this block
// without describing it; the handshake and the release report are this
// design's choice.
module output_control
  import lb_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // NP FIFO read side
  input  logic             f_empty,
  input  pkt_word_t        f_dout,
  output logic             f_pop,
  // network processor receive interface
  output logic             np_valid,
  output pkt_word_t        np_word,
  input  logic             np_ready,
  // packet-left report to entry control
  output logic             rel_valid,
  output logic [IDX_W-1:0] rel_entry
);

  logic             fire;
  logic [IDX_W-1:0] entry_r;
  logic [IDX_W-1:0] hdr_entry;

  assign np_valid  = !f_empty;
  assign np_word   = f_dout;
  assign fire      = np_valid && np_ready;
  assign f_pop     = fire;
  assign hdr_entry = IDX_W'(f_dout.data[HDR_ENT_LSB +: HDR_ENT_W]);

  assign rel_valid = fire && f_dout.eof;
  assign rel_entry = f_dout.sof ? hdr_entry : entry_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   entry_r <= '0;
    else if (fire && f_dout.sof)  entry_r <= hdr_entry;
  end

endmodule
