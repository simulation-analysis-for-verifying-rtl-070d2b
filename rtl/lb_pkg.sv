// Shared types and constants of the uplink linecard data path.
//
// Packets move between blocks as a stream of 32-bit words, each tagged with
// start-of-frame (sof) and end-of-frame (eof) flags. On ingress the packet
// convert block wraps every IP datagram in two 32-bit control words: a header
// word in front and a tail word behind. The load balancer writes the number of
// the chosen network processor (NP) and the flow-table entry number into the
// header word; the egress MUX removes both control words again.
//
// The 32-bit word width and the header/tail control words follow the
// document. The bit layout of the two control words is this design's own:
//   header: [31:28] = HDR_TAG, [27:24] NP number, [23:16] flow-table entry,
//           [15:0] ingress packet sequence number
//   tail:   [31:28] = TAIL_TAG, [27:16] zero, [15:0] datagram length in bytes
package lb_pkg;

  localparam int unsigned WORD_W = 32;

  typedef logic [WORD_W-1:0] word_t;

  // One word of a packet stream.
  typedef struct packed {
    logic  sof;
    logic  eof;
    word_t data;
  } pkt_word_t;

  localparam int unsigned PKT_WORD_W = $bits(pkt_word_t);

  localparam logic [3:0] HDR_TAG  = 4'hC;
  localparam logic [3:0] TAIL_TAG = 4'hE;

  // Header control word fields.
  localparam int unsigned HDR_NP_LSB  = 24;
  localparam int unsigned HDR_NP_W    = 4;
  localparam int unsigned HDR_ENT_LSB = 16;
  localparam int unsigned HDR_ENT_W   = 8;

  // Word index, counted from the header control word, that carries the IPv4
  // source address: control word (1) + first three IPv4 header words (3).
  localparam int unsigned SRC_IP_WORD = 4;
  // Word that carries the IPv4 destination address.
  localparam int unsigned DST_IP_WORD = 5;

  function automatic word_t make_header(input logic [15:0] seq);
    return {HDR_TAG, 4'h0, 8'h00, seq};
  endfunction

  function automatic word_t make_tail(input logic [15:0] nbytes);
    return {TAIL_TAG, 12'h000, nbytes};
  endfunction

  // Write NP number and entry number into a header control word.
  function automatic word_t mark_header(input word_t hdr,
                                        input logic [HDR_NP_W-1:0] np,
                                        input logic [HDR_ENT_W-1:0] entry);
    word_t w;
    w = hdr;
    w[HDR_NP_LSB  +: HDR_NP_W]  = np;
    w[HDR_ENT_LSB +: HDR_ENT_W] = entry;
    return w;
  endfunction

endpackage
