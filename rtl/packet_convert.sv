// Packet convert block, ingress direction: turns the datagram stream from
// the POS PHY into the load balancer's packet format.
//
// Input is a POS-PHY Level 3 style 32-bit receive stream (valid, sop, eop,
// mod = number of unused bytes in the last word) with a ready handshake. For
// every datagram the block emits a header control word (with a 16-bit
// ingress sequence number), the datagram words, and a tail control word
// carrying the datagram length in bytes. The document states that 32-bit
// control words describing the packet are added; their contents, the
// sequence number and the byte count are this design's choice. Words that
// arrive outside a datagram (no sop seen) are discarded.
//
// Timing: the header and tail each take one cycle in which no input word is
// accepted, so a datagram of n words occupies n+2 output cycles. out_ready
// low holds everything.
module packet_convert
  import lb_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // PHY receive side
  input  logic        rx_valid,
  input  logic        rx_sop,
  input  logic        rx_eop,
  input  logic [1:0]  rx_mod,
  input  word_t       rx_data,
  output logic        rx_ready,
  // converted packet stream
  output logic        out_valid,
  output pkt_word_t   out_word,
  input  logic        out_ready
);

  typedef enum logic [1:0] {S_IDLE, S_BODY, S_TAIL} state_t;
  state_t      state;
  logic [15:0] seq;
  logic [15:0] nbytes;
  logic [15:0] nbytes_next;

  assign nbytes_next = nbytes + (rx_eop ? 16'(3'd4 - 3'(rx_mod)) : 16'd4);

  always_comb begin
    out_valid = 1'b0;
    out_word  = '{sof: 1'b0, eof: 1'b0, data: rx_data};
    rx_ready  = 1'b0;
    unique case (state)
      S_IDLE: begin
        out_valid = rx_valid && rx_sop;
        out_word  = '{sof: 1'b1, eof: 1'b0, data: make_header(seq)};
        rx_ready  = rx_valid && !rx_sop;   // drop stray words
      end
      S_BODY: begin
        out_valid = rx_valid;
        rx_ready  = out_ready;
      end
      S_TAIL: begin
        out_valid = 1'b1;
        out_word  = '{sof: 1'b0, eof: 1'b1, data: make_tail(nbytes)};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      seq    <= '0;
      nbytes <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (out_valid && out_ready) begin
          state  <= S_BODY;
          seq    <= seq + 1'b1;
          nbytes <= '0;
        end
        S_BODY: if (rx_valid && out_ready) begin
          nbytes <= nbytes_next;
          if (rx_eop) state <= S_TAIL;
        end
        S_TAIL: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
