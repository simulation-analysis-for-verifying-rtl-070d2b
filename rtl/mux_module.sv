// Egress MUX: merges the packets coming back from the network processors
// into one stream towards the packet convert block, removing the header
// and tail control words of each packet.
//
// Following the document, the packet whose header arrived first is sent
// first, and when headers arrive in the same cycle the lower-numbered NP
// (NP #1) is served first. "Arrived" is measured with an age counter per
// input that counts the cycles a header has been waiting; the oldest wins,
// ties go to the lowest index. A packet is sent whole before the next is
// chosen; the other inputs are held off with ready low.
//
// The header word is consumed when the packet is granted. To drop the tail
// word, each data word is held for one cycle until the next input word shows
// whether it was the last data word (next word is the tail): the held word is
// then sent with eop and the tail is dropped. Inputs: per NP valid/ready
// stream of pkt_word_t. Output: 32-bit words with sop/eop and ready.
// Words at an input's head that do not start a packet while the MUX is idle
// are discarded. The age counters and the one-word hold are this design's
// choice.
module mux_module
  import lb_pkg::*;
#(
  parameter int unsigned N_NP  = 2,
  parameter int unsigned AGE_W = 16,
  localparam int unsigned NP_W = (N_NP > 1) ? $clog2(N_NP) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // from the network processors
  input  logic      [N_NP-1:0]  np_valid,
  input  pkt_word_t [N_NP-1:0]  np_word,
  output logic      [N_NP-1:0]  np_ready,
  // towards the packet convert block
  output logic                  out_valid,
  output logic                  out_sop,
  output logic                  out_eop,
  output word_t                 out_data,
  input  logic                  out_ready,
  // strobe: a grant decided between headers that arrived in the same cycle
  output logic                  ev_tie
);

  logic             busy;
  logic [NP_W-1:0]  gnt;
  logic             hold_v, hold_first;
  word_t            hold_data;
  logic [AGE_W-1:0] age [N_NP];

  // Choose among waiting headers: oldest first, lowest index on a tie.
  logic [N_NP-1:0]  cand;
  logic             any_cand;
  logic [NP_W-1:0]  win;
  logic [AGE_W-1:0] win_age;
  always_comb begin
    any_cand = 1'b0;
    win      = '0;
    win_age  = '0;
    ev_tie   = 1'b0;
    for (int i = 0; i < N_NP; i++) begin
      cand[i] = np_valid[i] && np_word[i].sof;
      if (cand[i]) begin
        if (!any_cand || age[i] > win_age) begin
          win     = NP_W'(i);
          win_age = age[i];
          ev_tie  = 1'b0;
        end else if (age[i] == win_age) begin
          ev_tie  = 1'b1;
        end
        any_cand = 1'b1;
      end
    end
    ev_tie = ev_tie && !busy;
  end

  logic      in_v;
  pkt_word_t in_w;
  logic      in_fire;
  assign in_v    = np_valid[gnt];
  assign in_w    = np_word[gnt];

  always_comb begin
    np_ready  = '0;
    out_valid = 1'b0;
    out_sop   = hold_first;
    out_eop   = in_w.eof;
    out_data  = hold_data;
    if (!busy) begin
      for (int i = 0; i < N_NP; i++)
        if (np_valid[i] && !np_word[i].sof) np_ready[i] = 1'b1;   // discard
      if (any_cand) np_ready[win] = 1'b1;                          // take header
    end else begin
      out_valid     = hold_v && in_v;
      np_ready[gnt] = hold_v ? out_ready : 1'b1;
    end
  end
  assign in_fire = busy && in_v && np_ready[gnt];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      gnt        <= '0;
      hold_v     <= 1'b0;
      hold_first <= 1'b0;
      hold_data  <= '0;
      for (int i = 0; i < N_NP; i++) age[i] <= '0;
    end else begin
      for (int i = 0; i < N_NP; i++) begin
        if (!cand[i] || (!busy && any_cand && win == NP_W'(i)))
          age[i] <= '0;
        else if (age[i] != '1)
          age[i] <= age[i] + 1'b1;
      end
      if (!busy) begin
        if (any_cand) begin
          busy   <= 1'b1;
          gnt    <= win;
          hold_v <= 1'b0;
        end
      end else if (in_fire) begin
        if (in_w.eof) begin
          busy   <= 1'b0;
          hold_v <= 1'b0;
        end else begin
          hold_v     <= 1'b1;
          hold_first <= !hold_v;
          hold_data  <= in_w.data;
        end
      end
    end
  end

endmodule
