// Synchronous first-in first-out buffer, used for the two NP FIFOs, the
// pipeline buffer and the key queue of the load balancer.
//
// A circular array of DEPTH entries with a write and a read pointer. push
// writes din when the FIFO is not full; pop discards the head when it is not
// empty. dout shows the head word combinationally (first-word fall-through),
// so a reader sees a new word the cycle after it is written. level counts the
// stored entries and is what the FIFO selection logic compares. Push and pop
// in the same cycle are allowed at any fill level except that a push into a
// full FIFO is dropped. The document gives the FIFOs but not their depth,
// width or handshake; those are this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned LW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             full,
  output logic             empty,
  output logic [LW-1:0]    level
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign full    = (level == LW'(DEPTH));
  assign empty   = (level == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      level <= level + LW'(do_push) - LW'(do_pop);
    end
  end

endmodule
