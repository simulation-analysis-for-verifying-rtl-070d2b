// FIFO selection compensator: picks the NP FIFO for a packet of a new flow.
//
// The document says the NP for a new flow is chosen by comparing the states
// of the output queues. This block compares the fill levels of the N_NP
// FIFOs and selects the least-filled one; on a tie the lower-numbered FIFO
// (NP #1) wins, matching the egress MUX, which also favours NP #1. Using the
// word fill level as the queue state is this design's choice.
// Purely combinational: sel is valid in the same cycle as level.
module fifo_select #(
  parameter int unsigned N_NP  = 2,
  parameter int unsigned LVL_W = 10,
  localparam int unsigned SEL_W = (N_NP > 1) ? $clog2(N_NP) : 1
) (
  input  logic [N_NP-1:0][LVL_W-1:0] level,
  output logic [SEL_W-1:0]           sel
);

  logic [LVL_W-1:0] best;

  always_comb begin
    sel  = '0;
    best = level[0];
    for (int i = 1; i < N_NP; i++) begin
      if (level[i] < best) begin
        best = level[i];
        sel  = SEL_W'(i);
      end
    end
  end

endmodule
