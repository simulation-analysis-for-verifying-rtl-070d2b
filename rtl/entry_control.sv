// Entry control: counts, for every flow-table entry, the packets that have
// been assigned through it and have not yet left their NP FIFO.
//
// The document shows an entry control block between the FIFOs and the flow
// table, fed with the entry number carried in each marked packet header, but
// does not describe it. Here it keeps one counter per entry: alloc (one
// packet assigned to alloc_entry) increments it, and each release lane (an
// NP finished reading a packet whose header carried release_entry)
// decrements it. busy[i] is high while entry i still has packets in flight;
// the flow control logic does not overwrite a busy entry, because a flow
// whose entry was dropped while its packets are still queued could be sent
// to another NP and overtake them.
//
// Timing: counters update at the clock edge; busy follows one cycle later.
// Any number of lanes may release in the same cycle, also for one entry.
module entry_control #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned N_NP  = 2,
  parameter int unsigned CNT_W = 10,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       alloc,
  input  logic [IDX_W-1:0]           alloc_entry,
  input  logic [N_NP-1:0]            release_valid,
  input  logic [N_NP-1:0][IDX_W-1:0] release_entry,
  output logic [DEPTH-1:0]           busy
);

  logic [CNT_W-1:0] cnt [DEPTH];
  logic [CNT_W-1:0] dec [DEPTH];

  // Number of releases for each entry in this cycle.
  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      dec[i] = '0;
      for (int l = 0; l < N_NP; l++)
        if (release_valid[l] && release_entry[l] == IDX_W'(i)) dec[i] = dec[i] + 1'b1;
    end
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) busy[i] = (cnt[i] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) cnt[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++)
        cnt[i] <= cnt[i] + CNT_W'(alloc && alloc_entry == IDX_W'(i)) - dec[i];
    end
  end

endmodule
