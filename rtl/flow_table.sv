// Flow table: a small content-addressable memory that remembers, for each
// recently seen flow, which NP FIFO its packets were sent to.
//
// Following the document, the table is organised as a circular buffer: each
// entry holds a flow key (the IPv4 source address) and the FIFO number it was
// allocated. A lookup compares the presented key with every entry in
// parallel; a priority encoder turns the match lines into hit/miss, the entry
// number and the entry's FIFO number. A new flow is written at the entry the
// current pointer names, and the pointer then moves past it, so the oldest
// flow is the one overwritten. One refinement is this design's own: entries
// that entry control reports busy (packets still queued) are skipped, i.e.
// the new flow takes the first entry at or after the current pointer that is
// not busy. When every entry is busy, alloc_ok is low and no flow can be
// added. The valid bit per entry, the lowest-index priority and the
// one-cycle lookup latency are also this design's choices.
//
// The document's model refreshes a row when a packet of its flow is found.
// With REFRESH = 1 this is done the way a circular buffer allows, by giving
// the row a second chance: a hit sets the row's reference bit, the
// allocation search skips rows whose bit is set, and an insert clears the
// bits of the rows it skipped, so a refreshed row survives one more pass of
// the pointer. If every idle row is referenced, the first idle row is taken
// as with REFRESH = 0. REFRESH = 0 (the default) is the plain circular
// buffer of the hardware description.
//
// Timing: lookup_valid/lookup_key in cycle t give result_valid with hit,
// entry and np in cycle t+1. alloc_entry, alloc_ok and evict (the entry an
// insert would overwrite holds a valid flow) are combinational from the
// pointer and busy. insert_valid writes insert_key/insert_np at alloc_entry
// at the clock edge and moves the pointer to the entry after it.
module flow_table #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned KEY_W = 32,
  parameter int unsigned NP_W  = 1,
  parameter bit          REFRESH = 1'b0,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup request
  input  logic             lookup_valid,
  input  logic [KEY_W-1:0] lookup_key,
  // lookup result, one cycle later
  output logic             result_valid,
  output logic             hit,
  output logic [IDX_W-1:0] entry,
  output logic [NP_W-1:0]  np,
  // allocation of a new flow
  input  logic [DEPTH-1:0] busy,
  output logic [IDX_W-1:0] alloc_entry,
  output logic             alloc_ok,
  output logic             evict,
  input  logic             insert_valid,
  input  logic [KEY_W-1:0] insert_key,
  input  logic [NP_W-1:0]  insert_np
);

  logic [KEY_W-1:0] key_q   [DEPTH];
  logic [NP_W-1:0]  np_q    [DEPTH];
  logic [DEPTH-1:0] valid_q;
  logic [IDX_W-1:0] cur_ptr;

  // Comparators, one per entry.
  logic [DEPTH-1:0] match;
  always_comb begin
    for (int i = 0; i < DEPTH; i++)
      match[i] = valid_q[i] && (key_q[i] == lookup_key);
  end

  // Priority encoder: lowest matching entry wins.
  logic             any_match;
  logic [IDX_W-1:0] match_idx;
  always_comb begin
    any_match = 1'b0;
    match_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match[i]) begin
        any_match = 1'b1;
        match_idx = IDX_W'(i);
      end
    end
  end

  // Reference bits, used only when REFRESH is set.
  logic [DEPTH-1:0] ref_q;

  // Oldest entry that is not busy: search from the current pointer onwards.
  // With REFRESH, a first search also requires the reference bit to be
  // clear, and `passed` marks the rows it went over.
  logic             free_ok, fresh_ok;
  logic [IDX_W-1:0] free_idx, fresh_idx;
  logic [DEPTH-1:0] passed;
  always_comb begin
    free_ok   = 1'b0;
    free_idx  = cur_ptr;
    fresh_ok  = 1'b0;
    fresh_idx = cur_ptr;
    passed    = '0;
    for (int k = 0; k < DEPTH; k++) begin
      int unsigned idx;
      idx = int'(cur_ptr) + k;
      if (idx >= DEPTH) idx = idx - DEPTH;
      if (!free_ok && !busy[idx]) begin
        free_ok  = 1'b1;
        free_idx = IDX_W'(idx);
      end
      if (!fresh_ok && !busy[idx] && !ref_q[idx]) begin
        fresh_ok  = 1'b1;
        fresh_idx = IDX_W'(idx);
      end
      if (!fresh_ok) passed[idx] = 1'b1;
    end
  end

  assign alloc_ok    = free_ok;
  assign alloc_entry = (REFRESH && fresh_ok) ? fresh_idx : free_idx;

  assign evict = valid_q[alloc_entry];

  always_ff @(posedge clk) begin
    if (insert_valid) begin
      key_q[alloc_entry] <= insert_key;
      np_q[alloc_entry]  <= insert_np;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      ref_q        <= '0;
      cur_ptr      <= '0;
      result_valid <= 1'b0;
      hit          <= 1'b0;
      entry        <= '0;
      np           <= '0;
    end else begin
      result_valid <= lookup_valid;
      if (lookup_valid) begin
        hit   <= any_match;
        entry <= match_idx;
        np    <= np_q[match_idx];
      end
      if (insert_valid) begin
        valid_q[alloc_entry] <= 1'b1;
        cur_ptr <= (alloc_entry == IDX_W'(DEPTH - 1)) ? '0 : alloc_entry + 1'b1;
      end
      if (REFRESH) begin
        // A lookup and an insert never fall in the same cycle, so the two
        // updates do not collide.
        if (insert_valid) ref_q <= ref_q & ~passed;
        else if (lookup_valid && any_match) ref_q[match_idx] <= 1'b1;
      end
    end
  end

endmodule
