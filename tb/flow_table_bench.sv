// Stimulus and reference model for flow_table, parameterised by REFRESH so
// that tb_flow_table can run both table policies. Keys come from a pool
// larger than the table (some differ only in their upper 16 bits); every
// miss is inserted. Hit/miss, entry number, FIFO number, the allocated entry
// and the eviction flag are compared with a model of a circular table whose
// oldest entry that is not busy is overwritten; with REFRESH the model also
// keeps a reference bit per row (set on a hit, cleared when the pointer
// passes) and skips referenced rows while an unreferenced idle row exists.
// The busy vector is random, sometimes all ones. Sets `done` when finished.
module flow_table_bench #(
  parameter bit REFRESH = 1'b0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  import lb_pkg::*;
  localparam int D = 8, KW = 32, NW = 1;
  logic rst_n = 0;
  logic lookup_valid, result_valid, hit, evict, insert_valid, alloc_ok;
  logic [D-1:0] busy;
  logic [KW-1:0] lookup_key, insert_key;
  logic [$clog2(D)-1:0] entry, alloc_entry;
  logic [NW-1:0] np, insert_np;

  flow_table #(.DEPTH(D), .KEY_W(KW), .NP_W(NW), .REFRESH(REFRESH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL REFRESH=%0d %s at %0t", REFRESH, what, $time);
    end
  endtask

  logic [KW-1:0] m_key[D];
  logic [NW-1:0] m_np[D];
  bit            m_valid[D];
  bit            m_ref[D];
  int            m_ptr = 0;
  int            hits = 0, misses = 0, evicts = 0, skips = 0, none_free = 0, second = 0;

  initial begin
    checks = 0; failures = 0; done = 0;
    busy = '0;
    lookup_valid = 0; insert_valid = 0; lookup_key = 0; insert_key = 0; insert_np = 0;
    foreach (m_valid[i]) begin m_valid[i] = 0; m_ref[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int exp_idx;
      logic [KW-1:0] k;
      begin
        int i;
        i = $urandom_range(0, 12);
        k = 32'h0A00_0000 + word_t'(i % 7) + (word_t'(i / 7) << 24);
      end
      @(negedge clk);
      lookup_valid = 1; lookup_key = k;
      @(negedge clk);
      lookup_valid = 0;
      check(result_valid, "result_valid");
      exp_idx = -1;
      for (int i = 0; i < D; i++) if (m_valid[i] && m_key[i] == k && exp_idx < 0) exp_idx = i;
      check(hit == (exp_idx >= 0), "hit");
      if (exp_idx >= 0) begin
        hits++;
        check(entry == exp_idx, "entry");
        check(np == m_np[exp_idx], "np");
        if (REFRESH) m_ref[exp_idx] = 1;
      end else begin
        int a, f;
        misses++;
        a = -1;
        f = -1;
        for (int j = 0; j < D; j++) begin
          int x;
          x = (m_ptr + j) % D;
          if (a < 0 && !busy[x]) a = x;
          if (f < 0 && !busy[x] && !(REFRESH && m_ref[x])) f = x;
        end
        check(alloc_ok == (a >= 0), "alloc_ok");
        if (a < 0) none_free++;
        else begin
          if (f >= 0 && f != a) second++;
          if (f >= 0) a = f;
          if (a != m_ptr) skips++;
          check(alloc_entry == a, "alloc_entry");
          check(evict == m_valid[a], "evict");
          if (m_valid[a]) evicts++;
          insert_valid = 1; insert_key = k; insert_np = NW'($urandom);
          if (REFRESH) begin
            // clear the bits of the rows the search went over
            if (f < 0) foreach (m_ref[x]) m_ref[x] = 0;
            else for (int x = m_ptr; x != f; x = (x + 1) % D) m_ref[x] = 0;
          end
          m_key[a] = k; m_np[a] = insert_np; m_valid[a] = 1;
          m_ptr = (a + 1) % D;
          @(negedge clk);
          insert_valid = 0;
        end
      end
      busy = ($urandom_range(0, 19) == 0) ? '1 : D'($urandom & $urandom);
    end
    check(hits > 100 && misses > 100 && evicts > 50 && skips > 20 && none_free > 5, "coverage");
    if (REFRESH) check(second > 20, "second-chance coverage");
    else check(second == 0, "no second chance without REFRESH");
    $display("REFRESH=%0d hits=%0d misses=%0d evicts=%0d skips=%0d none_free=%0d second_chance=%0d",
             REFRESH, hits, misses, evicts, skips, none_free, second);
    done = 1;
  end
endmodule
