// Self-checking testbench for flow_control_logic together with a flow_table
// and fifo_select. Packets of random length (short ones carry no source
// address and get key 0) are fed word by word; a reference model of the
// circular flow table, the least-filled-FIFO rule and the per-entry
// in-flight counts predicts every decision {np, entry}. Checks the
// decisions, the table writes (over the oldest entry with no packets in
// flight), the wait while every entry is busy, the WAIT-CONTROL-REQUEST-RESULT sequence (decision offered three
// cycles after the key word when idle), and counts hits, misses, evictions
// and stalls.
module tb_flow_control_logic;
  import lb_pkg::*;
  localparam int D = 8, N = 2;
  logic clk = 0, rst_n = 0;
  logic in_fire, keyq_full;
  pkt_word_t in_word;
  logic ft_lookup_valid, ft_result_valid, ft_hit, ft_insert_valid, ft_evict, ft_alloc_ok;
  word_t ft_lookup_key, ft_insert_key;
  logic [2:0] ft_entry, ft_alloc_entry, alloc_entry, dec_entry;
  logic [0:0] ft_np, ft_insert_np, fifo_sel, dec_np;
  logic [D-1:0] entry_busy;
  logic alloc, dec_valid, dec_ready, ev_hit, ev_miss, ev_stall;
  logic [N-1:0][9:0] level;
  int checks = 0, failures = 0;

  flow_table #(.DEPTH(D), .KEY_W(32), .NP_W(1)) u_ft (
    .clk, .rst_n, .lookup_valid(ft_lookup_valid), .lookup_key(ft_lookup_key),
    .result_valid(ft_result_valid), .hit(ft_hit), .entry(ft_entry), .np(ft_np),
    .busy(entry_busy), .alloc_entry(ft_alloc_entry), .alloc_ok(ft_alloc_ok), .evict(ft_evict), .insert_valid(ft_insert_valid),
    .insert_key(ft_insert_key), .insert_np(ft_insert_np));
  fifo_select #(.N_NP(N), .LVL_W(10)) u_sel (.level, .sel(fifo_sel));
  flow_control_logic #(.DEPTH(D), .N_NP(N), .KEYQ_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // reference model
  word_t m_key[D];
  int    m_np[D];
  bit    m_valid[D];
  int    m_ptr = 0;
  int    m_cnt[D];
  word_t keys[$];            // keys of packets not yet decided, in order
  int    hits = 0, misses = 0, evicts = 0, stalls = 0, decided = 0;
  localparam int NPK = 400;

  // in-flight model: releases at random
  always @(posedge clk) #2 begin
    for (int i = 0; i < D; i++)
      if (m_cnt[i] > 0 && $urandom_range(0, 59) == 0) m_cnt[i]--;
    for (int i = 0; i < D; i++) entry_busy[i] = (m_cnt[i] != 0);
    level[0] = 10'($urandom_range(0, 5));
    level[1] = 10'($urandom_range(0, 5));
    dec_ready = ($urandom_range(0, 3) != 0);
  end

  always @(negedge clk) if (rst_n) begin
    if (ev_stall) begin
      stalls++;
      check(entry_busy == '1, "wait only while every entry is busy");
    end
    if (dec_valid && dec_ready) begin
      word_t k;
      int exp_idx;
      k = keys.pop_front();
      exp_idx = -1;
      for (int i = 0; i < D; i++) if (m_valid[i] && m_key[i] == k && exp_idx < 0) exp_idx = i;
      if (exp_idx >= 0) begin
        hits++;
        check(ev_hit && !ev_miss && !ft_insert_valid, "hit strobes");
        check(int'(dec_entry) == exp_idx && int'(dec_np) == m_np[exp_idx], "hit decision");
      end else begin
        int sel, a;
        sel = (level[1] < level[0]) ? 1 : 0;
        a = -1;
        for (int j = 0; j < D; j++) if (a < 0 && m_cnt[(m_ptr + j) % D] == 0) a = (m_ptr + j) % D;
        misses++;
        check(a >= 0, "a free entry exists");
        if (a < 0) a = 0;
        if (m_valid[a]) evicts++;
        check(ev_miss && ft_insert_valid && ft_insert_key == k, "table write");
        check(int'(dec_entry) == a && int'(dec_np) == sel, "miss decision");
        m_key[a] = k; m_np[a] = sel; m_valid[a] = 1;
        m_ptr = (a + 1) % D;
      end
      check(alloc && int'(alloc_entry) == int'(dec_entry), "alloc");
      m_cnt[dec_entry]++;
      decided++;
    end else begin
      check(!alloc, "no alloc without decision");
    end
  end

  initial begin
    in_fire = 0; in_word = '0; dec_ready = 0;
    foreach (m_valid[i]) begin m_valid[i] = 0; m_cnt[i] = 0; end
    entry_busy = '0; level = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < NPK; p++) begin
      int nw;
      word_t src;
      nw = (p % 13 == 0) ? 3 : $urandom_range(6, 10);
      src = 32'hC0A8_0000 + $urandom_range(0, 13);
      keys.push_back(nw > SRC_IP_WORD ? src : '0);
      for (int i = 0; i < nw; i++) begin
        bit acc;
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
        in_word.sof = (i == 0); in_word.eof = (i == nw - 1);
        in_word.data = (i == SRC_IP_WORD) ? src : $urandom;
        do begin @(negedge clk); acc = !keyq_full; in_fire = acc; @(posedge clk); end while (!acc);
        #1 in_fire = 0;
      end
    end
    wait (decided == NPK);
    // latency check on an idle machine: decision three cycles after key word
    wait (entry_busy == '0);
    repeat (2) @(posedge clk);
    #1;
    begin
      int t0, t1;
      for (int i = 0; i <= SRC_IP_WORD; i++) begin
        in_word.sof = (i == 0); in_word.eof = (i == SRC_IP_WORD);
        in_word.data = 32'hC0A8_0001;
        keys.push_back(32'hC0A8_0001);
        if (i != SRC_IP_WORD) void'(keys.pop_back());
        in_fire = 1;
        @(posedge clk);
        #1 in_fire = 0;
      end
      t0 = $time;
      while (!dec_valid) @(posedge clk) #1;
      t1 = $time;
      check((t1 - t0) / 10 == 3, "decision latency 3 cycles");
      $display("latency=%0d", (t1 - t0) / 10);
      wait (decided == NPK + 1);
    end
    check(hits > 50 && misses > 50 && evicts > 20 && stalls > 0, "coverage");
    $display("hits=%0d misses=%0d evicts=%0d stalls=%0d", hits, misses, evicts, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
