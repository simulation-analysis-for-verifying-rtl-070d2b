// Self-checking testbench for load_balancing_logic with the NP FIFOs
// modelled in the testbench (queues of limited size whose levels feed the
// selection compensator, read at random, long read pauses). A reference
// flow table with its own per-entry in-flight counts predicts the NP and
// entry of every packet: the table's FIFO for a known flow; for a new flow
// the least-filled FIFO (NP #1 on a tie) and the oldest entry with no
// packets in flight. Checks each
// packet's target FIFO, contents and header marking, order, the release
// handling, the in_ready back pressure, and counts the mechanisms.
module tb_load_balancing_logic;
  import lb_pkg::*;
  localparam int N = 2, D = 8, FD = 64, LW = 10;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  pkt_word_t in_word, f_din;
  logic [N-1:0] f_push, f_full, rel_valid;
  logic [N-1:0][LW-1:0] f_level;
  logic [N-1:0][2:0] rel_entry;
  logic ev_hit, ev_miss, ev_evict, ev_stall, ev_backpressure;
  int checks = 0, failures = 0;

  load_balancing_logic #(.N_NP(N), .FT_DEPTH(D), .PB_DEPTH(16), .KEYQ_DEPTH(4), .LVL_W(LW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  localparam int NPK = 600;
  pkt_word_t sent_w[$];          // all words in input order
  word_t     pkt_key[NPK];
  pkt_word_t fq [N][$];          // FIFO models
  int        exp_np[$];          // NP per packet, in decision order
  word_t     m_key[D];
  int        m_np[D];
  bit        m_valid[D];
  int        m_cnt[D];
  int        exp_ent[$];
  int        m_ptr = 0, dec_n = 0, wr_pkt = 0, cur_np = -1;
  int        c_hit = 0, c_miss = 0, c_evict = 0, c_stall = 0, c_bp = 0, c_full = 0;
  int        pause [N];

  // FIFO model levels and reads (release on the last word of a packet)
  always @(posedge clk) #2 begin
    rel_valid = '0;
    for (int k = 0; k < N; k++) begin
      if (pause[k] > 0) pause[k]--;
      else if ($urandom_range(0, 199) == 0) pause[k] = 120;
      f_level[k] = LW'(fq[k].size());
      f_full[k]  = (fq[k].size() >= FD);
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (ev_stall) begin
      c_stall++;
      for (int i = 0; i < D; i++) check(m_cnt[i] > 0, "wait only while every entry is busy");
    end
    if (ev_backpressure) c_bp++;
    if (ev_evict) c_evict++;
    for (int k = 0; k < N; k++) if (f_full[k]) c_full++;
    // decisions, in packet order
    if (ev_hit || ev_miss) begin
      word_t k;
      int idx;
      k = pkt_key[dec_n];
      idx = -1;
      for (int i = 0; i < D; i++) if (m_valid[i] && m_key[i] == k && idx < 0) idx = i;
      check(ev_hit == (idx >= 0), "hit/miss");
      if (idx >= 0) begin
        exp_np.push_back(m_np[idx]);
        exp_ent.push_back(idx);
        m_cnt[idx]++;
        c_hit++;
      end else begin
        int sel, a;
        sel = (f_level[1] < f_level[0]) ? 1 : 0;
        a = -1;
        for (int j = 0; j < D; j++) if (a < 0 && m_cnt[(m_ptr + j) % D] == 0) a = (m_ptr + j) % D;
        check(a >= 0, "miss only with a free entry");
        if (a < 0) a = 0;
        check(ev_evict == m_valid[a], "eviction flag");
        exp_np.push_back(sel);
        exp_ent.push_back(a);
        m_cnt[a]++;
        m_key[a] = k; m_np[a] = sel; m_valid[a] = 1;
        m_ptr = (a + 1) % D;
        c_miss++;
      end
      dec_n++;
    end
    // FIFO writes
    check($countones(f_push) <= 1, "one FIFO write per cycle");
    for (int k = 0; k < N; k++) if (f_push[k]) begin
      pkt_word_t e;
      check(!f_full[k], "no write into a full FIFO");
      e = sent_w.pop_front();
      if (e.sof) begin
        cur_np = exp_np.pop_front();
        check(k == cur_np, "packet goes to the predicted NP");
        check(int'(f_din.data[27:24]) == k, "NP number in header");
        check(int'(f_din.data[23:16]) == exp_ent.pop_front(), "entry number in header");
        e.data = mark_header(e.data, 4'(k), f_din.data[23:16]);
      end
      check(f_din == e, "word contents");
      fq[k].push_back(f_din);
      if (f_din.eof) wr_pkt++;
    end
    // NP reads
    for (int k = 0; k < N; k++) begin
      if (pause[k] == 0 && fq[k].size() > 0 && $urandom_range(0, 2) == 0) begin
        pkt_word_t w;
        w = fq[k].pop_front();
        if (w.sof) rel_entry[k] = w.data[18:16];
        if (w.eof) begin
          rel_valid[k] = 1;
          m_cnt[rel_entry[k]]--;
        end
      end
    end
  end

  initial begin
    in_valid = 0; in_word = '0; rel_valid = '0; rel_entry = '0; f_full = '0; f_level = '0;
    foreach (m_valid[i]) begin m_valid[i] = 0; m_cnt[i] = 0; end
    foreach (pause[k]) pause[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < NPK; p++) begin
      int nw;
      word_t src;
      nw = (p % 10 == 3) ? 3 : $urandom_range(6, 12);
      src = 32'h0A00_0100 + $urandom_range(0, (p < NPK / 2) ? 7 : 11);
      pkt_key[p] = (nw > SRC_IP_WORD) ? src : '0;
      for (int i = 0; i < nw; i++) begin
        bit acc;
        in_valid = 1;
        in_word.sof = (i == 0); in_word.eof = (i == nw - 1);
        in_word.data = (i == 0) ? make_header(16'(p)) : (i == SRC_IP_WORD) ? src : $urandom;
        do begin @(negedge clk); acc = in_ready; @(posedge clk); end while (!acc);
        sent_w.push_back(in_word);
        #1 in_valid = 0;
      end
    end
    wait (wr_pkt == NPK);
    repeat (10) @(posedge clk);
    check(dec_n == NPK && sent_w.size() == 0, "all packets placed");
    check(c_hit > 0 && c_miss > 0 && c_evict > 0 && c_stall > 0 && c_bp > 0 && c_full > 0,
          "hit, miss, eviction, stall, back pressure and full FIFO all happened");
    $display("hit=%0d miss=%0d evict=%0d stall=%0d bp=%0d full=%0d", c_hit, c_miss, c_evict, c_stall, c_bp, c_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
