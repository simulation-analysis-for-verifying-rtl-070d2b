// Shared end-to-end test environment for the linecard data path, included
// by tb_linecard_dataplane (reduced sizes), tb_linecard_refresh (reduced
// sizes, row refresh on) and tb_linecard_full (default sizes). The
// including module declares NPKT, NFLOW, STALL_LEN, FT_DEPTH_TB, WATCHDOG,
// a task report(checks, failures) that prints the result and ends the run,
// and the design instance `dut`, connected to the signals declared here.
//
// PHY source: NPKT IPv4-like datagrams from NFLOW source addresses (flow
// key = word 3 of the datagram); every 11th datagram is too short to carry
// a source address. The first half of the run uses only as many flows as
// the flow table holds, the second half all NFLOW flows. Word 0 carries a
// global packet id, word 5 (when present) the packet's number within its
// flow.
// NP models: each accepts words with random stalls, and now and then a long
// stall of STALL_LEN cycles that fills its FIFO; it returns each packet
// unchanged NP_LAT cycles after its last word arrived, rounded up to a
// multiple of 8 cycles, so that both NPs sometimes start a packet in the
// same cycle. Because every NP has the same latency, packets come back in
// the order the NPs finished receiving them.
// Checks: the NP header marking; delivery of every datagram unchanged, once;
// order within every flow at the NP inputs, including that a flow only moves
// to another NP after its earlier packets were all handed to their NP; order
// at the PHY output within each flow for packets that went through the same
// NP; and that each mechanism of the design occurred at least once.

  import lb_pkg::*;
  localparam int N = 2;
  localparam int NP_LAT = 40;

  logic clk = 0, rst_n = 0;
  logic phy_rx_valid, phy_rx_sop, phy_rx_eop, phy_rx_ready;
  logic [1:0] phy_rx_mod;
  word_t phy_rx_data;
  logic [N-1:0] np_tx_valid, np_tx_ready, np_rx_valid, np_rx_ready;
  pkt_word_t [N-1:0] np_tx_word, np_rx_word;
  logic phy_tx_valid, phy_tx_sop, phy_tx_eop, phy_tx_ready;
  word_t phy_tx_data;
  logic ev_hit, ev_miss, ev_evict, ev_stall, ev_backpressure, ev_mux_tie;
  logic [N-1:0] ev_fifo_full;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    report(checks, failures);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- stimulus ----------------
  word_t sent [NPKT][$];        // datagram words by global id
  int    flow_of [NPKT];        // flow index (NFLOW for short packets)
  int    flow_seq [NFLOW+1];

  function automatic word_t flow_ip(int f);
    return 32'h0A01_0000 + word_t'(f * 7 + 1);
  endfunction

  initial begin
    foreach (flow_seq[f]) flow_seq[f] = 0;
    for (int g = 0; g < NPKT; g++) begin
      int nw, f;
      bit short_pkt;
      short_pkt = (g % 11 == 7);
      nw = short_pkt ? 3 : $urandom_range(6, 24);
      // first half: no more flows than table entries (FIFOs fill under NP
      // stalls); second half: all flows (evictions)
      f  = short_pkt ? NFLOW :
           (g < NPKT / 2 && NFLOW > FT_DEPTH_TB) ? $urandom_range(0, FT_DEPTH_TB - 1)
                                                 : $urandom_range(0, NFLOW - 1);
      flow_of[g] = f;
      for (int i = 0; i < nw; i++) begin
        word_t w;
        case (i)
          0: w = {8'h45, 8'h00, 16'(g)};
          3: w = flow_ip(f);
          4: w = 32'hC0A8_0101;
          5: w = word_t'(flow_seq[f]);
          default: w = $urandom;
        endcase
        sent[g].push_back(w);
      end
      flow_seq[f]++;
    end
  end

  int nstall_phy = 0;
  initial begin
    phy_rx_valid = 0; phy_rx_sop = 0; phy_rx_eop = 0; phy_rx_mod = 0; phy_rx_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int g = 0; g < NPKT; g++) begin
      for (int i = 0; i < sent[g].size(); i++) begin
        bit acc;
        phy_rx_valid = 1;
        phy_rx_sop = (i == 0);
        phy_rx_eop = (i == sent[g].size() - 1);
        phy_rx_mod = 2'd0;
        phy_rx_data = sent[g][i];
        do begin
          @(negedge clk); acc = phy_rx_ready;
          @(posedge clk);
          if (!acc) nstall_phy++;
        end while (!acc);
        #1 phy_rx_valid = 0;
      end
    end
  end

  // ---------------- NP models ----------------
  int np_pkts [N];
  int np_stalls_long = 0;
  int np_last_gid [NFLOW+1];
  int np_last_np [NFLOW+1];
  int np_of [NPKT];
  bit np_done [NPKT];
  int c_move = 0;

  for (genvar n = 0; n < N; n++) begin : g_np
    pkt_word_t rxq[$];          // words received, whole packets
    int        due[$];          // release cycle of each received packet
    int        cur_len = 0;
    int        stall = 0;
    int        gid_hdr = 0;

    // receive side
    always @(posedge clk) #2 begin
      if (stall > 0) stall--;
      else if ($urandom_range(0, 999) < 3) begin stall = STALL_LEN; np_stalls_long++; end
      np_tx_ready[n] = (stall == 0) && ($urandom_range(0, 3) != 0);
    end

    always @(negedge clk) if (rst_n && np_tx_valid[n] && np_tx_ready[n]) begin
      pkt_word_t w;
      w = np_tx_word[n];
      if (w.sof) begin
        int g, f;
        g = int'(w.data[15:0]);
        f = flow_of[g];
        check(g > np_last_gid[f], "order within the flow at the NP inputs");
        check(np_last_np[f] < 0 || np_last_np[f] == n || np_done[np_last_gid[f]],
              "flow moves to another NP only after its packets were handed over");
        if (np_last_np[f] >= 0 && np_last_np[f] != n) c_move++;
        np_last_gid[f] = g;
        np_last_np[f] = n;
        np_of[g] = n;
        gid_hdr = g;
        check(w.data[31:28] == HDR_TAG, "header tag at NP");
        check(int'(w.data[27:24]) == n, "header NP number");
        check(int'(w.data[23:16]) < FT_DEPTH_TB, "header entry number");
      end
      rxq.push_back(w);
      cur_len++;
      if (w.eof) begin
        int t;
        t = int'($time / 10) + NP_LAT;
        t = ((t + 7) / 8) * 8;
        due.push_back(t);
        np_done[gid_hdr] = 1;
        np_pkts[n]++;
        cur_len = 0;
      end
    end

    // transmit side
    initial begin
      np_rx_valid[n] = 0; np_rx_word[n] = '0;
      forever begin
        pkt_word_t w;
        wait (due.size() > 0);
        while (int'($time / 10) < due[0]) @(posedge clk);
        #1;
        void'(due.pop_front());
        do begin
          bit acc;
          w = rxq.pop_front();
          np_rx_valid[n] = 1;
          np_rx_word[n] = w;
          do begin @(negedge clk); acc = np_rx_ready[n]; @(posedge clk); end while (!acc);
          #1 np_rx_valid[n] = 0;
        end while (!w.eof);
      end
    end
  end

  // ---------------- PHY output and checks ----------------
  always @(posedge clk) #2 phy_tx_ready = ($urandom_range(0, 9) != 0);

  word_t got[$];
  int    delivered = 0;
  int    last_gid [NFLOW+1];
  bit    seen [NPKT];

  always @(negedge clk) if (rst_n && phy_tx_valid && phy_tx_ready) begin
    if (phy_tx_sop) got.delete();
    got.push_back(phy_tx_data);
    if (phy_tx_eop) begin
      int g, f;
      g = int'(got[0][15:0]);
      check(g < NPKT && !seen[g], "known packet, delivered once");
      if (g < NPKT && !seen[g]) begin
        seen[g] = 1;
        f = flow_of[g];
        check(got == sent[g], "packet contents");
        if (last_gid[f] >= 0 && np_of[last_gid[f]] == np_of[g])
          check(g > last_gid[f], "order at the output within flow and NP");
        last_gid[f] = g;
        delivered++;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int c_hit = 0, c_miss = 0, c_evict = 0, c_stall = 0, c_bp = 0, c_tie = 0;
  int c_full [N];
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) c_hit++;
    if (ev_miss) c_miss++;
    if (ev_evict) c_evict++;
    if (ev_stall) c_stall++;
    if (ev_backpressure) c_bp++;
    if (ev_mux_tie) c_tie++;
    for (int i = 0; i < N; i++) if (ev_fifo_full[i]) c_full[i]++;
  end

  initial begin
    foreach (last_gid[f]) begin last_gid[f] = -1; np_last_gid[f] = -1; np_last_np[f] = -1; end
    foreach (np_done[g]) np_done[g] = 0;
    foreach (seen[g]) seen[g] = 0;
    foreach (c_full[i]) c_full[i] = 0;
    foreach (np_pkts[i]) np_pkts[i] = 0;
    wait (rst_n);
    wait (delivered == NPKT);
    repeat (20) @(posedge clk);
    check(c_hit + c_miss == NPKT, "one classification per packet");
    check(c_hit > 0, "flow table hit happened");
    check(c_miss > 0, "flow table miss happened");
    check(c_evict > 0, "eviction of the oldest flow happened");
    check(c_stall > 0, "stall on a busy entry happened");
    check(c_bp > 0, "back pressure to the PHY happened");
    check(c_full[0] > 0 && c_full[1] > 0, "both NP FIFOs filled up");
    check(c_tie > 0, "MUX same-cycle headers happened");
    check(c_move > 0, "a flow moved to the other NP after eviction");
    check(np_pkts[0] > NPKT / 5 && np_pkts[1] > NPKT / 5, "both NPs used");
    $display("cycles=%0d", int'($time / 10));
    $display("packets=%0d np0=%0d np1=%0d hit=%0d miss=%0d evict=%0d stall=%0d bp=%0d full0=%0d full1=%0d tie=%0d moves=%0d",
             delivered, np_pkts[0], np_pkts[1], c_hit, c_miss, c_evict, c_stall, c_bp,
             c_full[0], c_full[1], c_tie, c_move);
    report(checks, failures);
  end
