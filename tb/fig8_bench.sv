// Stimulus, NP models and checks of the flow-classification workload, for
// tb_fig8_workload: the traffic of the source's experiment run through
// linecard_dataplane at its default sizes, with N network processors. Twelve
// source addresses send about 490 datagrams in total, with exponentially
// distributed gaps (mean 8 cycles) and random lengths; N NPs with equal
// latency return them. Checks that every packet of one source address is
// served by one NP only, that the flows are spread over the NPs, that no
// flow-table entry is ever evicted (12 flows fit the 16 entries), and that
// every datagram comes back unchanged and in order per flow. Prints, per
// source address, the NP, the packet count and the mean latency from PHY
// input to PHY output, and the same per NP. As the source's service-time
// results report, each source's mean latency must lie within 15 % of the
// overall mean, and each NP's within 10 %.
// With N > 2 the flows need only reach more than one NP: at this light
// load the FIFOs are mostly empty when a flow first appears, and ties go to
// the lowest-numbered NP. Sets `done` when finished.
module fig8_bench #(
  parameter int N = 2
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  import lb_pkg::*;
  localparam int NFLOW = 12, NPKT = 490, NP_LAT = 40;
  logic rst_n = 0;
  logic phy_rx_valid, phy_rx_sop, phy_rx_eop, phy_rx_ready;
  logic [1:0] phy_rx_mod;
  word_t phy_rx_data;
  logic [N-1:0] np_tx_valid, np_tx_ready, np_rx_valid, np_rx_ready;
  pkt_word_t [N-1:0] np_tx_word, np_rx_word;
  logic phy_tx_valid, phy_tx_sop, phy_tx_eop, phy_tx_ready;
  word_t phy_tx_data;
  logic ev_hit, ev_miss, ev_evict, ev_stall, ev_backpressure, ev_mux_tie;
  logic [N-1:0] ev_fifo_full;
  initial begin checks = 0; failures = 0; done = 0; end

  linecard_dataplane #(.N_NP(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s at %0t", N, what, $time);
    end
  endtask

  word_t sent [NPKT][$];
  int    flow_of [NPKT];
  int    t_in [NPKT];
  int    flow_np [NFLOW];
  int    flow_cnt [NFLOW];
  int    np_cnt [N], np_lat_sum [N];
  int    src_lat_sum [NFLOW];
  int    last_gid [NFLOW];
  int    np_of [NPKT];
  int    delivered = 0, evicts = 0;

  // exponential gap with the given mean, in cycles
  function automatic int exp_gap(int mean);
    real u;
    u = (real'($urandom_range(1, 1000000))) / 1000000.0;
    return int'(-$ln(u) * real'(mean));
  endfunction

  initial begin
    for (int g = 0; g < NPKT; g++) begin
      int nw, f;
      nw = $urandom_range(6, 24);
      f  = $urandom_range(0, NFLOW - 1);
      flow_of[g] = f;
      for (int i = 0; i < nw; i++)
        sent[g].push_back(i == 0 ? {16'h4500, 16'(g)} : i == 3 ? 32'h0A02_0000 + word_t'(f) : $urandom);
    end
  end

  initial begin
    phy_rx_valid = 0; phy_rx_sop = 0; phy_rx_eop = 0; phy_rx_mod = 0; phy_rx_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int g = 0; g < NPKT; g++) begin
      repeat (exp_gap(8)) @(posedge clk);
      #1;
      t_in[g] = int'($time / 10);
      for (int i = 0; i < sent[g].size(); i++) begin
        bit acc;
        phy_rx_valid = 1; phy_rx_sop = (i == 0); phy_rx_eop = (i == sent[g].size() - 1);
        phy_rx_data = sent[g][i];
        do begin @(negedge clk); acc = phy_rx_ready; @(posedge clk); end while (!acc);
        #1 phy_rx_valid = 0;
      end
    end
  end

  // NP models: random read stalls, fixed latency, packets returned in order
  for (genvar n = 0; n < N; n++) begin : g_np
    pkt_word_t rxq[$];
    int        due[$];
    always @(posedge clk) #2 np_tx_ready[n] = ($urandom_range(0, 3) != 0);
    always @(negedge clk) if (rst_n && np_tx_valid[n] && np_tx_ready[n]) begin
      rxq.push_back(np_tx_word[n]);
      if (np_tx_word[n].sof) begin
        int g, f;
        g = int'(np_tx_word[n].data[15:0]);
        f = flow_of[g];
        np_of[g] = n;
        if (flow_np[f] < 0) flow_np[f] = n;
        check(flow_np[f] == n, "all packets of a source address on one NP");
        flow_cnt[f]++;
        np_cnt[n]++;
      end
      if (np_tx_word[n].eof) due.push_back(int'($time / 10) + NP_LAT);
    end
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
          np_rx_valid[n] = 1; np_rx_word[n] = w;
          do begin @(negedge clk); acc = np_rx_ready[n]; @(posedge clk); end while (!acc);
          #1 np_rx_valid[n] = 0;
        end while (!w.eof);
      end
    end
  end

  assign phy_tx_ready = 1'b1;

  word_t got[$];
  always @(negedge clk) if (rst_n && phy_tx_valid) begin
    if (phy_tx_sop) got.delete();
    got.push_back(phy_tx_data);
    if (phy_tx_eop) begin
      int g, f;
      g = int'(got[0][15:0]);
      f = flow_of[g];
      check(got == sent[g], "packet contents");
      check(g > last_gid[f], "order within the flow");
      last_gid[f] = g;
      np_lat_sum[np_of[g]] += int'($time / 10) - t_in[g];
      src_lat_sum[f] += int'($time / 10) - t_in[g];
      delivered++;
    end
  end

  always @(posedge clk) if (rst_n && ev_evict) evicts++;

  initial begin
    int flows_on [N];
    real all_mean;
    foreach (flow_np[f]) begin
      flow_np[f] = -1; flow_cnt[f] = 0; last_gid[f] = -1; src_lat_sum[f] = 0;
    end
    foreach (np_cnt[n]) begin np_cnt[n] = 0; np_lat_sum[n] = 0; flows_on[n] = 0; end
    wait (rst_n);
    wait (delivered == NPKT);
    repeat (10) @(posedge clk);
    check(evicts == 0, "no flow evicted");
    all_mean = 0.0;
    foreach (np_lat_sum[n]) all_mean += real'(np_lat_sum[n]);
    all_mean = all_mean / NPKT;
    for (int f = 0; f < NFLOW; f++) begin
      real m;
      m = flow_cnt[f] ? real'(src_lat_sum[f]) / flow_cnt[f] : 0.0;
      $display("N=%0d source %0d: NP%0d packets=%0d mean latency=%0.1f cycles", N, f, flow_np[f] + 1,
               flow_cnt[f], m);
      if (flow_np[f] >= 0) flows_on[flow_np[f]]++;
      // Fig. 9: every source is served in about the same time
      if (flow_cnt[f] > 0) check(m > 0.85 * all_mean && m < 1.15 * all_mean,
                                 "per-source mean latency near the overall mean");
    end
    for (int n = 0; n < N; n++) begin
      real m;
      m = np_cnt[n] ? real'(np_lat_sum[n]) / np_cnt[n] : 0.0;
      $display("N=%0d NP%0d: flows=%0d packets=%0d mean latency=%0.1f cycles", N, n + 1, flows_on[n],
               np_cnt[n], m);
      // Fig. 10: both NPs take about the same time per packet
      if (np_cnt[n] > 0)
        check(m > 0.9 * all_mean && m < 1.1 * all_mean, "per-NP mean latency near the overall mean");
    end
    $display("N=%0d all: mean latency=%0.1f cycles", N, all_mean);
    if (N == 2) begin
      // Fig. 8: flows distributed over the two NPs almost evenly
      for (int n = 0; n < N; n++) begin
        check(flows_on[n] >= 3, "flows spread over both NPs");
        check(np_cnt[n] > NPKT / 4, "packets spread over both NPs");
      end
    end else begin
      // A new flow goes to the least-filled FIFO, lowest NP on a tie. At
      // this light load the FIFOs are mostly empty when a flow first
      // appears, so only a spread over more than one NP is required.
      int used;
      used = 0;
      foreach (flows_on[n]) if (flows_on[n] > 0) used++;
      check(used >= 2, "flows spread over more than one NP");
    end
    done = 1;
  end
endmodule
