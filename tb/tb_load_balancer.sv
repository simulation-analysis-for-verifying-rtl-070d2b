// Self-checking testbench for load_balancer at its default sizes. Packets
// from 20 flows (more than the 16 flow-table entries) are fed in; two NP
// sinks read with random stalls. Checks at the NP ports: contents and header
// marking, order within each flow, and that a flow only moves to the other
// NP after its earlier packets were all taken by their NP. Also checks the
// latency of an isolated packet: its header reaches the NP port five cycles
// after the source-address word was accepted (key queue, lookup request,
// result, decision, FIFO write).
module tb_load_balancer;
  import lb_pkg::*;
  localparam int N = 2, NFLOW = 20, NPK = 800;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  pkt_word_t in_word;
  logic [N-1:0] np_valid, np_ready, ev_fifo_full;
  pkt_word_t [N-1:0] np_word;
  logic ev_hit, ev_miss, ev_evict, ev_stall, ev_backpressure;
  int checks = 0, failures = 0;

  load_balancer dut (.*);

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

  pkt_word_t pk [NPK+1][$];
  int        flow_of [NPK+1];
  int        last_gid [NFLOW+1], last_np [NFLOW+1];
  bit        done [NPK+1];
  int        cur [N], widx [N];
  int        got = 0, moves = 0, c_hit = 0, c_miss = 0, c_evict = 0;
  bit        lat_mode = 0;
  int        t_key = -1;
  bit        lat_checked = 0;

  always @(posedge clk) #2
    for (int k = 0; k < N; k++) np_ready[k] = lat_mode || ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    if (ev_hit) c_hit++;
    if (ev_miss) c_miss++;
    if (ev_evict) c_evict++;
  end

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) if (np_valid[k] && np_ready[k]) begin
      pkt_word_t w, e;
      w = np_word[k];
      if (w.sof) begin
        int g, f;
        g = int'(w.data[15:0]);
        f = flow_of[g];
        cur[k] = g; widx[k] = 0;
        check(int'(w.data[27:24]) == k, "NP number in header");
        check(g > last_gid[f], "order within the flow");
        check(last_np[f] < 0 || last_np[f] == k || done[last_gid[f]],
              "flow moves only after its packets were taken");
        if (last_np[f] >= 0 && last_np[f] != k) moves++;
        last_gid[f] = g; last_np[f] = k;
      end
      e = pk[cur[k]][widx[k]];
      if (w.sof) e.data = mark_header(e.data, 4'(k), w.data[23:16]);
      check(w == e, "word contents");
      widx[k]++;
      if (w.eof) begin done[cur[k]] = 1; got++; end
    end
  end

  task automatic send(input int g);
    for (int i = 0; i < pk[g].size(); i++) begin
      bit acc;
      in_valid = 1;
      in_word = pk[g][i];
      do begin @(negedge clk); acc = in_ready; @(posedge clk); end while (!acc);
      #1 in_valid = 0;
    end
  endtask

  initial begin
    in_valid = 0; in_word = '0;
    foreach (last_gid[f]) begin last_gid[f] = -1; last_np[f] = -1; end
    foreach (done[g]) done[g] = 0;
    for (int g = 0; g <= NPK; g++) begin
      int nw, f;
      nw = (g % 9 == 4) ? 4 : $urandom_range(6, 30);
      f = (nw > SRC_IP_WORD) ? $urandom_range(0, NFLOW - 1) : NFLOW;
      flow_of[g] = f;
      for (int i = 0; i < nw; i++) begin
        pkt_word_t w;
        w.sof = (i == 0); w.eof = (i == nw - 1);
        w.data = (i == 0) ? make_header(16'(g)) :
                 (i == SRC_IP_WORD) ? 32'h0A0A_0000 + word_t'(f) : $urandom;
        pk[g].push_back(w);
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int g = 0; g < NPK; g++) send(g);
    wait (got == NPK);
    // latency of an isolated packet
    lat_mode = 1;
    repeat (10) @(posedge clk);
    #1;
    for (int i = 0; i < pk[NPK].size(); i++) begin
      in_valid = 1;
      in_word = pk[NPK][i];
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    wait (got == NPK + 1);
    check(lat_checked, "latency measured");
    check(c_hit > 0 && c_miss > 0 && c_evict > 0 && moves > 0, "hit, miss, eviction, NP move happened");
    $display("hit=%0d miss=%0d evict=%0d moves=%0d", c_hit, c_miss, c_evict, moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // header arrival time of the isolated packet
  always @(posedge clk) if (rst_n && in_valid && in_ready && lat_mode && !in_word.sof && in_word.data == 32'h0A0A_0000 + word_t'(flow_of[NPK]))
    t_key = $time;
  always @(negedge clk) if (rst_n && lat_mode && t_key >= 0) begin
    for (int k = 0; k < N; k++) if (np_valid[k] && np_word[k].sof) begin
      // the header is first visible in the cycle after the edge that wrote it
      check(($time - 5 - t_key) / 10 == 5, "header 5 cycles after the key word");
      $display("latency=%0d", ($time - 5 - t_key) / 10);
      t_key = -1;
      lat_checked = 1;
    end
  end
endmodule
