// Self-checking testbench for the two flow definitions of the load
// balancer: key = source address (USE_DST = 0, the default) and key =
// source and destination address (USE_DST = 1). Two load_balancer
// instances receive the same 300 packets from 4 sources x 3 destinations,
// plus packets too short to carry a destination. Checks, per instance: the
// number of flow-table misses equals the number of distinct keys (all fit
// in the table), every packet of one key reaches one NP only, and every
// packet arrives unchanged apart from the header marking. With USE_DST = 1
// at least one source must be split over both NPs.
module tb_flow_key_modes;
  import lb_pkg::*;
  localparam int N = 2, NPK = 300, NSRC = 4, NDST = 3;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  pkt_word_t pk [NPK][$];
  int        src_of [NPK], dst_of [NPK];
  bit        gen_done = 0;

  initial begin
    for (int g = 0; g < NPK; g++) begin
      int nw;
      nw = (g % 10 == 9) ? 5 : $urandom_range(6, 16);   // 5 words: no destination
      src_of[g] = $urandom_range(0, NSRC - 1);
      dst_of[g] = (nw > DST_IP_WORD) ? $urandom_range(0, NDST - 1) : NDST;
      for (int i = 0; i < nw; i++) begin
        pkt_word_t w;
        w.sof = (i == 0); w.eof = (i == nw - 1);
        w.data = (i == 0) ? make_header(16'(g)) :
                 (i == SRC_IP_WORD) ? 32'h0A00_0000 + word_t'(src_of[g]) :
                 (i == DST_IP_WORD) ? 32'hC0A8_0000 + word_t'(dst_of[g]) : $urandom;
        pk[g].push_back(w);
      end
    end
    gen_done = 1;
  end

  for (genvar m = 0; m < 2; m++) begin : g_mode
    logic in_valid, in_ready;
    pkt_word_t in_word;
    logic [N-1:0] np_valid, np_ready, ev_fifo_full;
    pkt_word_t [N-1:0] np_word;
    logic ev_hit, ev_miss, ev_evict, ev_stall, ev_backpressure;
    int misses = 0, got = 0;
    int key_np [NSRC][NDST+1];
    int src_np [NSRC][N];
    int cur [N], widx [N];

    load_balancer #(.USE_DST(m)) dut (.*);

    assign np_ready = '1;

    always @(posedge clk) if (rst_n && ev_miss) misses++;

    always @(negedge clk) if (rst_n) begin
      for (int k = 0; k < N; k++) if (np_valid[k]) begin
        pkt_word_t e;
        if (np_word[k].sof) begin
          int g, d;
          g = int'(np_word[k].data[15:0]);
          cur[k] = g; widx[k] = 0;
          d = (m == 1) ? dst_of[g] : 0;
          if (key_np[src_of[g]][d] < 0) key_np[src_of[g]][d] = k;
          check(key_np[src_of[g]][d] == k, "one NP per flow key");
          src_np[src_of[g]][k]++;
        end
        e = pk[cur[k]][widx[k]];
        if (e.sof) e.data = mark_header(e.data, 4'(k), np_word[k].data[23:16]);
        check(np_word[k] == e, "word contents");
        widx[k]++;
        if (np_word[k].eof) got++;
      end
    end

    initial begin
      in_valid = 0; in_word = '0;
      foreach (key_np[s, d]) key_np[s][d] = -1;
      foreach (src_np[s, k]) src_np[s][k] = 0;
      wait (gen_done && rst_n);
      #1;
      for (int g = 0; g < NPK; g++)
        for (int i = 0; i < pk[g].size(); i++) begin
          bit acc;
          in_valid = 1; in_word = pk[g][i];
          do begin @(negedge clk); acc = in_ready; @(posedge clk); end while (!acc);
          #1 in_valid = 0;
        end
    end
  end

  initial begin
    int keys0, keys1, split;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (g_mode[0].got == NPK && g_mode[1].got == NPK);
    repeat (5) @(posedge clk);
    keys0 = 0; keys1 = 0; split = 0;
    for (int s = 0; s < NSRC; s++) begin
      if (g_mode[0].key_np[s][0] >= 0) keys0++;
      for (int d = 0; d <= NDST; d++) if (g_mode[1].key_np[s][d] >= 0) keys1++;
      if (g_mode[1].src_np[s][0] > 0 && g_mode[1].src_np[s][1] > 0) split++;
    end
    check(g_mode[0].misses == keys0, "source-only key: one miss per source");
    check(g_mode[1].misses == keys1, "source+destination key: one miss per pair");
    check(keys1 > keys0, "more flows with the destination in the key");
    check(split > 0, "a source split over both NPs by destination");
    $display("USE_DST=0: flows=%0d misses=%0d; USE_DST=1: flows=%0d misses=%0d, split sources=%0d",
             keys0, g_mode[0].misses, keys1, g_mode[1].misses, split);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
