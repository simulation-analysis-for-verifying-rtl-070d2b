// Self-checking testbench for mux_module: two NP sources send packets
// (header, data words, tail) with random gaps while the output applies
// random back pressure. Checks that (1) each grant goes to the input whose
// header has waited longest, NP #1 (index 0) when headers arrived in the same
// cycle, (2) the output carries exactly the data words of the granted
// packets, with sop on the first and eop on the last and no control words,
// and (3) same-cycle arrivals occurred.
module tb_mux_module;
  import lb_pkg::*;
  localparam int N = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] np_valid, np_ready;
  pkt_word_t [N-1:0] np_word;
  logic out_valid, out_sop, out_eop, out_ready, ev_tie;
  word_t out_data;
  int checks = 0, failures = 0;

  mux_module #(.N_NP(N)) dut (.*);

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

  localparam int NPKT = 150;
  int ndata [N][NPKT];            // data words per packet
  int pkt_idx [N];                // next packet index granted per input
  int arrive [N];                 // time the waiting header first showed
  int ties = 0, grants = 0, out_pkts = 0;
  word_t exp_q[$];                // expected output data
  bit    exp_sop[$], exp_eop[$];
  bit    start_all = 0;

  function automatic word_t dword(int src, int p, int i);
    return word_t'((src << 28) | (p << 12) | i);
  endfunction

  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      np_valid[s] = 0; np_word[s] = '0;
      wait (start_all);
      for (int p = 0; p < NPKT; p++) begin
        int nw;
        nw = ndata[s][p] + 2;
        // every 10th packet starts on a common cycle for both sources
        if (p % 10 == 0) begin
          @(posedge clk);
          while (($time / 10) % 64 != 0) @(posedge clk);
          #1;
        end
        for (int i = 0; i < nw; i++) begin
          bit acc;
          if (p % 10 != 0 && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
          np_valid[s] = 1;
          np_word[s].sof = (i == 0);
          np_word[s].eof = (i == nw - 1);
          np_word[s].data = (i == 0) ? make_header(16'(p)) :
                            (i == nw - 1) ? make_tail(16'(p)) : dword(s, p, i - 1);
          do begin @(negedge clk); acc = np_ready[s]; @(posedge clk); end while (!acc);
          #1 np_valid[s] = 0;
        end
      end
    end
  end

  always @(posedge clk) #2 out_ready = ($urandom_range(0, 3) != 0);

  // arbitration check and expected-output bookkeeping
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++)
      if (np_valid[i] && np_word[i].sof && arrive[i] < 0) arrive[i] = $time;
    for (int i = 0; i < N; i++) begin
      if (np_valid[i] && np_word[i].sof && np_ready[i]) begin
        int best;
        best = -1;
        for (int j = 0; j < N; j++)
          if (arrive[j] >= 0 && (best < 0 || arrive[j] < arrive[best])) best = j;
        check(best == i, "grant to the oldest header");
        for (int j = 0; j < N; j++) if (j != i && arrive[j] == arrive[i]) ties++;
        grants++;
        for (int k = 0; k < ndata[i][pkt_idx[i]]; k++) begin
          exp_q.push_back(dword(i, pkt_idx[i], k));
          exp_sop.push_back(k == 0);
          exp_eop.push_back(k == ndata[i][pkt_idx[i]] - 1);
        end
        pkt_idx[i]++;
        arrive[i] = -1;
      end
    end
    if (out_valid && out_ready) begin
      if (exp_q.size() == 0) begin checks++; failures++; $display("FAIL unexpected output"); end
      else begin
        check(out_data == exp_q.pop_front(), "data");
        check(out_sop == exp_sop.pop_front(), "sop");
        check(out_eop == exp_eop.pop_front(), "eop");
        if (out_eop) out_pkts++;
      end
    end
  end

  int ev_ties = 0;
  always @(posedge clk) if (rst_n && ev_tie) ev_ties++;

  initial begin
    foreach (arrive[i]) begin arrive[i] = -1; pkt_idx[i] = 0; end
    foreach (ndata[s, p]) ndata[s][p] = (p % 17 == 5) ? 0 : $urandom_range(1, 12);
    out_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    start_all = 1;
    wait (pkt_idx[0] == NPKT && pkt_idx[1] == NPKT);
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    check(grants == 2 * NPKT, "all packets granted");
    check(ties > 0, "same-cycle headers occurred");
    check(ev_ties == ties, "tie strobe");
    $display("grants=%0d ties=%0d out_pkts=%0d", grants, ties, out_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
