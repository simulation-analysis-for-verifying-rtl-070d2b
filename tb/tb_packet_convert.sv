// Self-checking testbench for packet_convert: random datagrams with random
// gaps on the PHY side and random back pressure on the output. Each output
// packet must be header (tag, sequence number), the datagram words, and tail
// (tag, byte count). A stray word outside a datagram must be dropped.
// Also checks that an n-word datagram takes n+2 cycles without back pressure.
module tb_packet_convert;
  import lb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_sop, rx_eop, rx_ready, out_valid, out_ready;
  logic [1:0] rx_mod;
  word_t rx_data;
  pkt_word_t out_word;
  int checks = 0, failures = 0;

  packet_convert dut (.*);

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
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // expected output words
  pkt_word_t exp_q[$];
  bit        bp_on = 1;
  int        npkts = 200;

  task automatic send(input int nw, input logic [1:0] mod, input bit gaps);
    for (int i = 0; i < nw; i++) begin
      if (gaps && i > 0 && $urandom_range(0, 2) == 0) begin @(posedge clk); #1; end
      rx_valid = 1; rx_sop = (i == 0); rx_eop = (i == nw - 1);
      rx_mod = (i == nw - 1) ? mod : 2'd0;
      rx_data = $urandom;
      exp_q.push_back('{sof: 1'b0, eof: 1'b0, data: rx_data});
      begin
        bit acc;
        do begin @(negedge clk); acc = rx_ready; @(posedge clk); end while (!acc);
      end
      #1;
      rx_valid = 0;
    end
  endtask

  // output monitor
  always @(negedge clk) if (rst_n && out_valid && out_ready) begin
    if (exp_q.size() == 0) begin checks++; failures++; $display("FAIL unexpected word %h at %0t", out_word, $time); end
    else begin
      pkt_word_t e;
      e = exp_q.pop_front();
      check(out_word == e, "word"); if (out_word != e) $display("  got %h exp %h", out_word, e);
    end
  end

  always @(posedge clk) #2 out_ready = bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    int seq = 0;
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_mod = 0; rx_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // stray word: must be dropped
    rx_valid = 1; rx_sop = 0; rx_eop = 0; rx_data = 32'hDEAD_BEEF;
    @(posedge clk);
    #1 rx_valid = 0;
    for (int p = 0; p < npkts; p++) begin
      int nw; logic [1:0] mod;
      nw = $urandom_range(1, 20); mod = 2'($urandom);
      exp_q.push_back('{sof: 1'b1, eof: 1'b0, data: make_header(16'(seq))});
      seq++;
      // the tail is queued after the body, computed here
      fork send(nw, mod, 1); join
      exp_q.push_back('{sof: 1'b0, eof: 1'b1, data: make_tail(16'(nw * 4 - int'(mod)))});
    end
    // latency: 10-word datagram, no back pressure, no gaps
    bp_on = 0;
    wait (exp_q.size() == 0);
    @(negedge clk);
    begin
      int t0, t1;
      exp_q.push_back('{sof: 1'b1, eof: 1'b0, data: make_header(16'(seq))});
      t0 = $time;
      send(10, 2'd0, 0);
      exp_q.push_back('{sof: 1'b0, eof: 1'b1, data: make_tail(16'd40)});
      wait (exp_q.size() == 0);
      @(posedge clk); t1 = $time;
      check((t1 - t0 + 5) / 10 == 12, "12 cycles for a 10-word datagram");
      $display("cycles=%0d", (t1 - t0 + 5) / 10);
    end
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all words out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
