// Self-checking testbench for output_control, fed by a sync_fifo: packets
// with marked headers go through a randomly stalling NP interface. Checks
// the words delivered to the NP, and that one release pulse with the
// header's entry number follows the last word of every packet (also for
// single-word packets).
module tb_output_control;
  import lb_pkg::*;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic push, f_empty, f_full, f_pop, np_valid, np_ready, rel_valid;
  pkt_word_t din, f_dout, np_word;
  logic [3:0] rel_entry;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(PKT_WORD_W), .DEPTH(8)) u_fifo (
    .clk, .rst_n, .push, .din, .pop(f_pop), .dout(f_dout), .full(f_full),
    .empty(f_empty), .level());
  output_control #(.DEPTH(D)) dut (.*);

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

  pkt_word_t exp_q[$];
  int        rel_q[$];
  int        npk = 300, rels = 0;

  always @(posedge clk) #2 np_ready = ($urandom_range(0, 2) != 0);

  always @(negedge clk) if (rst_n) begin
    if (np_valid && np_ready) begin
      pkt_word_t e;
      e = exp_q.pop_front();
      check(np_word == e, "word to NP");
      check(rel_valid == np_word.eof, "release with last word");
      if (rel_valid) begin
        check(int'(rel_entry) == rel_q.pop_front(), "release entry");
        rels++;
      end
    end else check(!rel_valid, "no stray release");
  end

  initial begin
    push = 0; din = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < npk; p++) begin
      int nw, ent;
      nw = (p % 9 == 0) ? 1 : $urandom_range(2, 10);
      ent = $urandom_range(0, D - 1);
      rel_q.push_back(ent);
      for (int i = 0; i < nw; i++) begin
        bit acc;
        push = 1;
        din.sof = (i == 0); din.eof = (i == nw - 1);
        din.data = (i == 0) ? mark_header(make_header(16'(p)), 4'd1, 8'(ent)) : $urandom;
        do begin @(negedge clk); acc = !f_full; @(posedge clk); end while (!acc);
        exp_q.push_back(din);
        #1 push = 0;
      end
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    check(rels == npk, "one release per packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
