// Self-checking testbench for fifo_control with a sync_fifo as pipeline
// buffer: packets enter the buffer, decisions {np, entry} arrive late and
// at random, and both NP FIFOs report full at random. Checks that every
// word goes to the decided FIFO, never into a full one, in order, with NP
// and entry written into the header word, and that in_ready follows the
// buffer and key-queue full flags.
module tb_fifo_control;
  import lb_pkg::*;
  localparam int N = 2, D = 16;
  logic clk = 0, rst_n = 0;
  logic dec_valid, dec_ready, pb_empty, pb_pop, pb_full, keyq_full, in_ready, pb_push;
  logic [0:0] dec_np;
  logic [3:0] dec_entry;
  pkt_word_t pb_dout, pb_din, f_din;
  logic [N-1:0] f_push, f_full;
  int checks = 0, failures = 0;

  sync_fifo #(.WIDTH(PKT_WORD_W), .DEPTH(12)) u_pb (
    .clk, .rst_n, .push(pb_push), .din(pb_din), .pop(pb_pop), .dout(pb_dout),
    .full(pb_full), .empty(pb_empty), .level());
  fifo_control #(.N_NP(N), .DEPTH(D)) dut (.*);

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

  localparam int NPK = 200;
  int        dnp[NPK], dent[NPK];
  pkt_word_t exp_w[$];
  int        exp_np[$];
  int        out_pkts = 0, full_stalls = 0;

  always @(posedge clk) #2 begin
    f_full[0] = ($urandom_range(0, 3) == 0);
    f_full[1] = ($urandom_range(0, 3) == 0);
    keyq_full = ($urandom_range(0, 7) == 0);
  end

  always @(negedge clk) if (rst_n) begin
    check(in_ready == (!pb_full && !keyq_full), "in_ready");
    check($countones(f_push) <= 1, "one push per cycle");
    if (!pb_empty && dut.active && f_full[dut.np_r]) full_stalls++;
    for (int k = 0; k < N; k++) if (f_push[k]) begin
      check(!f_full[k], "no push into full FIFO");
      check(k == exp_np.pop_front(), "target FIFO");
      check(f_din == exp_w.pop_front(), "word");
      if (f_din.eof) out_pkts++;
    end
  end

  // packet source into the pipeline buffer
  initial begin
    pb_push = 0; pb_din = '0;
    foreach (dnp[p]) begin dnp[p] = $urandom_range(0, 1); dent[p] = $urandom_range(0, D - 1); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int p = 0; p < NPK; p++) begin
      int nw;
      nw = $urandom_range(1, 9);
      for (int i = 0; i < nw; i++) begin
        bit acc;
        pkt_word_t e;
        pb_push = 1;
        pb_din.sof = (i == 0); pb_din.eof = (i == nw - 1);
        pb_din.data = (i == 0) ? make_header(16'(p)) : $urandom;
        e = pb_din;
        if (i == 0) e.data = mark_header(pb_din.data, 4'(dnp[p]), 8'(dent[p]));
        exp_w.push_back(e);
        exp_np.push_back(dnp[p]);
        do begin @(negedge clk); acc = !pb_full; @(posedge clk); end while (!acc);
        #1 pb_push = 0;
      end
    end
  end

  // decisions, in packet order, with random delay
  initial begin
    dec_valid = 0; dec_np = 0; dec_entry = 0;
    repeat (3) @(posedge clk);
    #1;
    for (int p = 0; p < NPK; p++) begin
      bit acc;
      repeat ($urandom_range(0, 6)) @(posedge clk);
      #1;
      dec_valid = 1; dec_np = 1'(dnp[p]); dec_entry = 4'(dent[p]);
      do begin @(negedge clk); acc = dec_ready; @(posedge clk); end while (!acc);
      #1 dec_valid = 0;
    end
    wait (out_pkts == NPK);
    repeat (5) @(posedge clk);
    check(exp_w.size() == 0, "all words moved");
    check(full_stalls > 0, "full FIFO stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
