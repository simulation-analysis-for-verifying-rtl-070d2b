// Self-checking testbench for sync_fifo: random pushes and pops against a
// queue reference model; checks data order, full/empty flags and level.
module tb_sync_fifo;
  localparam int W = 8, D = 5;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] level;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      check(level == model.size(), "level");
      check(full == (model.size() == D), "full");
      check(empty == (model.size() == 0), "empty");
      if (model.size() > 0) check(dout == model[0], "data");
      push = ($urandom_range(0, 99) < (n < 1500 ? 60 : 40));
      pop  = ($urandom_range(0, 99) < (n < 1500 ? 40 : 60));
      din  = W'($urandom);
      begin
        bit wp, wq;
        wq = pop && model.size() > 0;
        wp = push && model.size() < D;
        @(posedge clk);
        #1;
        if (wq) void'(model.pop_front());
        if (wp) model.push_back(din);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
