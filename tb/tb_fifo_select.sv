// Self-checking testbench for fifo_select: random and corner fill levels;
// the selected FIFO must be the least filled, the lowest index on a tie.
module tb_fifo_select;
  localparam int N = 3, LW = 10;
  logic [N-1:0][LW-1:0] level;
  logic [1:0] sel;
  logic [LW-1:0] level2 [2];
  logic [0:0] sel2;
  int checks = 0, failures = 0;

  fifo_select #(.N_NP(N), .LVL_W(LW)) dut (.level, .sel);
  // the default two-NP configuration
  fifo_select dut2 (.level({level2[1], level2[0]}), .sel(sel2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int best;
      for (int i = 0; i < N; i++) level[i] = LW'($urandom_range(0, n < 1000 ? 3 : 512));
      level2[0] = LW'($urandom_range(0, 4));
      level2[1] = LW'($urandom_range(0, 4));
      #1;
      best = 0;
      for (int i = 1; i < N; i++) if (level[i] < level[best]) best = i;
      check(sel == best, "sel N=3");
      check(sel2 == (level2[1] < level2[0] ? 1 : 0), "sel N=2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
