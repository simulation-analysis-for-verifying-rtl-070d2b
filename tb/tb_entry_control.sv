// Self-checking testbench for entry_control: random allocations and
// releases (including two lanes releasing the same entry in one cycle)
// against per-entry reference counters; checks the busy vector.
module tb_entry_control;
  localparam int D = 8, N = 2;
  logic clk = 0, rst_n = 0;
  logic alloc;
  logic [2:0] alloc_entry;
  logic [N-1:0] release_valid;
  logic [N-1:0][2:0] release_entry;
  logic [D-1:0] busy;
  int checks = 0, failures = 0;
  int cnt[D];
  int same_cycle_double = 0;

  entry_control #(.DEPTH(D), .N_NP(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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
    alloc = 0; alloc_entry = 0; release_valid = 0; release_entry = 0;
    foreach (cnt[i]) cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int i = 0; i < D; i++) check(busy[i] == (cnt[i] != 0), "busy");
      alloc = $urandom_range(0, 1);
      alloc_entry = 3'($urandom_range(0, D - 1));
      release_valid = 0;
      for (int l = 0; l < N; l++) begin
        release_entry[l] = 3'($urandom_range(0, D - 1));
        if (l == 1 && $urandom_range(0, 3) == 0) release_entry[1] = release_entry[0];
        // release only what is outstanding
        if ($urandom_range(0, 1) &&
            cnt[release_entry[l]] > ((l == 1 && release_valid[0] && release_entry[0] == release_entry[1]) ? 1 : 0))
          release_valid[l] = 1;
      end
      if (release_valid == 2'b11 && release_entry[0] == release_entry[1]) same_cycle_double++;
      if (alloc) cnt[alloc_entry]++;
      for (int l = 0; l < N; l++) if (release_valid[l]) cnt[release_entry[l]]--;
    end
    check(same_cycle_double > 10, "double-release coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
