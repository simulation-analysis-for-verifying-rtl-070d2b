// Workload testbench for the source's flow-classification experiment:
// twelve source addresses, about 490 datagrams with exponential gaps, run
// through linecard_dataplane at its default sizes (fig8_bench). One bench
// uses the two NPs of the experiment; a second one uses four NPs, the
// "more than two network processors" case of the source's conclusion, on
// the same kind of traffic. Each bench checks one NP per source address,
// the spread of flows and packets over the NPs, no evictions, unchanged
// in-order delivery, and near-equal mean latency per source and per NP.
module tb_fig8_workload;
  logic clk = 0;
  int c2, f2, c4, f4;
  bit d2, d4;

  fig8_bench #(.N(2)) u_two  (.clk, .checks(c2), .failures(f2), .done(d2));
  fig8_bench #(.N(4)) u_four (.clk, .checks(c4), .failures(f4), .done(d4));

  always #5 clk = ~clk;

  initial begin
    fork
      wait (d2 && d4);
      repeat (200000) @(posedge clk);
    join_any
    if (!(d2 && d4)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4 + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", c2 + c4, f2 + f4);
    $finish;
  end
endmodule
