// Self-checking testbench for flow_table. Runs flow_table_bench twice at
// the same time: once with the plain circular table (REFRESH = 0) and once
// with the second-chance refresh (REFRESH = 1). Each bench compares the
// table with its own reference model; this top adds up the results.
module tb_flow_table;
  logic clk = 0;
  int c0, f0, c1, f1;
  bit d0, d1;

  flow_table_bench #(.REFRESH(1'b0)) u_plain   (.clk, .checks(c0), .failures(f0), .done(d0));
  flow_table_bench #(.REFRESH(1'b1)) u_refresh (.clk, .checks(c1), .failures(f1), .done(d1));

  always #5 clk = ~clk;

  initial begin
    fork
      wait (d0 && d1);
      repeat (50000) @(posedge clk);
    join_any
    if (!(d0 && d1)) begin
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    end else
      $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end
endmodule
