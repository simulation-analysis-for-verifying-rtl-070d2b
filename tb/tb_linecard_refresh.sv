// End-to-end testbench of linecard_dataplane with the flow table's refresh
// (second-chance) policy enabled, at the same reduced sizes and with the
// same traffic and checks (lc_env.svh) as tb_linecard_dataplane, except that
// the NP stalls last 600 cycles: refreshed flows are evicted less often, so
// the table needs longer stalls before every entry is busy. Checks: order per
// flow at the NP inputs and through each NP, a flow changes NP only after
// its earlier packets were handed over, and every mechanism must occur.
module tb_linecard_refresh;
  localparam int NPKT        = 1500;
  localparam int NFLOW       = 20;
  localparam int STALL_LEN   = 600;
  localparam int FT_DEPTH_TB = 8;
  localparam int WATCHDOG    = 400000;

  // Final report, called by the environment.
  task automatic report(input int checks, input int failures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  `include "lc_env.svh"

  linecard_dataplane #(
    .FT_DEPTH(FT_DEPTH_TB), .PB_DEPTH(16), .KEYQ_DEPTH(4), .FIFO_DEPTH(48),
    .REFRESH(1'b1)
  ) dut (.*);
endmodule
