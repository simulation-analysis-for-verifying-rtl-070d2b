// End-to-end testbench of linecard_dataplane at reduced sizes (8-entry flow
// table, 16-word pipeline buffer, 48-word NP FIFOs) so that evictions, busy
// entries, full FIFOs and back pressure all occur in a short run. The
// environment and its checks are in lc_env.svh.
module tb_linecard_dataplane;
  localparam int NPKT        = 1500;
  localparam int NFLOW       = 20;
  localparam int STALL_LEN   = 150;
  localparam int FT_DEPTH_TB = 8;
  localparam int WATCHDOG    = 400000;

  // Final report, called by the environment.
  task automatic report(input int checks, input int failures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  `include "lc_env.svh"

  linecard_dataplane #(
    .FT_DEPTH(FT_DEPTH_TB), .PB_DEPTH(16), .KEYQ_DEPTH(4), .FIFO_DEPTH(48)
  ) dut (.*);
endmodule
