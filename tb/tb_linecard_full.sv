// End-to-end testbench of linecard_dataplane with every parameter at its
// default (16-entry flow table, 64-word pipeline buffer, 512-word NP FIFOs).
// Long NP stalls fill the FIFOs; 18 flows exceed the flow table. The
// environment and its checks are in lc_env.svh.
module tb_linecard_full;
  localparam int NPKT        = 3000;
  localparam int NFLOW       = 18;
  localparam int STALL_LEN   = 2000;
  localparam int FT_DEPTH_TB = 16;
  localparam int WATCHDOG    = 2000000;

  // Final report, called by the environment.
  task automatic report(input int checks, input int failures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  `include "lc_env.svh"

  linecard_dataplane dut (.*);
endmodule
