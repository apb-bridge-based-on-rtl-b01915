// tb_axi4_apb_bridge: end-to-end test of the bridge at its default
// parameters. An AXI4 master (tasks below) runs random FIXED, INCR and WRAP
// read and write bursts on ACLK (10 ns) into the bridge, whose APB side runs
// on an unrelated PCLK (13 ns) and reaches two behavioural APB memories with
// random wait states. A shadow copy of both memories gives the expected read
// data; a monitor records every APB transfer, which is checked beat by beat
// against the AXI4 address rules, the write data and strobes. Error cases:
// peripheral error windows (SLVERR) and unmapped addresses (DECERR, no APB
// transfer). It opens with the two 4-beat bursts of the bridge's reference
// waveforms. Every mechanism is counted and must occur at least once.
module tb_axi4_apb_bridge;
  logic ACLK = 0, PCLK = 0;
  always #5 ACLK = ~ACLK;
  always #6.5 PCLK = ~PCLK;

`include "bridge_e2e_decls.svh"

  axi4_apb_bridge dut (.*);

`include "bridge_e2e_body.svh"

  // watchdog
  initial begin
    repeat (400000) @(posedge ACLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
