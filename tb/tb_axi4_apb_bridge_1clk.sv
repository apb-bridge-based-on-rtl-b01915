// tb_axi4_apb_bridge_1clk: the end-to-end bridge test with ACLK and PCLK
// being one clock, as the reference waveforms draw them, and the bridge's
// clock-domain synchronisers bypassed (SYNC_STAGES = 0). Same checks and
// mechanism counts as tb_axi4_apb_bridge.
module tb_axi4_apb_bridge_1clk;
  logic ACLK = 0, PCLK;
  always #5 ACLK = ~ACLK;
  assign PCLK = ACLK;

`include "bridge_e2e_decls.svh"

  axi4_apb_bridge #(.SYNC_STAGES(0)) dut (.*);

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
