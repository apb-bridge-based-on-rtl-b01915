// sync_bit: multi-flop synchroniser for one level signal.
//
// Brings `d` into the clk domain through STAGES flip-flops, giving metastable
// first stages time to settle. With STAGES = 0 the input passes straight
// through, for use when both sides run on the same clock; clk and rst_n are
// then unused. Reset value is 0.
// Latency is STAGES rising edges of clk.
module sync_bit #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  if (STAGES == 0) begin : g_bypass
    assign q = d;
  end else begin : g_sync
    logic [STAGES-1:0] ff;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ff <= '0;
      end else begin
        ff[0] <= d;
        for (int i = 1; i < STAGES; i++) ff[i] <= ff[i-1];
      end
    end
    assign q = ff[STAGES-1];
  end

endmodule
