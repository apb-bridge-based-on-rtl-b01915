// cdc_handshake: carries one command from the source clock domain to the
// destination clock domain and its response back.
//
// The bridge has separate AXI (ACLK/ARESETn) and APB (PCLK/PRESETn) clocks
// and resets; how the two domains meet is this design's choice. This block
// uses a toggle handshake: the source registers the command and flips
// `req_tog`; the destination sees the flip through a synchroniser, holds
// `dst_valid` high until its user pulses `dst_done`, then registers the
// response and flips `ack_tog`; the source sees that flip through its own
// synchroniser and pulses `src_rsp_valid` for one cycle. Only the toggle bits
// cross the domains through flip-flop chains; the command and response
// registers are held stable while they are read on the other side.
//
// Interface:
//   source  - src_valid/src_ready accept a command (ready is low while one is
//             in flight); src_rsp_valid pulses once with src_rsp.
//   dest    - dst_valid stays high with dst_cmd until dst_done is pulsed
//             together with dst_rsp.
// Timing: SYNC_STAGES destination cycles from acceptance to dst_valid, and
// SYNC_STAGES source cycles from dst_done to src_rsp_valid. SYNC_STAGES = 0
// is allowed when both sides share one clock. Both resets must be asserted
// together (this design's assumption).
module cdc_handshake
  import axi_apb_pkg::*;
#(
  parameter type         CMD_T       = axi_apb_pkg::apb_cmd_t,
  parameter type         RSP_T       = axi_apb_pkg::apb_rsp_t,
  parameter int unsigned SYNC_STAGES = 2
) (
  // source domain
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic src_valid,
  output logic src_ready,
  input  CMD_T src_cmd,
  output logic src_rsp_valid,
  output RSP_T src_rsp,
  // destination domain
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic dst_valid,
  output CMD_T dst_cmd,
  input  logic dst_done,
  input  RSP_T dst_rsp
);

  logic req_tog, req_sync;
  logic ack_tog, ack_sync, ack_seen;
  CMD_T cmd_q;
  RSP_T rsp_q;

  // ---------------- source domain ----------------
  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      req_tog  <= 1'b0;
      ack_seen <= 1'b0;
      cmd_q    <= '0;
    end else begin
      ack_seen <= ack_sync;
      if (src_valid && src_ready) begin
        req_tog <= ~req_tog;
        cmd_q   <= src_cmd;
      end
    end
  end

  sync_bit #(.STAGES(SYNC_STAGES)) u_ack_sync (
    .clk(src_clk), .rst_n(src_rst_n), .d(ack_tog), .q(ack_sync)
  );

  assign src_ready     = (req_tog == ack_sync);
  assign src_rsp_valid = (ack_sync != ack_seen);
  assign src_rsp       = rsp_q;

  // ---------------- destination domain ----------------
  sync_bit #(.STAGES(SYNC_STAGES)) u_req_sync (
    .clk(dst_clk), .rst_n(dst_rst_n), .d(req_tog), .q(req_sync)
  );

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      ack_tog <= 1'b0;
      rsp_q   <= '0;
    end else if (dst_valid && dst_done) begin
      ack_tog <= ~ack_tog;
      rsp_q   <= dst_rsp;
    end
  end

  assign dst_valid = (req_sync != ack_tog);
  assign dst_cmd   = cmd_q;

  // A response may only be given for a pending command.
  a_done_needs_valid: assert property (@(posedge dst_clk) disable iff (!dst_rst_n)
    dst_done |-> dst_valid);

endmodule
