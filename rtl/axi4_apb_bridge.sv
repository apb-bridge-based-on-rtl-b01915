// axi4_apb_bridge: AXI4 slave to APB4 master bus bridge.
//
// Lets a processor on an AXI4 bus reach simple peripherals on an APB bus.
// The bridge is an AXI4 slave on ACLK and an APB4 master on PCLK; each AXI
// beat becomes one APB transfer, so AXI bursts (FIXED, INCR, WRAP) are
// downgraded to a sequence of single APB transfers at the beat addresses.
//
//   AXI4 channels --> axi_slave_ctrl --cmd--> cdc_handshake --> apb_master
//        (ACLK)        burst_addr_gen <--rsp--              (PCLK)   |
//                                                            apb_decoder
//                                                         PSEL[i] / return mux
//
// Ports: the five AXI4 channels (AW, W, B, AR, R) with ID, address, length,
// size, burst type and protection; AXI4 cache, lock, QoS, region and user
// signals are not used. On the APB side one PSEL per peripheral
// (NUM_SLAVES), shared PADDR/PENABLE/PWRITE/PWDATA/PSTRB/PPROT, and one
// PRDATA/PREADY/PSLVERR per peripheral. A beat at an address no peripheral
// decodes gets DECERR without an APB transfer; PSLVERR becomes SLVERR.
//
// Timing: one burst at a time. Per beat, the command crosses to PCLK
// (SYNC_STAGES PCLK cycles), the APB transfer takes SETUP + ACCESS (2 PCLK
// cycles plus wait states) and the result crosses back (SYNC_STAGES ACLK
// cycles). Set SYNC_STAGES = 0 only when ACLK and PCLK are the same clock.
// Both resets must be asserted together.
//
// The interface split, two clocks with their resets and the burst address
// rules follow the bridge's specification; widths, the address map, the
// clock-domain crossing, read/write arbitration and error mapping are this
// design's choices.
module axi4_apb_bridge
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned ID_W        = 4,
  parameter int unsigned NUM_SLAVES  = 2,
  parameter int unsigned SYNC_STAGES = 2,
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] SLV_BASE = {32'h0000_1000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] SLV_MASK = {32'hFFFF_F000, 32'hFFFF_F000}
) (
  input  logic                                ACLK,
  input  logic                                ARESETn,
  input  logic                                PCLK,
  input  logic                                PRESETn,
  // AXI4 write address channel
  input  logic [ID_W-1:0]                     AWID,
  input  logic [ADDR_W-1:0]                   AWADDR,
  input  logic [7:0]                          AWLEN,
  input  logic [2:0]                          AWSIZE,
  input  logic [1:0]                          AWBURST,
  input  logic [2:0]                          AWPROT,
  input  logic                                AWVALID,
  output logic                                AWREADY,
  // AXI4 write data channel
  input  logic [DATA_W-1:0]                   WDATA,
  input  logic [DATA_W/8-1:0]                 WSTRB,
  input  logic                                WLAST,
  input  logic                                WVALID,
  output logic                                WREADY,
  // AXI4 write response channel
  output logic [ID_W-1:0]                     BID,
  output logic [1:0]                          BRESP,
  output logic                                BVALID,
  input  logic                                BREADY,
  // AXI4 read address channel
  input  logic [ID_W-1:0]                     ARID,
  input  logic [ADDR_W-1:0]                   ARADDR,
  input  logic [7:0]                          ARLEN,
  input  logic [2:0]                          ARSIZE,
  input  logic [1:0]                          ARBURST,
  input  logic [2:0]                          ARPROT,
  input  logic                                ARVALID,
  output logic                                ARREADY,
  // AXI4 read data channel
  output logic [ID_W-1:0]                     RID,
  output logic [DATA_W-1:0]                   RDATA,
  output logic [1:0]                          RRESP,
  output logic                                RLAST,
  output logic                                RVALID,
  input  logic                                RREADY,
  // APB4 interface
  output logic [ADDR_W-1:0]                   PADDR,
  output logic [NUM_SLAVES-1:0]               PSEL,
  output logic                                PENABLE,
  output logic                                PWRITE,
  output logic [DATA_W-1:0]                   PWDATA,
  output logic [DATA_W/8-1:0]                 PSTRB,
  output logic [2:0]                          PPROT,
  input  logic [NUM_SLAVES-1:0][DATA_W-1:0]   PRDATA,
  input  logic [NUM_SLAVES-1:0]               PREADY,
  input  logic [NUM_SLAVES-1:0]               PSLVERR
);

  // The command/response records use the package widths.
  if (ADDR_W != axi_apb_pkg::BUS_ADDR_W || DATA_W != axi_apb_pkg::BUS_DATA_W) begin : g_width_check
    $error("axi4_apb_bridge: ADDR_W/DATA_W must match axi_apb_pkg");
  end

  logic     a_cmd_valid, a_cmd_ready, a_rsp_valid;
  apb_cmd_t a_cmd;
  apb_rsp_t a_rsp;
  logic     p_cmd_valid, p_done;
  apb_cmd_t p_cmd;
  apb_rsp_t p_rsp;

  logic [ADDR_W-1:0] dec_addr;
  logic              dec_hit;
  logic              psel_m, pready_m, pslverr_m;
  logic [DATA_W-1:0] prdata_m;

  axi_slave_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .ID_W(ID_W)) u_axi (
    .ACLK, .ARESETn,
    .AWID, .AWADDR, .AWLEN, .AWSIZE, .AWBURST, .AWPROT, .AWVALID, .AWREADY,
    .WDATA, .WSTRB, .WLAST, .WVALID, .WREADY,
    .BID, .BRESP, .BVALID, .BREADY,
    .ARID, .ARADDR, .ARLEN, .ARSIZE, .ARBURST, .ARPROT, .ARVALID, .ARREADY,
    .RID, .RDATA, .RRESP, .RLAST, .RVALID, .RREADY,
    .cmd_valid (a_cmd_valid),
    .cmd_ready (a_cmd_ready),
    .cmd       (a_cmd),
    .rsp_valid (a_rsp_valid),
    .rsp       (a_rsp)
  );

  cdc_handshake #(
    .CMD_T(apb_cmd_t), .RSP_T(apb_rsp_t), .SYNC_STAGES(SYNC_STAGES)
  ) u_cdc (
    .src_clk       (ACLK),
    .src_rst_n     (ARESETn),
    .src_valid     (a_cmd_valid),
    .src_ready     (a_cmd_ready),
    .src_cmd       (a_cmd),
    .src_rsp_valid (a_rsp_valid),
    .src_rsp       (a_rsp),
    .dst_clk       (PCLK),
    .dst_rst_n     (PRESETn),
    .dst_valid     (p_cmd_valid),
    .dst_cmd       (p_cmd),
    .dst_done      (p_done),
    .dst_rsp       (p_rsp)
  );

  apb_master #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_apb (
    .PCLK, .PRESETn,
    .cmd_valid (p_cmd_valid),
    .cmd       (p_cmd),
    .done      (p_done),
    .rsp       (p_rsp),
    .dec_addr  (dec_addr),
    .dec_hit   (dec_hit),
    .PADDR, .PSEL(psel_m), .PENABLE, .PWRITE, .PWDATA, .PSTRB, .PPROT,
    .PRDATA    (prdata_m),
    .PREADY    (pready_m),
    .PSLVERR   (pslverr_m)
  );

  apb_decoder #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .NUM_SLAVES(NUM_SLAVES),
    .SLV_BASE(SLV_BASE), .SLV_MASK(SLV_MASK)
  ) u_dec (
    .addr      (dec_addr),
    .hit       (dec_hit),
    .psel_m    (psel_m),
    .prdata_m  (prdata_m),
    .pready_m  (pready_m),
    .pslverr_m (pslverr_m),
    .psel      (PSEL),
    .prdata    (PRDATA),
    .pready    (PREADY),
    .pslverr   (PSLVERR)
  );

endmodule
