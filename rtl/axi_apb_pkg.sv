// axi_apb_pkg: types and constants shared by the AXI4-to-APB4 bridge.
//
// Holds the AXI4 burst and response encodings (as defined by the AMBA AXI4
// protocol) and the two
// fixed-width records that travel across the clock-domain crossing: one APB
// command per AXI beat (ACLK -> PCLK) and its result (PCLK -> ACLK).
// Address and data widths are 32 bits, the usual width of the 32-bit
// embedded systems AMBA targets; that width is this design's choice.
package axi_apb_pkg;

  localparam int unsigned BUS_ADDR_W = 32;
  localparam int unsigned BUS_DATA_W = 32;
  localparam int unsigned BUS_STRB_W = BUS_DATA_W / 8;

  // AXI4 AxBURST encoding
  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10,
    BURST_RSVD  = 2'b11
  } burst_e;

  // AXI4 xRESP encoding
  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_e;

  // One APB transfer, as requested by the AXI side
  typedef struct packed {
    logic [BUS_ADDR_W-1:0] addr;
    logic              write;
    logic [BUS_DATA_W-1:0] wdata;
    logic [BUS_STRB_W-1:0] strb;
    logic [2:0]        prot;
  } apb_cmd_t;

  // Result of one APB transfer
  typedef struct packed {
    logic [BUS_DATA_W-1:0] rdata;
    resp_e             resp;
  } apb_rsp_t;

  // More significant response wins when a write burst merges its beats:
  // DECERR > SLVERR > OKAY.
  function automatic resp_e resp_merge(resp_e a, resp_e b);
    if (a == RESP_DECERR || b == RESP_DECERR) return RESP_DECERR;
    if (a == RESP_SLVERR || b == RESP_SLVERR) return RESP_SLVERR;
    return RESP_OKAY;
  endfunction

endpackage
