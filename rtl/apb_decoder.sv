// apb_decoder: address decoder and return multiplexer of the APB bus.
//
// The bridge's APB bus reaches several peripherals (two in the reference
// system). Each peripheral owns an address window given by SLV_BASE and
// SLV_MASK: peripheral i is hit when (addr & SLV_MASK[i]) == SLV_BASE[i].
// `hit` tells the APB master whether any peripheral decodes an
// address; the master's single select `psel_m` is routed to that
// peripheral's PSEL, and the hit peripheral's PRDATA, PREADY and PSLVERR are
// routed back. The address map (4 KB per peripheral from 0x0000_0000) is this
// design's choice. If windows overlap, the lowest index wins.
// Timing: purely combinational.
module apb_decoder #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned NUM_SLAVES = 2,
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] SLV_BASE = {32'h0000_1000, 32'h0000_0000},
  parameter logic [NUM_SLAVES-1:0][ADDR_W-1:0] SLV_MASK = {32'hFFFF_F000, 32'hFFFF_F000}
) (
  input  logic [ADDR_W-1:0]                  addr,
  output logic                               hit,
  // from / to the APB master
  input  logic                               psel_m,
  output logic [DATA_W-1:0]                  prdata_m,
  output logic                               pready_m,
  output logic                               pslverr_m,
  // to / from the peripherals
  output logic [NUM_SLAVES-1:0]              psel,
  input  logic [NUM_SLAVES-1:0][DATA_W-1:0]  prdata,
  input  logic [NUM_SLAVES-1:0]              pready,
  input  logic [NUM_SLAVES-1:0]              pslverr
);

  localparam int unsigned IDX_W = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1;

  logic [IDX_W-1:0] sel_idx;

  always_comb begin
    hit     = 1'b0;
    sel_idx = '0;
    for (int i = NUM_SLAVES - 1; i >= 0; i--) begin
      if ((addr & SLV_MASK[i]) == SLV_BASE[i]) begin
        hit     = 1'b1;
        sel_idx = IDX_W'(i);
      end
    end
  end

  always_comb begin
    psel      = '0;
    prdata_m  = '0;
    pready_m  = 1'b1;
    pslverr_m = 1'b0;
    if (hit) begin
      psel[sel_idx] = psel_m;
      prdata_m      = prdata[sel_idx];
      pready_m      = pready[sel_idx];
      pslverr_m     = pslverr[sel_idx];
    end
  end

endmodule
