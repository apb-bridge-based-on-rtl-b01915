// burst_addr_gen: address of each beat of an AXI4 burst.
//
// The AXI side loads the burst's start address, length (AxLEN), size
// (AxSIZE) and type (AxBURST) with `load`; `addr` then holds the address of
// the current beat, and each `advance` steps it to the next beat:
//   FIXED - every beat uses the start address;
//   INCR  - the address grows by the transfer size, 2**AxSIZE bytes (with a
//           full-width transfer that is the APB data bus width); after the
//           first beat the address is aligned to the transfer size;
//   WRAP  - as INCR, but the address wraps at the boundary of a block of
//           (AxLEN+1) * 2**AxSIZE bytes aligned to that block's size.
// The three rules follow the bridge's description of FIXED, INCREMENTING and
// WRAPPING bursts, and the wrap size is the one the AXI4 protocol defines.
// The reserved burst type is treated as INCR (this design's choice).
//
// Timing: `addr` is a register; `load` and `advance` take effect at the next
// rising edge of clk. `load` wins if both are high. Reset clears `addr`.
module burst_addr_gen
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_W = axi_apb_pkg::BUS_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ADDR_W-1:0] start_addr,
  input  logic [7:0]        len,      // AxLEN: beats - 1
  input  logic [2:0]        size,     // AxSIZE: log2(bytes per beat)
  input  burst_e            burst,
  input  logic              advance,
  output logic [ADDR_W-1:0] addr
);

  logic [2:0]        size_q;
  burst_e            burst_q;
  logic [ADDR_W-1:0] wrap_mask_q;   // wrap block size in bytes, minus one
  logic [ADDR_W-1:0] step;
  logic [ADDR_W-1:0] aligned;
  logic [ADDR_W-1:0] incr_addr;
  logic [ADDR_W-1:0] next_addr;
  logic [ADDR_W-1:0] wrap_bytes;

  // (len + 1) << size, computed at load time
  assign wrap_bytes = ADDR_W'(({1'b0, len} + 9'd1)) << size;

  assign step      = ADDR_W'(1) << size_q;
  assign aligned   = addr & ~(step - ADDR_W'(1));
  assign incr_addr = aligned + step;

  always_comb begin
    unique case (burst_q)
      BURST_FIXED: next_addr = addr;
      BURST_WRAP:  next_addr = (addr & ~wrap_mask_q) | (incr_addr & wrap_mask_q);
      default:     next_addr = incr_addr;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr        <= '0;
      size_q      <= '0;
      burst_q     <= BURST_INCR;
      wrap_mask_q <= '0;
    end else if (load) begin
      addr        <= start_addr;
      size_q      <= size;
      burst_q     <= burst;
      wrap_mask_q <= wrap_bytes - ADDR_W'(1);
    end else if (advance) begin
      addr        <= next_addr;
    end
  end

endmodule
