// apb_master: APB4 master state machine on PCLK.
//
// Performs one APB transfer for each command handed over from the AXI side.
// States follow the APB protocol:
//   IDLE   - waits for `cmd_valid`. The command's address is shown to the
//            decoder on `dec_addr`; if no peripheral decodes it, the command
//            completes at once with a DECERR response and no APB transfer.
//            Otherwise PADDR, PWRITE, PWDATA, PSTRB and PPROT are registered.
//   SETUP  - PSEL high, PENABLE low, for one cycle.
//   ACCESS - PSEL and PENABLE high until PREADY; then `done` pulses with the
//            read data and OKAY, or SLVERR when PSLVERR was high.
// PSTRB is driven low for reads, as APB4 requires. Between commands the
// master returns to IDLE, so PSEL drops between the beats of a burst unless
// the next command is already waiting (the handover from the AXI clock takes
// some cycles); this is this design's choice.
// Timing: a transfer with no wait states takes SETUP + ACCESS = 2 PCLK
// cycles after the command is seen; each low PREADY cycle adds one.
module apb_master
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_W = axi_apb_pkg::BUS_ADDR_W,
  parameter int unsigned DATA_W = axi_apb_pkg::BUS_DATA_W
) (
  input  logic                PCLK,
  input  logic                PRESETn,
  // command from the AXI side
  input  logic                cmd_valid,
  input  apb_cmd_t            cmd,
  output logic                done,
  output apb_rsp_t            rsp,
  // address decoder
  output logic [ADDR_W-1:0]   dec_addr,
  input  logic                dec_hit,
  // APB4 master signals (PSEL before decoding, return path after muxing)
  output logic [ADDR_W-1:0]   PADDR,
  output logic                PSEL,
  output logic                PENABLE,
  output logic                PWRITE,
  output logic [DATA_W-1:0]   PWDATA,
  output logic [DATA_W/8-1:0] PSTRB,
  output logic [2:0]          PPROT,
  input  logic [DATA_W-1:0]   PRDATA,
  input  logic                PREADY,
  input  logic                PSLVERR
);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_ACCESS} state_e;
  state_e state;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      state  <= S_IDLE;
      PADDR  <= '0;
      PWRITE <= 1'b0;
      PWDATA <= '0;
      PSTRB  <= '0;
      PPROT  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid && dec_hit) begin
          state  <= S_SETUP;
          PADDR  <= cmd.addr;
          PWRITE <= cmd.write;
          PWDATA <= cmd.write ? cmd.wdata : '0;
          PSTRB  <= cmd.write ? cmd.strb  : '0;
          PPROT  <= cmd.prot;
        end
        S_SETUP:  state <= S_ACCESS;
        S_ACCESS: if (PREADY) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

  assign PSEL     = (state != S_IDLE);
  assign PENABLE  = (state == S_ACCESS);
  assign dec_addr = (state == S_IDLE) ? cmd.addr : PADDR;

  always_comb begin
    done = 1'b0;
    rsp  = '{rdata: '0, resp: RESP_OKAY};
    if (state == S_IDLE && cmd_valid && !dec_hit) begin
      done     = 1'b1;
      rsp.resp = RESP_DECERR;
    end else if (state == S_ACCESS && PREADY) begin
      done      = 1'b1;
      rsp.rdata = PWRITE ? '0 : PRDATA;
      rsp.resp  = PSLVERR ? RESP_SLVERR : RESP_OKAY;
    end
  end

  // APB protocol rules
  a_enable_needs_sel: assert property (@(posedge PCLK) disable iff (!PRESETn)
    PENABLE |-> PSEL);
  a_setup_then_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PSEL && !PENABLE) |=> (PSEL && PENABLE));
  a_stable_in_access: assert property (@(posedge PCLK) disable iff (!PRESETn)
    (PSEL && PENABLE && !PREADY) |=> ($stable(PADDR) && $stable(PWRITE) &&
                                      $stable(PWDATA) && $stable(PSTRB) && PSEL && PENABLE));

endmodule
