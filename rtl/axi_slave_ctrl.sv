// axi_slave_ctrl: AXI4 slave side of the bridge, on ACLK.
//
// Accepts AXI4 read and write bursts one at a time and turns every beat into
// one APB command (address, direction, write data, strobes, protection),
// which is handed to the APB side through `cmd_valid/cmd_ready`; the result
// comes back as a one-cycle `rsp_valid` pulse.
//   Read burst:  ARREADY is given in IDLE; for each beat the controller
//                issues a read command, waits for its result, and presents it
//                on R (RDATA, RRESP, RID, RLAST on the last beat) until
//                RREADY. Then the next beat's address is stepped.
//   Write burst: AWREADY is given in IDLE; for each beat WREADY is raised
//                together with the command when WVALID is seen, so a beat's
//                data is taken only when it can go out on the APB bus. After
//                the last beat one B response is sent; it is the most severe
//                response of the beats (DECERR > SLVERR > OKAY).
// Beat addresses come from burst_addr_gen (FIXED, INCR, WRAP). The number of
// beats is taken from AxLEN; WLAST is checked against it by an assertion.
// When read and write addresses are both waiting, the grant alternates
// between them (this design's choice; the bridge has one APB bus, so reads
// and writes are served in turn). Data width on AXI equals the APB width,
// so there is exactly one APB transfer per AXI beat.
// Timing: one burst in flight; each beat costs the APB transfer plus the
// clock-domain handover in both directions.
module axi_slave_ctrl
  import axi_apb_pkg::*;
#(
  parameter int unsigned ADDR_W = axi_apb_pkg::BUS_ADDR_W,
  parameter int unsigned DATA_W = axi_apb_pkg::BUS_DATA_W,
  parameter int unsigned ID_W   = 4
) (
  input  logic                ACLK,
  input  logic                ARESETn,
  // write address channel
  input  logic [ID_W-1:0]     AWID,
  input  logic [ADDR_W-1:0]   AWADDR,
  input  logic [7:0]          AWLEN,
  input  logic [2:0]          AWSIZE,
  input  logic [1:0]          AWBURST,
  input  logic [2:0]          AWPROT,
  input  logic                AWVALID,
  output logic                AWREADY,
  // write data channel
  input  logic [DATA_W-1:0]   WDATA,
  input  logic [DATA_W/8-1:0] WSTRB,
  input  logic                WLAST,
  input  logic                WVALID,
  output logic                WREADY,
  // write response channel
  output logic [ID_W-1:0]     BID,
  output logic [1:0]          BRESP,
  output logic                BVALID,
  input  logic                BREADY,
  // read address channel
  input  logic [ID_W-1:0]     ARID,
  input  logic [ADDR_W-1:0]   ARADDR,
  input  logic [7:0]          ARLEN,
  input  logic [2:0]          ARSIZE,
  input  logic [1:0]          ARBURST,
  input  logic [2:0]          ARPROT,
  input  logic                ARVALID,
  output logic                ARREADY,
  // read data channel
  output logic [ID_W-1:0]     RID,
  output logic [DATA_W-1:0]   RDATA,
  output logic [1:0]          RRESP,
  output logic                RLAST,
  output logic                RVALID,
  input  logic                RREADY,
  // APB command handover
  output logic                cmd_valid,
  input  logic                cmd_ready,
  output apb_cmd_t            cmd,
  input  logic                rsp_valid,
  input  apb_rsp_t            rsp
);

  typedef enum logic [2:0] {
    S_IDLE, S_RD_CMD, S_RD_WAIT, S_RD_RESP, S_WR_DATA, S_WR_WAIT, S_WR_RESP
  } state_e;

  state_e            state;
  logic              prio_write;   // write gets the grant on a tie
  logic [ID_W-1:0]   id_q;
  logic [7:0]        len_q;
  logic [7:0]        beat_q;
  logic [2:0]        prot_q;
  resp_e             resp_q;
  logic [DATA_W-1:0] rdata_q;
  logic              last_beat;

  logic              grant_rd, grant_wr;
  logic              ag_load, ag_advance;
  logic [ADDR_W-1:0] ag_addr, ag_start;
  logic [7:0]        ag_len;
  logic [2:0]        ag_size;
  burst_e            ag_burst;

  assign grant_wr = (state == S_IDLE) && AWVALID && (prio_write || !ARVALID);
  assign grant_rd = (state == S_IDLE) && ARVALID && !grant_wr;
  assign AWREADY  = grant_wr;
  assign ARREADY  = grant_rd;
  assign last_beat = (beat_q == len_q);

  assign ag_load    = grant_wr || grant_rd;
  assign ag_start   = grant_wr ? AWADDR  : ARADDR;
  assign ag_len     = grant_wr ? AWLEN   : ARLEN;
  assign ag_size    = grant_wr ? AWSIZE  : ARSIZE;
  assign ag_burst   = burst_e'(grant_wr ? AWBURST : ARBURST);
  assign ag_advance = (state == S_RD_RESP && RREADY && !last_beat) ||
                      (state == S_WR_WAIT && rsp_valid && !last_beat);

  burst_addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk        (ACLK),
    .rst_n      (ARESETn),
    .load       (ag_load),
    .start_addr (ag_start),
    .len        (ag_len),
    .size       (ag_size),
    .burst      (ag_burst),
    .advance    (ag_advance),
    .addr       (ag_addr)
  );

  // command towards the APB side
  always_comb begin
    cmd_valid = 1'b0;
    WREADY    = 1'b0;
    cmd.addr  = ag_addr;
    cmd.prot  = prot_q;
    cmd.write = (state == S_WR_DATA);
    cmd.wdata = '0;
    cmd.strb  = '0;
    if (state == S_RD_CMD) begin
      cmd_valid = 1'b1;
    end else if (state == S_WR_DATA) begin
      cmd_valid = WVALID;
      WREADY    = cmd_ready;
      cmd.wdata = WDATA;
      cmd.strb  = WSTRB;
    end
  end

  always_ff @(posedge ACLK or negedge ARESETn) begin
    if (!ARESETn) begin
      state      <= S_IDLE;
      prio_write <= 1'b0;
      id_q       <= '0;
      len_q      <= '0;
      beat_q     <= '0;
      prot_q     <= '0;
      resp_q     <= RESP_OKAY;
      rdata_q    <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (grant_wr) begin
            state      <= S_WR_DATA;
            id_q       <= AWID;
            len_q      <= AWLEN;
            prot_q     <= AWPROT;
            prio_write <= 1'b0;
          end else if (grant_rd) begin
            state      <= S_RD_CMD;
            id_q       <= ARID;
            len_q      <= ARLEN;
            prot_q     <= ARPROT;
            prio_write <= 1'b1;
          end
          beat_q <= '0;
          resp_q <= RESP_OKAY;
        end
        S_RD_CMD: if (cmd_ready) state <= S_RD_WAIT;
        S_RD_WAIT: if (rsp_valid) begin
          state   <= S_RD_RESP;
          rdata_q <= rsp.rdata;
          resp_q  <= rsp.resp;
        end
        S_RD_RESP: if (RREADY) begin
          if (last_beat) begin
            state <= S_IDLE;
          end else begin
            state  <= S_RD_CMD;
            beat_q <= beat_q + 8'd1;
          end
        end
        S_WR_DATA: if (WVALID && cmd_ready) state <= S_WR_WAIT;
        S_WR_WAIT: if (rsp_valid) begin
          resp_q <= resp_merge(resp_q, rsp.resp);
          if (last_beat) begin
            state <= S_WR_RESP;
          end else begin
            state  <= S_WR_DATA;
            beat_q <= beat_q + 8'd1;
          end
        end
        S_WR_RESP: if (BREADY) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign RVALID = (state == S_RD_RESP);
  assign RDATA  = rdata_q;
  assign RRESP  = resp_q;
  assign RLAST  = (state == S_RD_RESP) && last_beat;
  assign RID    = id_q;
  assign BVALID = (state == S_WR_RESP);
  assign BRESP  = resp_q;
  assign BID    = id_q;

  // The master's WLAST must agree with the burst length.
  a_wlast_matches_len: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (WVALID && WREADY) |-> (WLAST == last_beat));
  // Handshake rule: a response stays valid until it is taken.
  a_rvalid_held: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (RVALID && !RREADY) |=> (RVALID && $stable(RDATA)));
  a_bvalid_held: assert property (@(posedge ACLK) disable iff (!ARESETn)
    (BVALID && !BREADY) |=> BVALID);

endmodule
