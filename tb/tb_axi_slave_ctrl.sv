// tb_axi_slave_ctrl: AXI4 master stimulus against the AXI-side controller,
// with the APB side replaced by a responder on the command handover that
// answers each command after a random delay. Checks, for random FIXED, INCR
// and WRAP read and write bursts: the command issued for every beat (address
// from the AXI4 burst rules, direction, write data, strobes, protection), the
// R beats (data, response, ID, RLAST only on the last beat), the single B
// response (worst of the beats) with its ID, back-pressure on R and B, and
// the alternating grant when read and write addresses arrive together.
module tb_axi_slave_ctrl;
  import axi_apb_pkg::*;

  logic ACLK = 0, ARESETn = 0;
  logic [3:0] AWID = 0, ARID = 0, BID, RID;
  logic [31:0] AWADDR = 0, ARADDR = 0, WDATA = 0, RDATA;
  logic [7:0] AWLEN = 0, ARLEN = 0;
  logic [2:0] AWSIZE = 0, ARSIZE = 0, AWPROT = 0, ARPROT = 0;
  logic [1:0] AWBURST = 0, ARBURST = 0, BRESP, RRESP;
  logic [3:0] WSTRB = 0;
  logic AWVALID = 0, AWREADY, WLAST = 0, WVALID = 0, WREADY, BVALID, BREADY = 0;
  logic ARVALID = 0, ARREADY, RLAST, RVALID, RREADY = 0;
  logic cmd_valid, cmd_ready, rsp_valid = 0;
  apb_cmd_t cmd;
  apb_rsp_t rsp = '0;

  int checks = 0, failures = 0;
  int n_tie = 0, n_rbp = 0, n_bbp = 0, n_slverr = 0, n_decerr = 0;
  int n_fixed = 0, n_incr = 0, n_wrap = 0;
  apb_cmd_t rd_q[$], wr_q[$];

  axi_slave_ctrl dut (.*);

  always #5 ACLK = ~ACLK;

  initial begin
    repeat (100000) @(posedge ACLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_addr(logic [31:0] s, int l, int sz, int b, int i);
    longint unsigned step, al, wb, lo, s64;
    s64 = 64'(s); step = 64'(1) << sz; al = (s64 / step) * step;
    if (b == 0 || i == 0) return s;
    if (b == 2) begin
      wb = 64'(l + 1) * step; lo = (s64 / wb) * wb;
      return 32'(lo + ((s64 - lo + 64'(i) * step) % wb));
    end
    return 32'(al + 64'(i) * step);
  endfunction

  function automatic apb_rsp_t answer(apb_cmd_t c);
    apb_rsp_t r;
    r.rdata = c.write ? 32'h0 : ~c.addr;
    r.resp  = (c.addr[5:2] == 4'hF)  ? RESP_SLVERR :   // single beats fail
              (c.addr[11:8] == 4'hD) ? RESP_DECERR : RESP_OKAY;
    return r;
  endfunction

  // APB-side responder: one command at a time, answered after 0..3 cycles
  assign cmd_ready = 1'b1;
  initial begin
    forever begin
      @(posedge ACLK);
      if (ARESETn && cmd_valid && cmd_ready) begin
        if (cmd.write) wr_q.push_back(cmd); else rd_q.push_back(cmd);
        rsp = answer(cmd);
        repeat ($urandom_range(3, 0)) @(posedge ACLK);
        #1 rsp_valid = 1;
        @(posedge ACLK);
        #1 rsp_valid = 0;
      end
    end
  end

  always @(posedge ACLK) begin
    if (ARVALID && AWVALID && (ARREADY || AWREADY)) n_tie <= n_tie + 1;
    if (RVALID && !RREADY) n_rbp <= n_rbp + 1;
    if (BVALID && !BREADY) n_bbp <= n_bbp + 1;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic axi_read(input logic [3:0] id, input logic [31:0] a, input int l, input int sz, input int b);
    resp_e er;
    @(negedge ACLK);
    ARID = id; ARADDR = a; ARLEN = 8'(l); ARSIZE = 3'(sz); ARBURST = 2'(b); ARPROT = 3'(id);
    ARVALID = 1;
    do @(posedge ACLK); while (!ARREADY);
    #1 ARVALID = 0;
    for (int i = 0; i <= l; i++) begin
      RREADY = 0;
      do @(posedge ACLK); while (!RVALID);
      repeat ($urandom_range(2, 0)) @(posedge ACLK);
      #1 RREADY = 1;
      @(posedge ACLK);
      er = answer('{addr: ref_addr(a, l, sz, b, i), write: 1'b0, wdata: '0, strb: '0, prot: 3'(id)}).resp;
      check(RDATA === ~ref_addr(a, l, sz, b, i), $sformatf("RDATA beat %0d got %h", i, RDATA));
      check(RRESP === er && RID === id && RLAST === (i == l), $sformatf("R ctl beat %0d", i));
      if (er == RESP_SLVERR) n_slverr++;
      if (er == RESP_DECERR) n_decerr++;
      #1 RREADY = 0;
    end
    for (int i = 0; i <= l; i++) begin
      check(rd_q.size() > 0, "read command missing");
      if (rd_q.size() > 0) begin
        apb_cmd_t c = rd_q.pop_front();
        check(c.addr === ref_addr(a, l, sz, b, i) && c.prot === 3'(id) && c.strb === 0,
              $sformatf("read cmd beat %0d addr %h", i, c.addr));
      end
    end
    case (b) 0: n_fixed++; 1: n_incr++; default: n_wrap++; endcase
  endtask

  task automatic axi_write(input logic [3:0] id, input logic [31:0] a, input int l, input int sz, input int b);
    logic [31:0] d [256];
    logic [3:0]  s [256];
    resp_e er = RESP_OKAY;
    for (int i = 0; i <= l; i++) begin
      d[i] = $urandom; s[i] = 4'($urandom);
      er = resp_merge(er, answer('{addr: ref_addr(a, l, sz, b, i), write: 1'b1,
                                   wdata: '0, strb: '0, prot: '0}).resp);
    end
    @(negedge ACLK);
    AWID = id; AWADDR = a; AWLEN = 8'(l); AWSIZE = 3'(sz); AWBURST = 2'(b); AWPROT = 3'(id);
    AWVALID = 1;
    do @(posedge ACLK); while (!AWREADY);
    #1 AWVALID = 0;
    for (int i = 0; i <= l; i++) begin
      repeat ($urandom_range(2, 0)) @(negedge ACLK);
      #1 WVALID = 1; WDATA = d[i]; WSTRB = s[i]; WLAST = (i == l);
      do @(posedge ACLK); while (!WREADY);
      #1 WVALID = 0; WLAST = 0;
    end
    repeat ($urandom_range(3, 0)) @(negedge ACLK);
    #1 BREADY = 1;
    do @(posedge ACLK); while (!BVALID);
    check(BRESP === er && BID === id, $sformatf("B resp %0d exp %0d", BRESP, er));
    if (er == RESP_SLVERR) n_slverr++;
    if (er == RESP_DECERR) n_decerr++;
    #1 BREADY = 0;
    for (int i = 0; i <= l; i++) begin
      check(wr_q.size() > 0, "write command missing");
      if (wr_q.size() > 0) begin
        apb_cmd_t c = wr_q.pop_front();
        check(c.addr === ref_addr(a, l, sz, b, i) && c.wdata === d[i] && c.strb === s[i] &&
              c.prot === 3'(id), $sformatf("write cmd beat %0d addr %h", i, c.addr));
      end
    end
    case (b) 0: n_fixed++; 1: n_incr++; default: n_wrap++; endcase
  endtask

  task automatic rand_burst(output logic [31:0] a, output int l, output int sz, output int b);
    b  = $urandom_range(2, 0);
    sz = $urandom_range(2, 0);
    a  = {20'h0, 12'($urandom)};
    if (b == 2) begin l = (1 << $urandom_range(4, 1)) - 1; a = (a >> sz) << sz; end
    else l = $urandom_range(7, 0);
  endtask

  initial begin
    logic [31:0] a1, a2;
    int l1, l2, s1, s2, b1, b2;
    repeat (3) @(posedge ACLK);
    ARESETn = 1;
    for (int t = 0; t < 120; t++) begin
      rand_burst(a1, l1, s1, b1);
      rand_burst(a2, l2, s2, b2);
      case (t % 3)
        0: axi_read(4'(t), a1, l1, s1, b1);
        1: axi_write(4'(t), a1, l1, s1, b1);
        default: fork
          axi_read(4'(t), a1, l1, s1, b1);
          axi_write(4'(t + 1), a2, l2, s2, b2);
        join
      endcase
    end
    check(n_tie > 0 && n_rbp > 0 && n_bbp > 0 && n_slverr > 0 && n_decerr > 0 &&
          n_fixed > 0 && n_incr > 0 && n_wrap > 0, "coverage");
    $display("ties=%0d r-backpressure=%0d b-backpressure=%0d slverr=%0d decerr=%0d fixed=%0d incr=%0d wrap=%0d",
             n_tie, n_rbp, n_bbp, n_slverr, n_decerr, n_fixed, n_incr, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
