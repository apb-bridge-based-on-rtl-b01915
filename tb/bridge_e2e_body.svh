// bridge_e2e_body.svh: peripherals, monitors, AXI4 master tasks and the
// test sequence of the end-to-end bridge test, included after the bridge
// instance in tb_axi4_apb_bridge and tb_axi4_apb_bridge_1clk.

  for (genvar i = 0; i < 2; i++) begin : g_periph
    apb_mem_model #(.TAG(16'hA000 + 16'(i) * 16'h1000), .MAX_WAIT(3)) u_mem (
      .PCLK, .PRESETn, .PSEL(PSEL[i]), .PENABLE, .PWRITE, .PADDR, .PWDATA, .PSTRB,
      .PRDATA(PRDATA[i]), .PREADY(PREADY[i]), .PSLVERR(PSLVERR[i])
    );
  end

  // APB monitor
  always @(posedge PCLK) if (PRESETn) begin
    if (PENABLE && PSEL == 2'b00) begin
      failures <= failures + 1; $display("FAIL PENABLE without PSEL");
    end
    if (PSEL == 2'b11) begin
      failures <= failures + 1; $display("FAIL two PSEL");
    end
    if (PSEL != 0 && PENABLE && PREADY[PSEL[1]] == 1'b0) n_wait <= n_wait + 1;
    if (PSEL != 0 && PENABLE && PREADY[PSEL[1]]) begin
      apb_q.push_back('{addr: PADDR, write: PWRITE, wdata: PWDATA, strb: PSTRB, prot: PPROT});
      if (PSEL[0]) n_sel0 <= n_sel0 + 1; else n_sel1 <= n_sel1 + 1;
    end
  end

  always @(posedge ACLK) begin
    if (ARVALID && AWVALID && (ARREADY || AWREADY)) n_tie <= n_tie + 1;
    if (RVALID && !RREADY) n_rbp <= n_rbp + 1;
    if (BVALID && !BREADY) n_bbp <= n_bbp + 1;
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

  // which peripheral decodes an address (-1: none)
  function automatic int slave_of(input logic [31:0] a);
    return (a[31:12] == 20'h0) ? 0 : (a[31:12] == 20'h1) ? 1 : -1;
  endfunction

  function automatic resp_e ref_resp(logic [31:0] a);
    if (slave_of(a) < 0) return RESP_DECERR;
    if (a[11:0] >= 12'hF00) return RESP_SLVERR;
    return RESP_OKAY;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic count_burst(input logic [31:0] a, input int l, input int sz, input int b);
    case (b) 0: n_fixed++; 1: n_incr++; default: n_wrap++; endcase
    for (int i = 1; i <= l; i++)
      if (ref_addr(a, l, sz, b, i) < ref_addr(a, l, sz, b, i - 1)) n_wrapped++;
    for (int i = 0; i <= l; i++) begin
      if (ref_resp(ref_addr(a, l, sz, b, i)) == RESP_SLVERR) n_slverr++;
      if (ref_resp(ref_addr(a, l, sz, b, i)) == RESP_DECERR) n_decerr++;
    end
  endtask

  // compare the recorded APB transfers with the beats of one burst
  task automatic check_apb(input logic [31:0] a, input int l, input int sz, input int b,
                           input bit wr, input logic [31:0] d [256], input logic [3:0] s [256]);
    for (int i = 0; i <= l; i++) begin
      logic [31:0] ea = ref_addr(a, l, sz, b, i);
      if (slave_of(ea) < 0) continue;            // DECERR: no APB transfer
      check(apb_q.size() > 0, "APB transfer missing");
      if (apb_q.size() > 0) begin
        xfer_t x = apb_q.pop_front();
        check(x.addr === ea && x.write === wr &&
              (!wr || (x.wdata === d[i] && x.strb === s[i])) && (wr || x.strb === 4'h0) &&
              x.prot === (wr ? 3'b000 : 3'b010),
              $sformatf("APB transfer beat %0d: addr %h exp %h", i, x.addr, ea));
      end
    end
  endtask

  task automatic axi_read(input logic [3:0] id, input logic [31:0] a, input int l, input int sz, input int b);
    logic [31:0] d [256];
    logic [3:0]  s [256];
    @(negedge ACLK);
    ARID = id; ARADDR = a; ARLEN = 8'(l); ARSIZE = 3'(sz); ARBURST = 2'(b); ARPROT = 3'b010;
    ARVALID = 1;
    do @(posedge ACLK); while (!ARREADY);
    #1 ARVALID = 0;
    for (int i = 0; i <= l; i++) begin
      logic [31:0] ea = ref_addr(a, l, sz, b, i);
      resp_e er = ref_resp(ea);
      logic [31:0] ed = (er == RESP_OKAY) ? shadow[slave_of(ea)][ea[11:2]] : 32'h0;
      do @(posedge ACLK); while (!RVALID);
      repeat ($urandom_range(2, 0)) @(posedge ACLK);
      #1 RREADY = 1;
      @(posedge ACLK);
      check(RDATA === ed && RRESP === er && RID === id && RLAST === (i == l),
            $sformatf("R beat %0d addr %h: data %h exp %h resp %0d exp %0d last %0d",
                      i, ea, RDATA, ed, RRESP, er, RLAST));
      #1 RREADY = 0;
    end
    check_apb(a, l, sz, b, 1'b0, d, s);
    count_burst(a, l, sz, b);
    n_rd++;
  endtask

  task automatic axi_write(input logic [3:0] id, input logic [31:0] a, input int l, input int sz, input int b);
    logic [31:0] d [256];
    logic [3:0]  s [256];
    resp_e er = RESP_OKAY;
    for (int i = 0; i <= l; i++) begin
      d[i] = $urandom; s[i] = 4'($urandom);
      er = resp_merge(er, ref_resp(ref_addr(a, l, sz, b, i)));
    end
    @(negedge ACLK);
    AWID = id; AWADDR = a; AWLEN = 8'(l); AWSIZE = 3'(sz); AWBURST = 2'(b); AWPROT = 3'b000;
    AWVALID = 1;
    do @(posedge ACLK); while (!AWREADY);
    #1 AWVALID = 0;
    for (int i = 0; i <= l; i++) begin
      repeat ($urandom_range(2, 0)) @(negedge ACLK);
      #1 WVALID = 1; WDATA = d[i]; WSTRB = s[i]; WLAST = (i == l);
      do @(posedge ACLK); while (!WREADY);
      #1 WVALID = 0; WLAST = 0;
    end
    do @(posedge ACLK); while (!BVALID);
    repeat ($urandom_range(2, 0)) @(posedge ACLK);
    #1 BREADY = 1;
    @(posedge ACLK);
    check(BRESP === er && BID === id, $sformatf("B resp %0d exp %0d", BRESP, er));
    #1 BREADY = 0;
    // update the shadow memories in beat order
    for (int i = 0; i <= l; i++) begin
      logic [31:0] ea = ref_addr(a, l, sz, b, i);
      if (ref_resp(ea) == RESP_OKAY)
        for (int k = 0; k < 4; k++)
          if (s[i][k]) shadow[slave_of(ea)][ea[11:2]][8*k +: 8] = d[i][8*k +: 8];
    end
    check_apb(a, l, sz, b, 1'b1, d, s);
    count_burst(a, l, sz, b);
    n_wr++;
  endtask

  task automatic rand_burst(output logic [31:0] a, output int l, output int sz, output int b);
    b  = $urandom_range(2, 0);
    sz = $urandom_range(2, 0);
    a  = {18'h0, 14'($urandom_range(32'h2FFF, 0))};   // both windows and an unmapped one
    if (b == 2) begin l = (1 << $urandom_range(4, 1)) - 1; a = (a >> sz) << sz; end
    else l = $urandom_range(15, 0);
  endtask

  initial begin
    logic [31:0] a1, a2;
    int l1, l2, s1, s2, b1, b2;
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < 1024; i++) shadow[p][i] = {16'hA000 + 16'(p) * 16'h1000, 16'(i)};
    repeat (4) @(posedge PCLK);
    ARESETn = 1; PRESETn = 1;
    // the reference waveforms: a 4-beat INCR read, then a 4-beat INCR write
    axi_read(4'h1, 32'h0000_0100, 3, 2, 1);
    axi_write(4'h2, 32'h0000_1200, 3, 2, 1);
    axi_read(4'h3, 32'h0000_1200, 3, 2, 1);
    for (int t = 0; t < 150; t++) begin
      rand_burst(a1, l1, s1, b1);
      rand_burst(a2, l2, s2, b2);
      case (t % 3)
        0: axi_read(4'(t), a1, l1, s1, b1);
        1: axi_write(4'(t), a1, l1, s1, b1);
        default: begin
          // concurrent read and write: keep them in disjoint halves of the
          // two peripherals so the expected read data does not depend on
          // which burst is granted first
          a1[31:11] = 21'h0;                 // peripheral 0, below 0x800
          a2[31:11] = 21'h2;                 // peripheral 1, below 0x1800
          fork
            axi_read(4'(t), a1, l1, s1, b1);
            axi_write(4'(t + 1), a2, l2, s2, b2);
          join
        end
      endcase
    end
    check(n_rd > 0, "no read");        check(n_wr > 0, "no write");
    check(n_fixed > 0, "no FIXED");    check(n_incr > 0, "no INCR");
    check(n_wrap > 0, "no WRAP");      check(n_wrapped > 0, "no wrap-around");
    check(n_wait > 0, "no APB wait");  check(n_slverr > 0, "no SLVERR");
    check(n_decerr > 0, "no DECERR");  check(n_rbp > 0, "no R back-pressure");
    check(n_bbp > 0, "no B back-pressure"); check(n_tie > 0, "no AR/AW tie");
    check(n_sel0 > 0 && n_sel1 > 0, "a peripheral never selected");
    check(apb_q.size() == 0, "unexpected APB transfers");
    $display("reads=%0d writes=%0d fixed=%0d incr=%0d wrap=%0d wrap-arounds=%0d apb-waits=%0d",
             n_rd, n_wr, n_fixed, n_incr, n_wrap, n_wrapped, n_wait);
    $display("slverr-beats=%0d decerr-beats=%0d r-stall=%0d b-stall=%0d ties=%0d periph0=%0d periph1=%0d",
             n_slverr, n_decerr, n_rbp, n_bbp, n_tie, n_sel0, n_sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
