// tb_bridge_beat_timing: runs the two reference transactions of the bridge,
// a 4-beat INCR read and a 4-beat INCR write, on one shared clock with
// peripherals that never insert wait states and an AXI master that is always
// ready. It checks the data, RLAST on the fourth beat only, BRESP OKAY, and
// the number of clock cycles between beats, for two bridges side by side:
//   SYNC_STAGES = 0: read beat every 6 cycles, write beat every 5 cycles;
//   SYNC_STAGES = 2: each crossing adds 2 cycles, so 10 and 9 cycles.
// The first beat of a read arrives 6 (10) cycles after the address
// handshake; the write response follows the fourth write beat by 5 (9)
// cycles.
module tb_bridge_beat_timing;
  import axi_apb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- one bridge + one zero-wait peripheral per synchroniser depth ----
  logic [3:0]  AWID [2], ARID [2], BID [2], RID [2];
  logic [31:0] AWADDR [2], ARADDR [2], WDATA [2], RDATA [2], PADDR [2], PWDATA [2];
  logic [7:0]  AWLEN [2], ARLEN [2];
  logic [2:0]  AWSIZE [2], ARSIZE [2], AWPROT [2], ARPROT [2], PPROT [2];
  logic [1:0]  AWBURST [2], ARBURST [2], BRESP [2], RRESP [2];
  logic [3:0]  WSTRB [2], PSTRB [2];
  logic        AWVALID [2], AWREADY [2], WLAST [2], WVALID [2], WREADY [2];
  logic        BVALID [2], BREADY [2], ARVALID [2], ARREADY [2];
  logic        RLAST [2], RVALID [2], RREADY [2], PENABLE [2], PWRITE [2];
  logic [1:0]  PSEL [2], PREADY [2], PSLVERR [2];
  logic [1:0][31:0] PRDATA [2];

  for (genvar g = 0; g < 2; g++) begin : g_dut
    axi4_apb_bridge #(.SYNC_STAGES(2 * g)) u_bridge (
      .ACLK(clk), .ARESETn(rst_n), .PCLK(clk), .PRESETn(rst_n),
      .AWID(AWID[g]), .AWADDR(AWADDR[g]), .AWLEN(AWLEN[g]), .AWSIZE(AWSIZE[g]),
      .AWBURST(AWBURST[g]), .AWPROT(AWPROT[g]), .AWVALID(AWVALID[g]), .AWREADY(AWREADY[g]),
      .WDATA(WDATA[g]), .WSTRB(WSTRB[g]), .WLAST(WLAST[g]), .WVALID(WVALID[g]), .WREADY(WREADY[g]),
      .BID(BID[g]), .BRESP(BRESP[g]), .BVALID(BVALID[g]), .BREADY(BREADY[g]),
      .ARID(ARID[g]), .ARADDR(ARADDR[g]), .ARLEN(ARLEN[g]), .ARSIZE(ARSIZE[g]),
      .ARBURST(ARBURST[g]), .ARPROT(ARPROT[g]), .ARVALID(ARVALID[g]), .ARREADY(ARREADY[g]),
      .RID(RID[g]), .RDATA(RDATA[g]), .RRESP(RRESP[g]), .RLAST(RLAST[g]), .RVALID(RVALID[g]),
      .RREADY(RREADY[g]),
      .PADDR(PADDR[g]), .PSEL(PSEL[g]), .PENABLE(PENABLE[g]), .PWRITE(PWRITE[g]),
      .PWDATA(PWDATA[g]), .PSTRB(PSTRB[g]), .PPROT(PPROT[g]),
      .PRDATA(PRDATA[g]), .PREADY(PREADY[g]), .PSLVERR(PSLVERR[g])
    );
    for (genvar p = 0; p < 2; p++) begin : g_mem
      apb_mem_model #(.MAX_WAIT(0), .TAG(16'hC000 + 16'(p))) u_mem (
        .PCLK(clk), .PRESETn(rst_n), .PSEL(PSEL[g][p]), .PENABLE(PENABLE[g]),
        .PWRITE(PWRITE[g]), .PADDR(PADDR[g]), .PWDATA(PWDATA[g]), .PSTRB(PSTRB[g]),
        .PRDATA(PRDATA[g][p]), .PREADY(PREADY[g][p]), .PSLVERR(PSLVERR[g][p])
      );
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // 4-beat INCR read at a, then 4-beat INCR write at a, then read back
  task automatic run(input int g, input int rd_period, input int wr_period);
    logic [31:0] a = 32'h0000_0040;
    logic [31:0] d [4];
    int t_last, t;
    // read
    @(negedge clk);
    ARID[g] = 4'h3; ARADDR[g] = a; ARLEN[g] = 8'd3; ARSIZE[g] = 3'd2; ARBURST[g] = 2'b01;
    ARPROT[g] = 3'b000; ARVALID[g] = 1; RREADY[g] = 1;
    t = 0;
    do begin @(posedge clk); t++; end while (!ARREADY[g]);
    #1 ARVALID[g] = 0;
    t_last = 0; t = 0;
    for (int i = 0; i < 4; i++) begin
      do begin @(posedge clk); t++; end while (!RVALID[g]);
      check(RDATA[g] === {16'hC000, 16'(16 + i)} && RRESP[g] === 2'b00 && RLAST[g] === (i == 3),
            $sformatf("sync=%0d read beat %0d data %h last %0d", 2 * g, i, RDATA[g], RLAST[g]));
      check(t - t_last == rd_period, $sformatf("sync=%0d read beat %0d after %0d cycles, expected %0d",
            2 * g, i, t - t_last, rd_period));
      t_last = t;
    end
    #1 RREADY[g] = 0;
    // write
    for (int i = 0; i < 4; i++) d[i] = $urandom;
    @(negedge clk);
    AWID[g] = 4'h5; AWADDR[g] = a; AWLEN[g] = 8'd3; AWSIZE[g] = 3'd2; AWBURST[g] = 2'b01;
    AWPROT[g] = 3'b000; AWVALID[g] = 1; BREADY[g] = 1;
    do @(posedge clk); while (!AWREADY[g]);
    #1 AWVALID[g] = 0;
    t = 0; t_last = 0;
    for (int i = 0; i < 4; i++) begin
      WVALID[g] = 1; WDATA[g] = d[i]; WSTRB[g] = 4'hF; WLAST[g] = (i == 3);
      do begin @(posedge clk); t++; end while (!WREADY[g]);
      if (i > 0)
        check(t - t_last == wr_period, $sformatf("sync=%0d write beat %0d after %0d cycles, expected %0d",
              2 * g, i, t - t_last, wr_period));
      t_last = t;
      #1;
    end
    WVALID[g] = 0; WLAST[g] = 0;
    do begin @(posedge clk); t++; end while (!BVALID[g]);
    check(BRESP[g] === 2'b00 && BID[g] === 4'h5, $sformatf("sync=%0d BRESP %0d", 2 * g, BRESP[g]));
    check(t - t_last == wr_period, $sformatf("sync=%0d B after %0d cycles, expected %0d",
          2 * g, t - t_last, wr_period));
    #1 BREADY[g] = 0;
    // read back what was written
    @(negedge clk);
    ARADDR[g] = a; ARVALID[g] = 1; RREADY[g] = 1;
    do @(posedge clk); while (!ARREADY[g]);
    #1 ARVALID[g] = 0;
    for (int i = 0; i < 4; i++) begin
      do @(posedge clk); while (!RVALID[g]);
      check(RDATA[g] === d[i], $sformatf("sync=%0d read-back beat %0d", 2 * g, i));
    end
    #1 RREADY[g] = 0;
  endtask

  initial begin
    for (int g = 0; g < 2; g++) begin
      AWID[g] = 0; AWADDR[g] = 0; AWLEN[g] = 0; AWSIZE[g] = 0; AWBURST[g] = 0; AWPROT[g] = 0;
      AWVALID[g] = 0; WDATA[g] = 0; WSTRB[g] = 0; WLAST[g] = 0; WVALID[g] = 0; BREADY[g] = 0;
      ARID[g] = 0; ARADDR[g] = 0; ARLEN[g] = 0; ARSIZE[g] = 0; ARBURST[g] = 0; ARPROT[g] = 0;
      ARVALID[g] = 0; RREADY[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 6, 5);
    run(1, 10, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
