// tb_apb_master: drives random read/write commands into the APB master,
// which talks to one behavioural APB peripheral with random wait states.
// Checks read data and responses against a shadow memory, the SETUP/ACCESS
// phase sequence, the address and write data on the bus, PSTRB low on reads,
// DECERR without a bus transfer for undecoded addresses, SLVERR for
// PSLVERR, and that a transfer takes 2 + (wait states) PCLK cycles.
module tb_apb_master;
  import axi_apb_pkg::*;

  logic PCLK = 0, PRESETn = 0;
  logic cmd_valid = 0, done;
  apb_cmd_t cmd = '0;
  apb_rsp_t rsp;
  logic [31:0] dec_addr, PADDR, PWDATA, PRDATA;
  logic dec_hit, PSEL, PENABLE, PWRITE, PREADY, PSLVERR;
  logic [3:0] PSTRB;
  logic [2:0] PPROT;
  int checks = 0, failures = 0;
  int n_wait = 0, n_err = 0, n_dec = 0, n_rd = 0, n_wr = 0;
  logic [31:0] shadow [1024];

  apb_master dut (.*);
  apb_mem_model #(.TAG(16'hB000)) u_slv (
    .PCLK, .PRESETn, .PSEL, .PENABLE, .PWRITE, .PADDR, .PWDATA, .PSTRB,
    .PRDATA, .PREADY, .PSLVERR
  );

  assign dec_hit = (dec_addr[31:12] == 20'h0);
  always #5 PCLK = ~PCLK;

  initial begin
    repeat (50000) @(posedge PCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus monitor: phase order
  logic prev_setup = 0;
  always @(posedge PCLK) if (PRESETn) begin
    if (prev_setup) begin
      checks <= checks + 1;
      if (!(PSEL && PENABLE)) begin
        failures <= failures + 1;
        $display("FAIL no ACCESS after SETUP");
      end
    end
    prev_setup <= PSEL && !PENABLE;
    if (PSEL && PENABLE && !PREADY) n_wait <= n_wait + 1;
  end

  initial begin
    int cyc, waits, w;
    logic [31:0] a, exp;
    logic err;
    for (int i = 0; i < 1024; i++) shadow[i] = {16'hB000, 16'(i)};
    repeat (3) @(posedge PCLK);
    PRESETn = 1;
    for (int t = 0; t < 600; t++) begin
      a = {20'h0, 12'($urandom) & 12'hFFC};
      if (t % 10 == 9) a[31:12] = 20'(t);          // undecoded
      if (t % 13 == 0) a[11:0] = 12'hF40;          // peripheral error region
      @(negedge PCLK);
      cmd.addr = a; cmd.write = 1'($urandom); cmd.wdata = $urandom;
      cmd.strb = 4'($urandom); cmd.prot = 3'($urandom);
      cmd_valid = 1;
      cyc = 0; waits = 0;
      #1;
      while (!done && cyc < 20) begin
        @(negedge PCLK); cyc++;
        if (PSEL && PENABLE) begin
          checks++;
          if (PADDR !== a || PWRITE !== cmd.write || PPROT !== cmd.prot ||
              PSTRB !== (cmd.write ? cmd.strb : 4'h0) ||
              (cmd.write && PWDATA !== cmd.wdata)) begin
            failures++; $display("FAIL bus signals t=%0d", t);
          end
          if (!PREADY) waits++;
        end
      end
      // done is high now (combinational), in ACCESS or IDLE
      checks++;
      if (!done) begin failures++; $display("FAIL transfer %0d never completed", t); end
      checks++;
      err = (a[11:0] >= 12'hF00);
      w = int'(a[11:2]);
      if (a[31:12] != 0) begin
        n_dec++;
        if (rsp.resp !== RESP_DECERR || cyc != 0 || PSEL) begin
          failures++; $display("FAIL decerr t=%0d resp=%0d cyc=%0d", t, rsp.resp, cyc);
        end
      end else begin
        if (err) n_err++;
        exp = (cmd.write || err) ? 32'h0 : shadow[w];
        if (rsp.resp !== (err ? RESP_SLVERR : RESP_OKAY) || rsp.rdata !== exp) begin
          failures++;
          $display("FAIL rsp t=%0d got %h/%0d exp %h/%0d", t, rsp.rdata, rsp.resp, exp, err);
        end
        checks++;
        if (cyc != 2 + waits) begin
          failures++; $display("FAIL cycles t=%0d: %0d, waits %0d", t, cyc, waits);
        end
        if (cmd.write && !err)
          for (int b = 0; b < 4; b++) if (cmd.strb[b]) shadow[w][8*b +: 8] = cmd.wdata[8*b +: 8];
        if (cmd.write) n_wr++; else n_rd++;
      end
      @(posedge PCLK);
      #1 cmd_valid = 0;
    end
    checks++;
    if (n_wait == 0 || n_err == 0 || n_dec == 0 || n_rd == 0 || n_wr == 0) begin
      failures++; $display("FAIL coverage");
    end
    $display("reads=%0d writes=%0d wait-cycles=%0d slverr=%0d decerr=%0d", n_rd, n_wr, n_wait, n_err, n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
