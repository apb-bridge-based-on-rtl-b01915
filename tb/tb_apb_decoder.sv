// tb_apb_decoder: drives random addresses (inside both default 4 KB windows
// and outside them) and random peripheral return signals, and checks the hit
// flag, the per-peripheral PSEL and the multiplexed PRDATA/PREADY/PSLVERR.
module tb_apb_decoder;
  logic [31:0] addr;
  logic hit, psel_m, pready_m, pslverr_m;
  logic [31:0] prdata_m;
  logic [1:0] psel, pready, pslverr;
  logic [1:0][31:0] prdata;
  int checks = 0, failures = 0, n_s0 = 0, n_s1 = 0, n_miss = 0;

  apb_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    logic exp_hit;
    for (int t = 0; t < 2000; t++) begin
      case (t % 3)
        0: addr = {20'h00000, 12'($urandom)};
        1: addr = {20'h00001, 12'($urandom)};
        default: addr = $urandom;
      endcase
      psel_m = 1'($urandom); pready = 2'($urandom); pslverr = 2'($urandom);
      prdata[0] = $urandom; prdata[1] = $urandom;
      #1;
      sel = (addr[31:12] == 20'h0) ? 0 : (addr[31:12] == 20'h1) ? 1 : -1;
      exp_hit = (sel >= 0);
      checks++;
      if (hit !== exp_hit) begin failures++; $display("FAIL hit addr=%h", addr); end
      if (sel >= 0) begin
        checks++;
        if (psel !== (2'(psel_m) << sel) || prdata_m !== prdata[sel] ||
            pready_m !== pready[sel] || pslverr_m !== pslverr[sel]) begin
          failures++; $display("FAIL route addr=%h", addr);
        end
        if (sel == 0) n_s0++; else n_s1++;
      end else begin
        n_miss++;
        checks++;
        if (psel !== 2'b00) begin failures++; $display("FAIL psel on miss addr=%h", addr); end
      end
    end
    checks++;
    if (n_s0 == 0 || n_s1 == 0 || n_miss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
