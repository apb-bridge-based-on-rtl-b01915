// tb_burst_addr_gen: checks the beat addresses of FIXED, INCR and WRAP bursts
// against a reference computed here from the AXI4 address rules, for random
// start addresses, lengths and sizes.
module tb_burst_addr_gen;
  import axi_apb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, advance = 0;
  logic [31:0] start_addr = '0;
  logic [7:0]  len = '0;
  logic [2:0]  size = '0;
  burst_e      burst = BURST_INCR;
  logic [31:0] addr;
  int checks = 0, failures = 0;
  int n_fixed = 0, n_incr = 0, n_wrap = 0, n_wrapped = 0;

  burst_addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: address of beat i
  function automatic logic [31:0] ref_addr(logic [31:0] s, int l, int sz, burst_e b, int i);
    longint unsigned step, al, wb, lo, s64;
    s64  = 64'(s);
    step = 64'(1) << sz;
    al   = (s64 / step) * step;
    if (b == BURST_FIXED || i == 0) return s;
    if (b == BURST_WRAP) begin
      wb = 64'(l + 1) * step;
      lo = (s64 / wb) * wb;
      return 32'(lo + ((s64 - lo + 64'(i) * step) % wb));
    end
    return 32'(al + 64'(i) * step);
  endfunction

  initial begin
    int l, sz, bt;
    logic [31:0] s, exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      bt = $urandom_range(2, 0);
      sz = $urandom_range(2, 0);
      s  = $urandom;
      if (bt == 2) begin
        l = (1 << $urandom_range(4, 1)) - 1;       // 2, 4, 8, 16 beats
        s = (s >> sz) << sz;                        // WRAP start is aligned
      end else begin
        l = $urandom_range(15, 0);
      end
      if (t % 7 == 0) s = 32'hFFFF_FFF0 + 32'(t % 16);   // top of the address space
      if (bt == 2) s = (s >> sz) << sz;
      @(negedge clk);
      load = 1; start_addr = s; len = 8'(l); size = 3'(sz); burst = burst_e'(bt);
      @(negedge clk);
      load = 0;
      for (int i = 0; i <= l; i++) begin
        exp = ref_addr(s, l, sz, burst_e'(bt), i);
        checks++;
        if (addr !== exp) begin
          failures++;
          $display("FAIL burst=%0d len=%0d size=%0d start=%h beat %0d: got %h exp %h",
                   bt, l, sz, s, i, addr, exp);
        end
        if (bt == 2 && i > 0 && exp < ref_addr(s, l, sz, burst_e'(bt), i - 1)) n_wrapped++;
        advance = 1;
        @(negedge clk);
        advance = 0;
      end
      case (bt) 0: n_fixed++; 1: n_incr++; default: n_wrap++; endcase
    end
    checks++;
    if (n_fixed == 0 || n_incr == 0 || n_wrap == 0 || n_wrapped == 0) begin
      failures++;
      $display("FAIL coverage fixed=%0d incr=%0d wrap=%0d wrapped=%0d", n_fixed, n_incr, n_wrap, n_wrapped);
    end
    $display("bursts: fixed=%0d incr=%0d wrap=%0d wrap-arounds=%0d", n_fixed, n_incr, n_wrap, n_wrapped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
