// tb_cdc_handshake: sends a stream of random commands from a 10 ns source
// clock to a 7 ns destination clock, answers each after a random delay with
// a response derived from the command, and checks that every command arrives
// once, in order and intact, and that every response returns to the source.
// Also checks the round-trip cycle count against the synchroniser depth.
module tb_cdc_handshake;
  import axi_apb_pkg::*;

  localparam int N = 200;

  logic src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0;
  logic src_valid = 0, src_ready, src_rsp_valid, dst_valid, dst_done = 0;
  apb_cmd_t src_cmd = '0, dst_cmd;
  apb_rsp_t src_rsp, dst_rsp = '0;
  int checks = 0, failures = 0;
  int n_rx = 0, n_rsp = 0;
  apb_cmd_t sent [N];

  cdc_handshake dut (.*);

  always #5 src_clk = ~src_clk;
  always #3.5 dst_clk = ~dst_clk;

  function automatic apb_rsp_t answer(apb_cmd_t c);
    apb_rsp_t r;
    r.rdata = c.addr ^ 32'h5A5A_0F0F;
    r.resp  = resp_e'(c.addr[1:0]);
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge src_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // destination: receive, check, answer after 0..4 cycles
  initial begin
    wait (dst_rst_n);
    forever begin
      @(posedge dst_clk);
      if (dst_valid) begin
        checks++;
        if (dst_cmd !== sent[n_rx]) begin
          failures++;
          $display("FAIL cmd %0d: got %h exp %h", n_rx, dst_cmd, sent[n_rx]);
        end
        repeat ($urandom_range(4, 0)) begin
          @(posedge dst_clk);
          checks++;
          if (!dst_valid || dst_cmd !== sent[n_rx]) begin
            failures++;
            $display("FAIL cmd %0d not held", n_rx);
          end
        end
        @(negedge dst_clk);
        dst_done = 1; dst_rsp = answer(dst_cmd);
        @(negedge dst_clk);
        dst_done = 0;
        n_rx++;
      end
    end
  end

  initial begin
    int lat;
    repeat (3) @(posedge src_clk);
    src_rst_n = 1; dst_rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge src_clk);
      sent[i] = apb_cmd_t'({$urandom, $urandom, $urandom});
      src_cmd = sent[i]; src_valid = 1;
      checks++;
      if (!src_ready) begin failures++; $display("FAIL not ready before cmd %0d", i); end
      @(negedge src_clk);
      src_valid = 0; src_cmd = '0;
      if (src_ready) begin failures++; $display("FAIL ready while busy"); end
      lat = 0;
      while (!src_rsp_valid) begin @(negedge src_clk); lat++; end
      checks++;
      if (src_rsp !== answer(sent[i])) begin
        failures++;
        $display("FAIL rsp %0d: got %h exp %h", i, src_rsp, answer(sent[i]));
      end
      // two destination flops + at most 4 hold cycles + one done cycle + two
      // source flops, in source cycles of 10 ns versus 7 ns: bound it loosely
      checks++;
      if (lat < 2 || lat > 12) begin failures++; $display("FAIL latency %0d", lat); end
      n_rsp++;
      @(negedge src_clk);
      checks++;
      if (src_rsp_valid) begin failures++; $display("FAIL rsp pulse longer than one cycle"); end
    end
    checks++;
    if (n_rx != N || n_rsp != N) begin failures++; $display("FAIL counts %0d %0d", n_rx, n_rsp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
