// bridge_e2e_decls.svh: signals and counters of the end-to-end bridge test,
// included at the top of tb_axi4_apb_bridge and tb_axi4_apb_bridge_1clk.
// The including module declares ACLK and PCLK itself.
  import axi_apb_pkg::*;

  logic ARESETn = 0, PRESETn = 0;
  logic [3:0] AWID = 0, ARID = 0, BID, RID;
  logic [31:0] AWADDR = 0, ARADDR = 0, WDATA = 0, RDATA;
  logic [7:0] AWLEN = 0, ARLEN = 0;
  logic [2:0] AWSIZE = 0, ARSIZE = 0, AWPROT = 0, ARPROT = 0;
  logic [1:0] AWBURST = 0, ARBURST = 0, BRESP, RRESP;
  logic [3:0] WSTRB = 0;
  logic AWVALID = 0, AWREADY, WLAST = 0, WVALID = 0, WREADY, BVALID, BREADY = 0;
  logic ARVALID = 0, ARREADY, RLAST, RVALID, RREADY = 0;
  logic [31:0] PADDR, PWDATA;
  logic [1:0] PSEL, PREADY, PSLVERR;
  logic PENABLE, PWRITE;
  logic [3:0] PSTRB;
  logic [2:0] PPROT;
  logic [1:0][31:0] PRDATA;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_rd = 0, n_wr = 0, n_fixed = 0, n_incr = 0, n_wrap = 0, n_wrapped = 0;
  int n_wait = 0, n_slverr = 0, n_decerr = 0, n_rbp = 0, n_bbp = 0, n_tie = 0;
  int n_sel0 = 0, n_sel1 = 0;

  logic [31:0] shadow [2][1024];
  typedef struct { logic [31:0] addr; logic write; logic [31:0] wdata; logic [3:0] strb; logic [2:0] prot; } xfer_t;
  xfer_t apb_q[$];

