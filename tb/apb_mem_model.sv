// apb_mem_model: behavioural APB4 peripheral for simulation.
//
// A word-addressed memory of DEPTH 32-bit words behind one PSEL. Reads
// return the stored word; writes update the bytes enabled by PSTRB. Each
// access phase lasts a random 0..MAX_WAIT extra cycles (PREADY low), drawn
// when the access phase starts. Offsets at or above ERR_OFFSET inside the
// window answer with PSLVERR and leave the memory unchanged. The memory
// starts with word i holding {TAG, i[15:0]}.
module apb_mem_model #(
  parameter int unsigned DEPTH      = 1024,
  parameter int unsigned MAX_WAIT   = 3,
  parameter logic [11:0] ERR_OFFSET = 12'hF00,
  parameter logic [15:0] TAG        = 16'hA000
) (
  input  logic        PCLK,
  input  logic        PRESETn,
  input  logic        PSEL,
  input  logic        PENABLE,
  input  logic        PWRITE,
  input  logic [31:0] PADDR,
  input  logic [31:0] PWDATA,
  input  logic [3:0]  PSTRB,
  output logic [31:0] PRDATA,
  output logic        PREADY,
  output logic        PSLVERR
);

  logic [31:0] mem [DEPTH];
  int unsigned wait_left;
  logic        in_access;
  logic        err;
  int unsigned idx;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = {TAG, 16'(i)};

  assign idx     = int'(PADDR[11:2]) % DEPTH;
  assign err     = (PADDR[11:0] >= ERR_OFFSET);
  assign PREADY  = PSEL && PENABLE && (wait_left == 0) && in_access;
  assign PSLVERR = PREADY && err;
  assign PRDATA  = (PREADY && !PWRITE && !err) ? mem[idx] : 32'h0;

  always_ff @(posedge PCLK or negedge PRESETn) begin
    if (!PRESETn) begin
      wait_left <= 0;
      in_access <= 1'b0;
    end else begin
      if (PSEL && !PENABLE) begin
        wait_left <= (MAX_WAIT == 0) ? 0 : $urandom_range(MAX_WAIT, 0);
        in_access <= 1'b1;
      end else if (PSEL && PENABLE && wait_left != 0) begin
        wait_left <= wait_left - 1;
      end else if (PREADY) begin
        in_access <= 1'b0;
        if (PWRITE && !err)
          for (int b = 0; b < 4; b++)
            if (PSTRB[b]) mem[idx][8*b +: 8] <= PWDATA[8*b +: 8];
      end
    end
  end

endmodule
