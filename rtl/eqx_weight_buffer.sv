// eqx_weight_buffer: weight buffer (50 MB by default) split into M banks, bank
// a feeding systolic array a directly.
//
// A word is one block-floating-point beat of a weight tile: N x W 8-bit
// mantissas and a 12-bit exponent. Each bank has a read port towards its
// array and a read-write port shared by the DRAM and host interfaces, as in
// the design description. All banks are read at the same address (one weight
// tile per array per MMU command). Reads return data one cycle after the
// request; this latency is this design's choice.
module eqx_weight_buffer
  import eqx_pkg::*;
#(
  parameter int N     = 143,
  parameter int M     = 4,
  parameter int W     = 4,
  parameter longint BYTES = 64'd52428800,
  localparam int WORD   = N*W*MW + EW,
  localparam int BDEPTH = int'((BYTES * 8) / longint'(WORD) / longint'(M)),
  localparam int WAW    = $clog2(BDEPTH),
  localparam int BKW    = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rd_en,
  input  logic [WAW-1:0]         rd_addr,
  output logic [M-1:0][WORD-1:0] rd_data,
  input  logic                   ext_en,
  input  logic                   ext_we,
  input  logic [BKW-1:0]         ext_bank,
  input  logic [WAW-1:0]         ext_addr,
  input  logic [WORD-1:0]        ext_wdata,
  output logic [WORD-1:0]        ext_rdata
);
  logic [WORD-1:0] ext_q [M];
  logic [BKW-1:0]  ext_bank_q;

  for (genvar b = 0; b < M; b++) begin : g_bank
    logic [WORD-1:0] mem [BDEPTH];
    always_ff @(posedge clk) begin
      if (ext_en && ext_we && ext_bank == BKW'(b)) mem[ext_addr] <= ext_wdata;
      if (ext_en && !ext_we && ext_bank == BKW'(b)) ext_q[b] <= mem[ext_addr];
      if (rd_en) rd_data[b] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (ext_en) ext_bank_q <= ext_bank;
  end
  assign ext_rdata = ext_q[ext_bank_q];
endmodule
