// eqx_instr_buffer: instruction memory (32 KB by default) of 96-bit
// instructions. Written at service installation through wr_*, read by the
// instruction dispatcher at the address the instruction controller gives;
// read data appear one cycle after rd_en. Word width and latency are this
// design's choices.
module eqx_instr_buffer
  import eqx_pkg::*;
#(
  parameter int BYTES = 32768,
  localparam int DEPTH = BYTES / (IW / 8),
  localparam int IAW   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [IAW-1:0] wr_addr,
  input  logic [IW-1:0]  wr_data,
  input  logic           rd_en,
  input  logic [IAW-1:0] rd_addr,
  output logic [IW-1:0]  rd_data
);
  logic [IW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
