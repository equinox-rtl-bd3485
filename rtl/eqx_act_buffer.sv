// eqx_act_buffer: banked activation buffer (20 MB by default).
//
// A word is one block-floating-point beat of an activation tile: N x W 8-bit
// mantissas and a 12-bit exponent. Words are interleaved over BANKS banks by
// the low address bits. Every bank has three ports, as in the design
// description: a read port facing the systolic arrays (rd_*), a read-write
// port facing the DRAM and host interfaces (ext_*) and a write port facing the
// SIMD unit (simd_*). Reads return data one cycle after the request. If the
// SIMD port and the external port write the same word in the same cycle, the
// SIMD data is kept. Bank count, latency and the write priority are this
// design's choices.
module eqx_act_buffer
  import eqx_pkg::*;
#(
  parameter int N     = 143,
  parameter int W     = 4,
  parameter longint BYTES = 64'd20971520,
  parameter int BANKS = 4,
  localparam int WORD  = N*W*MW + EW,
  localparam int DEPTH = int'((BYTES * 8) / longint'(WORD)),
  localparam int AAW   = $clog2(DEPTH),
  localparam int BW    = $clog2(BANKS),
  localparam int BDEPTH = (DEPTH + BANKS - 1) / BANKS
) (
  input  logic            clk,
  // read port towards the MMU
  input  logic            rd_en,
  input  logic [AAW-1:0]  rd_addr,
  output logic [WORD-1:0] rd_data,
  // read-write port towards the DRAM / host interfaces
  input  logic            ext_en,
  input  logic            ext_we,
  input  logic [AAW-1:0]  ext_addr,
  input  logic [WORD-1:0] ext_wdata,
  output logic [WORD-1:0] ext_rdata,
  // write port from the SIMD unit
  input  logic            simd_we,
  input  logic [AAW-1:0]  simd_addr,
  input  logic [WORD-1:0] simd_wdata
);
  logic [WORD-1:0] rd_q   [BANKS];
  logic [WORD-1:0] ext_q  [BANKS];
  logic [BW-1:0]   rd_bank_q, ext_bank_q;

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WORD-1:0] mem [BDEPTH];
    always_ff @(posedge clk) begin
      if (ext_en && ext_we && ext_addr[BW-1:0] == BW'(b))
        mem[ext_addr[AAW-1:BW]] <= ext_wdata;
      if (simd_we && simd_addr[BW-1:0] == BW'(b))
        mem[simd_addr[AAW-1:BW]] <= simd_wdata;
      if (rd_en && rd_addr[BW-1:0] == BW'(b))
        rd_q[b] <= mem[rd_addr[AAW-1:BW]];
      if (ext_en && !ext_we && ext_addr[BW-1:0] == BW'(b))
        ext_q[b] <= mem[ext_addr[AAW-1:BW]];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en)  rd_bank_q  <= rd_addr[BW-1:0];
    if (ext_en) ext_bank_q <= ext_addr[BW-1:0];
  end

  assign rd_data   = rd_q[rd_bank_q];
  assign ext_rdata = ext_q[ext_bank_q];
endmodule
