// eqx_decoder: turns instructions into commands for the execution units.
//
// The instruction read from the instruction buffer (valid one cycle after the
// controller's fetch, with its ID) is decoded into an MMU, SIMD, DRAM or host
// command (eqx_pkg formats) and pushed into that unit's command queue (depth
// 2). If the queue is full the instruction is held and `dec_ready` stays low.
// OP_NOP completes at once (nop_valid); OP_END ends the context's program
// (end_valid). Decoding into per-unit control and the unit queues follow the
// design description; the encoding is this design's own.
module eqx_decoder
  import eqx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       fetch,        // instruction buffer read issued this cycle
  input  tag_t       fetch_tag,
  input  instr_t     instr,        // valid the cycle after `fetch`
  output logic       dec_ready,
  output logic       nop_valid,
  output tag_t       nop_tag,
  output logic       end_valid,
  output logic       end_ctx,
  output logic       mmu_valid,
  input  logic       mmu_ready,
  output mmu_cmd_t   mmu_cmd,
  output logic       simd_valid,
  input  logic       simd_ready,
  output simd_cmd_t  simd_cmd,
  output logic       dram_valid,
  input  logic       dram_ready,
  output xfer_cmd_t  dram_cmd,
  output logic       host_valid,
  input  logic       host_ready,
  output xfer_cmd_t  host_cmd
);
  logic      hold, fresh;
  instr_t    ins_q, ins;
  tag_t      tag_q;
  logic [3:0] push, full_n;
  mmu_cmd_t  m_c;
  simd_cmd_t s_c;
  xfer_cmd_t x_c;
  logic      accepted;

  // `fresh` marks an instruction arriving from the buffer this cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= 1'b0;
      hold  <= 1'b0;
      tag_q <= '0;
      ins_q <= '0;
    end else begin
      fresh <= fetch;
      if (fetch) tag_q <= fetch_tag;
      if ((fresh || hold) && !accepted) begin
        hold  <= 1'b1;
        ins_q <= ins;
      end else begin
        hold <= 1'b0;
      end
    end
  end

  assign ins       = hold ? ins_q : instr;
  assign dec_ready = !fresh && !hold;

  always_comb begin
    m_c = '{act_addr: ins.a, wgt_addr: ins.b, tag: tag_q};
    s_c = '{op: simd_op_e'(ins.sub), a_from_mmu: ins.flags[0], to_act: ins.flags[1],
            a_addr: ins.a, b_addr: ins.b, d_addr: ins.d[19:0], count: ins.c, tag: tag_q};
    x_c = '{store: ins.sub[0], weight: ins.sub[1], bank: ins.flags, buf_addr: ins.a,
            count: ins.c, ext_addr: ins.d, tag: tag_q};
    push = '0;
    if (fresh || hold) begin
      case (ins.op)
        OP_MMU:  push[0] = 1'b1;
        OP_SIMD: push[1] = 1'b1;
        OP_DRAM: push[2] = 1'b1;
        OP_HOST: push[3] = 1'b1;
        default: push    = '0;
      endcase
    end
    accepted  = (fresh || hold) && ((push & full_n) != '0 || push == '0);
    nop_valid = (fresh || hold) && (ins.op != OP_END) && (push == '0);
    nop_tag   = tag_q;
    end_valid = (fresh || hold) && (ins.op == OP_END);
    end_ctx   = tag_q.ctx;
  end

  eqx_fifo #(.DW($bits(mmu_cmd_t)), .DEPTH(2)) u_mmu_q (
    .clk, .rst_n, .in_valid(push[0]), .in_ready(full_n[0]), .in_data(m_c),
    .out_valid(mmu_valid), .out_ready(mmu_ready), .out_data(mmu_cmd), .count());
  eqx_fifo #(.DW($bits(simd_cmd_t)), .DEPTH(2)) u_simd_q (
    .clk, .rst_n, .in_valid(push[1]), .in_ready(full_n[1]), .in_data(s_c),
    .out_valid(simd_valid), .out_ready(simd_ready), .out_data(simd_cmd), .count());
  eqx_fifo #(.DW($bits(xfer_cmd_t)), .DEPTH(2)) u_dram_q (
    .clk, .rst_n, .in_valid(push[2]), .in_ready(full_n[2]), .in_data(x_c),
    .out_valid(dram_valid), .out_ready(dram_ready), .out_data(dram_cmd), .count());
  eqx_fifo #(.DW($bits(xfer_cmd_t)), .DEPTH(2)) u_host_q (
    .clk, .rst_n, .in_valid(push[3]), .in_ready(full_n[3]), .in_data(x_c),
    .out_valid(host_valid), .out_ready(host_ready), .out_data(host_cmd), .count());
endmodule
