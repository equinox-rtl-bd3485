// eqx_instr_dispatcher: back half of the Equinox front-end: instruction
// controller, instruction buffer, decoder and instruction completion unit.
//
// A batch from the request dispatcher starts its context's program. The
// controller fetches one instruction per decode slot from the instruction
// buffer (one-cycle read), the decoder pushes it as a command into the
// queue of its execution unit, and completions from the units come back
// through the completion unit and free the context for its next instruction.
// OP_END finishes the program and pulses `prog_done` with the context.
// Interface: install port for the instruction buffer (ib_wr_*), installation
// configuration (prog_start, qsize_threshold), the MMU's stall flag
// (mmu_wait, see eqx_instr_controller), command outputs with
// valid/ready for MMU, SIMD, DRAM and host, and per-unit done pulses with tags.
module eqx_instr_dispatcher
  import eqx_pkg::*;
#(
  parameter int IB_BYTES = 32768,
  parameter int QSW      = 12,
  localparam int IAW     = $clog2(IB_BYTES / (IW / 8))
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ib_wr_en,
  input  logic [IAW-1:0]  ib_wr_addr,
  input  logic [IW-1:0]   ib_wr_data,
  input  logic [1:0][IAW-1:0] prog_start,
  input  logic [QSW-1:0]  qsize_threshold,
  input  logic [QSW-1:0]  inf_qsize,
  input  logic            mmu_wait,
  input  logic            batch_valid,
  input  batch_t          batch,
  output logic [1:0]      ctx_free,
  output logic            mmu_valid,
  input  logic            mmu_ready,
  output mmu_cmd_t        mmu_cmd,
  output logic            simd_valid,
  input  logic            simd_ready,
  output simd_cmd_t       simd_cmd,
  output logic            dram_valid,
  input  logic            dram_ready,
  output xfer_cmd_t       dram_cmd,
  output logic            host_valid,
  input  logic            host_ready,
  output xfer_cmd_t       host_cmd,
  input  logic [3:0]      unit_done,
  input  tag_t [3:0]      unit_tag,
  output logic            prog_done,
  output logic            prog_done_ctx,
  output logic [1:0]      active,
  output logic            inf_only,
  output logic [31:0]     completed
);
  logic           ib_rd_en, dec_ready, cpl_valid, nop_valid, end_valid, end_ctx;
  logic [IAW-1:0] ib_addr;
  logic [IW-1:0]  ib_data;
  tag_t           fetch_tag, cpl_tag, nop_tag;

  eqx_instr_controller #(.IAW(IAW), .QSW(QSW)) u_ctrl (
    .clk, .rst_n, .prog_start, .qsize_threshold, .inf_qsize, .mmu_wait, .batch_valid, .batch,
    .ctx_free, .ib_rd_en, .ib_addr, .fetch_tag, .dec_ready, .cpl_valid, .cpl_tag,
    .end_valid, .end_ctx, .active, .inf_only);

  eqx_instr_buffer #(.BYTES(IB_BYTES)) u_ib (
    .clk, .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .rd_en(ib_rd_en), .rd_addr(ib_addr), .rd_data(ib_data));

  eqx_decoder u_dec (
    .clk, .rst_n, .fetch(ib_rd_en), .fetch_tag, .instr(instr_t'(ib_data)), .dec_ready,
    .nop_valid, .nop_tag, .end_valid, .end_ctx,
    .mmu_valid, .mmu_ready, .mmu_cmd, .simd_valid, .simd_ready, .simd_cmd,
    .dram_valid, .dram_ready, .dram_cmd, .host_valid, .host_ready, .host_cmd);

  eqx_completion_unit u_cpl (
    .clk, .rst_n, .unit_done, .unit_tag, .nop_valid, .nop_tag, .cpl_valid, .cpl_tag, .completed);

  assign prog_done     = end_valid;
  assign prog_done_ctx = end_ctx;
endmodule
