// equinox_top: Equinox, an inference accelerator that runs training batches in
// the cycles inference leaves idle.
//
// Front-end: the request dispatcher queues inference requests (batched with
// adaptive batching) and training batches, and starts the program of the
// matching hardware context in the instruction dispatcher. The instruction
// dispatcher interleaves the two contexts instruction by instruction
// (round-robin, inference only while the inference queue is above a
// threshold) and sends commands to the datapath.
// Datapath: an activation buffer and an M-bank weight buffer holding block
// floating-point tiles (8-bit mantissas, 12-bit shared exponent); the im2col
// unit, which lowers convolutions by translating the MMU's activation reads
// (geometry in cfg_conv); the MMU (M systolic arrays of N x N W-wide PEs) multiplying one activation tile by M
// weight tiles per command; the bfloat16 SIMD unit with its register file,
// which takes the MMU results and writes activation tiles back through its
// block floating-point quantizer; and the crossbar giving the DRAM and host
// interfaces access to both buffers.
// The DRAM (HBM) and host (PCIe) interfaces are outside this RTL: their
// command queues (dram_cmd_*, host_cmd_*), completion inputs (*_done) and
// buffer access ports (*_buf_*) are brought out. Instructions are installed
// through ib_wr_*; weights and inputs are written through the buffer ports.
// Defaults are the 500 us hbf8 configuration (n = 143) with the 20 MB / 50 MB
// / 32 KB / 5 MB SRAM split; M = W = 4 is this design's reading of that
// configuration's throughput.
module equinox_top
  import eqx_pkg::*;
#(
  parameter int N      = 143,
  parameter int M      = 4,
  parameter int W      = 4,
  parameter longint ACT_BYTES = 64'd20971520,
  parameter longint WGT_BYTES = 64'd52428800,
  parameter int INSTR_BYTES   = 32768,
  parameter longint RF_BYTES  = 64'd5242880,
  parameter int ACT_BANKS = 4,
  parameter int QDEPTH    = 1024,
  localparam int WORD = N*W*MW + EW,
  localparam int AAW  = $clog2(int'((ACT_BYTES * 8) / longint'(WORD))),
  localparam int WAW  = $clog2(int'((WGT_BYTES * 8) / longint'(WORD) / longint'(M))),
  localparam int BKW  = (M > 1) ? $clog2(M) : 1,
  localparam int IAW  = $clog2(INSTR_BYTES / (IW / 8)),
  localparam int QSW  = $clog2(QDEPTH + 1) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // request queues
  input  logic               inf_req_valid,
  output logic               inf_req_ready,
  input  logic [15:0]        inf_req_id,
  input  logic               trn_req_valid,
  output logic               trn_req_ready,
  input  logic [15:0]        trn_req_id,
  // installation-time configuration
  input  logic [31:0]        cfg_batch_timeout,
  input  logic [QSW-1:0]     cfg_qsize_threshold,
  input  logic [1:0][IAW-1:0] cfg_prog_start,
  input  conv_cfg_t          cfg_conv,
  input  logic               ib_wr_en,
  input  logic [IAW-1:0]     ib_wr_addr,
  input  logic [IW-1:0]      ib_wr_data,
  // DRAM interface: commands, completion, buffer access
  output logic               dram_cmd_valid,
  input  logic               dram_cmd_ready,
  output xfer_cmd_t          dram_cmd,
  input  logic               dram_done,
  input  tag_t               dram_done_tag,
  input  logic               dram_buf_valid,
  output logic               dram_buf_ready,
  input  logic               dram_buf_we,
  input  logic               dram_buf_weight,
  input  logic [BKW-1:0]     dram_buf_bank,
  input  logic [19:0]        dram_buf_addr,
  input  logic [WORD-1:0]    dram_buf_wdata,
  output logic               dram_buf_rvalid,
  output logic [WORD-1:0]    dram_buf_rdata,
  // host interface: commands, completion, buffer access
  output logic               host_cmd_valid,
  input  logic               host_cmd_ready,
  output xfer_cmd_t          host_cmd,
  input  logic               host_done,
  input  tag_t               host_done_tag,
  input  logic               host_buf_valid,
  output logic               host_buf_ready,
  input  logic               host_buf_we,
  input  logic               host_buf_weight,
  input  logic [BKW-1:0]     host_buf_bank,
  input  logic [19:0]        host_buf_addr,
  input  logic [WORD-1:0]    host_buf_wdata,
  output logic               host_buf_rvalid,
  output logic [WORD-1:0]    host_buf_rdata,
  // status
  output logic               batch_start,
  output batch_t             batch_info,
  output logic               batch_padded,
  output logic [N-1:0][15:0] inf_batch_ids,
  output logic               prog_done,
  output logic               prog_done_ctx,
  output logic [1:0]         ctx_active,
  output logic               inf_only,
  output logic               mmu_stall,
  output logic [31:0]        completed
);
  // front-end
  logic [1:0]   ctx_free;
  logic [QSW-1:0] inf_qsize;
  logic         mmu_cv, mmu_cr, simd_cv, simd_cr;
  mmu_cmd_t     mmu_c;
  simd_cmd_t    simd_c;
  logic [3:0]   unit_done;
  tag_t [3:0]   unit_tag;
  // datapath
  logic                   act_rd_en, wgt_rd_en, buf_rd_en;
  logic [19:0]            act_rd_addr;
  logic [AAW-1:0]         buf_rd_addr;
  logic [WORD-1:0]        buf_rd_data;
  logic [WAW-1:0]         wgt_rd_addr;
  logic [WORD-1:0]        act_rd_data;
  logic [M-1:0][WORD-1:0] wgt_rd_data;
  logic                   mmu_done, simd_done;
  tag_t                   mmu_tag, simd_tag;
  logic                   mo_valid, mo_ready, mo_last;
  logic [N-1:0][15:0]     mo_data;
  logic                   simd_we;
  logic [AAW-1:0]         simd_addr;
  logic [WORD-1:0]        simd_wdata;
  logic                   xa_en, xa_we, xw_en, xw_we;
  logic [AAW-1:0]         xa_addr;
  logic [WAW-1:0]         xw_addr;
  logic [BKW-1:0]         xw_bank;
  logic [WORD-1:0]        xa_wdata, xa_rdata, xw_wdata, xw_rdata;
  logic [1:0]             xi_ready, xi_rvalid;
  logic [1:0][WORD-1:0]   xi_rdata;

  eqx_request_dispatcher #(.N(N), .QDEPTH(QDEPTH)) u_req (
    .clk, .rst_n, .inf_req_valid, .inf_req_ready, .inf_req_id,
    .trn_req_valid, .trn_req_ready, .trn_req_id, .batch_timeout(cfg_batch_timeout),
    .ctx_free, .batch_valid(batch_start), .batch(batch_info), .batch_padded,
    .inf_batch_ids, .inf_qsize);

  eqx_instr_dispatcher #(.IB_BYTES(INSTR_BYTES), .QSW(QSW)) u_ins (
    .clk, .rst_n, .ib_wr_en, .ib_wr_addr, .ib_wr_data, .prog_start(cfg_prog_start),
    .qsize_threshold(cfg_qsize_threshold), .inf_qsize, .mmu_wait(mmu_stall), .batch_valid(batch_start),
    .batch(batch_info), .ctx_free,
    .mmu_valid(mmu_cv), .mmu_ready(mmu_cr), .mmu_cmd(mmu_c),
    .simd_valid(simd_cv), .simd_ready(simd_cr), .simd_cmd(simd_c),
    .dram_valid(dram_cmd_valid), .dram_ready(dram_cmd_ready), .dram_cmd,
    .host_valid(host_cmd_valid), .host_ready(host_cmd_ready), .host_cmd,
    .unit_done, .unit_tag, .prog_done, .prog_done_ctx, .active(ctx_active), .inf_only,
    .completed);

  assign unit_done = {host_done, dram_done, simd_done, mmu_done};
  assign unit_tag  = {host_done_tag, dram_done_tag, simd_tag, mmu_tag};

  eqx_crossbar #(.WORD(WORD), .AW_A(AAW), .AW_W(WAW), .BKW(BKW)) u_xbar (
    .clk, .rst_n,
    .i_valid({host_buf_valid, dram_buf_valid}), .i_ready(xi_ready),
    .i_we({host_buf_we, dram_buf_we}), .i_weight({host_buf_weight, dram_buf_weight}),
    .i_bank({host_buf_bank, dram_buf_bank}), .i_addr({host_buf_addr, dram_buf_addr}),
    .i_wdata({host_buf_wdata, dram_buf_wdata}), .i_rvalid(xi_rvalid), .i_rdata(xi_rdata),
    .act_en(xa_en), .act_we(xa_we), .act_addr(xa_addr), .act_wdata(xa_wdata), .act_rdata(xa_rdata),
    .wgt_en(xw_en), .wgt_we(xw_we), .wgt_bank(xw_bank), .wgt_addr(xw_addr),
    .wgt_wdata(xw_wdata), .wgt_rdata(xw_rdata));

  assign {host_buf_ready, dram_buf_ready}   = xi_ready;
  assign {host_buf_rvalid, dram_buf_rvalid} = xi_rvalid;
  assign dram_buf_rdata = xi_rdata[0];
  assign host_buf_rdata = xi_rdata[1];

  eqx_act_buffer #(.N(N), .W(W), .BYTES(ACT_BYTES), .BANKS(ACT_BANKS)) u_act (
    .clk, .rd_en(buf_rd_en), .rd_addr(buf_rd_addr), .rd_data(buf_rd_data),
    .ext_en(xa_en), .ext_we(xa_we), .ext_addr(xa_addr), .ext_wdata(xa_wdata), .ext_rdata(xa_rdata),
    .simd_we, .simd_addr, .simd_wdata);

  eqx_weight_buffer #(.N(N), .M(M), .W(W), .BYTES(WGT_BYTES)) u_wgt (
    .clk, .rd_en(wgt_rd_en), .rd_addr(wgt_rd_addr), .rd_data(wgt_rd_data),
    .ext_en(xw_en), .ext_we(xw_we), .ext_bank(xw_bank), .ext_addr(xw_addr),
    .ext_wdata(xw_wdata), .ext_rdata(xw_rdata));

  eqx_im2col #(.AAW(AAW), .WORD(WORD)) u_im2col (
    .clk, .rst_n, .cfg(cfg_conv), .in_rd_en(act_rd_en), .in_rd_addr(act_rd_addr),
    .buf_rd_en, .buf_rd_addr, .buf_rd_data, .out_rd_data(act_rd_data));

  eqx_mmu #(.N(N), .M(M), .W(W), .WAW(WAW)) u_mmu (
    .clk, .rst_n, .cmd_valid(mmu_cv), .cmd_ready(mmu_cr), .cmd(mmu_c),
    .act_rd_en, .act_rd_addr, .act_rd_data, .wgt_rd_en, .wgt_rd_addr, .wgt_rd_data,
    .done_valid(mmu_done), .done_tag(mmu_tag),
    .out_valid(mo_valid), .out_ready(mo_ready), .out_data(mo_data), .out_last(mo_last),
    .stall(mmu_stall));

  eqx_simd_unit #(.N(N), .W(W), .RF_BYTES(RF_BYTES), .AAW(AAW)) u_simd (
    .clk, .rst_n, .cmd_valid(simd_cv), .cmd_ready(simd_cr), .cmd(simd_c),
    .mmu_valid(mo_valid), .mmu_ready(mo_ready), .mmu_data(mo_data),
    .act_we(simd_we), .act_addr(simd_addr), .act_wdata(simd_wdata),
    .done_valid(simd_done), .done_tag(simd_tag));
endmodule
