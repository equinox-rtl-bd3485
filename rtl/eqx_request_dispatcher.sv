// eqx_request_dispatcher: front half of the Equinox front-end.
//
// It holds one request queue per hardware context. Inference requests (16-bit
// IDs) pass through the batch formation buffer (adaptive batching); training
// requests already come as batches and bypass it. The request controller
// picks a queue, and the queue-selection multiplexer hands a batch descriptor
// (batch_t: context, first request ID, number of real requests) to the
// instruction dispatcher when that context is free (ctx_free). The IDs of the
// inference batch are shown on inf_batch_ids for the host interface.
// `inf_qsize` (waiting plus gathered inference requests) goes to the
// instruction controller. Structure follows the design description; queue
// depth and the descriptor format are this design's choices.
module eqx_request_dispatcher
  import eqx_pkg::*;
#(
  parameter int N      = 143,
  parameter int QDEPTH = 1024,
  localparam int QCW   = $clog2(QDEPTH + 1),
  localparam int CW    = $clog2(N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inf_req_valid,
  output logic                 inf_req_ready,
  input  logic [15:0]          inf_req_id,
  input  logic                 trn_req_valid,
  output logic                 trn_req_ready,
  input  logic [15:0]          trn_req_id,
  input  logic [31:0]          batch_timeout,
  input  logic [1:0]           ctx_free,
  output logic                 batch_valid,
  output batch_t               batch,
  output logic                 batch_padded,
  output logic [N-1:0][15:0]   inf_batch_ids,
  output logic [QCW:0]         inf_qsize
);
  logic            iq_valid, iq_ready, tq_valid, tq_ready;
  logic [15:0]     iq_id, tq_id;
  logic [QCW-1:0]  iq_count;
  logic            bf_valid, bf_ready, bf_padded;
  logic [CW-1:0]   bf_count, bf_held;
  logic            sel, go;

  eqx_fifo #(.DW(16), .DEPTH(QDEPTH)) u_inf_q (
    .clk, .rst_n, .in_valid(inf_req_valid), .in_ready(inf_req_ready), .in_data(inf_req_id),
    .out_valid(iq_valid), .out_ready(iq_ready), .out_data(iq_id), .count(iq_count));

  eqx_fifo #(.DW(16), .DEPTH(QDEPTH)) u_trn_q (
    .clk, .rst_n, .in_valid(trn_req_valid), .in_ready(trn_req_ready), .in_data(trn_req_id),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_data(tq_id), .count());

  eqx_batch_formation #(.N(N)) u_bf (
    .clk, .rst_n, .req_valid(iq_valid), .req_ready(iq_ready), .req_id(iq_id),
    .timeout(batch_timeout), .batch_valid(bf_valid), .batch_ready(bf_ready),
    .batch_count(bf_count), .batch_padded(bf_padded), .batch_ids(inf_batch_ids),
    .held(bf_held));

  eqx_request_controller u_rc (
    .inf_avail(bf_valid), .trn_avail(tq_valid), .ctx_free, .sel, .go);

  // queue-selection multiplexer
  assign bf_ready    = go && !sel;
  assign tq_ready    = go && sel;
  assign batch_valid = go;
  assign batch_padded = go && !sel && bf_padded;
  always_comb begin
    batch = '0;
    batch.ctx = sel;
    if (sel) begin
      batch.first_id = tq_id;
      batch.count    = 16'd1;
    end else begin
      batch.first_id = inf_batch_ids[0];
      batch.count    = 16'(bf_count);
    end
  end

  assign inf_qsize = (QCW+1)'(iq_count) + (QCW+1)'(bf_held);
endmodule
