// eqx_instr_controller: instruction controller with one hardware context per
// service (0 inference, 1 training) and the priority scheduler.
//
// A context is started by a batch from the request dispatcher (batch_valid
// with batch.ctx) when it is free; its instruction counter is loaded with the
// service's program start address (prog_start, set at installation). Each
// cycle the controller may fetch one instruction (ib_rd_en / ib_addr) for one
// context whose previous instruction has completed; the fetched instruction
// goes to the decoder together with its ID (fetch_tag). Scheduling: while the
// inference queue size is at most `qsize_threshold`, ready contexts are
// served round-robin; above it only the inference context is served
// (`inf_only`), so a load spike stops training until it subsides. One
// exception: while the MMU holds undrained results and refuses a new matrix
// command (`mmu_wait`), training may still issue, so that it can drain its
// own results and inference is not blocked behind them. The
// context stays active until its OP_END instruction is decoded (end_valid).
// Contexts, instruction counters and the threshold-based priority follow the
// design description; one instruction in flight per context and the mmu_wait
// exception are this design's choices.
module eqx_instr_controller
  import eqx_pkg::*;
#(
  parameter int IAW = 12,
  parameter int QSW = 12
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0][IAW-1:0] prog_start,
  input  logic [QSW-1:0]  qsize_threshold,
  input  logic [QSW-1:0]  inf_qsize,
  input  logic            mmu_wait,
  input  logic            batch_valid,
  input  batch_t          batch,
  output logic [1:0]      ctx_free,
  output logic            ib_rd_en,
  output logic [IAW-1:0]  ib_addr,
  output tag_t            fetch_tag,
  input  logic            dec_ready,
  input  logic            cpl_valid,
  input  tag_t            cpl_tag,
  input  logic            end_valid,
  input  logic            end_ctx,
  output logic [1:0]      active,
  output logic            inf_only
);
  logic [1:0][IAW-1:0] pc;
  logic [1:0][6:0]     seq;
  logic [1:0]          inflight;
  logic [1:0]          ready;
  logic                last;      // context served last
  logic                pick;

  assign inf_only = (inf_qsize > qsize_threshold);
  assign ctx_free = ~active;

  always_comb begin
    ready[0] = active[0] && !inflight[0];
    ready[1] = active[1] && !inflight[1] && (!inf_only || mmu_wait);
    if (ready[0] && ready[1]) pick = !last;
    else                      pick = ready[1];
  end

  assign ib_rd_en  = dec_ready && (ready != 2'b00);
  assign ib_addr   = pc[pick];
  assign fetch_tag = '{ctx: pick, seq: seq[pick]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      seq      <= '0;
      inflight <= '0;
      active   <= '0;
      last     <= 1'b1;
    end else begin
      if (cpl_valid) inflight[cpl_tag.ctx] <= 1'b0;
      if (end_valid) begin
        active[end_ctx]   <= 1'b0;
        inflight[end_ctx] <= 1'b0;
      end
      if (ib_rd_en) begin
        inflight[pick] <= 1'b1;
        pc[pick]       <= pc[pick] + 1'b1;
        seq[pick]      <= seq[pick] + 1'b1;
        last           <= pick;
      end
      if (batch_valid && !active[batch.ctx]) begin
        active[batch.ctx]   <= 1'b1;
        inflight[batch.ctx] <= 1'b0;
        pc[batch.ctx]       <= prog_start[batch.ctx];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) batch_valid |-> !active[batch.ctx]);
  assert property (@(posedge clk) disable iff (!rst_n) cpl_valid |-> inflight[cpl_tag.ctx]);
endmodule
