// eqx_batch_formation: batch formation buffer with adaptive batching.
//
// Inference request IDs are gathered into a batch of up to N slots. The batch
// is offered (batch_valid) when all N slots are filled, or, with adaptive
// batching, when `timeout` cycles have passed since the first request of the
// batch arrived; the remaining slots are then dummy requests whose results are
// discarded, and `batch_padded` is high. A timeout of 0 selects static
// batching (wait for a full batch). While a batch is offered no request is
// taken. `held` is the number of requests in the buffer.
// Full batches of n, the installation-time threshold and padding with dummy
// requests follow the design description; measuring the time from the first
// request and the 0 = static encoding are this design's choices.
module eqx_batch_formation #(
  parameter int N   = 143,
  parameter int IDW = 16,
  localparam int CW = $clog2(N + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  output logic                    req_ready,
  input  logic [IDW-1:0]          req_id,
  input  logic [31:0]             timeout,
  output logic                    batch_valid,
  input  logic                    batch_ready,
  output logic [CW-1:0]           batch_count,
  output logic                    batch_padded,
  output logic [N-1:0][IDW-1:0]   batch_ids,
  output logic [CW-1:0]           held
);
  logic [31:0] timer;
  logic        offer;
  logic        timed_out;

  assign timed_out    = (timeout != 32'd0) && (held != '0) && (timer >= timeout - 1);
  assign batch_valid  = offer;
  assign batch_count  = held;
  assign batch_padded = offer && (held != CW'(N));
  assign req_ready    = !offer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held  <= '0;
      timer <= '0;
      offer <= 1'b0;
    end else if (offer) begin
      if (batch_ready) begin
        offer <= 1'b0;
        held  <= '0;
        timer <= '0;
      end
    end else begin
      if (req_valid) begin
        held <= held + 1'b1;
        if (held == CW'(N - 1)) offer <= 1'b1;
      end
      if (held != '0) timer <= timer + 1'b1;
      if (timed_out && !(req_valid && held == CW'(N - 1))) offer <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && req_ready) batch_ids[held] <= req_id;
  end
endmodule
