// tb_eqx_request_dispatcher: self-checking testbench of the request
// dispatcher (request queues, batch formation buffer with adaptive batching,
// request controller and queue selection) at N=4.
//
// Checks: a full inference batch of N requests is issued with its IDs and
// without padding; with a timeout, an incomplete batch is issued padded,
// timeout+2 cycles after its first request was pushed (one cycle through the
// queue, `timeout` cycles in the buffer, one to offer); a timeout of 0 waits
// for a full batch; training requests bypass batch formation; inference goes
// first when both contexts are free; a busy context holds its batch while
// the other proceeds; the reported inference queue size.
module tb_eqx_request_dispatcher;
  import eqx_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inf_req_valid, inf_req_ready, trn_req_valid, trn_req_ready, batch_valid, batch_padded;
  logic [15:0] inf_req_id, trn_req_id;
  logic [31:0] batch_timeout;
  logic [1:0] ctx_free;
  batch_t batch;
  logic [N-1:0][15:0] inf_batch_ids;
  logic [$clog2(16+1):0] inf_qsize;

  eqx_request_dispatcher #(.N(N), .QDEPTH(16)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  batch_t got [$];
  logic [N-1:0][15:0] got_ids [$];
  bit got_pad [$];
  int got_cyc [$];
  always @(posedge clk) if (rst_n && batch_valid) begin
    got.push_back(batch); got_ids.push_back(inf_batch_ids); got_pad.push_back(batch_padded);
    got_cyc.push_back(cycle);
  end

  task automatic push_inf(input int id);
    @(negedge clk);
    inf_req_valid = 1; inf_req_id = 16'(id);
    @(negedge clk);
    inf_req_valid = 0;
  endtask
  task automatic push_trn(input int id);
    @(negedge clk);
    trn_req_valid = 1; trn_req_id = 16'(id);
    @(negedge clk);
    trn_req_valid = 0;
  endtask

  initial begin : main
    int c0;
    inf_req_valid = 0; trn_req_valid = 0; inf_req_id = 0; trn_req_id = 0;
    batch_timeout = 0; ctx_free = 2'b11;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // static batching: three requests wait, the fourth completes the batch
    for (int k = 0; k < 3; k++) push_inf(100 + k);
    repeat (30) @(negedge clk);
    check(got.size() == 0, "static batching issued an incomplete batch");
    check(int'(inf_qsize) == 3, $sformatf("queue size %0d", inf_qsize));
    push_inf(103);
    repeat (3) @(negedge clk);
    check(got.size() == 1, "full batch issued");
    if (got.size() == 1) begin
      check(got[0].ctx == 0 && got[0].count == 16'(N) && got[0].first_id == 100 && !got_pad[0], "full batch descriptor");
      for (int i = 0; i < N; i++) check(got_ids[0][i] == 16'(100 + i), "batch IDs");
    end
    check(inf_qsize == 0, "queue size after batch");
    // adaptive batching
    batch_timeout = 10;
    got.delete(); got_ids.delete(); got_pad.delete(); got_cyc.delete();
    @(negedge clk);
    c0 = cycle;
    push_inf(200);
    push_inf(201);
    repeat (20) @(negedge clk);
    check(got.size() == 1, "timeout batch issued");
    if (got.size() == 1) begin
      check(got_pad[0] && got[0].count == 2 && got[0].first_id == 200, "padded batch descriptor");
      // the first request is presented one cycle after c0
      check(got_cyc[0] - c0 == 1 + 10 + 2, $sformatf("timeout issue after %0d cycles", got_cyc[0] - c0));
    end
    // training bypasses batch formation; inference first when both ready
    got.delete(); got_ids.delete(); got_pad.delete(); got_cyc.delete();
    ctx_free = 2'b00;
    push_trn(7);
    for (int k = 0; k < 4; k++) push_inf(300 + k);
    repeat (3) @(negedge clk);
    check(got.size() == 0, "nothing issued to busy contexts");
    ctx_free = 2'b11;
    @(negedge clk);
    ctx_free = 2'b10;           // the inference context is now busy
    @(negedge clk);
    ctx_free = 2'b00;
    @(negedge clk);
    check(got.size() == 2, $sformatf("two batches, got %0d", got.size()));
    if (got.size() == 2) begin
      check(got[0].ctx == 0 && got[0].first_id == 300, "inference first");
      check(got[1].ctx == 1 && got[1].first_id == 7 && got_cyc[1] == got_cyc[0] + 1, "training next");
    end
    // busy inference context: training still proceeds
    got.delete();
    for (int k = 0; k < 4; k++) push_inf(400 + k);
    push_trn(8);
    ctx_free = 2'b10;
    repeat (3) @(negedge clk);
    check(got.size() == 1 && got[0].ctx == 1 && got[0].first_id == 8, "training passes a busy inference context");
    check(int'(inf_qsize) == N, "gathered batch counted in queue size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
