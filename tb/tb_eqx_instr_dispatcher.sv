// tb_eqx_instr_dispatcher: self-checking testbench of the instruction
// dispatcher (instruction controller, instruction buffer, decoder,
// completion unit).
//
// An inference program and a training program are installed. The testbench
// plays the four execution units: it accepts commands at random and reports
// each one done a few cycles later. Checks: every command carries the fields
// and context of the instruction it came from, in program order; a context
// never has two instructions in flight; while the inference queue size is at
// or below the threshold the two contexts interleave; above it no training
// command issues (load spike) and training resumes afterwards; each program
// ends with prog_done for its context.
module tb_eqx_instr_dispatcher;
  import eqx_pkg::*;
  localparam int IAW = 12, QSW = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ib_wr_en;
  logic [IAW-1:0] ib_wr_addr;
  logic [IW-1:0] ib_wr_data;
  logic [1:0][IAW-1:0] prog_start;
  logic [QSW-1:0] qsize_threshold, inf_qsize;
  logic mmu_wait = 0;
  logic batch_valid;
  batch_t batch;
  logic [1:0] ctx_free, active;
  logic mmu_valid, mmu_ready, simd_valid, simd_ready, dram_valid, dram_ready, host_valid, host_ready;
  mmu_cmd_t mmu_cmd;
  simd_cmd_t simd_cmd;
  xfer_cmd_t dram_cmd, host_cmd;
  logic [3:0] unit_done;
  tag_t [3:0] unit_tag;
  logic prog_done, prog_done_ctx, inf_only;
  logic [31:0] completed;

  eqx_instr_dispatcher dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int PLEN = 13;
  instr_t prog [2][PLEN];
  int     pos [2] = '{0, 0};        // next expected instruction per context
  int     inflight [2] = '{0, 0};
  int     switches = 0, trn_in_spike = 0, spike_cycles = 0, ends [2] = '{0, 0};
  int     last_ctx = -1;

  function automatic instr_t mk(input int k, input int ctx);
    instr_t i;
    i = '0;
    case (k % 4)
      0: i.op = OP_MMU;
      1: i.op = OP_SIMD;
      2: i.op = OP_DRAM;
      default: i.op = OP_HOST;
    endcase
    if (k == 5) i.op = OP_NOP;
    i.sub = 4'($urandom_range(6)); i.flags = 4'($urandom);
    i.a = 20'($urandom); i.b = 20'($urandom); i.c = 20'($urandom); i.d = 24'($urandom);
    if (k == PLEN - 1) i.op = OP_END;
    return i;
  endfunction

  // a command seen by a unit: compare with the expected instruction
  task automatic seen(input int unit, input tag_t tag, input instr_t got_fields);
    instr_t e;
    int c = int'(tag.ctx);
    while (prog[c][pos[c]].op == OP_NOP) pos[c]++;
    e = prog[c][pos[c]];
    pos[c]++;
    check(int'(e.op) == unit + 1, $sformatf("ctx %0d unit %0d got op %0d", c, unit, e.op));
    check(got_fields.a == e.a && (unit >= 2 || got_fields.b == e.b), "operand fields a/b");
    if (unit == 1) check(got_fields.c == e.c && got_fields.d[19:0] == e.d[19:0] && got_fields.sub == e.sub && got_fields.flags[1:0] == e.flags[1:0], "SIMD fields");
    if (unit >= 2) check(got_fields.c == e.c && got_fields.d == e.d && got_fields.sub[1:0] == e.sub[1:0] && got_fields.flags == e.flags, "transfer fields");
    inflight[c]++;
    check(inflight[c] == 1, "two instructions of one context in flight");
    if (last_ctx != -1 && last_ctx != c) switches++;
    last_ctx = c;
    if (inf_only && c == 1) trn_in_spike++;
  endtask

  // unit models
  int delay [4] = '{0, 0, 0, 0};
  tag_t ptag [4];
  always @(posedge clk) begin
    unit_done <= '0;
    for (int u = 0; u < 4; u++) begin
      if (delay[u] > 0) begin
        delay[u] <= delay[u] - 1;
        if (delay[u] == 1) begin
          unit_done[u] <= 1'b1;
          unit_tag[u]  <= ptag[u];
          inflight[ptag[u].ctx] <= inflight[ptag[u].ctx] - 1;
        end
      end
    end
    if (mmu_valid && mmu_ready) begin
      instr_t f = '0; f.a = mmu_cmd.act_addr; f.b = mmu_cmd.wgt_addr;
      seen(0, mmu_cmd.tag, f); ptag[0] <= mmu_cmd.tag; delay[0] <= 3;
    end
    if (simd_valid && simd_ready) begin
      instr_t f = '0; f.a = simd_cmd.a_addr; f.b = simd_cmd.b_addr; f.c = simd_cmd.count;
      f.d = {4'd0, simd_cmd.d_addr}; f.sub = simd_cmd.op; f.flags = {2'b0, simd_cmd.to_act, simd_cmd.a_from_mmu};
      seen(1, simd_cmd.tag, f); ptag[1] <= simd_cmd.tag; delay[1] <= 4;
    end
    if (dram_valid && dram_ready) begin
      instr_t f = '0; f.a = dram_cmd.buf_addr; 
      f.c = dram_cmd.count; f.d = dram_cmd.ext_addr; f.sub = {2'b0, dram_cmd.weight, dram_cmd.store}; f.flags = dram_cmd.bank;
      seen(2, dram_cmd.tag, f); ptag[2] <= dram_cmd.tag; delay[2] <= 5;
    end
    if (host_valid && host_ready) begin
      instr_t f = '0; f.a = host_cmd.buf_addr; 
      f.c = host_cmd.count; f.d = host_cmd.ext_addr; f.sub = {2'b0, host_cmd.weight, host_cmd.store}; f.flags = host_cmd.bank;
      seen(3, host_cmd.tag, f); ptag[3] <= host_cmd.tag; delay[3] <= 2;
    end
    if (prog_done) ends[prog_done_ctx]++;
    if (inf_only) spike_cycles++;
  end
  always @(negedge clk) begin
    mmu_ready  <= $urandom_range(1) && delay[0] == 0;
    simd_ready <= $urandom_range(1) && delay[1] == 0;
    dram_ready <= $urandom_range(1) && delay[2] == 0;
    host_ready <= $urandom_range(1) && delay[3] == 0;
  end

  task automatic start(input int ctx);
    @(negedge clk);
    while (!ctx_free[ctx]) @(negedge clk);
    batch_valid = 1; batch = '{ctx: 1'(ctx), first_id: 16'(ctx), count: 16'd1};
    @(negedge clk);
    batch_valid = 0;
  endtask

  initial begin : main
    ib_wr_en = 0; ib_wr_addr = 0; ib_wr_data = 0; batch_valid = 0; batch = '0;
    prog_start[0] = 12'd0; prog_start[1] = 12'd32; qsize_threshold = 12'd8; inf_qsize = 12'd0;
    for (int c = 0; c < 2; c++) for (int k = 0; k < PLEN; k++) prog[c][k] = mk(k, c);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2; c++) for (int k = 0; k < PLEN; k++) begin
      @(negedge clk);
      ib_wr_en = 1; ib_wr_addr = prog_start[c] + 12'(k); ib_wr_data = prog[c][k];
    end
    @(negedge clk);
    ib_wr_en = 0;
    // both services together, low inference load
    start(0);
    start(1);
    while (ends[0] < 1 || ends[1] < 1) @(negedge clk);
    check(switches >= 8, $sformatf("contexts interleaved (%0d switches)", switches));
    check(pos[0] == PLEN - 1 && pos[1] == PLEN - 1, "all instructions executed");
    // load spike: training is held while the inference queue is long
    pos = '{0, 0};
    inf_qsize = 12'd20;
    start(1);
    start(0);
    while (ends[0] < 2) @(negedge clk);
    check(trn_in_spike == 0, "training command issued during a load spike");
    check(pos[1] <= 1, $sformatf("training advanced during the spike (%0d)", pos[1]));
    inf_qsize = 12'd2;
    while (ends[1] < 2) @(negedge clk);
    check(pos[1] == PLEN - 1, "training resumed after the spike");
    check(spike_cycles > 0, "spike seen");
    check(completed > 0, "completion count");
    $display("switches %0d spike cycles %0d", switches, spike_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("timeout: pos %0d %0d ends %0d %0d active %b", pos[0], pos[1], ends[0], ends[1], active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
