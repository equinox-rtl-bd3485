// tb_equinox_top: end-to-end testbench of the whole accelerator, by default
// at N=4, M=2, W=2 with small buffers (tb_equinox_top_full runs the same
// scenario on the default sizes).
//
// Two services are installed: an inference program (two layers: input from
// the host, MMU, ReLU in the SIMD unit, back to the activation buffer as
// block floating point, MMU, result to the host) and a training program
// (a feature map from DRAM, a convolution lowered by the im2col unit on the
// MMU's reads, the result through the register file back to DRAM). The testbench plays
// the host and DRAM interfaces: it answers their commands through the
// crossbar ports, sometimes both at once, and computes every expected output
// tile itself from the inputs and weights in real arithmetic (bfloat16
// truncation, block quantization with the largest exponent).
// Mechanisms counted and required at least once: padded batch (adaptive
// batching), full batch, both contexts active at once, load spike holding
// training (inference-only scheduling), MMU stall waiting for a drain, and a
// host request waiting for the DRAM interface at the crossbar, and padding
// words produced by im2col.
// Timing: inputs are driven on the falling clock edge; programs and weights are
// installed first. The scenario and the programs are this testbench's own;
// the arithmetic of the reference follows the block floating point described
// for the accelerator, with this design's exponent and rounding choices.
module tb_equinox_top;
  import eqx_pkg::*;
  localparam bit FULL = 0;
  localparam int N = FULL ? 143 : 4, M = FULL ? 4 : 2, W = FULL ? 4 : 2;
  localparam int WORD = N*W*MW + EW;
  localparam longint ABYTES = FULL ? 64'd20971520 : 64'(64 * WORD / 8);
  localparam longint WBYTES = FULL ? 64'd52428800 : 64'(M * 16 * WORD / 8);
  localparam longint RBYTES = FULL ? 64'd5242880  : 64'(64 * N * 2);
  localparam int QDEPTH = FULL ? 1024 : 16;
  localparam int IAW = 12, BKW = (M > 1) ? $clog2(M) : 1;
  localparam int QSW = $clog2(QDEPTH + 1) + 1;
  // tile addresses (in words)
  localparam int A_IN = 0, A_HID = N, A_OUT = 2*N, T_IN = 4*N, T_OUT = 8*N;
  localparam int W0 = 0, W1 = N;
  // training convolution: 3x3 map, one word per pixel, 2x2 kernel, stride 1,
  // padding 1; the tile of output pixel (0,0) (three of its four kernel
  // positions fall in the padding). Channel field widened so that one pixel's
  // window addresses cover a whole tile of N words.
  localparam int FMW = 9, LCW = ($clog2(N) > 2) ? $clog2(N) - 2 : 0;
  localparam int CONV_ADDR = 20'h80000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic inf_req_valid, inf_req_ready, trn_req_valid, trn_req_ready;
  logic [15:0] inf_req_id, trn_req_id;
  logic [31:0] cfg_batch_timeout;
  logic [QSW-1:0] cfg_qsize_threshold;
  logic [1:0][IAW-1:0] cfg_prog_start;
  conv_cfg_t cfg_conv;
  logic ib_wr_en;
  logic [IAW-1:0] ib_wr_addr;
  logic [IW-1:0] ib_wr_data;
  logic dram_cmd_valid, dram_cmd_ready, dram_done, host_cmd_valid, host_cmd_ready, host_done;
  xfer_cmd_t dram_cmd, host_cmd;
  tag_t dram_done_tag, host_done_tag;
  logic dram_buf_valid, dram_buf_ready, dram_buf_we, dram_buf_weight, dram_buf_rvalid;
  logic host_buf_valid, host_buf_ready, host_buf_we, host_buf_weight, host_buf_rvalid;
  logic [BKW-1:0] dram_buf_bank, host_buf_bank;
  logic [19:0] dram_buf_addr, host_buf_addr;
  logic [WORD-1:0] dram_buf_wdata, dram_buf_rdata, host_buf_wdata, host_buf_rdata;
  logic batch_start, batch_padded, prog_done, prog_done_ctx, inf_only, mmu_stall;
  batch_t batch_info;
  logic [N-1:0][15:0] inf_batch_ids;
  logic [1:0] ctx_active;
  logic [31:0] completed;

  equinox_top #(.N(N), .M(M), .W(W), .ACT_BYTES(ABYTES), .WGT_BYTES(WBYTES),
                .RF_BYTES(RBYTES), .QDEPTH(QDEPTH)) dut (.*);


  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------
  // reference arithmetic
  // ------------------------------------------------------------------
  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  // value truncated to bfloat16 precision; returns 0 for 0
  function automatic real trunc_bf(input real r, output int bexp);
    logic [63:0] b;
    bexp = 0;
    if (r == 0.0) return 0.0;
    b = $realtobits(r);
    b[44:0] = '0;
    bexp = int'(b[62:52]) - 1023 + 127;
    return $bitstoreal(b);
  endfunction
  typedef logic [WORD-1:0] tile_t [N];
  // one layer: tile x weights -> bfloat16 -> optional ReLU -> quantized tile
  function automatic void layer(input tile_t a, input tile_t w [M], input bit relu, output tile_t o);
    real v [N][M*N];
    int maxe = 0, be, e;
    for (int i = 0; i < N; i++) for (int b = 0; b < M; b++) for (int j = 0; j < N; j++) begin
      longint s = 0;
      for (int t = 0; t < N; t++) for (int k = 0; k < W; k++)
        s += longint'($signed(a[t][(i*W+k)*MW +: MW])) * longint'($signed(w[b][t][(j*W+k)*MW +: MW]));
      v[i][b*N+j] = trunc_bf(real'(s) * pow2(int'($signed(a[0][WORD-1 -: EW])) + int'($signed(w[b][0][WORD-1 -: EW]))), be);
      if (relu && v[i][b*N+j] < 0.0) begin v[i][b*N+j] = 0.0; be = 0; end
      if (be > maxe) maxe = be;
    end
    e = maxe - 133;
    for (int t = 0; t < N; t++) begin
      o[t] = '0;
      o[t][WORD-1 -: EW] = EW'(e);
      for (int i = 0; i < N; i++) for (int k = 0; k < W; k++)
        o[t][(i*W+k)*MW +: MW] = MW'($rtoi(v[i][t*W+k] / pow2(e)));
    end
  endfunction
  function automatic tile_t rnd_tile(input int e);
    tile_t x;
    for (int t = 0; t < N; t++) begin
      x[t] = '0;
      for (int q = 0; q < N*W; q++) x[t][q*MW +: MW] = MW'($urandom_range(254) - 127);
      x[t][WORD-1 -: EW] = EW'(e);
    end
    return x;
  endfunction

  typedef logic [WORD-1:0] map_t [FMW];
  function automatic map_t rnd_map(input int e);
    map_t f;
    for (int t = 0; t < FMW; t++) begin
      f[t] = '0;
      for (int q = 0; q < N*W; q++) f[t][q*MW +: MW] = MW'($urandom_range(254) - 127);
      f[t][WORD-1 -: EW] = EW'(e);
    end
    return f;
  endfunction
  // the tile the MMU sees through im2col for window addresses a .. a+N-1
  // (fields {oy, ox, ky, kx, c} with widths 2, 1, 1, LCW)
  function automatic tile_t lower(input map_t f, input int a);
    tile_t x;
    for (int t = 0; t < N; t++) begin
      int v, c, kx, ky, ox, oy, iy, ix;
      v = (a + t) & 32'h7FFFF;
      c = v & ((1 << LCW) - 1); kx = (v >> LCW) & 1; ky = (v >> (LCW + 1)) & 1;
      ox = (v >> (LCW + 2)) & 3; oy = v >> (LCW + 4);
      iy = oy + ky - 1; ix = ox + kx - 1;
      if (c >= 1 || iy < 0 || iy >= 3 || ix < 0 || ix >= 3) begin
        x[t] = '0; x[t][WORD-1 -: EW] = f[0][WORD-1 -: EW];
      end else x[t] = f[iy*3 + ix];
    end
    return x;
  endfunction

  tile_t wt0 [M], wt1 [M];

  // ------------------------------------------------------------------
  // host and DRAM interface models (commands -> crossbar accesses)
  // ------------------------------------------------------------------
  int host_wait = 0, stall_cycles = 0, spike_cycles = 0, both_active = 0;
  int padded = 0, full_batches = 0, inf_starts = 0, trn_starts = 0, inf_ends = 0, trn_ends = 0;
  int tiles_checked = 0, pad_reads = 0;
  always @(posedge clk) if (rst_n) begin
    if (host_buf_valid && dram_buf_valid && !host_buf_ready) host_wait++;
    if (mmu_stall) stall_cycles++;
    if (dut.buf_rd_en && dut.act_rd_addr[19] && dut.u_im2col.pad_word) pad_reads++;
    if (inf_only && ctx_active[1]) spike_cycles++;
    if (ctx_active == 2'b11) both_active++;
    if (batch_start && batch_info.ctx == 0) begin
      inf_starts++;
      if (batch_padded) padded++; else full_batches++;
    end
    if (batch_start && batch_info.ctx == 1) trn_starts++;
    if (prog_done && !prog_done_ctx) inf_ends++;
    if (prog_done && prog_done_ctx) trn_ends++;
  end

  // buffer accesses through one crossbar initiator (0 DRAM, 1 host)
  task automatic buf_write(input bit host, input bit weight, input int bank, input int addr, input logic [WORD-1:0] d);
    @(negedge clk);
    if (host) begin
      host_buf_valid = 1; host_buf_we = 1; host_buf_weight = weight; host_buf_bank = BKW'(bank);
      host_buf_addr = 20'(addr); host_buf_wdata = d;
      #1; while (!host_buf_ready) begin @(negedge clk); #1; end
      @(negedge clk); host_buf_valid = 0;
    end else begin
      dram_buf_valid = 1; dram_buf_we = 1; dram_buf_weight = weight; dram_buf_bank = BKW'(bank);
      dram_buf_addr = 20'(addr); dram_buf_wdata = d;
      #1; while (!dram_buf_ready) begin @(negedge clk); #1; end
      @(negedge clk); dram_buf_valid = 0;
    end
  endtask
  task automatic buf_read(input bit host, input int addr, output logic [WORD-1:0] d);
    @(negedge clk);
    if (host) begin
      host_buf_valid = 1; host_buf_we = 0; host_buf_weight = 0; host_buf_addr = 20'(addr);
      #1; while (!host_buf_ready) begin @(negedge clk); #1; end
      @(negedge clk); host_buf_valid = 0; #1;
      d = host_buf_rdata;
    end else begin
      dram_buf_valid = 1; dram_buf_we = 0; dram_buf_weight = 0; dram_buf_addr = 20'(addr);
      #1; while (!dram_buf_ready) begin @(negedge clk); #1; end
      @(negedge clk); dram_buf_valid = 0; #1;
      d = dram_buf_rdata;
    end
  endtask

  // Host: a load brings a new input tile and records the expected result,
  // a store reads the result tile and compares.
  tile_t exp_inf [64], exp_trn [64];
  int ei_wr = 0, ei_rd = 0, et_wr = 0, et_rd = 0;
  initial begin : host_model
    xfer_cmd_t c;
    tile_t x, h, o;
    logic [WORD-1:0] d;
    host_cmd_ready = 0; host_done = 0; host_done_tag = '0;
    forever begin
      @(negedge clk);
      host_done = 0;
      host_cmd_ready = 1;
      if (host_cmd_valid) begin
        c = host_cmd;
        @(negedge clk);
        host_cmd_ready = 0;
        if (!c.store) begin
          x = rnd_tile(int'($urandom_range(6)) - 3);
          for (int t = 0; t < N; t++) buf_write(1, 0, 0, int'(c.buf_addr) + t, x[t]);
          layer(x, wt0, 1, h);
          layer(h, wt1, 0, o);
          exp_inf[ei_wr++ % 64] = o;
        end else begin
          o = exp_inf[ei_rd++ % 64];
          for (int t = 0; t < N; t++) begin
            buf_read(1, int'(c.buf_addr) + t, d);
            check(d == o[t], $sformatf("inference result word %0d: %h expected %h", t, d, o[t]));
          end
          tiles_checked++;
        end
        @(negedge clk);
        host_done = 1; host_done_tag = c.tag;
      end
    end
  end

  initial begin : dram_model
    xfer_cmd_t c;
    tile_t x, o;
    logic [WORD-1:0] d;
    logic [WORD-1:0] fm [FMW];
    dram_cmd_ready = 0; dram_done = 0; dram_done_tag = '0;
    forever begin
      @(negedge clk);
      dram_done = 0;
      dram_cmd_ready = 1;
      if (dram_cmd_valid) begin
        c = dram_cmd;
        @(negedge clk);
        dram_cmd_ready = 0;
        if (!c.store) begin
          fm = rnd_map(int'($urandom_range(4)));
          for (int t = 0; t < FMW; t++) buf_write(0, 0, 0, int'(c.buf_addr) + t, fm[t]);
          x = lower(fm, CONV_ADDR);
          layer(x, wt0, 0, o);
          exp_trn[et_wr++ % 64] = o;
        end else begin
          o = exp_trn[et_rd++ % 64];
          for (int t = 0; t < N; t++) begin
            buf_read(0, int'(c.buf_addr) + t, d);
            check(d == o[t], $sformatf("training result word %0d", t));
          end
          tiles_checked++;
        end
        @(negedge clk);
        dram_done = 1; dram_done_tag = c.tag;
      end
    end
  end

  // ------------------------------------------------------------------
  // programs
  // ------------------------------------------------------------------
  function automatic instr_t ins(input opcode_e op, input int sub, input int flags, input int a,
                                 input int b, input int c, input int d);
    return '{op: op, sub: 4'(sub), flags: 4'(flags), a: 20'(a), b: 20'(b), c: 20'(c), d: 24'(d)};
  endfunction

  instr_t iprog [$], tprog [$];
  initial begin
    // inference: input from host, layer 1 with ReLU, layer 2, result to host
    iprog.push_back(ins(OP_HOST, 0, 0, A_IN, 0, N, 0));
    iprog.push_back(ins(OP_MMU, 0, 0, A_IN, W0, 0, 0));
    iprog.push_back(ins(OP_SIMD, SIMD_RELU, 3, 0, 0, M*N, A_HID));
    iprog.push_back(ins(OP_MMU, 0, 0, A_HID, W1, 0, 0));
    iprog.push_back(ins(OP_SIMD, SIMD_PASS, 3, 0, 0, M*N, A_OUT));
    iprog.push_back(ins(OP_HOST, 1, 0, A_OUT, 0, N, 0));
    iprog.push_back(ins(OP_END, 0, 0, 0, 0, 0, 0));
    // training step: tile from DRAM, MMU, result through the register file to DRAM
    tprog.push_back(ins(OP_DRAM, 0, 0, T_IN, 0, FMW, 4096));
    tprog.push_back(ins(OP_MMU, 0, 0, CONV_ADDR, W0, 0, 0));
    tprog.push_back(ins(OP_SIMD, SIMD_PASS, 1, 0, 0, M*N, 0));
    tprog.push_back(ins(OP_NOP, 0, 0, 0, 0, 0, 0));
    tprog.push_back(ins(OP_SIMD, SIMD_PASS, 2, 0, 0, M*N, T_OUT));
    tprog.push_back(ins(OP_DRAM, 1, 0, T_OUT, 0, N, 8192));
    tprog.push_back(ins(OP_END, 0, 0, 0, 0, 0, 0));
  end

  task automatic send_inf(input int id);
    @(negedge clk);
    inf_req_valid = 1; inf_req_id = 16'(id);
    #1; while (!inf_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    inf_req_valid = 0;
  endtask
  task automatic send_trn(input int id);
    @(negedge clk);
    trn_req_valid = 1; trn_req_id = 16'(id);
    #1; while (!trn_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    trn_req_valid = 0;
  endtask

  initial begin : main
    int id = 0;
    inf_req_valid = 0; trn_req_valid = 0; inf_req_id = 0; trn_req_id = 0;
    cfg_batch_timeout = 40; cfg_qsize_threshold = QSW'(N + 2);
    cfg_prog_start[0] = 12'd0; cfg_prog_start[1] = 12'd64;
    cfg_conv = '{base: 20'(T_IN), fh: 10'd3, fw: 10'd3, cw: 8'd1, kh: 4'd2, kw: 4'd2, stride: 3'd1,
                 pad: 3'd1, lcw: 4'(LCW), lkx: 4'd1, lky: 4'd1, lox: 4'd2};
    ib_wr_en = 0; ib_wr_addr = 0; ib_wr_data = 0;
    dram_buf_valid = 0; dram_buf_we = 0; dram_buf_weight = 0; dram_buf_bank = 0; dram_buf_addr = 0; dram_buf_wdata = 0;
    host_buf_valid = 0; host_buf_we = 0; host_buf_weight = 0; host_buf_bank = 0; host_buf_addr = 0; host_buf_wdata = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // installation: programs and weights
    foreach (iprog[k]) begin
      @(negedge clk); ib_wr_en = 1; ib_wr_addr = IAW'(k); ib_wr_data = iprog[k];
    end
    foreach (tprog[k]) begin
      @(negedge clk); ib_wr_en = 1; ib_wr_addr = IAW'(64 + k); ib_wr_data = tprog[k];
    end
    @(negedge clk); ib_wr_en = 0;
    for (int b = 0; b < M; b++) begin
      wt0[b] = rnd_tile(-2 + b);
      wt1[b] = rnd_tile(1 - b);
      for (int t = 0; t < N; t++) begin
        buf_write(1, 1, b, W0 + t, wt0[b][t]);
        buf_write(1, 1, b, W1 + t, wt1[b][t]);
      end
    end
    // phase 1: one training batch, then a lone inference request (padded batch)
    send_trn(1);
    send_inf(id++);
    while (inf_ends < 1 || trn_ends < 1) @(negedge clk);
    // phase 2: a full inference batch while training runs
    send_trn(2);
    for (int k = 0; k < N; k++) send_inf(id++);
    while (inf_ends < 2 || trn_ends < 2) @(negedge clk);
    // phase 3: load spike, more inference requests than the threshold
    send_trn(3);
    send_trn(4);
    repeat (5) @(negedge clk);
    for (int k = 0; k < 3*N + 3; k++) send_inf(id++);
    while (trn_ends < 4 || inf_ends < inf_starts || inf_req_valid || dut_inf_pending()) @(negedge clk);
    repeat (20) @(negedge clk);
    // phase 4: host and DRAM copy tiles into the activation buffer at the same time
    begin
      tile_t hx, dx;
      logic [WORD-1:0] d;
      hx = rnd_tile(1); dx = rnd_tile(2);
      fork
        for (int t = 0; t < N; t++) buf_write(1, 0, 0, 6*N + t, hx[t]);
        for (int t = 0; t < N; t++) buf_write(0, 0, 0, 7*N + t, dx[t]);
      join
      for (int t = 0; t < N; t++) begin
        buf_read(1, 6*N + t, d); check(d == hx[t], "host copy");
        buf_read(0, 7*N + t, d); check(d == dx[t], "DRAM copy");
      end
    end
    check(inf_ends == inf_starts && trn_ends == 4, $sformatf("programs ended: inf %0d/%0d trn %0d", inf_ends, inf_starts, trn_ends));
    check(ei_wr == ei_rd && et_wr == et_rd, "every loaded tile produced a result");
    check(padded > 0, "no padded (adaptive) batch");
    check(full_batches > 0, "no full batch");
    check(both_active > 0, "contexts never active together");
    check(spike_cycles > 0, "no load spike with training held");
    check(stall_cycles > 0, "no MMU stall");
    check(host_wait > 0, "no crossbar contention");
    check(pad_reads > 0, "no im2col padding word");
    $display("tiles %0d, padded %0d, full %0d, both-active %0d, spike %0d, mmu stall %0d, host waits %0d, im2col pads %0d",
             tiles_checked, padded, full_batches, both_active, spike_cycles, stall_cycles, host_wait, pad_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit dut_inf_pending();
    return ctx_active[0];
  endfunction

  initial begin : watchdog
    repeat (FULL ? 200000 : 60000) @(posedge clk);
    failures++;
    $display("watchdog: inf %0d/%0d trn %0d", inf_ends, inf_starts, trn_ends);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
