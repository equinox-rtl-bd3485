// tb_eqx_simd_unit: self-checking testbench of the SIMD unit and its
// bfloat16 -> block floating-point quantizer at N=4, W=2.
//
// Random bfloat16 vectors are streamed in as MMU results and stored, added,
// subtracted, multiplied, compared and passed through ReLU and its derivative.
// Register-file contents are compared with results computed here in real
// arithmetic (truncated to bfloat16, one unit in the last place allowed for
// the unit's guard-bit truncation). A tile is then written to the activation
// buffer port; the written words are compared with a quantization computed
// here from the real values (shared exponent from the largest element,
// mantissas truncated toward zero). Also checked: done tags, two cycles per
// vector, and that completion waits for the quantizer to finish.
module tb_eqx_simd_unit;
  import eqx_pkg::*;
  localparam int N = 4, W = 2, AAW = 8;
  localparam longint RFB = 64'd1024;           // 128 vectors
  localparam int WORD = N*W*MW + EW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, mmu_valid, mmu_ready, act_we, done_valid;
  simd_cmd_t cmd;
  logic [N-1:0][15:0] mmu_data;
  logic [AAW-1:0] act_addr;
  logic [WORD-1:0] act_wdata;
  tag_t done_tag;

  eqx_simd_unit #(.N(N), .W(W), .RF_BYTES(RFB), .AAW(AAW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real pow2(input int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction
  function automatic real bf2r(input logic [15:0] x);
    if (x[14:7] == 0) return 0.0;
    return (x[15] ? -1.0 : 1.0) * (1.0 + real'(x[6:0]) / 128.0) * pow2(int'(x[14:7]) - 127);
  endfunction
  function automatic logic [15:0] r2bf(input real r);
    logic [63:0] b;
    int ex;
    if (r == 0.0) return 16'h0;
    b = $realtobits(r);
    ex = int'(b[62:52]) - 1023 + 127;
    if (ex <= 0) return 16'h0;
    return {b[63], ex[7:0], b[51:45]};
  endfunction
  function automatic bit close(input logic [15:0] x, input logic [15:0] y);
    int d;
    if (x == y) return 1;
    if (x[14:0] == 0 && y[14:0] == 0) return 1;
    if (x[15] != y[15]) return 0;
    d = int'(x[14:0]) - int'(y[14:0]);
    return (d == 1 || d == -1);
  endfunction
  function automatic logic [15:0] rnd();
    return {1'($urandom), 8'($urandom_range(134, 120)), 7'($urandom)};
  endfunction

  logic [N-1:0][15:0] vin [16];
  logic [N-1:0][15:0] rfv [128];    // expected register file
  logic [N-1:0][15:0] sarr [64];
  int shead = 0, stail = 0;
  int done_seen = 0;

  // MMU stream source with random gaps
  logic gap;
  always @(posedge clk) begin
    if (mmu_valid && mmu_ready) shead <= shead + 1;
    gap <= ($urandom_range(3) == 0);
  end
  assign mmu_valid = (shead != stail) && !gap;
  assign mmu_data  = sarr[shead];

  task automatic run(input simd_op_e op, input bit from_mmu, input bit to_act, input int a,
                     input int b, input int d, input int cnt, input int seq, output int cycles);
    int t0;
    @(negedge clk);
    cmd = '{op: op, a_from_mmu: from_mmu, to_act: to_act, a_addr: 20'(a), b_addr: 20'(b),
            d_addr: 20'(d), count: 20'(cnt), tag: '{ctx: 1'b1, seq: 7'(seq)}};
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    t0 = int'($time / 10);
    @(negedge clk);
    cmd_valid = 0;
    while (!done_valid) @(negedge clk);
    cycles = int'($time / 10) - t0;
    check(done_tag.seq == 7'(seq) && done_tag.ctx, "done tag");
  endtask

  function automatic logic [15:0] ref_op(input simd_op_e op, input logic [15:0] x, input logic [15:0] y);
    real a = bf2r(x), b = bf2r(y);
    case (op)
      SIMD_ADD:   return r2bf(a + b);
      SIMD_SUB:   return r2bf(a - b);
      SIMD_MUL:   return r2bf(a * b);
      SIMD_MAX:   return (a > b) ? x : y;
      SIMD_RELU:  return (a > 0.0) ? x : 16'h0;
      SIMD_DRELU: return (b > 0.0) ? x : 16'h0;
      default:    return x;
    endcase
  endfunction

  // activation writes observed
  logic [WORD-1:0] wr_data [$];
  int wr_addr [$];
  always @(posedge clk) if (act_we) begin wr_data.push_back(act_wdata); wr_addr.push_back(int'(act_addr)); end

  initial begin : main
    int cyc;
    simd_op_e ops[5] = '{SIMD_SUB, SIMD_MUL, SIMD_MAX, SIMD_RELU, SIMD_DRELU};
    cmd_valid = 0; cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: store 8 MMU vectors in r0..r7
    for (int v = 0; v < 8; v++) begin
      for (int l = 0; l < N; l++) vin[v][l] = rnd();
      begin sarr[stail] = vin[v]; stail++; end
      rfv[v] = vin[v];
    end
    run(SIMD_PASS, 1, 0, 0, 0, 0, 8, 1, cyc);
    for (int v = 0; v < 8; v++) check(dut.rf[v] == rfv[v], $sformatf("pass r%0d", v));
    // 2: accumulate: r8..r15 = mmu + r0..r7
    for (int v = 0; v < 8; v++) begin
      for (int l = 0; l < N; l++) begin
        vin[8+v][l] = rnd();
        rfv[8+v][l] = ref_op(SIMD_ADD, vin[8+v][l], rfv[v][l]);
      end
      begin sarr[stail] = vin[8+v]; stail++; end
    end
    run(SIMD_ADD, 1, 0, 0, 0, 8, 8, 2, cyc);
    for (int v = 0; v < 8; v++) for (int l = 0; l < N; l++)
      check(close(dut.rf[8+v][l], rfv[8+v][l]), $sformatf("add r%0d.%0d %h %h", 8+v, l, dut.rf[8+v][l], rfv[8+v][l]));
    // 3: register-file operations
    for (int o = 0; o < 5; o++) begin
      run(ops[o], 0, 0, 0, 8, 16 + 8*o, 8, 3 + o, cyc);
      check(cyc == 2*8 + 1, $sformatf("%s takes %0d cycles", ops[o].name(), cyc));
      for (int v = 0; v < 8; v++) for (int l = 0; l < N; l++)
        check(close(dut.rf[16+8*o+v][l], ref_op(ops[o], dut.rf[v][l], dut.rf[8+v][l])),
              $sformatf("%s r%0d.%0d", ops[o].name(), v, l));
    end
    // 4: write r8..r15 as one activation tile at address 5
    wr_data.delete(); wr_addr.delete();
    run(SIMD_PASS, 0, 1, 8, 0, 5, N*W, 9, cyc);
    check(wr_data.size() == N, "tile word count");
    begin
      int maxe = 0, e;
      real sc;
      for (int v = 0; v < N*W; v++) for (int l = 0; l < N; l++)
        if (int'(dut.rf[8+v][l][14:7]) > maxe) maxe = int'(dut.rf[8+v][l][14:7]);
      e = maxe - 133;
      sc = pow2(e);
      for (int t = 0; t < N && t < wr_data.size(); t++) begin
        check(wr_addr[t] == 5 + t, "tile address");
        check($signed(wr_data[t][WORD-1 -: EW]) == e, "tile exponent");
        for (int i = 0; i < N; i++) for (int k = 0; k < W; k++)
          check($signed(wr_data[t][(i*W+k)*MW +: MW]) == $rtoi(bf2r(dut.rf[8 + t*W + k][i]) / sc),
                $sformatf("mantissa t%0d i%0d k%0d", t, i, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
