// tb_eqx_mmu: self-checking testbench of the matrix multiply unit (with its
// systolic arrays, PEs and fixed-point to bfloat16 converter) at N=4, M=2, W=2.
//
// Random block floating-point tiles are placed in behavioural activation and
// weight memories (one-cycle read latency). For each of several commands the
// expected result of every output element is computed here as an integer dot
// product, scaled by 2^(activation exponent + weight exponent) in real
// arithmetic and truncated to bfloat16 from its double-precision bits. The
// testbench checks each drained vector, the drain order, the done tag, the
// 3N+1-cycle compute latency, and that a second command stalls until the
// first result has been drained.
module tb_eqx_mmu;
  import eqx_pkg::*;
  localparam int N = 4, M = 2, W = 2, AAW = 8, WAW = 8;
  localparam int WORD = N*W*MW + EW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, act_rd_en, wgt_rd_en, done_valid, out_valid, out_ready, out_last, stall;
  mmu_cmd_t cmd;
  logic [19:0] act_rd_addr;
  logic [WAW-1:0] wgt_rd_addr;
  logic [WORD-1:0] act_rd_data;
  logic [M-1:0][WORD-1:0] wgt_rd_data;
  tag_t done_tag;
  logic [N-1:0][15:0] out_data;

  logic [WORD-1:0] amem [2**AAW];
  logic [WORD-1:0] wmem [M][2**WAW];

  eqx_mmu #(.N(N), .M(M), .W(W), .WAW(WAW)) dut (.*);

  always_ff @(posedge clk) begin
    if (act_rd_en) act_rd_data <= amem[AAW'(act_rd_addr)];
    if (wgt_rd_en) for (int a = 0; a < M; a++) wgt_rd_data[a] <= wmem[a][wgt_rd_addr];
  end

  int checks = 0, failures = 0, cycle = 0, stalls = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (stall) stalls <= stalls + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] ref_bf16(input longint acc, input int e);
    real r;
    logic [63:0] b;
    int ex;
    if (acc == 0) return 16'h0;
    r = real'(acc) * (2.0 ** e);
    b = $realtobits(r);
    ex = int'(b[62:52]) - 1023 + 127;
    return {b[63], ex[7:0], b[51:45]};
  endfunction

  // one tile set: activation at address aa, weights at wa
  task automatic fill(input int aa, input int wa, input int ea, input int ew);
    for (int t = 0; t < N; t++) begin
      logic [WORD-1:0] aw;
      aw = '0;
      for (int x = 0; x < N*W; x++) aw[x*MW +: MW] = MW'($urandom_range(254) - 127);
      aw[WORD-1 -: EW] = EW'(ea);
      amem[aa + t] = aw;
      for (int a = 0; a < M; a++) begin
        logic [WORD-1:0] ww;
        ww = '0;
        for (int x = 0; x < N*W; x++) ww[x*MW +: MW] = MW'($urandom_range(254) - 127);
        ww[WORD-1 -: EW] = EW'(ew);
        wmem[a][wa + t] = ww;
      end
    end
  endtask

  function automatic longint ref_dot(input int aa, input int wa, input int a, input int i, input int j);
    longint s = 0;
    for (int t = 0; t < N; t++)
      for (int k = 0; k < W; k++)
        s += longint'($signed(amem[aa+t][(i*W+k)*MW +: MW])) *
             longint'($signed(wmem[a][wa+t][(j*W+k)*MW +: MW]));
    return s;
  endfunction

  int aa_l[3] = '{0, 16, 32};
  int wa_l[3] = '{0, 8, 40};
  int ea_l[3] = '{-3, 5, -12};
  int ew_l[3] = '{-4, 2, 7};

  initial begin : main
    int t_acc, t_done;
    cmd_valid = 0; out_ready = 0; cmd = '0;
    for (int c = 0; c < 3; c++) fill(aa_l[c], wa_l[c], ea_l[c], ew_l[c]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int c = 0; c < 3; c++) begin
      cmd.act_addr = 20'(aa_l[c]); cmd.wgt_addr = 20'(wa_l[c]);
      cmd.tag = '{ctx: c[0], seq: 7'(c + 10)};
      @(negedge clk);
      cmd_valid = 1;
      while (!cmd_ready) @(negedge clk);
      t_acc = int'($time / 10);
      @(negedge clk);
      cmd_valid = 0;
      // next command is presented at once and must stall until drained
      while (!done_valid) @(negedge clk);
      t_done = int'($time / 10);
      check(t_done - t_acc == 3*N + 1, $sformatf("latency %0d", t_done - t_acc));
      check(done_tag == cmd.tag, "done tag");
      if (c < 2) begin
        cmd.act_addr = 20'(aa_l[c+1]); cmd.wgt_addr = 20'(wa_l[c+1]);
        cmd_valid = 1;
      end
      for (int a = 0; a < M; a++) begin
        for (int j = 0; j < N; j++) begin
          out_ready = ($urandom_range(3) != 0);
          while (!(out_valid && out_ready)) begin
            @(negedge clk);
            check(!(cmd_valid && cmd_ready), "command accepted before drain");
            out_ready = ($urandom_range(3) != 0);
          end
          for (int i = 0; i < N; i++)
            check(out_data[i] == ref_bf16(ref_dot(aa_l[c], wa_l[c], a, i, j), ea_l[c] + ew_l[c]),
                  $sformatf("cmd %0d array %0d row %0d col %0d: %h", c, a, i, j, out_data[i]));
          check(out_last == (a == M-1 && j == N-1), "out_last");
          @(negedge clk);
          out_ready = 0;
        end
      end
      cmd_valid = 0;
      @(posedge clk);
    end
    check(stalls > 0, "stall never happened");
    $display("stall cycles: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
