// tb_eqx_buffers: self-checking testbench of the activation buffer, the
// weight buffer and the crossbar in front of their read-write ports, at N=2,
// M=2, W=2 with small capacities.
//
// Random words are written through the DRAM and host initiators of the
// crossbar (both at once, to the same and to different buffers), then read
// back through the crossbar and through the buffers' datapath read ports, and
// compared with a model kept here. Also checked: one-cycle read latency, that
// the host waits while the DRAM interface uses the same buffer, that both
// proceed when they use different buffers, and that the SIMD write port wins
// a same-cycle write to the same address.
module tb_eqx_buffers;
  import eqx_pkg::*;
  localparam int N = 2, M = 2, W = 2, BANKS = 4;
  localparam int WORD = N*W*MW + EW;                 // 44 bits
  localparam longint ABYTES = 64'(64 * WORD / 8);    // 64 words
  localparam longint WBYTES = 64'(64 * WORD / 8);    // 32 words per bank
  localparam int AAW = 6, WAW = 5, BKW = 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // crossbar
  logic [1:0] i_valid, i_ready, i_we, i_weight, i_rvalid;
  logic [1:0][BKW-1:0] i_bank;
  logic [1:0][19:0] i_addr;
  logic [1:0][WORD-1:0] i_wdata, i_rdata;
  logic act_en, act_we, wgt_en, wgt_we;
  logic [AAW-1:0] act_addr;
  logic [WAW-1:0] wgt_addr;
  logic [BKW-1:0] wgt_bank;
  logic [WORD-1:0] act_wdata, act_rdata, wgt_wdata, wgt_rdata;
  // datapath ports
  logic rd_en, wrd_en, simd_we;
  logic [AAW-1:0] rd_addr, simd_addr;
  logic [WAW-1:0] wrd_addr;
  logic [WORD-1:0] rd_data, simd_wdata;
  logic [M-1:0][WORD-1:0] wrd_data;

  eqx_crossbar #(.WORD(WORD), .AW_A(AAW), .AW_W(WAW), .BKW(BKW)) u_x (.*);
  eqx_act_buffer #(.N(N), .W(W), .BYTES(ABYTES), .BANKS(BANKS)) u_a (
    .clk, .rd_en, .rd_addr, .rd_data, .ext_en(act_en), .ext_we(act_we), .ext_addr(act_addr),
    .ext_wdata(act_wdata), .ext_rdata(act_rdata), .simd_we, .simd_addr, .simd_wdata);
  eqx_weight_buffer #(.N(N), .M(M), .W(W), .BYTES(WBYTES)) u_w (
    .clk, .rd_en(wrd_en), .rd_addr(wrd_addr), .rd_data(wrd_data), .ext_en(wgt_en), .ext_we(wgt_we),
    .ext_bank(wgt_bank), .ext_addr(wgt_addr), .ext_wdata(wgt_wdata), .ext_rdata(wgt_rdata));

  int checks = 0, failures = 0, host_waits = 0, parallel = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [WORD-1:0] amod [64];
  logic [WORD-1:0] wmod [M][32];

  function automatic logic [WORD-1:0] rw();
    return {12'($urandom), 32'($urandom)};
  endfunction

  // both initiators issue one request each; wait until both are accepted
  task automatic xfer2(input bit we0, input bit wt0, input int bk0, input int a0,
                       input bit we1, input bit wt1, input int bk1, input int a1);
    logic [WORD-1:0] d0, d1;
    bit done0 = 0, done1 = 0, rd0 = 0, rd1 = 0;
    d0 = rw(); d1 = rw();
    @(negedge clk);
    i_valid = 2'b11; i_we = {we1, we0}; i_weight = {wt1, wt0};
    i_bank = {1'(bk1), 1'(bk0)}; i_addr = {20'(a1), 20'(a0)}; i_wdata = {d1, d0};
    while (!(done0 && done1)) begin
      bit acc0, acc1;
      #1;
      acc0 = i_valid[0] && i_ready[0];
      acc1 = i_valid[1] && i_ready[1];
      if (i_valid == 2'b11 && wt0 == wt1) begin
        check(acc0 && !acc1, $sformatf("DRAM wins a shared buffer r=%b v=%b w=%b", i_ready, i_valid, i_weight));
        host_waits++;
      end
      if (i_valid == 2'b11 && wt0 != wt1) begin
        check(acc0 && acc1, "different buffers in parallel");
        parallel++;
      end
      @(negedge clk);
      if (acc0) begin
        done0 = 1; i_valid[0] = 0;
        if (we0) begin if (wt0) wmod[bk0][a0] = d0; else amod[a0] = d0; end
        else check(i_rvalid[0] && i_rdata[0] == (wt0 ? wmod[bk0][a0] : amod[a0]), "DRAM read data");
      end
      if (acc1) begin
        done1 = 1; i_valid[1] = 0;
        if (we1) begin if (wt1) wmod[bk1][a1] = d1; else amod[a1] = d1; end
        else check(i_rvalid[1] && i_rdata[1] == (wt1 ? wmod[bk1][a1] : amod[a1]), "host read data");
      end
    end
  endtask

  initial begin : main
    i_valid = 0; i_we = 0; i_weight = 0; i_bank = 0; i_addr = 0; i_wdata = 0;
    rd_en = 0; wrd_en = 0; simd_we = 0; rd_addr = 0; simd_addr = 0; wrd_addr = 0; simd_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill both buffers: DRAM writes activations while the host writes weights
    for (int a = 0; a < 32; a++) xfer2(1, 0, 0, a, 1, 1, a % 2, a);
    for (int a = 0; a < 32; a++) xfer2(1, 1, (a + 1) % 2, a, 1, 0, 0, 32 + a);
    // same-buffer contention, reads mixed with writes
    for (int k = 0; k < 20; k++) begin
      int b = $urandom_range(1);
      xfer2($urandom_range(1), b[0], $urandom_range(1), $urandom_range(31),
            $urandom_range(1), b[0], $urandom_range(1), $urandom_range(31) + (b ? 0 : 32));
    end
    // datapath read ports
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); rd_en = 1; rd_addr = AAW'(a); wrd_en = (a < 32); wrd_addr = WAW'(a);
      @(negedge clk); rd_en = 0; wrd_en = 0;
      check(rd_data == amod[a], $sformatf("activation read %0d", a));
      if (a < 32) for (int b = 0; b < M; b++) check(wrd_data[b] == wmod[b][a], $sformatf("weight read %0d.%0d", b, a));
    end
    // SIMD write port; same address as an external write: SIMD kept
    @(negedge clk);
    simd_we = 1; simd_addr = 6'd9; simd_wdata = rw();
    i_valid = 2'b01; i_we = 2'b01; i_weight = 2'b00; i_addr[0] = 20'd9; i_wdata[0] = rw();
    amod[9] = simd_wdata;
    @(negedge clk);
    simd_we = 0; i_valid = 0;
    rd_en = 1; rd_addr = 6'd9;
    @(negedge clk);
    rd_en = 0;
    check(rd_data == amod[9], "SIMD write wins");
    check(host_waits > 0 && parallel > 0, "contention and parallel access both seen");
    $display("host waits %0d, parallel accesses %0d", host_waits, parallel);
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
