// tb_eqx_im2col: self-checking testbench of the im2col unit.
//
// A behavioural one-cycle-latency memory stands behind the unit; every word
// holds its own address in the mantissa bits and a fixed exponent, so the
// word that comes back names the address that was read. For several random
// convolution geometries (map size, channel words, kernel, stride, padding)
// the testbench walks every window address {oy, ox, ky, kx, c}, including
// field values past the kernel and channel counts, and compares the returned
// word with a nested-loop model of the lowering: the word of input pixel
// (oy*stride+ky-pad, ox*stride+kx-pad), channel word c, or a zero-mantissa
// word with the map's exponent for padding. Plain addresses (bit 19 clear)
// must pass through. Reads are issued back to back at one per cycle; the
// data is checked on the following cycle. Counts padding words seen.
module tb_eqx_im2col;
  import eqx_pkg::*;
  localparam int AAW = 12, WORD = 4*2*8 + EW;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  conv_cfg_t cfg;
  logic in_rd_en, buf_rd_en;
  logic [19:0] in_rd_addr;
  logic [AAW-1:0] buf_rd_addr;
  logic [WORD-1:0] buf_rd_data, out_rd_data;
  eqx_im2col #(.AAW(AAW), .WORD(WORD)) dut (.*);

  localparam logic [EW-1:0] XP = 12'hFF7;
  always_ff @(posedge clk)
    if (buf_rd_en) buf_rd_data <= {XP, (WORD-EW)'(buf_rd_addr) + (WORD-EW)'(1)};

  int checks = 0, failures = 0, pads = 0, reals = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int clog(input int x);
    int l = 0;
    while ((1 << l) < x) l++;
    return l;
  endfunction

  logic [WORD-1:0] expq [$];
  task automatic issue(input logic [19:0] a, input logic [WORD-1:0] e);
    @(negedge clk);
    in_rd_en = 1; in_rd_addr = a;
    @(negedge clk);
    in_rd_en = 0;
    check(out_rd_data == e, $sformatf("addr %h: %h expected %h", a, out_rd_data, e));
  endtask

  initial begin
    in_rd_en = 0; in_rd_addr = 0; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // plain addresses pass through
    for (int k = 0; k < 20; k++) begin
      int a;
      a = $urandom_range(4000);
      issue(20'(a), {XP, (WORD-EW)'(a + 1)});
    end
    for (int g = 0; g < 12; g++) begin
      int fh, fw, cw, kh, kw, st, pd, oh, ow;
      fh = $urandom_range(7, 2); fw = $urandom_range(7, 2); cw = $urandom_range(3, 1);
      kh = $urandom_range(3, 1); kw = $urandom_range(3, 1); st = $urandom_range(2, 1);
      pd = $urandom_range(1, 0);
      if (g == 0) begin fh = 3; fw = 3; cw = 1; kh = 3; kw = 3; st = 1; pd = 1; end
      oh = (fh + 2*pd - kh) / st + 1; ow = (fw + 2*pd - kw) / st + 1;
      cfg.base = 20'($urandom_range(100)); cfg.fh = 10'(fh); cfg.fw = 10'(fw); cfg.cw = 8'(cw);
      cfg.kh = 4'(kh); cfg.kw = 4'(kw); cfg.stride = 3'(st); cfg.pad = 3'(pd);
      cfg.lcw = 4'(clog(cw) + (g % 2)); cfg.lkx = 4'(clog(kw)); cfg.lky = 4'(clog(kh)); cfg.lox = 4'(clog(ow));
      for (int oy = 0; oy < oh; oy++) for (int ox = 0; ox < ow; ox++)
        for (int ky = 0; ky < (1 << cfg.lky); ky++) for (int kx = 0; kx < (1 << cfg.lkx); kx++)
          for (int c = 0; c < (1 << cfg.lcw); c++) begin
            int iy, ix;
            logic [19:0] a;
            logic [WORD-1:0] e;
            iy = oy*st + ky - pd; ix = ox*st + kx - pd;
            a = 20'(((((oy << cfg.lox) + ox) << cfg.lky | ky) << cfg.lkx | kx) << cfg.lcw | c);
            a[19] = 1'b1;
            if (c >= cw || kx >= kw || ky >= kh || iy < 0 || iy >= fh || ix < 0 || ix >= fw) begin
              e = {XP, (WORD-EW)'(0)}; pads++;
            end else begin
              e = {XP, (WORD-EW)'(int'(cfg.base) + (iy*fw + ix)*cw + c + 1)}; reals++;
            end
            issue(a, e);
          end
    end
    // back-to-back reads: the data of each read follows one cycle later
    cfg.base = 0; cfg.fh = 4; cfg.fw = 4; cfg.cw = 1; cfg.kh = 2; cfg.kw = 2; cfg.stride = 1; cfg.pad = 0;
    cfg.lcw = 0; cfg.lkx = 1; cfg.lky = 1; cfg.lox = 2;
    @(negedge clk);
    for (int k = 0; k < 4; k++) begin
      in_rd_en = 1; in_rd_addr = 20'h80000 | 20'(k);
      @(negedge clk);
      check(out_rd_data == {XP, (WORD-EW)'((k / 2) * 4 + (k % 2) + 1)}, $sformatf("streamed read %0d", k));
    end
    in_rd_en = 0;
    check(pads > 0 && reals > 0, "padding and real words both exercised");
    $display("real words %0d, padding words %0d", reals, pads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
