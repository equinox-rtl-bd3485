// eqx_im2col: im2col unit between the activation buffer and the MMU. It
// lowers a convolution to matrix multiplication on the fly, by translating
// the MMU's activation read addresses, so no lowered copy of the input is
// ever stored.
//
// Feature maps are kept in the activation buffer pixel by pixel, row-major,
// `cw` words per pixel; each word holds, for the N batch rows, W channels.
// An MMU activation address with bit 19 clear passes through unchanged. With
// bit 19 set it names one word of the lowered matrix: its low 19 bits are the
// fields {oy, ox, ky, kx, c} of widths (rest, lox, lky, lkx, lcw) taken from
// the installation-time geometry `cfg` (conv_cfg_t). The unit reads the word
// of input pixel (oy*stride+ky-pad, ox*stride+kx-pad), channel word c. A
// field value outside the kernel or channel count, or a pixel outside the
// map (zero padding), gives a word whose mantissas are all zero and whose
// exponent is that of the map's first word, which is read in its place.
// So a lowered row is the kernel window of one output pixel, and an MMU
// command over N consecutive window addresses multiplies N words of it.
//
// Interface and timing: in_rd_en/in_rd_addr come from the MMU and go out on
// buf_rd_en/buf_rd_addr in the same cycle (the translation is combinational);
// the buffer's data comes back one cycle later and is passed to out_rd_data,
// zeroed for padding words, so the MMU still sees a one-cycle read latency.
// The function (lowering convolutions to matrix multiplication) and the
// unit's place between activation buffer and MMU follow the design
// description; the on-the-fly address translation, the window address
// format and the power-of-two field widths are this design's own choices.
// A feature map must share one block exponent (the unit does not
// re-quantize words read from different tiles).
module eqx_im2col
  import eqx_pkg::*;
#(
  parameter int AAW  = 16,
  parameter int WORD = 4588
) (
  input  logic            clk,
  input  logic            rst_n,
  input  conv_cfg_t       cfg,
  input  logic            in_rd_en,
  input  logic [19:0]     in_rd_addr,
  output logic            buf_rd_en,
  output logic [AAW-1:0]  buf_rd_addr,
  input  logic [WORD-1:0] buf_rd_data,
  output logic [WORD-1:0] out_rd_data
);
  logic [18:0] v, rest;
  logic [18:0] c, kx, ky, ox, oy;
  logic signed [21:0] iy, ix;
  logic        pad_word, pad_q;
  logic [39:0] src;

  function automatic logic [18:0] field(input logic [18:0] x, input logic [3:0] len);
    return x & ((19'd1 << len) - 19'd1);
  endfunction

  always_comb begin
    v    = in_rd_addr[18:0];
    c    = field(v, cfg.lcw);
    rest = v >> cfg.lcw;
    kx   = field(rest, cfg.lkx);
    rest = rest >> cfg.lkx;
    ky   = field(rest, cfg.lky);
    rest = rest >> cfg.lky;
    ox   = field(rest, cfg.lox);
    oy   = rest >> cfg.lox;
    iy   = 22'($signed({3'b0, oy}) * $signed({19'b0, cfg.stride}) + $signed({3'b0, ky})
              - $signed({19'b0, cfg.pad}));
    ix   = 22'($signed({3'b0, ox}) * $signed({19'b0, cfg.stride}) + $signed({3'b0, kx})
              - $signed({19'b0, cfg.pad}));
    pad_word = (c >= 19'(cfg.cw)) || (kx >= 19'(cfg.kw)) || (ky >= 19'(cfg.kh)) ||
               (iy < 0) || (iy >= 22'(cfg.fh)) || (ix < 0) || (ix >= 22'(cfg.fw));
    src  = 40'(cfg.base) + (40'(iy[19:0]) * 40'(cfg.fw) + 40'(ix[19:0])) * 40'(cfg.cw) + 40'(c);
    buf_rd_en = in_rd_en;
    if (!in_rd_addr[19])  buf_rd_addr = AAW'(in_rd_addr);
    else if (pad_word)    buf_rd_addr = AAW'(cfg.base);
    else                  buf_rd_addr = AAW'(src);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pad_q <= 1'b0;
    else if (in_rd_en) pad_q <= in_rd_addr[19] && pad_word;
  end

  always_comb begin
    out_rd_data = buf_rd_data;
    if (pad_q) out_rd_data[WORD-EW-1:0] = '0;
  end
endmodule
