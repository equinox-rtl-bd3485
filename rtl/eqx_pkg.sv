// eqx_pkg: types, constants and arithmetic helpers shared by the Equinox RTL.
//
// Number formats. Matrix operands are block floating point (hbf8): a block of
// signed 8-bit mantissas shares one 12-bit two's-complement exponent, and an
// element's value is mantissa * 2^exponent. The systolic arrays accumulate in
// 25-bit fixed point. The SIMD unit works in bfloat16 (1 sign, 8 exponent bits
// biased by 127, 7 fraction bits). The 8/12/25-bit widths follow the design
// description; rounding (truncation), flushing subnormals to zero and the
// instruction encoding below are this design's own choices.
//
// Instruction word (96 bits, own encoding):
//   [95:92] opcode  [91:88] sub  [87:84] flags  [83:64] a  [63:44] b
//   [43:24] c       [23:0]  d
//   OP_MMU   : a = activation tile address (bit 19 set: im2col window address,
//              see eqx_im2col), b = weight tile address (all banks)
//   OP_SIMD  : sub = simd_op_e, flags[0] = operand A from MMU output,
//              flags[1] = result to activation buffer (via the quantizer),
//              a/b/d(low 20 bits) = register file addresses of A, B, result
//              (d = activation tile address when flags[1]), c = vector count
//   OP_DRAM  : sub[0] = 1 store to DRAM / 0 load, sub[1] = weight buffer,
//              flags = weight bank, a = buffer address, c = word count,
//              d = DRAM word address
//   OP_HOST  : same fields as OP_DRAM, towards the host interface
//   OP_END   : end of the batch's program
package eqx_pkg;

  localparam int MW  = 8;    // mantissa bits
  localparam int EW  = 12;   // shared exponent bits
  localparam int AW  = 25;   // accumulator bits
  localparam int IW  = 96;   // instruction bits
  localparam int TAGW = 8;   // instruction ID bits

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_MMU  = 4'd1,
    OP_SIMD = 4'd2,
    OP_DRAM = 4'd3,
    OP_HOST = 4'd4,
    OP_END  = 4'd15
  } opcode_e;

  typedef enum logic [3:0] {
    SIMD_PASS  = 4'd0,  // r = a
    SIMD_ADD   = 4'd1,  // r = a + b (accumulate partial output tiles)
    SIMD_SUB   = 4'd2,  // r = a - b (loss gradient of a squared error)
    SIMD_MUL   = 4'd3,  // r = a * b
    SIMD_MAX   = 4'd4,  // r = max(a, b)
    SIMD_RELU  = 4'd5,  // r = max(a, 0)
    SIMD_DRELU = 4'd6   // r = (b > 0) ? a : 0 (derivative of ReLU times gradient)
  } simd_op_e;

  typedef struct packed {
    opcode_e     op;
    logic [3:0]  sub;
    logic [3:0]  flags;
    logic [19:0] a;
    logic [19:0] b;
    logic [19:0] c;
    logic [23:0] d;
  } instr_t;

  // Instruction ID: context (0 inference, 1 training) and a sequence number.
  typedef struct packed {
    logic       ctx;
    logic [6:0] seq;
  } tag_t;

  typedef struct packed {
    logic [19:0] act_addr;
    logic [19:0] wgt_addr;
    tag_t        tag;
  } mmu_cmd_t;

  typedef struct packed {
    simd_op_e    op;
    logic        a_from_mmu;
    logic        to_act;
    logic [19:0] a_addr;
    logic [19:0] b_addr;
    logic [19:0] d_addr;
    logic [19:0] count;
    tag_t        tag;
  } simd_cmd_t;

  // Transfer command for the DRAM or host interface.
  typedef struct packed {
    logic        store;      // 1: buffer -> outside, 0: outside -> buffer
    logic        weight;     // 1: weight buffer, 0: activation buffer
    logic [3:0]  bank;       // weight bank
    logic [19:0] buf_addr;
    logic [19:0] count;
    logic [23:0] ext_addr;
    tag_t        tag;
  } xfer_cmd_t;

  // Batch handed from the request dispatcher to the instruction dispatcher.
  typedef struct packed {
    logic        ctx;        // 0 inference, 1 training
    logic [15:0] first_id;   // ID of the first request in the batch
    logic [15:0] count;      // real (non-dummy) requests
  } batch_t;

  // im2col geometry (set at installation). An MMU activation address with
  // bit 19 set is an im2col window address whose low 19 bits are the fields
  // {oy, ox, ky, kx, cw}, from the top down, of widths given by lox, lky, lkx
  // and lcw (oy takes the remaining bits).
  typedef struct packed {
    logic [19:0] base;       // word address of the feature map, pixel (0,0)
    logic [9:0]  fh, fw;     // feature-map height and width in pixels
    logic [7:0]  cw;         // words per pixel (channels / W)
    logic [3:0]  kh, kw;     // kernel height and width
    logic [2:0]  stride;
    logic [2:0]  pad;        // zero padding on every side
    logic [3:0]  lcw, lkx, lky, lox;
  } conv_cfg_t;

  // ---------------------------------------------------------------------
  // bfloat16 helpers (truncating, subnormals flushed to zero, no NaN/Inf)
  // ---------------------------------------------------------------------
  function automatic logic [15:0] bf16_pack(input logic s, input int e, input logic [7:0] m);
    // m holds the significand 1.fffffff (m[7] = 1); e is the biased exponent
    if (e <= 0)        return 16'h0000;
    else if (e >= 255) return {s, 8'hFE, 7'h7F};
    else               return {s, e[7:0], m[6:0]};
  endfunction

  function automatic logic [15:0] bf16_mul(input logic [15:0] x, input logic [15:0] y);
    logic        s;
    logic [15:0] p;
    int          e;
    s = x[15] ^ y[15];
    if (x[14:7] == 8'd0 || y[14:7] == 8'd0) return 16'h0000;
    p = {8'd0, 1'b1, x[6:0]} * {8'd0, 1'b1, y[6:0]};
    e = int'(x[14:7]) + int'(y[14:7]) - 127;
    if (p[15]) begin
      e = e + 1;
      return bf16_pack(s, e, p[15:8]);
    end
    return bf16_pack(s, e, p[14:7]);
  endfunction

  function automatic logic [15:0] bf16_add(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] big, sml;
    logic [10:0] mb, ms;      // 1.fffffff plus 3 guard bits
    logic [11:0] sum;
    int          eb, d, k;
    if (x[14:7] == 8'd0) return (y[14:7] == 8'd0) ? 16'h0000 : y;
    if (y[14:7] == 8'd0) return x;
    if (x[14:0] >= y[14:0]) begin big = x; sml = y; end
    else                    begin big = y; sml = x; end
    eb = int'(big[14:7]);
    d  = eb - int'(sml[14:7]);
    mb = {1'b1, big[6:0], 3'b000};
    ms = (d > 10) ? 11'd0 : ({1'b1, sml[6:0], 3'b000} >> d);
    if (big[15] == sml[15]) sum = {1'b0, mb} + {1'b0, ms};
    else                      sum = {1'b0, mb} - {1'b0, ms};
    if (sum == 12'd0) return 16'h0000;
    if (sum[11]) return bf16_pack(big[15], eb + 1, sum[11:4]);
    k = 0;
    for (int i = 10; i >= 0; i--) begin
      if (sum[i]) begin k = 10 - i; break; end
    end
    sum = sum << k;
    return bf16_pack(big[15], eb - k, sum[10:3]);
  endfunction

  function automatic logic bf16_gt(input logic [15:0] x, input logic [15:0] y);
    // x > y, with +0 == -0
    logic xz, yz;
    xz = (x[14:7] == 8'd0);
    yz = (y[14:7] == 8'd0);
    if (xz && yz) return 1'b0;
    if (xz) return y[15];
    if (yz) return !x[15];
    if (x[15] != y[15]) return y[15];
    if (!x[15]) return x[14:0] > y[14:0];
    return x[14:0] < y[14:0];
  endfunction

  // Fixed-point accumulator times 2^exp -> bfloat16 (truncating).
  function automatic logic [15:0] fix_to_bf16(input logic signed [AW-1:0] acc,
                                               input logic signed [EW:0] exp);
    logic [AW-1:0] mag;
    int            msb, e;
    logic [7:0]    m;
    if (acc == '0) return 16'h0000;
    mag = acc[AW-1] ? (~acc + 1'b1) : acc;
    msb = 0;
    for (int i = 0; i < AW; i++) if (mag[i]) msb = i;
    if (msb >= 7) m = 8'(mag >> (msb - 7));
    else          m = 8'(mag << (7 - msb));
    e = msb + int'(exp) + 127;
    return bf16_pack(acc[AW-1], e, m);
  endfunction

  // bfloat16 -> 8-bit mantissa relative to a shared exponent.
  // maxe is the largest biased exponent in the block; the block's exponent is
  // maxe - 133, so the element with exponent maxe gets magnitude 64..127.
  function automatic logic [MW-1:0] bf16_to_mant(input logic [15:0] x, input logic [7:0] maxe);
    int         sh;
    logic [7:0] mag;
    if (x[14:7] == 8'd0) return '0;
    sh  = 1 + int'(maxe) - int'(x[14:7]);
    mag = (sh > 8) ? 8'd0 : ({1'b1, x[6:0]} >> sh);
    return x[15] ? (~mag + 1'b1) : mag;
  endfunction

endpackage
