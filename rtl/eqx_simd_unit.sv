// eqx_simd_unit: bfloat16 vector unit with its register file (5 MB by default).
//
// A vector has N lanes, one per batch row. A command processes `count`
// vectors: vector v takes operand A from the MMU output stream (when
// a_from_mmu) or from register a_addr+v, operand B from register b_addr+v,
// applies the lane operation (simd_op_e: pass, add, sub, mul, max, ReLU and
// the ReLU derivative used in back-propagation) and writes the result to
// register d_addr+v, or, when to_act, hands it to the block-floating-point
// quantizer that writes activation tiles starting at address d_addr.
// Each vector takes two cycles: register read, then execute and write. The
// command completes (`done_valid` with its tag) once its last result is
// written and, for activation results, the quantizer has finished writing.
// Operands from the MMU or the register file, results to the activation
// buffer, and training's derivative/loss operations follow the design
// description; the operation set, vector length and timing are this design's
// choices.
module eqx_simd_unit
  import eqx_pkg::*;
#(
  parameter int N   = 143,
  parameter int W   = 4,
  parameter longint RF_BYTES = 64'd5242880,
  parameter int AAW = 16,
  localparam int WORD  = N*W*MW + EW,
  localparam int RDEPTH = int'((RF_BYTES * 8) / longint'(N * 16)),
  localparam int RAW   = $clog2(RDEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmd_valid,
  output logic               cmd_ready,
  input  simd_cmd_t          cmd,
  // MMU result vectors
  input  logic               mmu_valid,
  output logic               mmu_ready,
  input  logic [N-1:0][15:0] mmu_data,
  // activation buffer write port
  output logic               act_we,
  output logic [AAW-1:0]     act_addr,
  output logic [WORD-1:0]    act_wdata,
  // completion
  output logic               done_valid,
  output tag_t               done_tag
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_EXEC, S_FLUSH} state_e;

  state_e             state;
  simd_cmd_t          cur;
  logic [19:0]        v;
  logic [N-1:0][15:0] rf [RDEPTH];
  logic [N-1:0][15:0] ra_q, rb_q, mmu_q, opa, res;
  logic               q_valid, q_ready, q_idle;

  function automatic logic [15:0] lane_op(input simd_op_e op, input logic [15:0] a,
                                          input logic [15:0] b);
    case (op)
      SIMD_PASS:  return a;
      SIMD_ADD:   return bf16_add(a, b);
      SIMD_SUB:   return bf16_add(a, {~b[15], b[14:0]});
      SIMD_MUL:   return bf16_mul(a, b);
      SIMD_MAX:   return bf16_gt(b, a) ? b : a;
      SIMD_RELU:  return bf16_gt(a, 16'h0000) ? a : 16'h0000;
      SIMD_DRELU: return bf16_gt(b, 16'h0000) ? a : 16'h0000;
      default:    return a;
    endcase
  endfunction

  assign cmd_ready = (state == S_IDLE);
  assign mmu_ready = (state == S_READ) && cur.a_from_mmu;
  assign opa       = cur.a_from_mmu ? mmu_q : ra_q;

  always_comb begin
    for (int l = 0; l < N; l++) res[l] = lane_op(cur.op, opa[l], rb_q[l]);
  end

  assign q_valid = (state == S_EXEC) && cur.to_act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      v          <= '0;
      done_valid <= 1'b0;
      done_tag   <= '0;
      mmu_q      <= '0;
    end else begin
      done_valid <= 1'b0;
      case (state)
        S_IDLE: if (cmd_valid) begin
          cur <= cmd;
          v   <= '0;
          if (cmd.count == '0) begin
            done_valid <= 1'b1;
            done_tag   <= cmd.tag;
          end else begin
            state <= S_READ;
          end
        end
        S_READ: if (!cur.a_from_mmu || mmu_valid) begin
          mmu_q <= mmu_data;
          state <= S_EXEC;
        end
        S_EXEC: if (!cur.to_act || q_ready) begin
          if (v == cur.count - 1'b1) begin
            state <= cur.to_act ? S_FLUSH : S_IDLE;
            if (!cur.to_act) begin
              done_valid <= 1'b1;
              done_tag   <= cur.tag;
            end
          end else begin
            v     <= v + 1'b1;
            state <= S_READ;
          end
        end
        S_FLUSH: if (q_idle) begin
          done_valid <= 1'b1;
          done_tag   <= cur.tag;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // register file: read in S_READ, written in S_EXEC
  always_ff @(posedge clk) begin
    if (state == S_READ) begin
      ra_q <= rf[RAW'(cur.a_addr + v)];
      rb_q <= rf[RAW'(cur.b_addr + v)];
    end
    if (state == S_EXEC && !cur.to_act) rf[RAW'(cur.d_addr + v)] <= res;
  end

  eqx_bf16_to_bfp #(.N(N), .W(W), .AAW(AAW)) u_quant (
    .clk, .rst_n,
    .in_valid(q_valid), .in_ready(q_ready), .in_data(res), .in_addr(AAW'(cur.d_addr)),
    .act_we, .act_addr, .act_wdata, .idle(q_idle)
  );
endmodule
