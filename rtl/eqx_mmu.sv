// eqx_mmu: matrix multiply unit, a row of M output-stationary systolic arrays
// of N x N W-wide PEs (vector-matrix mode).
//
// One command multiplies one activation tile by M weight tiles and produces M
// output tiles. An activation tile is N batch rows by N*W inputs, stored as N
// consecutive activation-buffer words; word t holds, for every row i, the W
// mantissas of inputs t*W .. t*W+W-1, plus the tile's 12-bit exponent. A
// weight tile is N*W inputs by N outputs, stored as N consecutive words in the
// weight-buffer bank of its array; word t holds, for every output column j,
// the W mantissas of inputs t*W .. t*W+W-1, plus the tile exponent.
//
// Operation: the command is accepted when the previous results have been
// drained. The unit then reads one activation word and M weight words per
// cycle for N cycles (one-cycle buffer latency; the activation address is
// the command's full 20-bit address, so that it can also name the im2col
// window, see eqx_im2col), skews row i by i cycles and
// column j by j cycles, and broadcasts the activation rows to all M arrays.
// The tile exponents of the first words go to each array's exponent adder and
// FIFO. 3*N+1 cycles after the command handshake, `done_valid` pulses with
// the command's tag. The results are then drained through `out_*`, one vector
// per handshake: array 0 column 0, array 0 column 1, ..., array M-1 column
// N-1 (M*N vectors; `out_last` marks the last). A vector holds the N batch
// rows of one output column, converted to bfloat16 with the array's exponent.
// The tile shapes, array organisation and bfloat16 conversion follow the
// design description; broadcasting rather than chaining the activations
// between arrays, the drain order and the stall until drained are this
// design's choices. Verilator's SYNCASYNCNET warning on rst_n comes from the
// `disable iff` of the drain assertion at the end, not from the logic: all
// flops use the asynchronous reset.
module eqx_mmu
  import eqx_pkg::*;
#(
  parameter int N   = 143,
  parameter int M   = 4,
  parameter int W   = 4,
  parameter int WAW = 15,
  localparam int WORD = N*W*MW + EW
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // command
  input  logic                   cmd_valid,
  output logic                   cmd_ready,
  input  mmu_cmd_t               cmd,
  // activation buffer read port
  output logic                   act_rd_en,
  output logic [19:0]            act_rd_addr,
  input  logic [WORD-1:0]        act_rd_data,
  // weight buffer read ports (same address in every bank)
  output logic                   wgt_rd_en,
  output logic [WAW-1:0]         wgt_rd_addr,
  input  logic [M-1:0][WORD-1:0] wgt_rd_data,
  // completion
  output logic                   done_valid,
  output tag_t                   done_tag,
  // result vectors towards the SIMD unit
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic [N-1:0][15:0]     out_data,
  output logic                   out_last,
  output logic                   stall       // command waiting for a drain
);
  typedef enum logic [1:0] {S_IDLE, S_FEED, S_FLUSH} state_e;
  localparam int CNTW = $clog2(2*N + 1);
  localparam int AIW  = (M > 1) ? $clog2(M) : 1;

  state_e             state;
  mmu_cmd_t           cur;
  logic [CNTW-1:0]    cnt;
  logic               results_pending;
  logic               rd_vld_q, rd_first_q;
  logic [AIW-1:0]     dr_arr;
  logic [CNTW-1:0]    dr_col;

  // array-side signals
  logic [N-1:0][W*MW-1:0] a_sk;
  logic [N-1:0]           v_sk, f_sk;
  logic [M-1:0][N-1:0][W*MW-1:0] w_sk;
  logic [M-1:0]           drain, exp_pop, exp_valid;
  logic signed [EW:0]     arr_exp [M];
  logic [N-1:0][AW-1:0]   arr_out [M];

  assign cmd_ready = (state == S_IDLE) && !results_pending;
  assign stall     = cmd_valid && (state == S_IDLE) && results_pending;

  // ---------------- sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      cnt        <= '0;
      rd_vld_q   <= 1'b0;
      rd_first_q <= 1'b0;
      done_valid <= 1'b0;
      done_tag   <= '0;
    end else begin
      done_valid <= 1'b0;
      rd_vld_q   <= (state == S_FEED);
      rd_first_q <= (state == S_FEED) && (cnt == '0);
      case (state)
        S_IDLE: if (cmd_valid && cmd_ready) begin
          cur   <= cmd;
          cnt   <= '0;
          state <= S_FEED;
        end
        S_FEED: begin
          if (cnt == CNTW'(N - 1)) begin
            cnt   <= CNTW'(2*N - 1);
            state <= S_FLUSH;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_FLUSH: begin
          if (cnt == '0) begin
            done_valid <= 1'b1;
            done_tag   <= cur.tag;
            state      <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign act_rd_en   = (state == S_FEED);
  assign act_rd_addr = cur.act_addr + 20'(cnt);
  assign wgt_rd_en   = (state == S_FEED);
  assign wgt_rd_addr = WAW'(cur.wgt_addr + 20'(cnt));

  // ---------------- skew ----------------
  for (genvar i = 0; i < N; i++) begin : g_askew
    logic [W*MW+1:0] d0;
    assign d0 = {rd_vld_q, rd_vld_q && rd_first_q, act_rd_data[i*W*MW +: W*MW]};
    if (i == 0) begin : g_nodelay
      assign {v_sk[i], f_sk[i], a_sk[i]} = d0;
    end else begin : g_delay
      logic [W*MW+1:0] sr [i];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int k = 0; k < i; k++) sr[k] <= '0;
        end else begin
          sr[0] <= d0;
          for (int k = 1; k < i; k++) sr[k] <= sr[k-1];
        end
      end
      assign {v_sk[i], f_sk[i], a_sk[i]} = sr[i-1];
    end
  end

  for (genvar a = 0; a < M; a++) begin : g_arr
    for (genvar j = 0; j < N; j++) begin : g_wskew
      if (j == 0) begin : g_nodelay
        assign w_sk[a][j] = wgt_rd_data[a][j*W*MW +: W*MW];
      end else begin : g_delay
        logic [W*MW-1:0] sr [j];
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            for (int k = 0; k < j; k++) sr[k] <= '0;
          end else begin
            sr[0] <= wgt_rd_data[a][j*W*MW +: W*MW];
            for (int k = 1; k < j; k++) sr[k] <= sr[k-1];
          end
        end
        assign w_sk[a][j] = sr[j-1];
      end
    end

    eqx_systolic_array #(.N(N), .W(W)) u_sa (
      .clk, .rst_n,
      .a_row(a_sk), .a_vld(v_sk), .a_first(f_sk), .w_col(w_sk[a]),
      .exp_push(rd_vld_q && rd_first_q),
      .exp_a(act_rd_data[WORD-1 -: EW]),
      .exp_w(wgt_rd_data[a][WORD-1 -: EW]),
      .exp_pop(exp_pop[a]), .exp_valid(exp_valid[a]), .out_exp(arr_exp[a]),
      .drain(drain[a]), .out_col(arr_out[a])
    );
  end

  // ---------------- drain ----------------
  // Results are ready once the exponent of the tile is in the FIFO and the
  // flush has finished.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      results_pending <= 1'b0;
      dr_arr          <= '0;
      dr_col          <= '0;
    end else begin
      if (state == S_FLUSH && cnt == '0) begin
        results_pending <= 1'b1;
        dr_arr          <= '0;
        dr_col          <= '0;
      end else if (out_valid && out_ready) begin
        if (dr_col == CNTW'(N - 1)) begin
          dr_col <= '0;
          if (dr_arr == AIW'(M - 1)) results_pending <= 1'b0;
          else                       dr_arr <= dr_arr + 1'b1;
        end else begin
          dr_col <= dr_col + 1'b1;
        end
      end
    end
  end

  assign out_valid = results_pending;
  assign out_last  = (dr_arr == AIW'(M - 1)) && (dr_col == CNTW'(N - 1));

  always_comb begin
    for (int a = 0; a < M; a++) begin
      drain[a]   = out_valid && out_ready && (dr_arr == AIW'(a));
      exp_pop[a] = drain[a] && (dr_col == CNTW'(N - 1));
    end
  end

  eqx_bfp_to_bf16 #(.LANES(N)) u_cvt (
    .acc(arr_out[dr_arr]), .exp(arr_exp[dr_arr]), .bf(out_data)
  );

  assert property (@(posedge clk) disable iff (!rst_n) results_pending |-> exp_valid[dr_arr]);
endmodule
