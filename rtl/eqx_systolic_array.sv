// eqx_systolic_array: an N x N grid of W-wide PEs with the block-exponent
// adder and exponent FIFO of one systolic array.
//
// Row i receives the activation blocks of batch row i from the left (a_row[i],
// already skewed by i cycles); column j receives the weight blocks of output
// column j from the top (w_col[j], skewed by j cycles). After a tile has
// streamed through, PE(i,j) holds output element (i,j) in fixed point.
// When `exp_push` is high, the adder sums the activation and weight tile
// exponents and stores the result in the FIFO; it stays there, in step with
// the tile whose results sit in the PEs, until the tile has been drained
// (`exp_pop`). Pulsing `drain` shifts every row left by one PE: out_col[i] is
// the accumulator of PE(i,0), i.e. column 0 first, then column 1, and so on.
// The exponent adder and FIFO follow the design description; FIFO depth and
// the 13-bit exponent sum are this design's choices.
module eqx_systolic_array
  import eqx_pkg::*;
#(
  parameter int N           = 143,
  parameter int W           = 4,
  parameter int EFIFO_DEPTH = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][W*MW-1:0] a_row,
  input  logic [N-1:0]          a_vld,
  input  logic [N-1:0]          a_first,
  input  logic [N-1:0][W*MW-1:0] w_col,
  input  logic                  exp_push,
  input  logic signed [EW-1:0]  exp_a,
  input  logic signed [EW-1:0]  exp_w,
  input  logic                  exp_pop,
  output logic                  exp_valid,
  output logic signed [EW:0]    out_exp,
  input  logic                  drain,
  output logic [N-1:0][AW-1:0]  out_col
);
  logic [W*MW-1:0]      a_h   [N][N+1];
  logic                 v_h   [N][N+1];
  logic                 f_h   [N][N+1];
  logic [W*MW-1:0]      w_v   [N+1][N];
  logic signed [AW-1:0] acc   [N][N+1];
  logic signed [EW:0]   exp_sum;
  logic                 efifo_ready;

  for (genvar i = 0; i < N; i++) begin : g_row
    assign a_h[i][0] = a_row[i];
    assign v_h[i][0] = a_vld[i];
    assign f_h[i][0] = a_first[i];
    assign acc[i][N] = '0;
    assign out_col[i] = acc[i][0];
    for (genvar j = 0; j < N; j++) begin : g_col
      if (i == 0) begin : g_top
        assign w_v[0][j] = w_col[j];
      end
      eqx_pe #(.W(W)) u_pe (
        .clk, .rst_n,
        .a_in(a_h[i][j]), .a_vld_in(v_h[i][j]), .a_first_in(f_h[i][j]),
        .w_in(w_v[i][j]), .drain, .acc_in(acc[i][j+1]),
        .a_out(a_h[i][j+1]), .a_vld_out(v_h[i][j+1]), .a_first_out(f_h[i][j+1]),
        .w_out(w_v[i+1][j]), .acc(acc[i][j])
      );
    end
  end

  // Exponent of a product block = sum of the operand exponents.
  assign exp_sum = (EW+1)'(exp_a) + (EW+1)'(exp_w);

  eqx_fifo #(.DW(EW+1), .DEPTH(EFIFO_DEPTH)) u_exp_fifo (
    .clk, .rst_n,
    .in_valid(exp_push), .in_ready(efifo_ready), .in_data(exp_sum),
    .out_valid(exp_valid), .out_ready(exp_pop), .out_data(out_exp),
    .count()
  );

  assert property (@(posedge clk) disable iff (!rst_n) exp_push |-> efifo_ready);
endmodule
