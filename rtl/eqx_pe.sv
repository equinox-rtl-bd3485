// eqx_pe: one w-wide processing element of an output-stationary systolic array.
//
// Each cycle in which a valid activation block arrives from the left, the PE
// multiplies the W signed 8-bit activation mantissas by the W signed 8-bit
// weight mantissas arriving from above and adds the W products to its 25-bit
// fixed-point accumulator (cleared first when the block is the first of a
// tile). Activations, their valid/first flags and weights are registered and
// passed to the right and downwards, one cycle per hop. While `drain` is high
// the accumulator instead takes the value of its right-hand neighbour, so a
// row of PEs shifts its results out at column 0.
// The 8-bit multipliers, the 25-bit accumulators and the left-to-right /
// top-to-bottom flow follow the design description; keeping the outputs in
// the PEs (output-stationary) and the drain path are this design's choices.
module eqx_pe
  import eqx_pkg::*;
#(
  parameter int W = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [W*MW-1:0]     a_in,
  input  logic                a_vld_in,
  input  logic                a_first_in,
  input  logic [W*MW-1:0]     w_in,
  input  logic                drain,
  input  logic signed [AW-1:0] acc_in,
  output logic [W*MW-1:0]     a_out,
  output logic                a_vld_out,
  output logic                a_first_out,
  output logic [W*MW-1:0]     w_out,
  output logic signed [AW-1:0] acc
);
  logic signed [AW-1:0] dot;

  always_comb begin
    dot = '0;
    for (int k = 0; k < W; k++) begin
      dot = dot + AW'($signed(a_in[k*MW +: MW]) * $signed(w_in[k*MW +: MW]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out       <= '0;
      a_vld_out   <= 1'b0;
      a_first_out <= 1'b0;
      w_out       <= '0;
      acc         <= '0;
    end else begin
      a_out       <= a_in;
      a_vld_out   <= a_vld_in;
      a_first_out <= a_first_in;
      w_out       <= w_in;
      if (drain)         acc <= acc_in;
      else if (a_vld_in) acc <= (a_first_in ? '0 : acc) + dot;
    end
  end
endmodule
