// eqx_bfp_to_bf16: converts a vector of 25-bit fixed-point accumulators that
// share one block exponent into bfloat16, one lane per accumulator.
//
// Each lane finds the leading one of the magnitude, keeps the 8 bits from it
// downwards (truncating the rest), and sets the exponent to the position of
// the leading one plus the shared exponent plus the bfloat16 bias. Results
// below the smallest normal number become zero; results above the largest
// finite number saturate. Purely combinational.
// The conversion point (MMU output towards the SIMD unit) follows the design
// description; truncation and saturation are this design's choices.
module eqx_bfp_to_bf16
  import eqx_pkg::*;
#(
  parameter int LANES = 143
) (
  input  logic [LANES-1:0][AW-1:0] acc,
  input  logic signed [EW:0]       exp,
  output logic [LANES-1:0][15:0]   bf
);
  always_comb begin
    for (int l = 0; l < LANES; l++) bf[l] = fix_to_bf16(acc[l], exp);
  end
endmodule
