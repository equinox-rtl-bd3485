// eqx_bf16_to_bfp: quantizer from bfloat16 SIMD results to block floating
// point, writing whole activation tiles into the activation buffer.
//
// It accepts N*W vectors (in_valid/in_ready), each holding one feature for the
// N batch rows, and remembers the activation-buffer address given with the
// first one. While collecting it tracks the largest exponent of the tile.
// Then, during N cycles, it writes the tile as N words: word t holds, for
// every row i, features t*W .. t*W+W-1 as signed 8-bit mantissas
// (symmetric range -127..127, truncated) and the shared 12-bit exponent
// (largest biased exponent - 133, so the largest element has magnitude
// 64..127). `in_ready` is low while writing; `idle` is high when nothing is
// collected or pending. Converting SIMD results back to block floating point
// before the activation buffer follows the design description; the block
// (one tile), the exponent choice and truncation are this design's choices.
module eqx_bf16_to_bfp
  import eqx_pkg::*;
#(
  parameter int N   = 143,
  parameter int W   = 4,
  parameter int AAW = 16,
  localparam int WORD = N*W*MW + EW,
  localparam int VCW  = $clog2(N*W + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [N-1:0][15:0] in_data,
  input  logic [AAW-1:0]     in_addr,
  output logic               act_we,
  output logic [AAW-1:0]     act_addr,
  output logic [WORD-1:0]    act_wdata,
  output logic               idle
);
  logic [N-1:0][15:0] stage [N*W];
  logic               writing;
  logic [VCW-1:0]     vcnt;      // vectors collected / words written
  logic [AAW-1:0]     base;
  logic [7:0]         maxe, vmax;

  assign in_ready = !writing;
  assign idle     = !writing && (vcnt == '0);

  // largest exponent within the incoming vector
  always_comb begin
    vmax = '0;
    for (int i = 0; i < N; i++) if (in_data[i][14:7] > vmax) vmax = in_data[i][14:7];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) stage[vcnt] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      writing <= 1'b0;
      vcnt    <= '0;
      base    <= '0;
      maxe    <= '0;
    end else if (!writing) begin
      if (in_valid) begin
        if (vcnt == '0) begin
          base <= in_addr;
          maxe <= vmax;
        end else if (vmax > maxe) begin
          maxe <= vmax;
        end
        if (vcnt == VCW'(N*W - 1)) begin
          writing <= 1'b1;
          vcnt    <= '0;
        end else begin
          vcnt <= vcnt + 1'b1;
        end
      end
    end else begin
      if (vcnt == VCW'(N - 1)) begin
        writing <= 1'b0;
        vcnt    <= '0;
      end else begin
        vcnt <= vcnt + 1'b1;
      end
    end
  end

  assign act_we   = writing;
  assign act_addr = base + AAW'(vcnt);

  always_comb begin
    act_wdata = '0;
    for (int k = 0; k < W; k++) begin
      for (int i = 0; i < N; i++) begin
        act_wdata[(i*W + k)*MW +: MW] = bf16_to_mant(stage[int'(vcnt)*W + k][i], maxe);
      end
    end
    act_wdata[WORD-1 -: EW] = EW'(signed'({4'd0, maxe}) - 12'sd133);
  end
endmodule
