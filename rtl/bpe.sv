// bpe: backward processing engine. Propagates the gradient of one layer's
// outputs back to that layer's inputs for a chunk of LANES inputs.
//
// Each cycle it takes the gradient x'_k of one output neuron k, the stored
// sign bit of that neuron (its ReLU derivative) and the LANES weights
// w[k][j0..j0+LANES-1] (the same row-major rows the forward engine reads).
// The IC module replaces the weights by 0 when the sign bit is 0; the
// Multiplier-Acc module multiplies the gated weights by the broadcast x'_k
// and adds the products into LANES accumulators, which after the last
// neuron hold y'_j = sum_k x'_k * A'_k * w[k][j]. Accumulating over the rows
// of the forward weight layout is what gives the transposed product without
// a second copy of the weights.
// Timing: one neuron per cycle; 'clear' restarts the accumulators with the
// first product, 'last' marks the final neuron, and y_valid pulses with the
// completed y' one cycle later.
module bpe
  import a3c_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  logic  clear,
  input  logic  last,
  input  fp32_t gk,
  input  logic  sel,
  input  fp32_t w  [LANES],
  output fp32_t yp [LANES],
  output logic  y_valid
);
  fp32_t wg [LANES];

  // IC module: ReLU derivative applied by gating the weights
  always_comb
    for (int j = 0; j < LANES; j++) wg[j] = sel ? w[j] : FP_ZERO;

  // Multiplier-Acc module
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      for (int j = 0; j < LANES; j++) yp[j] <= FP_ZERO;
    end else begin
      y_valid <= valid && last;
      if (valid)
        for (int j = 0; j < LANES; j++)
          yp[j] <= fp_add(clear ? FP_ZERO : yp[j], fp_mul(gk, wg[j]));
    end
  end
endmodule
