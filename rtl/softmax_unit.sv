// softmax_unit: the Softmax module of a forward processing engine.
//
// Turns the N policy logits x into probabilities pi[i] = e^x[i] / sum_j e^x[j]:
// N exponential units, an adder chain forming the sum and N dividers, as in
// the engine's softmax structure. The inputs are not shifted by their maximum
// before exponentiation (the structure exponentiates the logits directly);
// FP32 keeps this exact enough for logits within about +-80.
// Timing: the result is registered; pi_valid follows valid by one cycle.
module softmax_unit
  import a3c_pkg::*;
#(
  parameter int N = NUM_ACT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  fp32_t x  [N],
  output fp32_t pi [N],
  output logic  pi_valid
);
  fp32_t e   [N];
  fp32_t q   [N];
  fp32_t sum;

  always_comb begin
    sum = FP_ZERO;
    for (int i = 0; i < N; i++) begin
      e[i] = fp_exp(x[i]);
      sum  = fp_add(sum, e[i]);
    end
    for (int i = 0; i < N; i++) q[i] = fp_div(e[i], sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pi_valid <= 1'b0;
      for (int i = 0; i < N; i++) pi[i] <= FP_ZERO;
    end else begin
      pi_valid <= valid;
      if (valid) pi <= q;
    end
  end
endmodule
