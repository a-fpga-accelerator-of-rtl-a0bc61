// mult_addtree: the Multiplier-AddTree module of a forward processing engine.
//
// LANES inputs x[i] are multiplied by LANES weights w[i] in parallel and the
// products are summed by a balanced adder tree. A final adder adds either the
// neuron bias b (first = 1, the first chunk of a neuron) or the running
// partial sum acc_in (first = 0), so a neuron whose fan-in is wider than
// LANES is computed over several consecutive chunks.
// Timing: one chunk per cycle; y and y_valid are registered, one cycle after
// the inputs. Arithmetic is FP32 (a3c_pkg).
// The parallel multipliers, the adder tree and the bias multiplexer follow
// the engine structure of the accelerator; using the same multiplexer to
// select the running sum for chunked accumulation is this design's choice.
module mult_addtree
  import a3c_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  logic  first,
  input  fp32_t x [LANES],
  input  fp32_t w [LANES],
  input  fp32_t b,
  input  fp32_t acc_in,
  output fp32_t y,
  output logic  y_valid
);
  localparam int P2 = 1 << $clog2(LANES);

  fp32_t sum;

  always_comb begin
    fp32_t lvl [P2];
    for (int i = 0; i < P2; i++) lvl[i] = (i < LANES) ? fp_mul(x[i], w[i]) : FP_ZERO;
    for (int s = P2 / 2; s >= 1; s = s / 2)
      for (int i = 0; i < s; i++) lvl[i] = fp_add(lvl[2*i], lvl[2*i+1]);
    sum = fp_add(lvl[0], first ? b : acc_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y       <= FP_ZERO;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid;
      if (valid) y <= sum;
    end
  end
endmodule
