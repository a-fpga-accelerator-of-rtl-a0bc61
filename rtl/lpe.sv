// lpe: loss-gradient processing engine. From the softmax output z (policy
// probabilities) and the advantage delta = R - v of one time step it forms
// the gradient that training propagates back from the output layer.
//
// Actor module: X'pi[j] = c * sum_k (1 - ln z_k) * J[k][j] + delta * (e_i[j] - z_j)
// with J the softmax Jacobian (J[k][k] = z_k(1 - z_k), J[k][j] = -z_k z_j) and
// e_i the one-hot vector of the largest probability z_i. It is built from a
// -z_k*z_j multiplier bank, a -ln unit and adder forming (1 - ln z), a
// multiplier array and add tree for the vector-matrix product, a multiplier
// by c, a multiplexer choosing -z_j or 1 - z_j, a multiplier by delta and a
// final adder. Critic module: reuses one multiplier to form -2*delta, the
// loss gradient at the linear value output; multiplying it by the value
// weights (X'v = -2*delta*w) is done by the backward engine on its way to the
// last shared layer.
// Output: g[0..3] = -X'pi (X'pi ascends the actor objective; its negation is
// the descent direction), g[4] = -2*delta. Registered, one cycle after valid.
module lpe
  import a3c_pkg::*;
#(
  parameter fp32_t ENT_C = 32'h3C23_D70A   // entropy weight c = 0.01
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  fp32_t z [NUM_ACT],
  input  fp32_t delta,
  output fp32_t g [OUT_ROWS],
  output logic  g_valid
);
  fp32_t gn [OUT_ROWS];

  always_comb begin
    fp32_t one_m_ln [NUM_ACT];
    fp32_t jac [NUM_ACT][NUM_ACT];
    fp32_t acc, sel;
    int    imax;
    imax = 0;
    for (int k = 1; k < NUM_ACT; k++)
      if (fp_sub(z[k], z[imax])[31] == 1'b0 && !fp_is_zero(fp_sub(z[k], z[imax]))) imax = k;
    for (int k = 0; k < NUM_ACT; k++) begin
      one_m_ln[k] = fp_add(fp_neg(fp_ln(z[k])), FP_ONE);
      for (int j = 0; j < NUM_ACT; j++)
        jac[k][j] = (k == j) ? fp_mul(z[k], fp_add(fp_neg(z[k]), FP_ONE))
                             : fp_mul(z[k], fp_neg(z[j]));
    end
    for (int j = 0; j < NUM_ACT; j++) begin
      acc = FP_ZERO;
      for (int k = 0; k < NUM_ACT; k++) acc = fp_add(acc, fp_mul(one_m_ln[k], jac[k][j]));
      sel   = (j == imax) ? fp_add(fp_neg(z[j]), FP_ONE) : fp_neg(z[j]);
      gn[j] = fp_neg(fp_add(fp_mul(acc, ENT_C), fp_mul(delta, sel)));
    end
    gn[NUM_ACT] = fp_mul(delta, 32'hC000_0000);   // -2 * delta
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_valid <= 1'b0;
      for (int i = 0; i < OUT_ROWS; i++) g[i] <= FP_ZERO;
    end else begin
      g_valid <= valid;
      if (valid) g <= gn;
    end
  end
endmodule
