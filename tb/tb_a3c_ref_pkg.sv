// tb_a3c_ref_pkg: real-valued (double precision) reference model of the
// agent network and its A3C gradients, used by the engine and system
// testbenches. It mirrors the mathematics, not the hardware: plain loops
// over the same parameter layout (a3c_pkg::w_base/b_base, row-major weights).
//   forward()  : layer outputs of one step (index 0 = state, 4 = outputs)
//   add_grad() : adds one step's descent gradient into gsum[]
// Gradient of one step: output rows 0..3 get -(c*(1-ln z)^T J + delta*(e_i - z)),
// row 4 gets -2*delta; it is propagated through the ReLU layers and
// dW = g * x, db = g accumulated.
package tb_a3c_ref_pkg;
  import a3c_pkg::*;

  real th   [NUM_PARAMS];
  real gsum [NUM_PARAMS];

  function automatic void forward(input real s [128], output real a [5][256], output real pi [NUM_ACT]);
    real sum, e [NUM_ACT], es;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 256; j++) a[i][j] = 0.0;
    for (int j = 0; j < 128; j++) a[0][j] = s[j];
    for (int l = 0; l < NUM_LAYERS; l++)
      for (int k = 0; k < layer_out(l); k++) begin
        sum = th[b_base(l) + k];
        for (int j = 0; j < layer_in(l); j++) sum += th[w_base(l) + k * layer_in(l) + j] * a[l][j];
        a[l + 1][k] = (l < 3 && sum < 0.0) ? 0.0 : sum;
      end
    es = 0.0;
    for (int i = 0; i < NUM_ACT; i++) begin e[i] = $exp(a[4][i]); es += e[i]; end
    for (int i = 0; i < NUM_ACT; i++) pi[i] = e[i] / es;
  endfunction

  function automatic void out_grad(input real pi [NUM_ACT], input real delta, input real c,
                                   output real g [OUT_ROWS]);
    int imax;
    real acc, jkj;
    imax = 0;
    for (int i = 1; i < NUM_ACT; i++) if (pi[i] > pi[imax]) imax = i;
    for (int j = 0; j < NUM_ACT; j++) begin
      acc = 0.0;
      for (int k = 0; k < NUM_ACT; k++) begin
        jkj = (k == j) ? pi[k] * (1.0 - pi[k]) : -pi[k] * pi[j];
        acc += (1.0 - $ln(pi[k])) * jkj;
      end
      g[j] = -(c * acc + delta * (((j == imax) ? 1.0 : 0.0) - pi[j]));
    end
    g[NUM_ACT] = -2.0 * delta;
  endfunction

  function automatic void add_grad(input real a [5][256], input real gout [OUT_ROWS]);
    real g [256], gn [256];
    for (int j = 0; j < 256; j++) g[j] = 0.0;
    for (int j = 0; j < OUT_ROWS; j++) g[j] = gout[j];
    for (int l = NUM_LAYERS - 1; l >= 0; l--) begin
      for (int j = 0; j < 256; j++) gn[j] = 0.0;
      for (int k = 0; k < layer_out(l); k++) begin
        if (l < 3 && !(a[l + 1][k] > 0.0)) continue;   // ReLU derivative
        gsum[b_base(l) + k] += g[k];
        for (int j = 0; j < layer_in(l); j++) begin
          gsum[w_base(l) + k * layer_in(l) + j] += g[k] * a[l][j];
          gn[j] += g[k] * th[w_base(l) + k * layer_in(l) + j];
        end
      end
      g = gn;
    end
  endfunction
endpackage
