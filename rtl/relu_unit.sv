// relu_unit: the ReLU module of a forward processing engine.
//
// Combinational: y = max(0, x) on an FP32 word. Negative inputs and negative
// zero give +0, so a later test y > 0 cleanly separates active neurons.
module relu_unit
  import a3c_pkg::*;
(
  input  fp32_t x,
  output fp32_t y
);
  always_comb y = fp_pos(x) ? x : FP_ZERO;
endmodule
