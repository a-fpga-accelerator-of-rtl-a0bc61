// gpe: gradient processing engine. Computes parameter gradients of one layer,
// dw[k][j] = x'_k * A'_k * x_j and db[k] = x'_k * A'_k, LANES weights per
// cycle.
//
// Inputs per cycle: the output gradient x'_k of neuron k, its stored sign bit
// (the ReLU derivative A'_k) and LANES forward inputs x_j of the layer. The IC
// module passes x_j or 0 depending on the sign bit; the multiplier array
// multiplies by the broadcast x'_k. The bias gradient is the gated x'_k
// itself. Address tags travel with the data so the results can be added into
// the right gradient-buffer words.
// Timing: registered, all outputs one cycle after valid.
module gpe
  import a3c_pkg::*;
#(
  parameter int LANES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  logic   b_en,
  input  fp32_t  gk,
  input  logic   sel,
  input  fp32_t  x [LANES],
  input  paddr_t w_addr_in,
  input  paddr_t b_addr_in,
  output fp32_t  dw [LANES],
  output fp32_t  db,
  output paddr_t w_addr,
  output paddr_t b_addr,
  output logic   dw_valid,
  output logic   db_valid
);
  fp32_t xg [LANES];

  always_comb
    for (int j = 0; j < LANES; j++) xg[j] = sel ? x[j] : FP_ZERO;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dw_valid <= 1'b0;
      db_valid <= 1'b0;
      db       <= FP_ZERO;
      w_addr   <= '0;
      b_addr   <= '0;
      for (int j = 0; j < LANES; j++) dw[j] <= FP_ZERO;
    end else begin
      dw_valid <= valid;
      db_valid <= valid && b_en;
      if (valid) begin
        for (int j = 0; j < LANES; j++) dw[j] <= fp_mul(gk, xg[j]);
        db     <= sel ? gk : FP_ZERO;
        w_addr <= w_addr_in;
        b_addr <= b_addr_in;
      end
    end
  end
endmodule
