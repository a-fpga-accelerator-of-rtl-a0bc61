// param_update: parameter update module of the RMSProp unit.
//
// Given an agent number it sweeps the whole parameter space, LANES words per
// cycle, and applies RMSProp with that agent's aggregated gradient dtheta:
//   g       <= RHO * g + (1 - RHO) * dtheta^2
//   theta_c <= theta_c + LRN * dtheta / sqrt(g + EPS)
// where g is the shared mean-square memory and LRN the learning rate with a
// minus sign (a descent step). As each gradient word is read it is cleared,
// leaving the agent's gradient buffer empty for its next rollout.
// Pipeline (LANES lanes wide): cycle 0 reads gradient, g and theta at rd_addr
// (combinational reads) and clears the gradient; cycle 1 forms the new g;
// cycle 2 forms the new theta and writes theta and g back. A sweep of P
// parameters ends with a done pulse ceil(P/LANES) + 2 cycles after the
// cycle that accepts start.
// The RMSProp formula and the multiplier/adder/1/sqrt/register structure
// follow the unit's description; the lane count, stage split and constants
// are this design's choices.
module param_update
  import a3c_pkg::*;
#(
  parameter int    LANES = 8,
  parameter int    AGW   = 3,
  parameter int    P     = NUM_PARAMS,
  parameter fp32_t RHO   = 32'h3F7D_70A4,   // 0.99
  parameter fp32_t LRN   = 32'hBA37_8034,   // -7e-4
  parameter fp32_t EPS   = 32'h3DCC_CCCD    // 0.1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [AGW-1:0]  start_agent,
  output logic            busy,
  output logic            done,
  output logic [AGW-1:0]  agent,
  // read side (combinational memories), gradient cleared on read
  output logic            rd_en,
  output paddr_t          rd_addr,
  output logic [LANES-1:0] rd_mask,
  input  fp32_t           grad_rd [LANES],
  input  fp32_t           ms_rd   [LANES],
  input  fp32_t           th_rd   [LANES],
  // write side
  output logic            wr_en,
  output paddr_t          wr_addr,
  output logic [LANES-1:0] wr_mask,
  output fp32_t           th_wr   [LANES],
  output fp32_t           ms_wr   [LANES]
);
  localparam fp32_t ONE_M_RHO = fp_sub(FP_ONE, RHO);

  logic            run;
  int              addr;
  // stage 1
  logic            v1;
  paddr_t          a1;
  logic [LANES-1:0] m1;
  fp32_t           d1 [LANES], g1 [LANES], t1 [LANES];
  // stage 2
  logic            v2;
  paddr_t          a2;
  logic [LANES-1:0] m2;
  fp32_t           d2 [LANES], g2 [LANES], t2 [LANES];

  assign busy    = run || v1 || v2;
  assign rd_en   = run;
  assign rd_addr = paddr_t'(addr);
  always_comb
    for (int i = 0; i < LANES; i++) rd_mask[i] = (addr + i) < P;

  assign wr_en   = v2;
  assign wr_addr = a2;
  assign wr_mask = m2;
  always_comb
    for (int i = 0; i < LANES; i++) begin
      ms_wr[i] = g2[i];
      th_wr[i] = fp_add(t2[i], fp_mul(fp_mul(LRN, d2[i]), fp_rsqrt(fp_add(g2[i], EPS))));
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run   <= 1'b0;
      addr  <= 0;
      agent <= '0;
      done  <= 1'b0;
      v1 <= 1'b0; v2 <= 1'b0;
      a1 <= '0;   a2 <= '0;
      m1 <= '0;   m2 <= '0;
      for (int i = 0; i < LANES; i++) begin
        d1[i] <= FP_ZERO; g1[i] <= FP_ZERO; t1[i] <= FP_ZERO;
        d2[i] <= FP_ZERO; g2[i] <= FP_ZERO; t2[i] <= FP_ZERO;
      end
    end else begin
      done <= v2 && !v1 && !run;
      if (start && !busy) begin
        run   <= 1'b1;
        addr  <= 0;
        agent <= start_agent;
      end else if (run) begin
        if (addr + LANES >= P) run <= 1'b0;
        addr <= addr + LANES;
      end
      // stage 1: capture the reads
      v1 <= run;
      a1 <= rd_addr;
      m1 <= rd_mask;
      d1 <= grad_rd;
      g1 <= ms_rd;
      t1 <= th_rd;
      // stage 2: new mean square
      v2 <= v1;
      a2 <= a1;
      m2 <= m1;
      for (int i = 0; i < LANES; i++)
        g2[i] <= fp_add(fp_mul(RHO, g1[i]), fp_mul(ONE_M_RHO, fp_mul(d1[i], d1[i])));
      d2 <= d1;
      t2 <= t1;
    end
  end
endmodule
