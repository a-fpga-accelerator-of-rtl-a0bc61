// rmsprop_unit: asynchronous update of the central agent's parameters.
//
// Gradient value buffers: one buffer of P words per agent. The gradient
// aggregation module is an adder array per training slot: every gradient
// word a gradient engine produces (LANES weight gradients and, at the start
// of a row, one bias gradient) is added into the buffer of the agent that
// slot trains, so the gradients of all steps of a rollout are summed.
// When a training slot reports an agent finished (fin_valid/fin_ready; the
// lowest slot wins when several report together) the agent number enters a
// FIFO. Whenever the parameter update module is idle it takes the oldest
// number, reads that agent's buffer and the central parameters and applies
// RMSProp (see param_update), clearing the buffer. upd_done pulses with the
// agent number when its update is complete.
// After reset a sweep of ceil(P/LANES) cycles clears all buffers and g
// (init_busy); no gradients may arrive before it ends.
// The central parameters live in the memory unit; this unit reaches them
// through the th_* ports. The mean-square memory g is kept here.
module rmsprop_unit
  import a3c_pkg::*;
#(
  parameter int    NAG   = 8,
  parameter int    AGW   = 3,
  parameter int    NSLOT = 6,
  parameter int    LANES = 8,
  parameter int    P     = NUM_PARAMS,
  parameter fp32_t RHO   = 32'h3F7D_70A4,
  parameter fp32_t LRN   = 32'hBA37_8034,
  parameter fp32_t EPS   = 32'h3DCC_CCCD
) (
  input  logic            clk,
  input  logic            rst_n,
  // gradient aggregation, one port per training slot
  input  logic            dw_valid [NSLOT],
  input  logic [AGW-1:0]  agg_agent [NSLOT],
  input  paddr_t          w_addr   [NSLOT],
  input  fp32_t           dw       [NSLOT][LANES],
  input  logic            db_valid [NSLOT],
  input  paddr_t          b_addr   [NSLOT],
  input  fp32_t           db       [NSLOT],
  // rollout finished
  input  logic            fin_valid [NSLOT],
  input  logic [AGW-1:0]  fin_agent [NSLOT],
  output logic            fin_ready [NSLOT],
  // central parameters
  output paddr_t          th_rd_addr,
  input  fp32_t           th_rd    [LANES],
  output logic            th_wr_en,
  output paddr_t          th_wr_addr,
  output logic [LANES-1:0] th_wr_mask,
  output fp32_t           th_wr    [LANES],
  // status
  output logic            upd_done,
  output logic [AGW-1:0]  upd_agent,
  output logic            upd_busy,
  output logic            init_busy
);
  fp32_t grad [NAG][P];
  fp32_t ms   [P];

  // ---- FIFO of finished agents ----
  logic           push, pop, empty, full;
  logic [AGW-1:0] push_agent, head;

  always_comb begin
    push       = 1'b0;
    push_agent = '0;
    for (int s = 0; s < NSLOT; s++) fin_ready[s] = 1'b0;
    for (int s = NSLOT - 1; s >= 0; s--)
      if (fin_valid[s] && !full) begin
        push       = 1'b1;
        push_agent = fin_agent[s];
      end
    for (int s = 0; s < NSLOT; s++)
      if (fin_valid[s] && !full && push_agent == fin_agent[s]) fin_ready[s] = 1'b1;
  end

  agent_fifo #(.DEPTH(NAG), .W(AGW)) u_fifo (
    .clk, .rst_n, .push, .din(push_agent), .pop, .dout(head), .empty, .full
  );

  // ---- parameter update ----
  logic             rd_en, wr_en;
  paddr_t           rd_addr, wr_addr;
  logic [LANES-1:0] rd_mask, wr_mask;
  fp32_t            grad_rd [LANES], ms_rd [LANES], ms_wr [LANES];
  logic [AGW-1:0]   cur;

  assign pop = !empty && !upd_busy;

  param_update #(.LANES(LANES), .AGW(AGW), .P(P), .RHO(RHO), .LRN(LRN), .EPS(EPS)) u_upd (
    .clk, .rst_n, .start(pop), .start_agent(head), .busy(upd_busy), .done(upd_done),
    .agent(cur), .rd_en, .rd_addr, .rd_mask, .grad_rd, .ms_rd, .th_rd,
    .wr_en, .wr_addr, .wr_mask, .th_wr, .ms_wr
  );
  assign upd_agent  = cur;
  assign th_rd_addr = rd_addr;
  assign th_wr_en   = wr_en;
  assign th_wr_addr = wr_addr;
  assign th_wr_mask = wr_mask;

  always_comb
    for (int i = 0; i < LANES; i++) begin
      grad_rd[i] = rd_mask[i] ? grad[cur][int'(rd_addr) + i] : FP_ZERO;
      ms_rd[i]   = rd_mask[i] ? ms[int'(rd_addr) + i] : FP_ZERO;
    end

  // ---- clearing sweep after reset: all gradient buffers and g to zero ----
  int clr_addr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_addr <= 0;
      init_busy <= 1'b1;
    end else if (init_busy) begin
      clr_addr <= clr_addr + LANES;
      if (clr_addr + LANES >= P) init_busy <= 1'b0;
    end
  end

  // ---- gradient aggregation adder arrays and buffer writes ----
  always_ff @(posedge clk) begin
    if (init_busy) begin
      for (int i = 0; i < LANES; i++)
        if (clr_addr + i < P) begin
          for (int a = 0; a < NAG; a++) grad[a][clr_addr + i] <= FP_ZERO;
          ms[clr_addr + i] <= FP_ZERO;
        end
    end else begin
      for (int s = 0; s < NSLOT; s++) begin
        if (dw_valid[s])
          for (int i = 0; i < LANES; i++)
            if (int'(w_addr[s]) + i < P)
              grad[agg_agent[s]][int'(w_addr[s]) + i] <=
                fp_add(grad[agg_agent[s]][int'(w_addr[s]) + i], dw[s][i]);
        if (db_valid[s] && int'(b_addr[s]) < P)
          grad[agg_agent[s]][b_addr[s]] <= fp_add(grad[agg_agent[s]][b_addr[s]], db[s]);
      end
      if (rd_en)
        for (int i = 0; i < LANES; i++)
          if (rd_mask[i]) grad[cur][int'(rd_addr) + i] <= FP_ZERO;
      if (wr_en)
        for (int i = 0; i < LANES; i++)
          if (wr_mask[i]) ms[int'(wr_addr) + i] <= ms_wr[i];
    end
  end
endmodule
