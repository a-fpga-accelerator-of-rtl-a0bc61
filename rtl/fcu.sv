// fcu: forward computation unit, NF forward processing engines that serve
// inference requests of different agents at the same time.
//
// A request (agent, step) is accepted when some engine is idle
// (req_valid && req_ready) and given to the lowest-numbered idle engine,
// which runs the whole forward pass on its own memory ports. Finished
// results are returned one per cycle on rsp_* (lowest engine first); an
// engine waiting for its turn keeps its result.
// Each engine's memory ports are brought out unchanged (arrays indexed by
// engine). See fpe for the per-pass cycle count.
module fcu
  import a3c_pkg::*;
#(
  parameter int NF    = 6,
  parameter int AGW   = 3,
  parameter int LANES = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [AGW-1:0]  req_agent,
  input  logic [2:0]      req_step,
  output logic            rsp_valid,
  output logic [AGW-1:0]  rsp_agent,
  output logic [2:0]      rsp_step,
  output fp32_t           rsp_pi [NUM_ACT],
  output fp32_t           rsp_v,
  output logic [NF-1:0]   fpe_busy,
  // memory ports, one set per engine
  output logic [AGW-1:0]  f_agent   [NF],
  output paddr_t          f_p_addr  [NF],
  input  fp32_t           f_p_data  [NF][LANES],
  output paddr_t          f_b_addr  [NF],
  input  fp32_t           f_b_data  [NF],
  output aaddr_t          f_a_raddr [NF],
  input  fp32_t           f_a_rdata [NF][LANES],
  output logic            f_a_we    [NF],
  output aaddr_t          f_a_waddr [NF],
  output fp32_t           f_a_wdata [NF],
  output logic            f_s_we    [NF],
  output saddr_t          f_s_waddr [NF],
  output fp32_t           f_s_wdata [NF]
);
  logic       start  [NF];
  logic       busy   [NF];
  logic       dvalid [NF];
  logic       dready [NF];
  logic [2:0] step   [NF];
  fp32_t      pi     [NF][NUM_ACT];
  fp32_t      v      [NF];

  int sel, gnt;

  // engine choice depends only on engine state, never on req_valid
  always_comb begin
    sel = -1;
    gnt = -1;
    for (int f = NF - 1; f >= 0; f--) begin
      if (!busy[f]) sel = f;
      if (dvalid[f]) gnt = f;
    end
  end

  assign req_ready = (sel >= 0);

  always_comb begin
    rsp_valid = (gnt >= 0);
    rsp_agent = '0;
    rsp_step  = '0;
    rsp_v     = FP_ZERO;
    for (int i = 0; i < NUM_ACT; i++) rsp_pi[i] = FP_ZERO;
    for (int f = 0; f < NF; f++) begin
      start[f]    = req_valid && (f == sel);
      dready[f]   = (f == gnt);
      fpe_busy[f] = busy[f];
      if (f == gnt) begin
        rsp_agent = f_agent[f];
        rsp_step  = step[f];
        rsp_pi    = pi[f];
        rsp_v     = v[f];
      end
    end
  end

  for (genvar f = 0; f < NF; f++) begin : g_fpe
    fpe #(.LANES(LANES), .AGW(AGW)) u_fpe (
      .clk, .rst_n,
      .start(start[f]), .start_agent(req_agent), .start_step(req_step),
      .busy(busy[f]), .agent(f_agent[f]), .step(step[f]),
      .p_addr(f_p_addr[f]), .p_data(f_p_data[f]), .b_addr(f_b_addr[f]), .b_data(f_b_data[f]),
      .a_raddr(f_a_raddr[f]), .a_rdata(f_a_rdata[f]),
      .a_we(f_a_we[f]), .a_waddr(f_a_waddr[f]), .a_wdata(f_a_wdata[f]),
      .s_we(f_s_we[f]), .s_waddr(f_s_waddr[f]), .s_wdata(f_s_wdata[f]),
      .done_valid(dvalid[f]), .done_ready(dready[f]), .pi(pi[f]), .v(v[f])
    );
  end
endmodule
