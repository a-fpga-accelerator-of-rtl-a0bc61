// a3c_accel: FPGA-style accelerator for inference and training of
// distributed A3C agents.
//
// The host runs one environment per agent and talks to the accelerator
// through plain request/response ports (the network link of a real system
// would carry exactly these messages):
//   - it loads the central parameters (th_*), writes each observation
//     (128 words) into the agent's buffer (st_*) and asks for an inference
//     (inf_req_*); the forward computation unit (FCU, NF engines) returns the
//     action probabilities pi and the value v (inf_rsp_*);
//   - it writes the reward of each step (rw_*); after nsteps steps and one
//     extra bootstrap inference it asks for training (train_req_*);
//   - a free training slot (NT of them) runs the loss gradient unit (LGCU),
//     then the backward (BCU) and parameter gradient (PGCU) engines layer
//     by layer for every step, adding gradients into the agent's buffer in
//     the RMSProp unit; the agent number then queues for the parameter
//     update, which applies RMSProp to the central parameters and reports
//     upd_done with the agent number.
// Inference reads the central parameters directly, so the parameter copy
// of a rollout is the state of the central network while it runs.
// Between its training request and its upd_done an agent is 'pending': no
// inference or training request for it is accepted (its buffers are in use).
// Requests are accepted with valid && ready; responses have no back-pressure.
// Default sizes: NAG = 8 agents, NF = NT = 6 engines, LANES = 8.
// All flops use rst_n as an asynchronous reset; lint reports rst_n as also
// synchronous only because the agent FIFO's assertions are disabled with it.
module a3c_accel
  import a3c_pkg::*;
#(
  parameter int    NAG   = 8,
  parameter int    NF    = 6,
  parameter int    NT    = 6,
  parameter int    LANES = 8,
  parameter fp32_t GAMMA = 32'h3F7D_70A4,   // 0.99
  parameter fp32_t ENT_C = 32'h3C23_D70A,   // 0.01
  parameter fp32_t RHO   = 32'h3F7D_70A4,   // 0.99
  parameter fp32_t LRN   = 32'hBA37_8034,   // -7e-4
  parameter fp32_t EPS   = 32'h3DCC_CCCD,   // 0.1
  localparam int   AGW   = (NAG > 1) ? $clog2(NAG) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // parameter load / read-back
  input  logic            th_we,
  input  paddr_t          th_addr,
  input  fp32_t           th_wdata,
  input  paddr_t          th_raddr,
  output fp32_t           th_rdata,
  // observation and reward writes
  input  logic            st_we,
  input  logic [AGW-1:0]  st_agent,
  input  logic [2:0]      st_step,
  input  logic [6:0]      st_idx,
  input  fp32_t           st_data,
  input  logic            rw_we,
  input  logic [AGW-1:0]  rw_agent,
  input  logic [2:0]      rw_step,
  input  fp32_t           rw_data,
  // inference
  input  logic            inf_req_valid,
  output logic            inf_req_ready,
  input  logic [AGW-1:0]  inf_req_agent,
  input  logic [2:0]      inf_req_step,
  output logic            inf_rsp_valid,
  output logic [AGW-1:0]  inf_rsp_agent,
  output logic [2:0]      inf_rsp_step,
  output fp32_t           inf_rsp_pi [NUM_ACT],
  output fp32_t           inf_rsp_v,
  // training
  input  logic            train_req_valid,
  output logic            train_req_ready,
  input  logic [AGW-1:0]  train_req_agent,
  input  logic [2:0]      train_req_nsteps,
  input  logic            train_req_terminal,
  output logic            upd_done,
  output logic [AGW-1:0]  upd_agent,
  // status
  output logic            init_busy,
  output logic [NAG-1:0]  pending,
  output logic [NF-1:0]   fpe_busy,
  output logic [NT-1:0]   slot_busy,
  output logic            upd_busy
);
  // ---------------- FCU ----------------
  logic [AGW-1:0] f_agent   [NF];
  paddr_t         f_p_addr  [NF], f_b_addr [NF];
  fp32_t          f_p_data  [NF][LANES], f_b_data [NF], f_a_rdata [NF][LANES];
  aaddr_t         f_a_raddr [NF], f_a_waddr [NF];
  logic           f_a_we    [NF], f_s_we [NF];
  fp32_t          f_a_wdata [NF], f_s_wdata [NF];
  saddr_t         f_s_waddr [NF];
  logic           fcu_ready;

  assign inf_req_ready = fcu_ready && !pending[inf_req_agent];

  fcu #(.NF(NF), .AGW(AGW), .LANES(LANES)) u_fcu (
    .clk, .rst_n,
    .req_valid(inf_req_valid && inf_req_ready), .req_ready(fcu_ready),
    .req_agent(inf_req_agent), .req_step(inf_req_step),
    .rsp_valid(inf_rsp_valid), .rsp_agent(inf_rsp_agent), .rsp_step(inf_rsp_step),
    .rsp_pi(inf_rsp_pi), .rsp_v(inf_rsp_v), .fpe_busy,
    .f_agent, .f_p_addr, .f_p_data, .f_b_addr, .f_b_data, .f_a_raddr, .f_a_rdata,
    .f_a_we, .f_a_waddr, .f_a_wdata, .f_s_we, .f_s_waddr, .f_s_wdata
  );

  // ---------------- training slot dispatch ----------------
  logic           t_start [NT], t_busy [NT];
  logic [AGW-1:0] t_start_agent [NT];
  logic [2:0]     t_start_nsteps [NT];
  logic           t_start_term [NT];

  int tsel;
  always_comb begin
    tsel = -1;
    for (int s = NT - 1; s >= 0; s--) if (!t_busy[s]) tsel = s;
  end
  assign train_req_ready = (tsel >= 0) && !init_busy && !pending[train_req_agent];

  always_comb begin
    for (int s = 0; s < NT; s++) begin
      t_start[s]        = train_req_valid && train_req_ready && (s == tsel);
      t_start_agent[s]  = train_req_agent;
      t_start_nsteps[s] = train_req_nsteps;
      t_start_term[s]   = train_req_terminal;
      slot_busy[s]      = t_busy[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else
      for (int a = 0; a < NAG; a++) begin
        if (upd_done && int'(upd_agent) == a) pending[a] <= 1'b0;
        if (train_req_valid && train_req_ready && int'(train_req_agent) == a) pending[a] <= 1'b1;
      end
  end

  // ---------------- LGCU ----------------
  logic           lg_start [NT], lg_term [NT], lg_done [NT];
  logic [AGW-1:0] lg_agent [NT], o_agent [NT];
  logic [2:0]     lg_nsteps [NT], o_step [NT], g_step [NT];
  fp32_t          o_pi [NT][NUM_ACT], o_v [NT], o_r [NT];
  logic           g_we [NT];
  fp32_t          g_data [NT][OUT_ROWS];

  lgcu #(.NSLOT(NT), .AGW(AGW), .GAMMA(GAMMA), .ENT_C(ENT_C)) u_lgcu (
    .clk, .rst_n, .start(lg_start), .agent_in(lg_agent), .nsteps(lg_nsteps),
    .terminal(lg_term), .done(lg_done), .o_agent, .o_step, .o_pi, .o_v, .o_r,
    .g_we, .g_step, .g_data
  );

  // ---------------- training control, BCU, PGCU ----------------
  logic [AGW-1:0] t_agent [NT];
  paddr_t         t_w_addr [NT], e_w_addr [NT], e_b_addr [NT];
  aaddr_t         t_x_addr [NT];
  saddr_t         t_s_addr [NT];
  logic           t_sbit [NT], t_g_out [NT], t_g_bank [NT], t_gb_we [NT], t_gb_bank [NT];
  logic [2:0]     t_g_step [NT];
  logic [8:0]     t_g_idx [NT], t_gb_idx [NT];
  fp32_t          t_gk [NT], t_w [NT][LANES], t_x [NT][LANES], yp [NT][LANES];
  logic           e_valid [NT], e_clear [NT], e_last [NT], e_sel [NT], e_b_en [NT];
  logic           bpe_done [NT];
  logic           fin_valid [NT], fin_ready [NT];
  logic [AGW-1:0] fin_agent [NT];

  train_ctrl #(.NT(NT), .AGW(AGW), .LANES(LANES)) u_tctl (
    .clk, .rst_n, .start(t_start), .start_agent(t_start_agent), .start_nsteps(t_start_nsteps),
    .start_term(t_start_term), .busy(t_busy),
    .lg_start, .lg_agent, .lg_nsteps, .lg_term, .lg_done,
    .t_agent, .t_w_addr, .t_x_addr, .t_s_addr, .t_sbit, .t_g_out, .t_g_step, .t_g_bank,
    .t_g_idx, .t_gb_we, .t_gb_bank, .t_gb_idx,
    .e_valid, .e_clear, .e_last, .e_sel, .e_b_en, .e_w_addr, .e_b_addr, .bpe_done,
    .fin_valid, .fin_agent, .fin_ready
  );

  bcu #(.NSLOT(NT), .LANES(LANES)) u_bcu (
    .clk, .rst_n, .valid(e_valid), .clear(e_clear), .last(e_last), .gk(t_gk),
    .sel(e_sel), .w(t_w), .yp, .y_valid(bpe_done)
  );

  fp32_t  dw [NT][LANES], db [NT];
  paddr_t g_w_addr [NT], g_b_addr [NT];
  logic   dw_valid [NT], db_valid [NT];

  pgcu #(.NSLOT(NT), .LANES(LANES)) u_pgcu (
    .clk, .rst_n, .valid(e_valid), .b_en(e_b_en), .gk(t_gk), .sel(e_sel), .x(t_x),
    .w_addr_in(e_w_addr), .b_addr_in(e_b_addr), .dw, .db, .w_addr(g_w_addr),
    .b_addr(g_b_addr), .dw_valid, .db_valid
  );

  // ---------------- RMSProp unit ----------------
  paddr_t           r_rd_addr, r_wr_addr;
  fp32_t            r_th_rd [LANES], r_th_wr [LANES];
  logic             r_wr_en;
  logic [LANES-1:0] r_wr_mask;

  rmsprop_unit #(.NAG(NAG), .AGW(AGW), .NSLOT(NT), .LANES(LANES), .RHO(RHO), .LRN(LRN),
                 .EPS(EPS)) u_rms (
    .clk, .rst_n, .dw_valid, .agg_agent(t_agent), .w_addr(g_w_addr), .dw,
    .db_valid, .b_addr(g_b_addr), .db, .fin_valid, .fin_agent, .fin_ready,
    .th_rd_addr(r_rd_addr), .th_rd(r_th_rd), .th_wr_en(r_wr_en), .th_wr_addr(r_wr_addr),
    .th_wr_mask(r_wr_mask), .th_wr(r_th_wr), .upd_done, .upd_agent, .upd_busy, .init_busy
  );

  // ---------------- memory unit ----------------
  memory_unit #(.NAG(NAG), .AGW(AGW), .NF(NF), .NT(NT), .LANES(LANES)) u_mem (
    .clk,
    .h_st_we(st_we), .h_st_agent(st_agent),
    .h_st_addr(aaddr_t'(int'(st_step) * ACT_WORDS + int'(st_idx))), .h_st_data(st_data),
    .h_r_we(rw_we), .h_r_agent(rw_agent), .h_r_step(rw_step), .h_r_data(rw_data),
    .h_th_we(th_we), .h_th_addr(th_addr), .h_th_data(th_wdata),
    .h_th_raddr(th_raddr), .h_th_rdata(th_rdata),
    .f_agent, .f_p_addr, .f_p_data, .f_b_addr, .f_b_data, .f_a_raddr, .f_a_rdata,
    .f_a_we, .f_a_waddr, .f_a_wdata, .f_s_we, .f_s_waddr, .f_s_wdata,
    .o_agent, .o_step, .o_pi, .o_v, .o_r, .g_we, .g_step, .g_data,
    .t_agent, .t_w_addr, .t_w, .t_x_addr, .t_x, .t_s_addr, .t_sbit,
    .t_g_out, .t_g_step, .t_g_bank, .t_g_idx, .t_gk,
    .t_gb_we, .t_gb_bank, .t_gb_idx, .t_gb_data(yp),
    .r_rd_addr, .r_th_rd, .r_wr_en, .r_wr_addr, .r_wr_mask, .r_th_wr
  );
endmodule
