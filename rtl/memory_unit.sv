// memory_unit: the accelerator's on-chip storage, with independent ports for
// each computing unit so that no unit waits for another's memory access.
//
//  central agent buffer  theta[P]: the central network's parameters. Read
//                        LANES-wide (plus one bias word) by every forward
//                        engine and LANES-wide by every training slot; read
//                        and written LANES-wide by the RMSProp unit; written
//                        and read one word at a time by the host.
//  agent buffers         act[agent][step*ACT_WORDS + offset]: for each agent
//                        and step the state written by the host, the hidden
//                        outputs and the policy/value outputs written by the
//                        forward engine; rew[agent][step]: the rewards.
//  sign store            csg_buffer: the ReLU sign bits of each agent/step.
//  back propagation      gout[slot][step][5]: output-layer loss gradients from
//  buffer                the LGCU; gbuf[slot][bank][256]: the gradient vector
//                        a backward engine produces for the next lower layer
//                        (two banks used alternately by successive layers).
// All reads are combinational (reads past the end return zero); all writes
// happen on the clock edge. Contents are not reset: every word is written
// before the design reads it. The split into these buffers follows the
// accelerator's memory organisation; the word layout and port set are this
// design's choices.
module memory_unit
  import a3c_pkg::*;
#(
  parameter int NAG   = 8,
  parameter int AGW   = 3,
  parameter int NF    = 6,
  parameter int NT    = 6,
  parameter int LANES = 8,
  parameter int P     = NUM_PARAMS
) (
  input  logic            clk,
  // host
  input  logic            h_st_we,
  input  logic [AGW-1:0]  h_st_agent,
  input  aaddr_t          h_st_addr,
  input  fp32_t           h_st_data,
  input  logic            h_r_we,
  input  logic [AGW-1:0]  h_r_agent,
  input  logic [2:0]      h_r_step,
  input  fp32_t           h_r_data,
  input  logic            h_th_we,
  input  paddr_t          h_th_addr,
  input  fp32_t           h_th_data,
  input  paddr_t          h_th_raddr,
  output fp32_t           h_th_rdata,
  // forward engines
  input  logic [AGW-1:0]  f_agent   [NF],
  input  paddr_t          f_p_addr  [NF],
  output fp32_t           f_p_data  [NF][LANES],
  input  paddr_t          f_b_addr  [NF],
  output fp32_t           f_b_data  [NF],
  input  aaddr_t          f_a_raddr [NF],
  output fp32_t           f_a_rdata [NF][LANES],
  input  logic            f_a_we    [NF],
  input  aaddr_t          f_a_waddr [NF],
  input  fp32_t           f_a_wdata [NF],
  input  logic            f_s_we    [NF],
  input  saddr_t          f_s_waddr [NF],
  input  fp32_t           f_s_wdata [NF],
  // loss gradient unit
  input  logic [AGW-1:0]  o_agent   [NT],
  input  logic [2:0]      o_step    [NT],
  output fp32_t           o_pi      [NT][NUM_ACT],
  output fp32_t           o_v       [NT],
  output fp32_t           o_r       [NT],
  input  logic            g_we      [NT],
  input  logic [2:0]      g_step    [NT],
  input  fp32_t           g_data    [NT][OUT_ROWS],
  // training slots
  input  logic [AGW-1:0]  t_agent   [NT],
  input  paddr_t          t_w_addr  [NT],
  output fp32_t           t_w       [NT][LANES],
  input  aaddr_t          t_x_addr  [NT],
  output fp32_t           t_x       [NT][LANES],
  input  saddr_t          t_s_addr  [NT],
  output logic            t_sbit    [NT],
  input  logic            t_g_out   [NT],
  input  logic [2:0]      t_g_step  [NT],
  input  logic            t_g_bank  [NT],
  input  logic [8:0]      t_g_idx   [NT],
  output fp32_t           t_gk      [NT],
  input  logic            t_gb_we   [NT],
  input  logic            t_gb_bank [NT],
  input  logic [8:0]      t_gb_idx  [NT],
  input  fp32_t           t_gb_data [NT][LANES],
  // RMSProp unit
  input  paddr_t          r_rd_addr,
  output fp32_t           r_th_rd   [LANES],
  input  logic            r_wr_en,
  input  paddr_t          r_wr_addr,
  input  logic [LANES-1:0] r_wr_mask,
  input  fp32_t           r_th_wr   [LANES]
);
  localparam int ADEPTH = MAX_STEPS * ACT_WORDS;
  localparam int ADW    = $clog2(ADEPTH);

  fp32_t theta [P];
  fp32_t act   [NAG][ADEPTH];
  fp32_t rew   [NAG][MAX_STEPS];
  fp32_t gout  [NT][MAX_STEPS][OUT_ROWS];
  fp32_t gbuf  [NT][2][256];

  function automatic fp32_t th_at(input int a);
    return (a < P) ? theta[a] : FP_ZERO;
  endfunction

  function automatic fp32_t act_at(input logic [AGW-1:0] ag, input int a);
    return (a < ADEPTH) ? act[ag][a] : FP_ZERO;
  endfunction

  // ---- central agent buffer ----
  always_ff @(posedge clk) begin
    if (h_th_we && int'(h_th_addr) < P) theta[h_th_addr] <= h_th_data;
    if (r_wr_en)
      for (int i = 0; i < LANES; i++)
        if (r_wr_mask[i] && int'(r_wr_addr) + i < P) theta[int'(r_wr_addr) + i] <= r_th_wr[i];
  end

  assign h_th_rdata = th_at(int'(h_th_raddr));

  always_comb begin
    for (int i = 0; i < LANES; i++) r_th_rd[i] = th_at(int'(r_rd_addr) + i);
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < LANES; i++) begin
        f_p_data[f][i]  = th_at(int'(f_p_addr[f]) + i);
        f_a_rdata[f][i] = act_at(f_agent[f], int'(f_a_raddr[f]) + i);
      end
      f_b_data[f] = th_at(int'(f_b_addr[f]));
    end
    for (int t = 0; t < NT; t++) begin
      for (int i = 0; i < LANES; i++) begin
        t_w[t][i] = th_at(int'(t_w_addr[t]) + i);
        t_x[t][i] = act_at(t_agent[t], int'(t_x_addr[t]) + i);
      end
      for (int i = 0; i < NUM_ACT; i++)
        o_pi[t][i] = act_at(o_agent[t], int'(o_step[t]) * ACT_WORDS + act_base(4) + i);
      o_v[t]  = act_at(o_agent[t], int'(o_step[t]) * ACT_WORDS + act_base(4) + NUM_ACT);
      o_r[t]  = rew[o_agent[t]][o_step[t]];
      t_gk[t] = t_g_out[t] ? (int'(t_g_idx[t]) < OUT_ROWS ? gout[t][t_g_step[t]][t_g_idx[t][2:0]] : FP_ZERO)
                           : gbuf[t][t_g_bank[t]][t_g_idx[t][7:0]];
    end
  end

  // ---- agent buffers ----
  always_ff @(posedge clk) begin
    if (h_st_we && int'(h_st_addr) < ADEPTH) act[h_st_agent][h_st_addr[ADW-1:0]] <= h_st_data;
    for (int f = 0; f < NF; f++)
      if (f_a_we[f] && int'(f_a_waddr[f]) < ADEPTH) act[f_agent[f]][f_a_waddr[f][ADW-1:0]] <= f_a_wdata[f];
    if (h_r_we) rew[h_r_agent][h_r_step] <= h_r_data;
  end

  // ---- sign store ----
  csg_buffer #(.NAG(NAG), .AGW(AGW), .NW(NF), .NR(NT)) u_csg (
    .clk, .we(f_s_we), .wagent(f_agent), .waddr(f_s_waddr), .wy(f_s_wdata),
    .ragent(t_agent), .raddr(t_s_addr), .rbit(t_sbit)
  );

  // ---- back propagation buffer ----
  always_ff @(posedge clk)
    for (int t = 0; t < NT; t++) begin
      if (g_we[t]) gout[t][g_step[t]] <= g_data[t];
      if (t_gb_we[t])
        for (int i = 0; i < LANES; i++)
          if (int'(t_gb_idx[t]) + i < 256) gbuf[t][t_gb_bank[t]][int'(t_gb_idx[t]) + i] <= t_gb_data[t][i];
    end
endmodule
