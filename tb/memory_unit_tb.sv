// memory_unit_tb: storage of a small configuration (2 agents, 2 engines,
// 2 slots, 4 lanes, 64 parameters). A shadow model of every buffer is kept;
// random writes go through each write port (host, engines, LGCU, slots,
// RMSProp with lane masks) and every read port is compared with the model
// on the following cycle: LANES-wide parameter reads (zero past the end),
// bias reads, activation reads per agent, pi/v/reward reads of the LGCU,
// output-gradient and bank reads of the slots, and ReLU sign bits.
module memory_unit_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int NAG = 2, NF = 2, NT = 2, L = 4, NP = 64;
  localparam int AD = MAX_STEPS * ACT_WORDS;

  logic clk = 0;
  logic h_st_we = 0, h_r_we = 0, h_th_we = 0, r_wr_en = 0;
  logic h_st_agent = 0, h_r_agent = 0;
  aaddr_t h_st_addr = 0;
  logic [2:0] h_r_step = 0;
  paddr_t h_th_addr = 0, h_th_raddr = 0, r_rd_addr = 0, r_wr_addr = 0;
  fp32_t h_st_data = 0, h_r_data = 0, h_th_data = 0, h_th_rdata, r_th_rd [L], r_th_wr [L];
  logic [L-1:0] r_wr_mask = 0;
  logic f_agent [NF], f_a_we [NF], f_s_we [NF];
  paddr_t f_p_addr [NF], f_b_addr [NF];
  fp32_t f_p_data [NF][L], f_b_data [NF], f_a_rdata [NF][L], f_a_wdata [NF], f_s_wdata [NF];
  aaddr_t f_a_raddr [NF], f_a_waddr [NF];
  saddr_t f_s_waddr [NF];
  logic o_agent [NT], g_we [NT], t_agent [NT], t_sbit [NT], t_g_out [NT], t_g_bank [NT];
  logic t_gb_we [NT], t_gb_bank [NT];
  logic [2:0] o_step [NT], g_step [NT], t_g_step [NT];
  fp32_t o_pi [NT][NUM_ACT], o_v [NT], o_r [NT], g_data [NT][OUT_ROWS];
  paddr_t t_w_addr [NT];
  fp32_t t_w [NT][L], t_x [NT][L], t_gk [NT], t_gb_data [NT][L];
  aaddr_t t_x_addr [NT];
  saddr_t t_s_addr [NT];
  logic [8:0] t_g_idx [NT], t_gb_idx [NT];
  int checks = 0, failures = 0;

  memory_unit #(.NAG(NAG), .AGW(1), .NF(NF), .NT(NT), .LANES(L), .P(NP)) dut (.*);

  // shadow model
  fp32_t m_th [NP], m_act [NAG][AD], m_rew [NAG][MAX_STEPS], m_gout [NT][MAX_STEPS][OUT_ROWS];
  fp32_t m_gbuf [NT][2][256];
  logic m_sgn [NAG][MAX_STEPS * SGN_BITS];

  task automatic chk(input string what, input fp32_t got, input fp32_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("%s: %h expected %h", what, got, exp);
    end
  endtask

  function automatic fp32_t rnd();
    return r2f(urand(-2.0, 2.0));
  endfunction

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, p, k;
    // fill every buffer through its write ports
    for (int i = 0; i < NF; i++) begin f_a_we[i] = 0; f_s_we[i] = 0; f_agent[i] = 0; end
    for (int t = 0; t < NT; t++) begin g_we[t] = 0; t_gb_we[t] = 0; end
    @(negedge clk);
    h_th_we = 1;
    for (int i = 0; i < NP; i++) begin
      h_th_addr = paddr_t'(i); h_th_data = rnd(); m_th[i] = h_th_data; @(negedge clk);
    end
    h_th_we = 0;
    h_st_we = 1;
    for (int g = 0; g < NAG; g++)
      for (int i = 0; i < AD; i++) begin
        h_st_agent = 1'(g); h_st_addr = aaddr_t'(i); h_st_data = rnd(); m_act[g][i] = h_st_data;
        @(negedge clk);
      end
    h_st_we = 0;
    h_r_we = 1;
    for (int g = 0; g < NAG; g++)
      for (int s = 0; s < MAX_STEPS; s++) begin
        h_r_agent = 1'(g); h_r_step = 3'(s); h_r_data = rnd(); m_rew[g][s] = h_r_data; @(negedge clk);
      end
    h_r_we = 0;
    // sign bits of every address through the engines (engine f writes agent f)
    for (int i = 0; i < MAX_STEPS * SGN_BITS; i++) begin
      for (int f = 0; f < NF; f++) begin
        f_s_we[f] = 1; f_agent[f] = 1'(f); f_s_waddr[f] = saddr_t'(i); f_s_wdata[f] = rnd();
        m_sgn[f][i] = fp_pos(f_s_wdata[f]);
      end
      @(negedge clk);
    end
    for (int f = 0; f < NF; f++) f_s_we[f] = 0;
    for (int t = 0; t < NT; t++)
      for (int s = 0; s < MAX_STEPS; s++) begin
        g_we[t] = 1; g_step[t] = 3'(s);
        for (int j = 0; j < OUT_ROWS; j++) begin g_data[t][j] = rnd(); m_gout[t][s][j] = g_data[t][j]; end
        @(negedge clk);
        g_we[t] = 0;
      end
    for (int t = 0; t < NT; t++)
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 256; i += L) begin
          t_gb_we[t] = 1; t_gb_bank[t] = 1'(b); t_gb_idx[t] = 9'(i);
          for (int j = 0; j < L; j++) begin t_gb_data[t][j] = rnd(); m_gbuf[t][b][i + j] = t_gb_data[t][j]; end
          @(negedge clk);
          t_gb_we[t] = 0;
        end

    // random traffic: writes on all ports, then reads of every port
    for (int n = 0; n < 300; n++) begin
      r_wr_en = 1; r_wr_addr = paddr_t'($urandom % NP); r_wr_mask = L'($urandom);
      for (int i = 0; i < L; i++) begin
        r_th_wr[i] = rnd();
        if (r_wr_mask[i] && int'(r_wr_addr) + i < NP) m_th[int'(r_wr_addr) + i] = r_th_wr[i];
      end
      for (int f = 0; f < NF; f++) begin
        f_agent[f] = 1'(f); f_a_we[f] = 1; f_a_waddr[f] = aaddr_t'($urandom % AD); f_a_wdata[f] = rnd();
        m_act[f][f_a_waddr[f]] = f_a_wdata[f];
        f_s_we[f] = 1; f_s_waddr[f] = saddr_t'($urandom % (MAX_STEPS * SGN_BITS)); f_s_wdata[f] = rnd();
        m_sgn[f][f_s_waddr[f]] = fp_pos(f_s_wdata[f]);
      end
      for (int t = 0; t < NT; t++) begin
        g_we[t] = 1; g_step[t] = 3'($urandom);
        for (int j = 0; j < OUT_ROWS; j++) begin g_data[t][j] = rnd(); m_gout[t][g_step[t]][j] = g_data[t][j]; end
        t_gb_we[t] = 1; t_gb_bank[t] = 1'($urandom); t_gb_idx[t] = 9'(($urandom % (256 / L)) * L);
        for (int j = 0; j < L; j++) begin
          t_gb_data[t][j] = rnd(); m_gbuf[t][t_gb_bank[t]][int'(t_gb_idx[t]) + j] = t_gb_data[t][j];
        end
      end
      @(negedge clk);
      r_wr_en = 0;
      for (int f = 0; f < NF; f++) begin f_a_we[f] = 0; f_s_we[f] = 0; end
      for (int t = 0; t < NT; t++) begin g_we[t] = 0; t_gb_we[t] = 0; end
      // reads
      p = $urandom % (NP + 2);
      h_th_raddr = paddr_t'(p); r_rd_addr = paddr_t'(p);
      for (int f = 0; f < NF; f++) begin
        f_agent[f] = 1'($urandom); f_p_addr[f] = paddr_t'($urandom % (NP + 2));
        f_b_addr[f] = paddr_t'($urandom % NP); f_a_raddr[f] = aaddr_t'($urandom % AD);
      end
      for (int t = 0; t < NT; t++) begin
        o_agent[t] = 1'($urandom); o_step[t] = 3'($urandom); t_agent[t] = 1'($urandom);
        t_w_addr[t] = paddr_t'($urandom % NP); t_x_addr[t] = aaddr_t'($urandom % AD);
        t_s_addr[t] = saddr_t'($urandom % (MAX_STEPS * SGN_BITS));
        t_g_out[t] = 1'($urandom); t_g_step[t] = 3'($urandom); t_g_bank[t] = 1'($urandom);
        t_g_idx[t] = t_g_out[t] ? 9'($urandom % (OUT_ROWS + 1)) : 9'($urandom % 256);
      end
      #1;
      chk("host theta read", h_th_rdata, (p < NP) ? m_th[p] : 0);
      for (int i = 0; i < L; i++) chk("rmsprop theta read", r_th_rd[i], (p + i < NP) ? m_th[p + i] : 0);
      for (int f = 0; f < NF; f++) begin
        a = f_agent[f];
        for (int i = 0; i < L; i++) begin
          k = int'(f_p_addr[f]) + i;
          chk("engine parameter read", f_p_data[f][i], (k < NP) ? m_th[k] : 0);
          k = int'(f_a_raddr[f]) + i;
          chk("engine activation read", f_a_rdata[f][i], (k < AD) ? m_act[a][k] : 0);
        end
        chk("engine bias read", f_b_data[f], m_th[f_b_addr[f]]);
      end
      for (int t = 0; t < NT; t++) begin
        a = o_agent[t];
        for (int i = 0; i < NUM_ACT; i++)
          chk("lgcu pi read", o_pi[t][i], m_act[a][int'(o_step[t]) * ACT_WORDS + act_base(4) + i]);
        chk("lgcu v read", o_v[t], m_act[a][int'(o_step[t]) * ACT_WORDS + act_base(4) + NUM_ACT]);
        chk("lgcu reward read", o_r[t], m_rew[a][o_step[t]]);
        a = t_agent[t];
        for (int i = 0; i < L; i++) begin
          k = int'(t_w_addr[t]) + i;
          chk("slot weight read", t_w[t][i], (k < NP) ? m_th[k] : 0);
          k = int'(t_x_addr[t]) + i;
          chk("slot input read", t_x[t][i], (k < AD) ? m_act[a][k] : 0);
        end
        checks++;
        if (t_sbit[t] !== m_sgn[a][t_s_addr[t]]) begin failures++; $display("sign bit mismatch"); end
        if (t_g_out[t])
          chk("output gradient read", t_gk[t],
              (int'(t_g_idx[t]) < OUT_ROWS) ? m_gout[t][t_g_step[t]][int'(t_g_idx[t])] : 0);
        else
          chk("bank read", t_gk[t], m_gbuf[t][t_g_bank[t]][t_g_idx[t]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
