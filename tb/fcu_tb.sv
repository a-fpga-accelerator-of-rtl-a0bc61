// fcu_tb: forward computation unit with 3 engines and a memory model
// (shared parameters, one activation store per agent). Four agents request
// an inference in consecutive cycles: the first three go to engines 0, 1, 2
// (all busy at once), the fourth waits until an engine is free. Every
// response is checked for agent, step, pi and v against the real reference
// network, and the first response must arrive one engine pass after its
// request (fpe pass length + 2 cycles: start edge and registered response).
module fcu_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  import tb_a3c_ref_pkg::*;
  localparam int NF = 3, L = 8, NAGT = 4;
  localparam int FPE_CYC = 256*16 + 128*32 + 64*16 + 5*8 + NUM_LAYERS + 2 + NUM_ACT;

  logic clk = 0, rst_n = 0, req_valid = 0, req_ready, rsp_valid;
  logic [1:0] req_agent = 0, rsp_agent;
  logic [2:0] req_step = 0, rsp_step;
  fp32_t rsp_pi [NUM_ACT], rsp_v;
  logic [NF-1:0] fpe_busy;
  logic [1:0] f_agent [NF];
  paddr_t f_p_addr [NF], f_b_addr [NF];
  fp32_t f_p_data [NF][L], f_b_data [NF], f_a_rdata [NF][L], f_a_wdata [NF], f_s_wdata [NF];
  aaddr_t f_a_raddr [NF], f_a_waddr [NF];
  logic f_a_we [NF], f_s_we [NF];
  saddr_t f_s_waddr [NF];
  fp32_t thm [NUM_PARAMS];
  fp32_t actm [NAGT][MAX_STEPS * ACT_WORDS];
  int checks = 0, failures = 0;

  fcu #(.NF(NF), .AGW(2), .LANES(L)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_agent, .req_step, .rsp_valid, .rsp_agent,
    .rsp_step, .rsp_pi, .rsp_v, .fpe_busy, .f_agent, .f_p_addr, .f_p_data, .f_b_addr,
    .f_b_data, .f_a_raddr, .f_a_rdata, .f_a_we, .f_a_waddr, .f_a_wdata, .f_s_we,
    .f_s_waddr, .f_s_wdata);

  always_comb
    for (int f = 0; f < NF; f++) begin
      for (int i = 0; i < L; i++) begin
        f_p_data[f][i]  = (int'(f_p_addr[f]) + i < NUM_PARAMS) ? thm[int'(f_p_addr[f]) + i] : 0;
        f_a_rdata[f][i] = (int'(f_a_raddr[f]) + i < MAX_STEPS * ACT_WORDS) ?
                          actm[f_agent[f]][int'(f_a_raddr[f]) + i] : 0;
      end
      f_b_data[f] = thm[f_b_addr[f]];
    end
  always_ff @(posedge clk)
    for (int f = 0; f < NF; f++) if (rst_n && f_a_we[f]) actm[f_agent[f]][f_a_waddr[f]] <= f_a_wdata[f];

  int max_busy = 0, n_rsp = 0, first_rsp = -1, cyc = 0;
  real rpi [NAGT][NUM_ACT], rv [NAGT];
  logic seen [NAGT];

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if ($countones(fpe_busy) > max_busy) max_busy = $countones(fpe_busy);
    if (rsp_valid) begin
      n_rsp++;
      if (first_rsp < 0) first_rsp = cyc;
      checks++;
      if (seen[rsp_agent] || int'(rsp_step) != int'(rsp_agent) + 1) begin
        failures++; $display("unexpected response agent %0d step %0d", rsp_agent, rsp_step);
      end
      seen[rsp_agent] = 1'b1;
      for (int i = 0; i < NUM_ACT; i++) begin
        checks++;
        if (!near(f2r(rsp_pi[i]), rpi[rsp_agent][i], 1e-4)) begin
          failures++; $display("agent %0d pi[%0d] %f vs %f", rsp_agent, i, f2r(rsp_pi[i]), rpi[rsp_agent][i]);
        end
      end
      checks++;
      if (!near(f2r(rsp_v), rv[rsp_agent], 1e-4)) begin
        failures++; $display("agent %0d v %f vs %f", rsp_agent, f2r(rsp_v), rv[rsp_agent]);
      end
    end
  end

  always #5 clk = ~clk;
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s [128], a [5][256], p [NUM_ACT];
    int req_cyc, waited;
    for (int l = 0; l < NUM_LAYERS; l++) begin
      for (int i = 0; i < layer_in(l) * layer_out(l); i++)
        thm[w_base(l) + i] = r2f(urand(-1.7, 1.7) / $sqrt(real'(layer_in(l))));
      for (int k = 0; k < layer_out(l); k++) thm[b_base(l) + k] = r2f(urand(-0.1, 0.1));
    end
    for (int i = 0; i < NUM_PARAMS; i++) th[i] = f2r(thm[i]);
    for (int g = 0; g < NAGT; g++) begin
      seen[g] = 1'b0;
      for (int i = 0; i < MAX_STEPS * ACT_WORDS; i++) actm[g][i] = 0;
      for (int j = 0; j < 128; j++) begin
        actm[g][(g + 1) * ACT_WORDS + j] = r2f(urand(0.0, 1.0));
        s[j] = f2r(actm[g][(g + 1) * ACT_WORDS + j]);
      end
      forward(s, a, p);
      for (int i = 0; i < NUM_ACT; i++) rpi[g][i] = p[i];
      rv[g] = a[4][4];
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    waited = 0;
    req_cyc = 0;
    for (int g = 0; g < NAGT; g++) begin
      @(negedge clk);
      req_valid = 1; req_agent = 2'(g); req_step = 3'(g + 1);
      #1;
      while (!req_ready) begin waited++; @(negedge clk); #1; end
      if (g == 0) req_cyc = cyc;
      @(negedge clk);
      req_valid = 0;
    end
    while (n_rsp < NAGT) @(negedge clk);
    checks++;
    if (max_busy != NF) begin failures++; $display("at most %0d engines busy", max_busy); end
    checks++;
    if (waited == 0) begin failures++; $display("fourth request never waited"); end
    checks++;
    if (first_rsp - req_cyc != FPE_CYC + 2) begin
      failures++; $display("first response after %0d cycles, expected %0d", first_rsp - req_cyc, FPE_CYC + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
