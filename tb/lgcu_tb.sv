// lgcu_tb: two LGCU slots work on two agents at once from a memory model of
// random rollouts (probabilities, values, rewards). For every step the
// written output-layer gradients are compared with a reference that forms
// R = r + 0.99*R backwards from the bootstrap value (or 0 for a terminal
// episode), delta = R - v and the LPE formulas. Checks the 1 + 2*nsteps
// cycle count (nsteps*2 + 1 without the bootstrap read for terminal).
module lgcu_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  import tb_a3c_ref_pkg::*;
  localparam int NS = 2;
  logic clk = 0, rst_n = 0;
  logic start [NS], terminal [NS], done [NS], g_we [NS];
  logic [2:0] agent_in [NS], o_agent [NS], nsteps [NS], o_step [NS], g_step [NS];
  fp32_t o_pi [NS][NUM_ACT], o_v [NS], o_r [NS], g_data [NS][OUT_ROWS];
  fp32_t pim [8][MAX_STEPS][NUM_ACT], vm [8][MAX_STEPS], rm [8][MAX_STEPS];
  fp32_t got [NS][MAX_STEPS][OUT_ROWS];
  int checks = 0, failures = 0;

  lgcu #(.NSLOT(NS), .AGW(3)) dut (.clk, .rst_n, .start, .agent_in, .nsteps, .terminal, .done,
                                   .o_agent, .o_step, .o_pi, .o_v, .o_r, .g_we, .g_step, .g_data);

  always_comb
    for (int s = 0; s < NS; s++) begin
      o_pi[s] = pim[o_agent[s]][o_step[s]];
      o_v[s]  = vm[o_agent[s]][o_step[s]];
      o_r[s]  = rm[o_agent[s]][o_step[s]];
    end
  always_ff @(posedge clk)
    for (int s = 0; s < NS; s++) if (g_we[s]) got[s][g_step[s]] <= g_data[s];

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ps, pr [NUM_ACT], R, d, gref [OUT_ROWS];
    int cyc [NS], T [NS], ag [NS];
    logic term [NS];
    logic seen [NS];
    for (int s = 0; s < NS; s++) begin start[s] = 0; terminal[s] = 0; agent_in[s] = 0; nsteps[s] = 0; end
    for (int a = 0; a < 8; a++)
      for (int t = 0; t < MAX_STEPS; t++) begin
        ps = 0.0;
        for (int i = 0; i < NUM_ACT; i++) begin pr[i] = urand(0.05, 1.0); ps += pr[i]; end
        for (int i = 0; i < NUM_ACT; i++) pim[a][t][i] = r2f(pr[i] / ps);
        vm[a][t] = r2f(urand(-1.0, 1.0));
        rm[a][t] = r2f(urand(-1.0, 1.0));
      end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        ag[s] = (n * 2 + s) % 8; T[s] = 1 + (n + s) % 5; term[s] = (n % 3 == s);
        start[s] = 1; agent_in[s] = 3'(ag[s]); nsteps[s] = 3'(T[s]); terminal[s] = term[s];
        cyc[s] = 0;
      end
      @(negedge clk);
      for (int s = 0; s < NS; s++) start[s] = 0;
      for (int s = 0; s < NS; s++) seen[s] = 0;
      while (!(seen[0] && seen[1])) begin
        @(posedge clk);
        #1;
        for (int s = 0; s < NS; s++)
          if (!seen[s]) begin
            cyc[s]++;
            if (done[s]) seen[s] = 1;
          end
      end
      for (int s = 0; s < NS; s++) begin
        checks++;
        if (cyc[s] != 2 * T[s] + (term[s] ? 0 : 1)) begin
          failures++;
          $display("slot %0d: %0d cycles for %0d steps", s, cyc[s], T[s]);
        end
        R = term[s] ? 0.0 : f2r(vm[ag[s]][T[s]]);
        for (int t = T[s] - 1; t >= 0; t--) begin
          R = f2r(rm[ag[s]][t]) + 0.99 * R;
          d = R - f2r(vm[ag[s]][t]);
          for (int i = 0; i < NUM_ACT; i++) pr[i] = f2r(pim[ag[s]][t][i]);
          out_grad(pr, d, 0.01, gref);
          for (int i = 0; i < OUT_ROWS; i++) begin
            checks++;
            if (!near(f2r(got[s][t][i]), gref[i], 1e-4)) begin
              failures++;
              $display("slot %0d step %0d g[%0d] = %f expected %f", s, t, i, f2r(got[s][t][i]), gref[i]);
            end
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
