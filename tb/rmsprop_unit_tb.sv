// rmsprop_unit_tb: small unit (4 agents, 2 slots, P = 40) with a parameter
// memory model. Two slots aggregate random weight and bias gradients for
// agents 1 and 2 at the same time, then report completion in the same cycle.
// Checks: the clearing sweep after reset, one FIFO push per cycle (slot 0
// first), updates in FIFO order, the parameters against real-valued RMSProp
// applied agent after agent, and that an agent's buffer is empty after its
// update (a second update of agent 1 without gradients leaves theta alone).
module rmsprop_unit_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int NAG = 4, NS = 2, L = 8, NP = 40;
  logic clk = 0, rst_n = 0;
  logic dw_valid [NS], db_valid [NS], fin_valid [NS], fin_ready [NS];
  logic [1:0] agg_agent [NS], fin_agent [NS], upd_agent;
  paddr_t w_addr [NS], b_addr [NS], th_rd_addr, th_wr_addr;
  fp32_t dw [NS][L], db [NS], th_rd [L], th_wr [L];
  logic th_wr_en, upd_done, upd_busy, init_busy;
  logic [L-1:0] th_wr_mask;
  fp32_t thm [NP];
  int checks = 0, failures = 0;

  rmsprop_unit #(.NAG(NAG), .AGW(2), .NSLOT(NS), .LANES(L), .P(NP)) dut (
    .clk, .rst_n, .dw_valid, .agg_agent, .w_addr, .dw, .db_valid, .b_addr, .db,
    .fin_valid, .fin_agent, .fin_ready, .th_rd_addr, .th_rd, .th_wr_en, .th_wr_addr,
    .th_wr_mask, .th_wr, .upd_done, .upd_agent, .upd_busy, .init_busy);

  always_comb
    for (int i = 0; i < L; i++) th_rd[i] = (int'(th_rd_addr) + i < NP) ? thm[int'(th_rd_addr) + i] : 0;
  always_ff @(posedge clk)
    if (rst_n && th_wr_en)
      for (int i = 0; i < L; i++) if (th_wr_mask[i]) thm[int'(th_wr_addr) + i] <= th_wr[i];

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real gref [NAG][NP], ms [NP], eth [NP];

  task automatic apply_ref(input int a);
    for (int i = 0; i < NP; i++) begin
      ms[i]  = 0.99 * ms[i] + 0.01 * gref[a][i] * gref[a][i];
      eth[i] = eth[i] - 7e-4 * gref[a][i] / $sqrt(ms[i] + 0.1);
      gref[a][i] = 0.0;
    end
  endtask

  task automatic wait_upd(input int a);
    while (!upd_done) @(negedge clk);
    checks++;
    if (int'(upd_agent) != a) begin failures++; $display("update of agent %0d, expected %0d", upd_agent, a); end
    apply_ref(a);
    @(negedge clk);
  endtask

  initial begin
    int cyc;
    for (int s = 0; s < NS; s++) begin
      dw_valid[s] = 0; db_valid[s] = 0; fin_valid[s] = 0; agg_agent[s] = 2'(s + 1);
      fin_agent[s] = 2'(s + 1); w_addr[s] = 0; b_addr[s] = 0; db[s] = 0;
      for (int i = 0; i < L; i++) dw[s][i] = 0;
    end
    for (int i = 0; i < NP; i++) begin
      thm[i] = r2f(urand(-1.0, 1.0)); eth[i] = f2r(thm[i]); ms[i] = 0.0;
      for (int a = 0; a < NAG; a++) gref[a][i] = 0.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (init_busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != (NP + L - 1) / L) begin failures++; $display("clearing took %0d cycles", cyc); end
    // aggregation from both slots at once
    for (int n = 0; n < 30; n++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        dw_valid[s] = 1;
        w_addr[s] = paddr_t'($urandom % (NP - 2 * L + 1));
        db_valid[s] = ($urandom % 2) == 1;
        b_addr[s] = paddr_t'(NP - L + $urandom % L);   // bias words after the weights
        db[s] = r2f(urand(-1.0, 1.0));
        for (int i = 0; i < L; i++) begin
          dw[s][i] = r2f(urand(-1.0, 1.0));
          gref[s + 1][int'(w_addr[s]) + i] += f2r(dw[s][i]);
        end
        if (db_valid[s]) gref[s + 1][b_addr[s]] += f2r(db[s]);
      end
    end
    @(negedge clk);
    for (int s = 0; s < NS; s++) begin dw_valid[s] = 0; db_valid[s] = 0; fin_valid[s] = 1; end
    #1;
    checks++;
    if (!fin_ready[0] || fin_ready[1]) begin failures++; $display("slot 0 must be accepted first"); end
    @(negedge clk);
    fin_valid[0] = 0;
    #1;
    checks++;
    if (!fin_ready[1]) begin failures++; $display("slot 1 not accepted next"); end
    @(negedge clk);
    fin_valid[1] = 0;
    wait_upd(1);
    wait_upd(2);
    // agent 1 again, nothing aggregated: parameters must not move
    fin_valid[0] = 1;
    @(negedge clk);
    fin_valid[0] = 0;
    wait_upd(1);
    repeat (3) @(negedge clk);
    for (int i = 0; i < NP; i++) begin
      checks++;
      if (!near(f2r(thm[i]) - eth[i], 0.0, 3e-7)) begin
        failures++;
        $display("theta[%0d] = %f expected %f", i, f2r(thm[i]), eth[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule


