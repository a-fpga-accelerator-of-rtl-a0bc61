// a3c_accel_tb: end-to-end test of the whole accelerator at its default
// size (8 agents, 6 forward engines, 6 training slots, 8 lanes, the full
// 128-256-128-64-5 network). This is also the full-size testbench.
// Phases:
//   1. parameter load through the host port, then the clearing sweep;
//   2. rollouts: every agent runs Tmax = 5 steps plus one bootstrap
//      inference, all agents in flight at once; each pi and v is compared
//      with the real-valued reference network, and the latency of the first
//      inference is checked against the engine schedule;
//   3. training of agent 0 alone (bootstrapped): after upd_done every
//      parameter is read back and compared with reference A3C gradients
//      followed by RMSProp;
//   4. agents 1..7 request training back to back (agent 7 with a terminal
//      last step): slots run concurrently, the seventh request waits for a
//      slot, updates queue in the agent FIFO and finish once per agent, and
//      an inference request for a pending agent is refused.
// Each mechanism is counted; a mechanism that never happened is a failure.
// Run time is a few minutes (the FP32 operators are simulated bit-exactly).
module a3c_accel_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  import tb_a3c_ref_pkg::*;
  localparam int NAG = 8, NF = 6, NT = 6, TMAX = 5;
  localparam int FPE_CYC = 256*16 + 128*32 + 64*16 + 5*8 + NUM_LAYERS + 2 + NUM_ACT;

  logic clk = 0, rst_n = 0;
  logic th_we = 0, st_we = 0, rw_we = 0;
  paddr_t th_addr = 0, th_raddr = 0;
  fp32_t th_wdata = 0, th_rdata, st_data = 0, rw_data = 0;
  logic [2:0] st_agent = 0, rw_agent = 0, inf_req_agent = 0, train_req_agent = 0;
  logic [2:0] st_step = 0, rw_step = 0, inf_req_step = 0, train_req_nsteps = 0;
  logic [6:0] st_idx = 0;
  logic inf_req_valid = 0, inf_req_ready, inf_rsp_valid, train_req_valid = 0, train_req_ready;
  logic train_req_terminal = 0, upd_done, init_busy, upd_busy;
  logic [2:0] inf_rsp_agent, inf_rsp_step, upd_agent;
  fp32_t inf_rsp_pi [NUM_ACT], inf_rsp_v;
  logic [NAG-1:0] pending;
  logic [NF-1:0] fpe_busy;
  logic [NT-1:0] slot_busy;
  int checks = 0, failures = 0;

  a3c_accel dut (
    .clk, .rst_n, .th_we, .th_addr, .th_wdata, .th_raddr, .th_rdata,
    .st_we, .st_agent, .st_step, .st_idx, .st_data, .rw_we, .rw_agent, .rw_step, .rw_data,
    .inf_req_valid, .inf_req_ready, .inf_req_agent, .inf_req_step,
    .inf_rsp_valid, .inf_rsp_agent, .inf_rsp_step, .inf_rsp_pi, .inf_rsp_v,
    .train_req_valid, .train_req_ready, .train_req_agent, .train_req_nsteps, .train_req_terminal,
    .upd_done, .upd_agent, .init_busy, .pending, .fpe_busy, .slot_busy, .upd_busy);

  always #5 clk = ~clk;
  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- observed mechanisms ----------------
  int max_fpe = 0, max_slot = 0, fifo_queued = 0, slot_refused = 0, pend_refused = 0;
  int n_upd [NAG];
  logic inf_wait [NAG];
  fp32_t got_pi [NAG][TMAX + 1][NUM_ACT], got_v [NAG][TMAX + 1];
  int n_rsp = 0;

  always @(posedge clk) if (rst_n) begin
    if ($countones(fpe_busy) > max_fpe) max_fpe = $countones(fpe_busy);
    if ($countones(slot_busy) > max_slot) max_slot = $countones(slot_busy);
    if (int'(dut.u_rms.u_fifo.cnt) >= 2) fifo_queued++;
    if (inf_rsp_valid) begin
      for (int i = 0; i < NUM_ACT; i++) got_pi[inf_rsp_agent][inf_rsp_step][i] = inf_rsp_pi[i];
      got_v[inf_rsp_agent][inf_rsp_step] = inf_rsp_v;
      inf_wait[inf_rsp_agent] = 1'b0;
      n_rsp++;
    end
    if (upd_done) n_upd[upd_agent]++;
  end

  task automatic count_mech(input string name, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("mechanism never observed: %s", name); end
  endtask

  // ---------------- stimulus and reference ----------------
  real st [NAG][TMAX + 1][128], rw [NAG][TMAX];
  real th0 [NUM_PARAMS];

  initial begin
    real a [5][256], rpi [NUM_ACT], gout [OUT_ROWS], s [128];
    real r, delta, ms, exp_th;
    int cyc, nerr, nchg, na;
    bit found;

    for (int a_ = 0; a_ < NAG; a_++) begin n_upd[a_] = 0; inf_wait[a_] = 1'b0; end
    // 1. parameters
    for (int l = 0; l < NUM_LAYERS; l++) begin
      for (int i = 0; i < layer_in(l) * layer_out(l); i++)
        th[w_base(l) + i] = f2r(r2f(urand(-1.7, 1.7) / $sqrt(real'(layer_in(l)))));
      for (int k = 0; k < layer_out(l); k++) th[b_base(l) + k] = f2r(r2f(urand(-0.1, 0.1)));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (init_busy) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != (NUM_PARAMS + 7) / 8) begin failures++; $display("clearing sweep took %0d cycles", cyc); end
    th_we = 1;
    for (int i = 0; i < NUM_PARAMS; i++) begin
      th_addr = paddr_t'(i); th_wdata = r2f(th[i]);
      @(negedge clk);
    end
    th_we = 0;
    th0 = th;

    // observations of every step (the bootstrap state is step TMAX) and rewards
    st_we = 1;
    for (int a_ = 0; a_ < NAG; a_++)
      for (int t = 0; t <= TMAX; t++)
        for (int j = 0; j < 128; j++) begin
          st_data = r2f(urand(0.0, 1.0));
          st[a_][t][j] = f2r(st_data);
          st_agent = 3'(a_); st_step = 3'(t); st_idx = 7'(j);
          @(negedge clk);
        end
    st_we = 0;
    rw_we = 1;
    for (int a_ = 0; a_ < NAG; a_++)
      for (int t = 0; t < TMAX; t++) begin
        rw_data = r2f(urand(-1.0, 1.0));
        rw[a_][t] = f2r(rw_data);
        rw_agent = 3'(a_); rw_step = 3'(t);
        @(negedge clk);
      end
    rw_we = 0;

    // 2. rollouts of all agents at once: each agent issues its next step as
    // soon as the previous response came back
    begin
      int nxt [NAG];
      int first_cyc;
      first_cyc = -1;
      for (int a_ = 0; a_ < NAG; a_++) nxt[a_] = 0;
      cyc = 0;
      while (n_rsp < NAG * (TMAX + 1)) begin
        inf_req_valid = 0;
        found = 0;
        for (int a_ = 0; a_ < NAG; a_++)
          if (!found && !inf_wait[a_] && nxt[a_] <= TMAX) begin
            found = 1;
            inf_req_valid = 1; inf_req_agent = 3'(a_); inf_req_step = 3'(nxt[a_]);
          end
        #1;
        if (inf_req_valid && inf_req_ready) begin
          inf_wait[inf_req_agent] = 1'b1;
          nxt[inf_req_agent]++;
        end
        @(negedge clk);
        cyc++;
        if (first_cyc < 0 && n_rsp > 0) first_cyc = cyc;
      end
      inf_req_valid = 0;
      // the first request is accepted at cycle 0's edge; the response is
      // registered one cycle after the engine's done
      checks++;
      if (first_cyc != FPE_CYC + 2) begin
        failures++; $display("first inference took %0d cycles, expected %0d", first_cyc, FPE_CYC + 2);
      end
    end
    nerr = 0;
    for (int a_ = 0; a_ < NAG; a_++)
      for (int t = 0; t <= TMAX; t++) begin
        forward(st[a_][t], a, rpi);
        for (int i = 0; i < NUM_ACT; i++) begin
          checks++;
          if (!near(f2r(got_pi[a_][t][i]), rpi[i], 1e-4)) begin
            failures++; nerr++;
            if (nerr < 10) $display("agent %0d step %0d pi[%0d] %f vs %f", a_, t, i, f2r(got_pi[a_][t][i]), rpi[i]);
          end
        end
        checks++;
        if (!near(f2r(got_v[a_][t]), a[4][4], 1e-4)) begin
          failures++; nerr++;
          if (nerr < 10) $display("agent %0d step %0d v %f vs %f", a_, t, f2r(got_v[a_][t]), a[4][4]);
        end
      end

    // 3. training of agent 0, bootstrapped from the value of step TMAX
    @(negedge clk);
    train_req_valid = 1; train_req_agent = 0; train_req_nsteps = 3'(TMAX); train_req_terminal = 0;
    #1;
    checks++;
    if (!train_req_ready) begin failures++; $display("training request refused"); end
    @(negedge clk);
    train_req_valid = 0;
    inf_req_valid = 1; inf_req_agent = 0; inf_req_step = 0;
    #1;
    if (!inf_req_ready) pend_refused++;
    @(negedge clk);
    inf_req_valid = 0;
    while (!upd_done) @(negedge clk);
    checks++;
    if (upd_agent != 0) begin failures++; $display("update reported for agent %0d", upd_agent); end
    @(negedge clk);
    // reference: gradients of all steps against theta0, then RMSProp from zero
    for (int i = 0; i < NUM_PARAMS; i++) gsum[i] = 0.0;
    forward(st[0][TMAX], a, rpi);
    r = a[4][4];
    for (int t = TMAX - 1; t >= 0; t--) begin
      forward(st[0][t], a, rpi);
      r = rw[0][t] + 0.99 * r;
      delta = r - a[4][4];
      out_grad(rpi, delta, 0.01, gout);
      add_grad(a, gout);
    end
    nerr = 0; nchg = 0;
    for (int i = 0; i < NUM_PARAMS; i++) begin
      ms = 0.01 * gsum[i] * gsum[i];
      exp_th = th0[i] - 7e-4 * gsum[i] / $sqrt(ms + 0.1);
      th_raddr = paddr_t'(i);
      #1;
      checks++;
      if (!near(f2r(th_rdata), exp_th, 2e-6)) begin
        failures++; nerr++;
        if (nerr < 10) $display("theta[%0d] = %.9f expected %.9f (was %.9f)", i, f2r(th_rdata), exp_th, th0[i]);
      end
      if (f2r(th_rdata) != th0[i]) nchg++;
    end
    checks++;
    if (nchg < NUM_PARAMS / 4) begin failures++; $display("only %0d parameters changed", nchg); end
    $display("agent 0 update: %0d of %0d parameters changed, %0d mismatches", nchg, NUM_PARAMS, nerr);

    // 4. concurrent training of agents 1..7; agent 7 ends in a terminal state
    for (int a_ = 1; a_ < NAG; a_++) begin
      @(negedge clk);
      train_req_valid = 1; train_req_agent = 3'(a_); train_req_nsteps = 3'(TMAX);
      train_req_terminal = (a_ == NAG - 1);
      #1;
      while (!train_req_ready) begin
        slot_refused++;
        @(negedge clk);
        #1;
      end
      @(negedge clk);
      train_req_valid = 0;
      if (a_ == 1) begin
        inf_req_valid = 1; inf_req_agent = 1; inf_req_step = 0;
        #1;
        if (!inf_req_ready) pend_refused++;
        @(negedge clk);
        inf_req_valid = 0;
      end
    end
    while (pending != 0) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int a_ = 0; a_ < NAG; a_++) begin
      checks++;
      if (n_upd[a_] != 1) begin failures++; $display("agent %0d: %0d updates", a_, n_upd[a_]); end
    end
    // the parameters must stay finite
    nerr = 0;
    for (int i = 0; i < NUM_PARAMS; i++) begin
      th_raddr = paddr_t'(i);
      #1;
      if (th_rdata[30:23] == 8'hFF || f2r(th_rdata) > 100.0 || f2r(th_rdata) < -100.0) nerr++;
    end
    checks++;
    if (nerr != 0) begin failures++; $display("%0d parameters out of range", nerr); end

    $display("mechanisms: max engines %0d, max slots %0d, fifo queued %0d cycles, slot waits %0d, pending refusals %0d",
             max_fpe, max_slot, fifo_queued, slot_refused, pend_refused);
    count_mech("all forward engines busy at once", max_fpe == NF);
    count_mech("all training slots busy at once", max_slot == NT);
    count_mech("training request waiting for a free slot", slot_refused > 0);
    count_mech("updates queued in the agent FIFO", fifo_queued > 0);
    count_mech("inference refused for a pending agent", pend_refused == 2);
    count_mech("terminal rollout trained", n_upd[NAG - 1] == 1);
    count_mech("bootstrapped rollout trained", n_upd[0] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
