// param_update_tb: the update module sweeps a small parameter space (P = 37,
// not a multiple of the 8 lanes) twice with random gradients, against memory
// models in the testbench. After each sweep every parameter and mean-square
// word is compared with real-valued RMSProp:
//   g' = 0.99 g + 0.01 d^2,  theta' = theta - 7e-4 d / sqrt(g' + 0.1)
// and the sweep must end (done) ceil(P/8) + 2 cycles after the start cycle.
module param_update_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int L = 8, NP = 37;
  logic clk = 0, rst_n = 0, start = 0, busy, done, rd_en, wr_en;
  logic [2:0] agent;
  paddr_t rd_addr, wr_addr;
  logic [L-1:0] rd_mask, wr_mask;
  fp32_t grad_rd [L], ms_rd [L], th_rd [L], th_wr [L], ms_wr [L];
  fp32_t gm [NP], msm [NP], thm [NP];
  int checks = 0, failures = 0;

  param_update #(.LANES(L), .AGW(3), .P(NP)) dut (
    .clk, .rst_n, .start, .start_agent(3'd5), .busy, .done, .agent, .rd_en, .rd_addr, .rd_mask,
    .grad_rd, .ms_rd, .th_rd, .wr_en, .wr_addr, .wr_mask, .th_wr, .ms_wr);

  always_comb
    for (int i = 0; i < L; i++) begin
      grad_rd[i] = (int'(rd_addr) + i < NP) ? gm[int'(rd_addr) + i] : 0;
      ms_rd[i]   = (int'(rd_addr) + i < NP) ? msm[int'(rd_addr) + i] : 0;
      th_rd[i]   = (int'(rd_addr) + i < NP) ? thm[int'(rd_addr) + i] : 0;
    end
  always_ff @(posedge clk)
    if (wr_en)
      for (int i = 0; i < L; i++)
        if (wr_mask[i]) begin
          thm[int'(wr_addr) + i] <= th_wr[i];
          msm[int'(wr_addr) + i] <= ms_wr[i];
        end

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real eth [NP], ems [NP], d;
    int cyc;
    for (int i = 0; i < NP; i++) begin msm[i] = 0; thm[i] = r2f(urand(-1.0, 1.0)); end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2; n++) begin
      for (int i = 0; i < NP; i++) begin
        gm[i] = r2f(urand(-2.0, 2.0));
        d = f2r(gm[i]);
        ems[i] = 0.99 * f2r(msm[i]) + 0.01 * d * d;
        eth[i] = f2r(thm[i]) - 7e-4 * d / $sqrt(ems[i] + 0.1);
      end
      @(negedge clk);
      start = 1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      start = 0;
      checks++;
      if (agent !== 3'd5 || !busy) begin failures++; $display("agent/busy wrong"); end
      while (!done) begin @(posedge clk); cyc++; #1; end
      checks++;
      if (cyc != (NP + L - 1) / L + 2) begin failures++; $display("sweep took %0d cycles", cyc); end
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("still busy"); end
      for (int i = 0; i < NP; i++) begin
        checks += 2;
        if (!near(f2r(msm[i]), ems[i], 1e-5)) begin failures++; $display("g[%0d] %f vs %f", i, f2r(msm[i]), ems[i]); end
        if (!near(f2r(thm[i]) - eth[i], 0.0, 2e-7)) begin failures++; $display("theta[%0d] %f vs %f", i, f2r(thm[i]), eth[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
