// fpe_tb: one forward engine with a memory model around it (combinational
// parameter and activation reads). Several random states are run through the
// full 128-256-128-64-5 network; the probabilities, the value, every written
// hidden output and every captured ReLU output are compared with the real
// reference model, and the pass length is checked against
// sum(out*in/LANES) + layers + 2 + actions cycles after the start cycle.
module fpe_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  import tb_a3c_ref_pkg::*;
  localparam int L = 8;
  localparam int EXP_CYC = 256*16 + 128*32 + 64*16 + 5*8 + NUM_LAYERS + 2 + NUM_ACT;

  logic clk = 0, rst_n = 0, start = 0, busy, a_we, s_we, done_valid, done_ready = 0;
  logic [2:0] agent, step, start_step = 0;
  paddr_t p_addr, b_addr;
  aaddr_t a_raddr, a_waddr;
  saddr_t s_waddr;
  fp32_t p_data [L], a_rdata [L], b_data, a_wdata, s_wdata, pi [NUM_ACT], v;
  fp32_t thm [NUM_PARAMS];
  fp32_t actm [MAX_STEPS * ACT_WORDS];
  int checks = 0, failures = 0;

  fpe #(.LANES(L), .AGW(3)) dut (
    .clk, .rst_n, .start, .start_agent(3'd0), .start_step, .busy, .agent, .step,
    .p_addr, .p_data, .b_addr, .b_data, .a_raddr, .a_rdata, .a_we, .a_waddr, .a_wdata,
    .s_we, .s_waddr, .s_wdata, .done_valid, .done_ready, .pi, .v);

  always_comb begin
    for (int i = 0; i < L; i++) begin
      p_data[i]  = (int'(p_addr) + i < NUM_PARAMS) ? thm[int'(p_addr) + i] : 0;
      a_rdata[i] = actm[int'(a_raddr) + i];
    end
    b_data = thm[b_addr];
  end
  always_ff @(posedge clk) if (a_we) actm[a_waddr] <= a_wdata;

  // every ReLU output offered to the sign store must be the written activation
  always @(posedge clk)
    if (s_we) begin
      checks++;
      if (!a_we || s_wdata !== a_wdata) begin
        failures++;
        $display("sign capture mismatch");
      end
    end

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s [128], a [5][256], rpi [NUM_ACT];
    int cyc, nerr;
    for (int l = 0; l < NUM_LAYERS; l++) begin
      for (int i = 0; i < layer_in(l) * layer_out(l); i++)
        thm[w_base(l) + i] = r2f(urand(-1.7, 1.7) / $sqrt(real'(layer_in(l))));
      for (int k = 0; k < layer_out(l); k++) thm[b_base(l) + k] = r2f(urand(-0.1, 0.1));
    end
    for (int i = 0; i < NUM_PARAMS; i++) th[i] = f2r(thm[i]);
    for (int i = 0; i < MAX_STEPS * ACT_WORDS; i++) actm[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      start_step = 3'(n * 2 + 1);
      for (int j = 0; j < 128; j++) begin
        actm[int'(start_step) * ACT_WORDS + j] = r2f(urand(0.0, 1.0));
        s[j] = f2r(actm[int'(start_step) * ACT_WORDS + j]);
      end
      forward(s, a, rpi);
      @(negedge clk);
      start = 1;
      @(posedge clk);
      cyc = 0;
      @(negedge clk);
      start = 0;
      while (!done_valid) begin @(posedge clk); cyc++; #1; end
      checks++;
      if (cyc != EXP_CYC) begin failures++; $display("pass took %0d cycles, expected %0d", cyc, EXP_CYC); end
      for (int i = 0; i < NUM_ACT; i++) begin
        checks++;
        if (!near(f2r(pi[i]), rpi[i], 1e-4)) begin failures++; $display("pi[%0d] %f vs %f", i, f2r(pi[i]), rpi[i]); end
        checks++;
        if (actm[int'(start_step) * ACT_WORDS + act_base(4) + i] !== pi[i]) begin failures++; $display("pi not stored"); end
      end
      checks++;
      if (!near(f2r(v), a[4][4], 1e-4)) begin failures++; $display("v %f vs %f", f2r(v), a[4][4]); end
      nerr = 0;
      for (int l = 1; l < 4; l++)
        for (int k = 0; k < layer_out(l - 1); k++)
          if (!near(f2r(actm[int'(start_step) * ACT_WORDS + act_base(l) + k]), a[l][k], 1e-4)) nerr++;
      checks++;
      if (nerr != 0) begin failures++; $display("%0d hidden outputs differ", nerr); end
      @(negedge clk);
      done_ready = 1;
      @(negedge clk);
      done_ready = 0;
      checks++;
      if (busy) begin failures++; $display("engine still busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
