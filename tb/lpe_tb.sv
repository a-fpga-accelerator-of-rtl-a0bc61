// lpe_tb: random probability vectors and advantages. The reference forms the
// actor gradient c*(1 - ln z)^T J + delta*(e_imax - z) element by element in
// real arithmetic and the critic gradient -2*delta; the engine must output
// their negation and -2*delta one cycle after valid.
module lpe_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam real C = 0.01;
  logic clk = 0, rst_n = 0, valid = 0, g_valid;
  fp32_t z [NUM_ACT], delta, g [OUT_ROWS];
  int checks = 0, failures = 0;

  lpe dut (.clk, .rst_n, .valid, .z, .delta, .g, .g_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real zr [NUM_ACT], s, d, acc, jkj, expv;
    int imax;
    for (int i = 0; i < NUM_ACT; i++) z[i] = 0;
    delta = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      s = 0.0;
      for (int i = 0; i < NUM_ACT; i++) begin zr[i] = urand(0.05, 1.0); s += zr[i]; end
      imax = 0;
      for (int i = 0; i < NUM_ACT; i++) begin
        z[i]  = r2f(zr[i] / s);
        zr[i] = f2r(z[i]);
        if (zr[i] > zr[imax]) imax = i;
      end
      d = urand(-3.0, 3.0);
      delta = r2f(d);
      d = f2r(delta);
      @(negedge clk);
      valid = 1;
      @(negedge clk);
      valid = 0;
      checks++;
      if (!g_valid) begin failures++; $display("g_valid missing"); end
      for (int j = 0; j < NUM_ACT; j++) begin
        acc = 0.0;
        for (int k = 0; k < NUM_ACT; k++) begin
          jkj = (k == j) ? zr[k] * (1.0 - zr[k]) : -zr[k] * zr[j];
          acc += (1.0 - $ln(zr[k])) * jkj;
        end
        expv = -(C * acc + d * (((j == imax) ? 1.0 : 0.0) - zr[j]));
        checks++;
        if (!near(f2r(g[j]), expv, 1e-5)) begin
          failures++;
          $display("g[%0d] = %f expected %f", j, f2r(g[j]), expv);
        end
      end
      checks++;
      if (!near(f2r(g[NUM_ACT]), -2.0 * d, 1e-6)) begin
        failures++;
        $display("critic g = %f expected %f", f2r(g[NUM_ACT]), -2.0 * d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
