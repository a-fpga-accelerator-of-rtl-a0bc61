// softmax_unit_tb: random logit vectors in [-6, 6]; the probabilities are
// compared with a real-valued softmax, and must appear one cycle later.
module softmax_unit_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, valid = 0, pi_valid;
  fp32_t x [N], pi [N];
  int checks = 0, failures = 0;

  softmax_unit #(.N(N)) dut (.clk, .rst_n, .valid, .x, .pi, .pi_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e [N], s;
    for (int i = 0; i < N; i++) x[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      s = 0.0;
      for (int i = 0; i < N; i++) begin
        x[i] = r2f(urand(-6.0, 6.0));
        e[i] = $exp(f2r(x[i]));
        s += e[i];
      end
      valid = 1;
      @(negedge clk);
      valid = 0;
      checks++;
      if (!pi_valid) begin failures++; $display("pi_valid missing"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (!near(f2r(pi[i]), e[i] / s, 2e-6)) begin
          failures++;
          $display("pi[%0d] = %f expected %f", i, f2r(pi[i]), e[i] / s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
