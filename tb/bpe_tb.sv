// bpe_tb: random chunks of K output neurons with random gradients, sign bits
// and weight rows. The reference accumulates x'_k * w[k][j] over the neurons
// whose sign bit is 1; y_valid must pulse exactly one cycle after 'last'.
module bpe_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, valid = 0, clear = 0, last = 0, sel = 0, y_valid;
  fp32_t gk, w [L], yp [L];
  int checks = 0, failures = 0;

  bpe #(.LANES(L)) dut (.clk, .rst_n, .valid, .clear, .last, .gk, .sel, .w, .yp, .y_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc [L];
    int K;
    gk = 0;
    for (int j = 0; j < L; j++) w[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 150; n++) begin
      K = 1 + $urandom % 9;
      for (int j = 0; j < L; j++) acc[j] = 0.0;
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        valid = 1;
        clear = (k == 0);
        last  = (k == K - 1);
        sel   = ($urandom % 3) != 0;
        gk    = r2f(urand(-1.0, 1.0));
        for (int j = 0; j < L; j++) begin
          w[j] = r2f(urand(-1.0, 1.0));
          if (sel) acc[j] += f2r(gk) * f2r(w[j]);
        end
        if (k != K - 1) begin
          @(posedge clk); #1;
          checks++;
          if (y_valid) begin failures++; $display("early y_valid"); end
        end
      end
      @(negedge clk);
      valid = 0;
      last  = 0;
      checks++;
      if (!y_valid) begin failures++; $display("y_valid missing"); end
      for (int j = 0; j < L; j++) begin
        checks++;
        if (!near(f2r(yp[j]), acc[j], 1e-5)) begin
          failures++;
          $display("chunk %0d y'[%0d] = %f expected %f", n, j, f2r(yp[j]), acc[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
