// bcu_tb: two backward engines of the BCU receive different random chunks in
// the same cycles; each engine's input gradients must match its own
// reference, showing that the engines work independently side by side.
module bcu_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int NS = 2, L = 8;
  logic clk = 0, rst_n = 0;
  logic valid [NS], clear [NS], last [NS], sel [NS], y_valid [NS];
  fp32_t gk [NS], w [NS][L], yp [NS][L];
  int checks = 0, failures = 0;

  bcu #(.NSLOT(NS), .LANES(L)) dut (.clk, .rst_n, .valid, .clear, .last, .gk, .sel, .w, .yp, .y_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real acc [NS][L];
    int K;
    for (int s = 0; s < NS; s++) begin
      valid[s] = 0; clear[s] = 0; last[s] = 0; sel[s] = 0; gk[s] = 0;
      for (int j = 0; j < L; j++) w[s][j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      K = 2 + $urandom % 7;
      for (int s = 0; s < NS; s++) for (int j = 0; j < L; j++) acc[s][j] = 0.0;
      for (int k = 0; k < K; k++) begin
        @(negedge clk);
        for (int s = 0; s < NS; s++) begin
          valid[s] = 1; clear[s] = (k == 0); last[s] = (k == K - 1);
          sel[s] = ($urandom % 4) != 0;
          gk[s] = r2f(urand(-1.0, 1.0));
          for (int j = 0; j < L; j++) begin
            w[s][j] = r2f(urand(-1.0, 1.0));
            if (sel[s]) acc[s][j] += f2r(gk[s]) * f2r(w[s][j]);
          end
        end
      end
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        valid[s] = 0; last[s] = 0;
        checks++;
        if (!y_valid[s]) begin failures++; $display("slot %0d: y_valid missing", s); end
        for (int j = 0; j < L; j++) begin
          checks++;
          if (!near(f2r(yp[s][j]), acc[s][j], 1e-5)) begin
            failures++;
            $display("slot %0d y'[%0d] = %f expected %f", s, j, f2r(yp[s][j]), acc[s][j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
