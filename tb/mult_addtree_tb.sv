// mult_addtree_tb: drives random neurons of 1 to 4 chunks through the
// Multiplier-AddTree module and compares each neuron's sum (bias plus all
// products) with a real-valued reference. Also checks the one-cycle latency.
module mult_addtree_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, valid = 0, first = 0;
  fp32_t x [L], w [L], b, y;
  logic y_valid;
  int checks = 0, failures = 0;

  mult_addtree #(.LANES(L)) dut (.clk, .rst_n, .valid, .first, .x, .w, .b, .acc_in(y), .y, .y_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real ref_sum;
    int nch;
    for (int i = 0; i < L; i++) begin x[i] = 0; w[i] = 0; end
    b = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      nch = 1 + $urandom % 4;
      b = r2f(urand(-1.0, 1.0));
      ref_sum = f2r(b);
      for (int c = 0; c < nch; c++) begin
        @(negedge clk);
        valid = 1;
        first = (c == 0);
        for (int i = 0; i < L; i++) begin
          x[i] = r2f(urand(-2.0, 2.0));
          w[i] = r2f(urand(-1.0, 1.0));
          ref_sum += f2r(x[i]) * f2r(w[i]);
        end
        @(posedge clk);
        #1;
        checks++;
        if (!y_valid) begin
          failures++;
          $display("no y_valid one cycle after a chunk");
        end
      end
      @(negedge clk);
      valid = 0;
      checks++;
      if (!near(f2r(y), ref_sum, 1e-5)) begin
        failures++;
        $display("neuron %0d: got %f expected %f", n, f2r(y), ref_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
