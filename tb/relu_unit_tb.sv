// relu_unit_tb: random positive, negative and zero inputs; the output must
// equal the input when it is positive and +0 otherwise.
module relu_unit_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  fp32_t x, y;
  int checks = 0, failures = 0;

  relu_unit dut (.x, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r;
    for (int n = 0; n < 500; n++) begin
      r = (n % 10 == 0) ? 0.0 : urand(-10.0, 10.0);
      x = r2f(r);
      if (n % 25 == 1) x = 32'h8000_0000;   // negative zero
      #1;
      checks++;
      if (r > 0.0 && n % 25 != 1) begin
        if (y !== x) begin failures++; $display("relu(%f) = %f", r, f2r(y)); end
      end else if (y !== 32'd0) begin
        failures++;
        $display("relu(%f) = %h, expected +0", r, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
