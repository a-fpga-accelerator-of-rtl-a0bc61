// gpe_tb: random gradients, sign bits and input chunks; dw must equal
// x'_k * x_j when the sign bit is 1 and 0 otherwise, db the gated x'_k, with
// the address tags and valid flags one cycle after the inputs.
module gpe_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int L = 8;
  logic clk = 0, rst_n = 0, valid = 0, b_en = 0, sel = 0, dw_valid, db_valid;
  fp32_t gk, x [L], dw [L], db;
  paddr_t w_addr_in, b_addr_in, w_addr, b_addr;
  int checks = 0, failures = 0;

  gpe #(.LANES(L)) dut (.clk, .rst_n, .valid, .b_en, .gk, .sel, .x, .w_addr_in, .b_addr_in,
                        .dw, .db, .w_addr, .b_addr, .dw_valid, .db_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    gk = 0; w_addr_in = 0; b_addr_in = 0;
    for (int j = 0; j < L; j++) x[j] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      valid = 1;
      b_en  = ($urandom % 2) == 1;
      sel   = ($urandom % 3) != 0;
      gk    = r2f(urand(-1.0, 1.0));
      w_addr_in = paddr_t'($urandom % 70000);
      b_addr_in = paddr_t'($urandom % 70000);
      for (int j = 0; j < L; j++) x[j] = r2f(urand(0.0, 3.0));
      @(negedge clk);
      valid = 0;
      checks += 4;
      if (!dw_valid || db_valid !== b_en) begin failures++; $display("valid flags wrong"); end
      if (w_addr !== w_addr_in || b_addr !== b_addr_in) begin failures++; $display("tags wrong"); end
      if (!near(f2r(db), sel ? f2r(gk) : 0.0, 1e-7)) begin failures++; $display("db wrong"); end
      for (int j = 0; j < L; j++) begin
        e = sel ? f2r(gk) * f2r(x[j]) : 0.0;
        if (!near(f2r(dw[j]), e, 1e-6)) begin
          failures++;
          $display("dw[%0d] = %f expected %f", j, f2r(dw[j]), e);
        end
      end
      @(posedge clk); #1;
      checks++;
      if (dw_valid) begin failures++; $display("dw_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
