// pgcu_tb: two gradient engines of the PGCU receive different random inputs
// in the same cycles; each must produce its own gated products and tags.
module pgcu_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int NS = 2, L = 8;
  logic clk = 0, rst_n = 0;
  logic valid [NS], b_en [NS], sel [NS], dw_valid [NS], db_valid [NS];
  fp32_t gk [NS], x [NS][L], dw [NS][L], db [NS];
  paddr_t w_addr_in [NS], b_addr_in [NS], w_addr [NS], b_addr [NS];
  int checks = 0, failures = 0;

  pgcu #(.NSLOT(NS), .LANES(L)) dut (.clk, .rst_n, .valid, .b_en, .gk, .sel, .x, .w_addr_in,
                                     .b_addr_in, .dw, .db, .w_addr, .b_addr, .dw_valid, .db_valid);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e;
    for (int s = 0; s < NS; s++) begin
      valid[s] = 0; b_en[s] = 0; sel[s] = 0; gk[s] = 0; w_addr_in[s] = 0; b_addr_in[s] = 0;
      for (int j = 0; j < L; j++) x[s][j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        valid[s] = 1; b_en[s] = ($urandom % 2) == 1; sel[s] = ($urandom % 3) != 0;
        gk[s] = r2f(urand(-1.0, 1.0));
        w_addr_in[s] = paddr_t'($urandom % 70000);
        b_addr_in[s] = paddr_t'($urandom % 70000);
        for (int j = 0; j < L; j++) x[s][j] = r2f(urand(0.0, 2.0));
      end
      @(negedge clk);
      for (int s = 0; s < NS; s++) begin
        valid[s] = 0;
        checks += 3;
        if (!dw_valid[s] || db_valid[s] !== b_en[s]) begin failures++; $display("flags"); end
        if (w_addr[s] !== w_addr_in[s] || b_addr[s] !== b_addr_in[s]) begin failures++; $display("tags"); end
        if (!near(f2r(db[s]), sel[s] ? f2r(gk[s]) : 0.0, 1e-7)) begin failures++; $display("db"); end
        for (int j = 0; j < L; j++) begin
          e = sel[s] ? f2r(gk[s]) * f2r(x[s][j]) : 0.0;
          checks++;
          if (!near(f2r(dw[s][j]), e, 1e-6)) begin failures++; $display("slot %0d dw[%0d]", s, j); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
