// csg_buffer_tb: two writers store the sign information of random ReLU
// outputs (positive or zero) for different agents; three readers check every
// stored bit against a reference copy.
module csg_buffer_tb;
  import a3c_pkg::*;
  import tb_fp_pkg::*;
  localparam int NAG = 4, NW = 2, NR = 3, D = 64;
  logic clk = 0;
  logic we [NW];
  logic [1:0] wagent [NW], ragent [NR];
  saddr_t waddr [NW], raddr [NR];
  fp32_t wy [NW];
  logic rbit [NR];
  logic refm [NAG][D];
  int checks = 0, failures = 0;

  csg_buffer #(.NAG(NAG), .AGW(2), .NW(NW), .NR(NR), .DEPTH(D)) dut (
    .clk, .we, .wagent, .waddr, .wy, .ragent, .raddr, .rbit);

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NW; p++) begin we[p] = 0; wagent[p] = 0; waddr[p] = 0; wy[p] = 0; end
    for (int p = 0; p < NR; p++) begin ragent[p] = 0; raddr[p] = 0; end
    // fill everything once, writer p serving agents p and p+2
    for (int a = 0; a < 2; a++)
      for (int i = 0; i < D; i++) begin
        @(negedge clk);
        for (int p = 0; p < NW; p++) begin
          we[p] = 1;
          wagent[p] = 2'(p + 2 * a);
          waddr[p] = saddr_t'(i);
          wy[p] = ($urandom % 2) ? r2f(urand(0.001, 5.0)) : 32'd0;
          refm[p + 2 * a][i] = (wy[p] != 0);
        end
      end
    @(negedge clk);
    for (int p = 0; p < NW; p++) we[p] = 0;
    for (int a = 0; a < NAG; a++)
      for (int i = 0; i < D; i += NR) begin
        for (int p = 0; p < NR; p++) begin
          ragent[p] = 2'(a);
          raddr[p]  = saddr_t'((i + p) % D);
        end
        #1;
        for (int p = 0; p < NR; p++) begin
          checks++;
          if (rbit[p] !== refm[a][(i + p) % D]) begin
            failures++;
            $display("agent %0d bit %0d: got %b", a, (i + p) % D, rbit[p]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
