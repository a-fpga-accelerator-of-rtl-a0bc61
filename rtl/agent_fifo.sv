// agent_fifo: synchronous FIFO of agent numbers in the RMSProp unit.
//
// When an agent finishes aggregating its gradients its number is pushed; the
// parameter update module pops the oldest number whenever it is idle, so the
// central parameters are updated one agent at a time in completion order.
// Standard first-word-fall-through FIFO: dout is valid while !empty; push
// when full is dropped and flagged by an assertion. One push and one pop may
// happen in the same cycle.
// rst_n is an asynchronous reset for the pointers; the two assertions also
// use it (disable iff) to stay quiet during reset, which is why lint reports
// rst_n as used both asynchronously and synchronously. No logic samples it.
module agent_fifo #(
  parameter int DEPTH = 8,
  parameter int W     = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int PW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic [PW:0]   cnt;

  assign empty = (cnt == '0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign dout  = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= din;
        wp      <= (int'(wp) == DEPTH - 1) ? '0 : wp + 1'b1;
      end
      if (pop && !empty) rp <= (int'(rp) == DEPTH - 1) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
