// agent_fifo_tb: random pushes and pops against a queue model; checks the
// head, empty and full flags every cycle, including simultaneous push/pop.
module agent_fifo_tb;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, empty, full;
  logic [2:0] din, dout;
  logic [2:0] q [$];
  int checks = 0, failures = 0, npush = 0, npop = 0, nfull = 0;

  agent_fifo #(.DEPTH(8), .W(3)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 8)) begin
        failures++;
        $display("flags wrong at size %0d", q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("head %0d expected %0d", dout, q[0]); end
      end
      if (full) nfull++;
      push = (n < 1000) ? ($urandom % 3 != 0) : ($urandom % 3 == 0);
      push = push && !full;
      pop  = ($urandom % 2 == 0) && !empty;
      din  = 3'($urandom);
      @(posedge clk);
      if (pop) begin void'(q.pop_front()); npop++; end
      if (push) begin q.push_back(din); npush++; end
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
