// csg_buffer: control-signal-generation (CSG) store of ReLU sign information.
//
// During forward inference each hidden output y written on a capture port is
// reduced to one bit, 1 when y > 0 and 0 when y = 0 (the ReLU output is never
// negative), and stored per agent at the given bit address. The backward
// (BPE) and gradient (GPE) engines read these bits back instead of computing
// the ReLU derivative, which is exactly 1 for y > 0 and 0 for y = 0.
// NW capture ports (one per forward engine) write on the clock edge; NR read
// ports are combinational. Ports never write the same agent at once.
// Keeping one shared bit store per agent, instead of a buffer inside every
// engine, is this design's choice.
module csg_buffer
  import a3c_pkg::*;
#(
  parameter int NAG   = 8,
  parameter int AGW   = 3,
  parameter int NW    = 6,
  parameter int NR    = 6,
  parameter int DEPTH = MAX_STEPS * SGN_BITS
) (
  input  logic            clk,
  input  logic            we     [NW],
  input  logic [AGW-1:0]  wagent [NW],
  input  saddr_t          waddr  [NW],
  input  fp32_t           wy     [NW],
  input  logic [AGW-1:0]  ragent [NR],
  input  saddr_t          raddr  [NR],
  output logic            rbit   [NR]
);
  localparam int DW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic mem [NAG][DEPTH];

  always_ff @(posedge clk)
    for (int p = 0; p < NW; p++)
      if (we[p] && int'(waddr[p]) < DEPTH) mem[wagent[p]][waddr[p][DW-1:0]] <= fp_pos(wy[p]);

  always_comb
    for (int p = 0; p < NR; p++)
      rbit[p] = (int'(raddr[p]) < DEPTH) ? mem[ragent[p]][raddr[p][DW-1:0]] : 1'b0;
endmodule
