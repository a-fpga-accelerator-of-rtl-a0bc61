// bcu: backward computation unit, NSLOT backward processing engines side by
// side, one per training engine, so that several agents back-propagate at
// the same time. Each engine is independent; see bpe for its timing.
module bcu
  import a3c_pkg::*;
#(
  parameter int NSLOT = 6,
  parameter int LANES = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid   [NSLOT],
  input  logic  clear   [NSLOT],
  input  logic  last    [NSLOT],
  input  fp32_t gk      [NSLOT],
  input  logic  sel     [NSLOT],
  input  fp32_t w       [NSLOT][LANES],
  output fp32_t yp      [NSLOT][LANES],
  output logic  y_valid [NSLOT]
);
  for (genvar s = 0; s < NSLOT; s++) begin : g_bpe
    bpe #(.LANES(LANES)) u_bpe (
      .clk, .rst_n, .valid(valid[s]), .clear(clear[s]), .last(last[s]),
      .gk(gk[s]), .sel(sel[s]), .w(w[s]), .yp(yp[s]), .y_valid(y_valid[s])
    );
  end
endmodule
