// pgcu: parameter gradient computation unit, NSLOT gradient processing
// engines side by side, one per training engine. Each engine is independent;
// see gpe for its timing.
module pgcu
  import a3c_pkg::*;
#(
  parameter int NSLOT = 6,
  parameter int LANES = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid     [NSLOT],
  input  logic   b_en      [NSLOT],
  input  fp32_t  gk        [NSLOT],
  input  logic   sel       [NSLOT],
  input  fp32_t  x         [NSLOT][LANES],
  input  paddr_t w_addr_in [NSLOT],
  input  paddr_t b_addr_in [NSLOT],
  output fp32_t  dw        [NSLOT][LANES],
  output fp32_t  db        [NSLOT],
  output paddr_t w_addr    [NSLOT],
  output paddr_t b_addr    [NSLOT],
  output logic   dw_valid  [NSLOT],
  output logic   db_valid  [NSLOT]
);
  for (genvar s = 0; s < NSLOT; s++) begin : g_gpe
    gpe #(.LANES(LANES)) u_gpe (
      .clk, .rst_n, .valid(valid[s]), .b_en(b_en[s]), .gk(gk[s]), .sel(sel[s]),
      .x(x[s]), .w_addr_in(w_addr_in[s]), .b_addr_in(b_addr_in[s]),
      .dw(dw[s]), .db(db[s]), .w_addr(w_addr[s]), .b_addr(b_addr[s]),
      .dw_valid(dw_valid[s]), .db_valid(db_valid[s])
    );
  end
endmodule
