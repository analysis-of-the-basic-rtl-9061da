// coef_store: on-chip store of the basis-set exponents alpha_i of the orbital
// being evaluated.  The host writes them once through the write port; after
// that every grid point reuses them, so only the r2 stream has to cross the
// host link.  NRD independent read ports (one per EP module) each return
// the word at their address one clock later, as a block RAM does.  Keeping
// the reused coefficients on the FPGA is the published scheme; the depth,
// the port count and the one-cycle read are choices of this design.
module coef_store #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NRD   = 4,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr [NRD],
  output logic [DW-1:0] rdata [NRD]
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  for (genvar p = 0; p < NRD; p++) begin : g_rd
    always_ff @(posedge clk) rdata[p] <= mem[raddr[p]];
  end
endmodule
