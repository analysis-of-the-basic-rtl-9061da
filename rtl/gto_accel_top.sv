// gto_accel_top: the accelerator of one FPGA.  It evaluates the exponential
// part of a contracted Gaussian orbital,  s(r2) = sum_i exp(-alpha_i * r2),
// for a stream of squared distances r2 (one 32-bit word per grid point in,
// one 32-bit word per grid point out, IEEE-754 single precision).
//
// N_EP EP modules (four in the published configuration, the most one FPGA
// can be fed by its memory link) work side by side.  The exponents alpha_i
// of the orbital are written once into the coefficient store and read by all
// EP modules, so only the r2 values and the sums move across the link.
// stream_dist hands the r2 words out round robin and stream_collect takes
// the sums back in the same order, so the output order equals the input
// order.  With n_prim primitives the array produces N_EP sums every n_prim
// clocks, i.e. N_EP exponentials per clock.
//
// Interface: coefficient writes (coef_we/coef_waddr/coef_wdata) and n_prim
// must be set before r2 words are sent and left alone while any is in
// flight.  Input and output are valid/ready streams; a word moves when valid
// and ready are both high at a rising clock edge.  Latency of a grid point
// is 2 + n_prim + 33 clocks from its acceptance to its sum at the output
// when the output is ready; the host link, its interface logic and the
// external memories are outside this module.
module gto_accel_top #(
  parameter int unsigned EW        = 8,
  parameter int unsigned FW        = 23,
  parameter int unsigned N_EP      = 4,
  parameter int unsigned MAX_PRIM  = 16,
  parameter int unsigned OUT_DEPTH = 64,
  localparam int unsigned DW       = 1 + EW + FW,
  localparam int unsigned CAW      = (MAX_PRIM > 1) ? $clog2(MAX_PRIM) : 1,
  localparam int unsigned NW       = $clog2(MAX_PRIM + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // configuration
  input  logic           coef_we,
  input  logic [CAW-1:0] coef_waddr,
  input  logic [DW-1:0]  coef_wdata,
  input  logic [NW-1:0]  n_prim,
  // r2 stream in
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [DW-1:0]  in_r2,
  // sums out
  output logic           out_valid,
  input  logic           out_ready,
  output logic [DW-1:0]  out_sum
);
  logic [CAW-1:0] raddr [N_EP];
  logic [DW-1:0]  rdata [N_EP];

  coef_store #(.DW(DW), .DEPTH(MAX_PRIM), .NRD(N_EP)) u_coef (
    .clk, .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .raddr, .rdata
  );

  logic [N_EP-1:0] ep_in_valid, ep_in_ready, ep_out_valid, ep_out_ready;
  logic [DW-1:0]   ep_in_data;
  logic [DW-1:0]   ep_out_data [N_EP];

  stream_dist #(.DW(DW), .N(N_EP)) u_dist (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_r2),
    .out_valid(ep_in_valid), .out_ready(ep_in_ready), .out_data(ep_in_data)
  );

  for (genvar e = 0; e < N_EP; e++) begin : g_ep
    ep_module #(.EW(EW), .FW(FW), .MAX_PRIM(MAX_PRIM), .OUT_DEPTH(OUT_DEPTH)) u_ep (
      .clk, .rst_n, .n_prim,
      .coef_addr(raddr[e]), .coef_rdata(rdata[e]),
      .in_valid(ep_in_valid[e]), .in_ready(ep_in_ready[e]), .in_r2(ep_in_data),
      .out_valid(ep_out_valid[e]), .out_ready(ep_out_ready[e]), .out_data(ep_out_data[e])
    );
  end

  stream_collect #(.DW(DW), .N(N_EP)) u_coll (
    .clk, .rst_n, .in_valid(ep_out_valid), .in_ready(ep_out_ready), .in_data(ep_out_data),
    .out_valid, .out_ready, .out_data(out_sum)
  );
endmodule
