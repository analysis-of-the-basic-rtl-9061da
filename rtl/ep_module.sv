// ep_module: the EP (exponential part) module.  For every squared distance
// r2 that enters it computes
//
//     s(r2) = sum_{i=0}^{n_prim-1} exp(-alpha_i * r2)
//
// over the exponents alpha_i held in the coefficient store, i.e. the sum of
// Gaussian primitives of one contracted orbital at one grid point.  The
// datapath is the published chain of three pipelined floating-point units:
// fp_mul forms alpha_i * r2 (its sign bit is inverted on the way out, which
// costs nothing), fp_exp takes the exponential and fp_acc sums the n_prim
// terms of each grid point.  All three accept one operand per clock, so one
// exponential is started every clock while input is available.
//
// A small sequencer holds the current r2 and steps the coefficient address
// 0 .. n_prim-1, one per clock; the coefficient store answers one cycle
// later.  A new r2 is taken on the last step of the previous one, so
// consecutive grid points follow without a bubble.  The flag that marks the
// last term travels beside the data through a delay line of the multiplier
// plus exp depth.  Finished sums go into an output FIFO of OUT_DEPTH words;
// a credit counter admits an r2 only when its result is sure to find room,
// so a stalled output never loses data and never stalls the arithmetic.
// The sequencer, the FIFO and the credit scheme are choices of this design.
//
// The contraction coefficients C_i of the orbital are not applied: the
// published module consists of exactly one multiplier, one exp unit and one
// accumulator and its depth is the sum of theirs.  n_prim must be stable
// while r2 values are in flight; 0 is read as 1.
//
// Timing (single precision): an r2 accepted at clock t starts its terms at
// t+2 .. t+1+n_prim; the sum of the last term leaves the accumulator
// MUL_LAT + EXP_LAT + ACC_LAT = 4 + 21 + 8 = 33 clocks after that term
// entered the multiplier and is at the output one clock later.  Throughput
// is one grid point every n_prim clocks.
module ep_module #(
  parameter int unsigned EW        = 8,
  parameter int unsigned FW        = 23,
  parameter int unsigned MAX_PRIM  = 16,
  parameter int unsigned OUT_DEPTH = 64,
  parameter int unsigned MUL_LAT   = fp_pkg::mul_lat(FW),
  parameter int unsigned EXP_LAT   = fp_pkg::exp_lat(FW),
  parameter int unsigned ACC_LAT   = fp_pkg::acc_lat(FW),
  localparam int unsigned DW       = 1 + EW + FW,
  localparam int unsigned CAW      = (MAX_PRIM > 1) ? $clog2(MAX_PRIM) : 1,
  localparam int unsigned NW       = $clog2(MAX_PRIM + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NW-1:0]  n_prim,       // primitives per orbital, 1 .. MAX_PRIM
  // coefficient store read port, data one clock after the address
  output logic [CAW-1:0] coef_addr,
  input  logic [DW-1:0]  coef_rdata,
  // r2 input stream
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [DW-1:0]  in_r2,
  // sum output stream
  output logic           out_valid,
  input  logic           out_ready,
  output logic [DW-1:0]  out_data
);
  // ---------------- sequencer ----------------
  logic           busy;
  logic [CAW-1:0] idx, last_idx;
  logic [DW-1:0]  r2_q;
  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);
  logic [OCW-1:0] outstanding;
  logic           accept, pop, step_last;

  assign last_idx  = (n_prim == '0) ? '0 : CAW'(n_prim - 1'b1);
  assign step_last = busy && (idx == last_idx);
  assign in_ready  = (!busy || step_last) && (outstanding < OCW'(OUT_DEPTH));
  assign accept    = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign coef_addr = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= '0;
      r2_q <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      idx  <= '0;
      r2_q <= in_r2;
    end else if (step_last) begin
      busy <= 1'b0;
      idx  <= '0;
    end else if (busy) begin
      idx <= idx + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) outstanding <= '0;
    else        outstanding <= outstanding + OCW'(accept) - OCW'(pop);
  end

  // operand stage: coefficient arrives one clock after its address
  logic          op_v, op_last;
  logic [DW-1:0] op_r2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_v <= 1'b0; op_last <= 1'b0; op_r2 <= '0;
    end else begin
      op_v    <= busy;
      op_last <= step_last;
      op_r2   <= r2_q;
    end
  end

  // ---------------- multiplier -> exp -> accumulator ----------------
  logic          mul_v, exp_v, acc_v, exp_last;
  logic [DW-1:0] mul_y, exp_y, acc_y;

  fp_mul #(.EW(EW), .FW(FW), .LAT(MUL_LAT)) u_mul (
    .clk, .rst_n, .in_valid(op_v), .a(coef_rdata), .b(op_r2),
    .out_valid(mul_v), .y(mul_y)
  );

  fp_exp #(.EW(EW), .FW(FW), .LAT(EXP_LAT)) u_exp (
    .clk, .rst_n, .in_valid(mul_v), .x({~mul_y[DW-1], mul_y[DW-2:0]}),
    .out_valid(exp_v), .y(exp_y)
  );

  delay_pipe #(.W(1), .DEPTH(MUL_LAT + EXP_LAT)) u_last (
    .clk, .rst_n, .d(op_last), .q(exp_last)
  );

  fp_acc #(.EW(EW), .FW(FW), .LAT(ACC_LAT)) u_acc (
    .clk, .rst_n, .in_valid(exp_v), .in_last(exp_last), .in_data(exp_y),
    .out_valid(acc_v), .out_data(acc_y)
  );

  // ---------------- output buffer ----------------
  logic fifo_full;
  sync_fifo #(.W(DW), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n, .wr_en(acc_v), .wr_data(acc_y), .rd_en(pop),
    .rd_valid(out_valid), .rd_data(out_data), .full(fifo_full)
  );

  // every result must find room: the credit counter guarantees it
  a_credit: assert property (@(posedge clk) disable iff (!rst_n) !(acc_v && fifo_full))
    else $error("ep_module: result without credit");
endmodule
