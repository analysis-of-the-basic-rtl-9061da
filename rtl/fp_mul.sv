// fp_mul: pipelined IEEE-754 floating-point multiplier with a truncated
// mantissa product.
//
// The full product of two (FW+1)-bit significands is 2*FW+2 bits wide, but
// only its upper half survives rounding.  The partial-product columns below
// weight DROP are therefore not built at all: every partial product is masked
// to the columns >= DROP before the summation, so the adder tree of the low
// columns disappears.  With DROP = FW+1-(clog2(FW+1)+4) the discarded carries
// are worth less than 1/10 of a unit in the last place, so the result is
// within 0.6 ulp of the exact product (round-to-nearest-even on the kept bits).
// Removing the low columns of the product is what the published design does;
// the exact cut-off and the rounding are choices of this design.
//
// Zero and subnormal operands are read as zero and results too small for a
// normal number are flushed to zero; overflow gives infinity; NaN, or
// infinity times zero, gives a quiet NaN.
//
// Timing: fully pipelined, one product per clock, result LAT cycles after the
// operands (LAT >= 3; 4 for single and 5 for double precision).  No stalls:
// in_valid travels with the data to out_valid.
module fp_mul #(
  parameter int unsigned EW  = 8,
  parameter int unsigned FW  = 23,
  parameter int unsigned LAT = fp_pkg::mul_lat(FW)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [EW+FW:0]   a,
  input  logic [EW+FW:0]   b,
  output logic             out_valid,
  output logic [EW+FW:0]   y
);
  localparam int unsigned M    = FW + 1;                  // significand width
  localparam int unsigned PW   = 2 * M;                   // product width
  localparam int unsigned DROP = M - ($clog2(M) + 4);     // lowest kept column
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned EMAX = (1 << EW) - 1;

  localparam logic [PW-1:0] KEEP = ~((PW)'((64'(1) << DROP) - 1));

  // ---------------- stage 1: unpack ----------------
  logic              s1_v, s1_sign, s1_zero, s1_inf, s1_nan;
  logic [M-1:0]      s1_ma, s1_mb;
  logic signed [EW+2:0] s1_exp;          // ea + eb - bias

  wire [EW-1:0] ea = a[EW+FW-1:FW];
  wire [EW-1:0] eb = b[EW+FW-1:FW];
  wire a_zero = (ea == '0);
  wire b_zero = (eb == '0);
  wire a_inf  = (ea == EW'(EMAX)) && (a[FW-1:0] == '0);
  wire b_inf  = (eb == EW'(EMAX)) && (b[FW-1:0] == '0);
  wire a_nan  = (ea == EW'(EMAX)) && (a[FW-1:0] != '0);
  wire b_nan  = (eb == EW'(EMAX)) && (b[FW-1:0] != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_sign <= 1'b0; s1_zero <= 1'b0; s1_inf <= 1'b0; s1_nan <= 1'b0;
      s1_ma <= '0; s1_mb <= '0; s1_exp <= '0;
    end else begin
      s1_v    <= in_valid;
      s1_sign <= a[EW+FW] ^ b[EW+FW];
      s1_nan  <= a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero);
      s1_inf  <= a_inf || b_inf;
      s1_zero <= a_zero || b_zero;
      s1_ma   <= {1'b1, a[FW-1:0]};
      s1_mb   <= {1'b1, b[FW-1:0]};
      s1_exp  <= $signed({3'b000, ea}) + $signed({3'b000, eb}) - $signed((EW+3)'(BIAS));
    end
  end

  // ---------------- stage 2: truncated significand product ----------------
  logic [PW-1:0] prod_c;
  always_comb begin
    prod_c = '0;
    for (int j = 0; j < int'(M); j++)
      if (s1_mb[j]) prod_c = prod_c + (((PW)'(s1_ma) << j) & KEEP);
  end

  logic              s2_v, s2_sign, s2_zero, s2_inf, s2_nan;
  logic [PW-1:0]     s2_prod;
  logic signed [EW+2:0] s2_exp;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_sign <= 1'b0; s2_zero <= 1'b0; s2_inf <= 1'b0; s2_nan <= 1'b0;
      s2_prod <= '0; s2_exp <= '0;
    end else begin
      s2_v <= s1_v; s2_sign <= s1_sign; s2_zero <= s1_zero; s2_inf <= s1_inf;
      s2_nan <= s1_nan; s2_prod <= prod_c; s2_exp <= s1_exp;
    end
  end

  // ---------------- stage 3: normalise, round, pack ----------------
  logic [FW-1:0]        frac_c;
  logic                 rnd_c, stk_c;
  logic [FW:0]          frac_r;            // rounded fraction with carry
  logic signed [EW+2:0] exp_c;
  logic [EW+FW:0]       y_c;
  always_comb begin
    if (s2_prod[PW-1]) begin
      frac_c = s2_prod[PW-2 -: FW];
      rnd_c  = s2_prod[PW-2-FW];
      stk_c  = |s2_prod[PW-3-FW:0];
      exp_c  = s2_exp + 1;
    end else begin
      frac_c = s2_prod[PW-3 -: FW];
      rnd_c  = s2_prod[PW-3-FW];
      stk_c  = |s2_prod[PW-4-FW:0];
      exp_c  = s2_exp;
    end
    frac_r = {1'b0, frac_c} + (FW+1)'(rnd_c && (stk_c || frac_c[0]));
    if (frac_r[FW]) exp_c = exp_c + 1;
    if (s2_nan)
      y_c = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};
    else if (s2_inf || exp_c >= $signed((EW+3)'(EMAX)))
      y_c = {s2_sign, {EW{1'b1}}, {FW{1'b0}}};
    else if (s2_zero || exp_c <= 0)
      y_c = {s2_sign, {(EW+FW){1'b0}}};
    else
      y_c = {s2_sign, exp_c[EW-1:0], frac_r[FW-1:0]};
  end

  logic           s3_v;
  logic [EW+FW:0] s3_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_y <= '0;
    end else begin
      s3_v <= s2_v; s3_y <= y_c;
    end
  end

  // ---------------- remaining stages up to LAT ----------------
  delay_pipe #(.W(EW+FW+2), .DEPTH(LAT - 3)) u_pad (
    .clk, .rst_n, .d({s3_v, s3_y}), .q({out_valid, y})
  );

  initial assert (LAT >= 3) else $error("fp_mul: LAT must be at least 3");
endmodule
