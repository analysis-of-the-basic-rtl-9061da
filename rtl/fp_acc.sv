// fp_acc: fully pipelined floating-point accumulator that takes one datum per
// clock and returns the sum of each group of data (a group ends with the
// datum that carries in_last).
//
// A floating-point adder in a feedback loop cannot accept a new datum every
// cycle, so the running sum is kept instead in a wide two's-complement
// fixed-point register (mixed precision: IEEE inputs and output, a long
// fixed-point word inside).  Each input is aligned to that register by a
// shift, the add then closes in one cycle, and the finished sum is turned
// back into IEEE format by a leading-one search, a normalising shift and
// rounding to nearest even.  One datum per clock, a pipelined unit and
// mixed precision are the published properties; the fixed-point method and
// the register window are choices of this design.
//
// The register has ACC_INT integer and ACC_FRAC fraction bits: terms below
// 2^-ACC_FRAC are dropped (alignment truncates toward zero) and a sum
// reaching 2^ACC_INT in magnitude, an infinite input or a NaN input makes the
// group's result infinity or NaN.  Subnormal inputs read as zero.
//
// Timing: the result of a group leaves LAT cycles after its last datum
// (8 for single, 10 for double precision); a new group may start on the very
// next clock, there are no stalls.
module fp_acc #(
  parameter int unsigned EW       = 8,
  parameter int unsigned FW       = 23,
  parameter int unsigned LAT      = fp_pkg::acc_lat(FW),
  parameter int unsigned ACC_INT  = FW + 1,
  parameter int unsigned ACC_FRAC = 2 * (FW + 1) + 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           in_last,
  input  logic [EW+FW:0] in_data,
  output logic           out_valid,
  output logic [EW+FW:0] out_data
);
  localparam int unsigned BIAS   = (1 << (EW - 1)) - 1;
  localparam int unsigned EMAX   = (1 << EW) - 1;
  localparam int unsigned AW     = 1 + ACC_INT + ACC_FRAC;   // signed register width
  localparam int unsigned M      = FW + 1;
  localparam int unsigned STAGES = 6;
  localparam int unsigned PW     = $clog2(AW);

  // ---------------- stage 1: unpack ----------------
  logic          s1_v, s1_last, s1_sign, s1_zero, s1_inf, s1_nan, s1_ovf;
  logic [M-1:0]  s1_m;
  logic signed [EW+1:0] s1_pos;       // weight of the significand's LSB in the register
  wire [EW-1:0] ie = in_data[EW+FW-1:FW];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_last <= 1'b0; s1_sign <= 1'b0; s1_zero <= 1'b0;
      s1_inf <= 1'b0; s1_nan <= 1'b0; s1_ovf <= 1'b0; s1_m <= '0; s1_pos <= '0;
    end else begin
      s1_v    <= in_valid;
      s1_last <= in_last;
      s1_sign <= in_data[EW+FW];
      s1_zero <= (ie == '0);
      s1_inf  <= (ie == EW'(EMAX)) && (in_data[FW-1:0] == '0);
      s1_nan  <= (ie == EW'(EMAX)) && (in_data[FW-1:0] != '0);
      s1_ovf  <= (ie != EW'(EMAX)) && (int'(ie) - int'(BIAS) >= int'(ACC_INT));
      s1_m    <= {1'b1, in_data[FW-1:0]};
      s1_pos  <= (EW+2)'(int'(ie) - int'(BIAS) - int'(FW) + int'(ACC_FRAC));
    end
  end

  // ---------------- stage 2: align to the register ----------------
  logic [AW-1:0] mag_c;
  always_comb begin
    mag_c = '0;
    if (!s1_zero && !s1_ovf && !s1_inf && !s1_nan) begin
      if (s1_pos >= 0) mag_c = AW'(s1_m) << s1_pos;
      else             mag_c = AW'(s1_m) >> (-s1_pos);
    end
  end

  logic                 s2_v, s2_last, s2_inf, s2_nan, s2_ovf, s2_neg_inf;
  logic signed [AW-1:0] s2_val;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_last <= 1'b0; s2_inf <= 1'b0; s2_nan <= 1'b0; s2_ovf <= 1'b0;
      s2_neg_inf <= 1'b0; s2_val <= '0;
    end else begin
      s2_v       <= s1_v;
      s2_last    <= s1_last;
      s2_inf     <= s1_inf;
      s2_neg_inf <= s1_inf && s1_sign;
      s2_nan     <= s1_nan;
      s2_ovf     <= s1_ovf;
      s2_val     <= s1_sign ? -$signed(mag_c) : $signed(mag_c);
    end
  end

  // ---------------- stage 3: accumulate ----------------
  // Running state of the open group; 'fresh' means the next datum starts a
  // new group.
  logic                 fresh;
  logic signed [AW-1:0] acc;
  logic                 acc_pinf, acc_ninf, acc_nan, acc_ovf;

  logic signed [AW-1:0] sum_c;
  logic                 pinf_c, ninf_c, nan_c, ovf_c;
  always_comb begin
    logic signed [AW-1:0] base;
    base   = fresh ? '0 : acc;
    sum_c  = base + s2_val;
    pinf_c = (!fresh && acc_pinf) || (s2_inf && !s2_neg_inf);
    ninf_c = (!fresh && acc_ninf) || s2_neg_inf;
    nan_c  = (!fresh && acc_nan) || s2_nan;
    // two's-complement overflow of the add, or an input beyond the window
    ovf_c  = (!fresh && acc_ovf) || s2_ovf ||
             ((base[AW-1] == s2_val[AW-1]) && (sum_c[AW-1] != base[AW-1]));
  end

  logic                 s3_v, s3_pinf, s3_ninf, s3_nan, s3_ovf;
  logic signed [AW-1:0] s3_sum;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= 1'b1; acc <= '0; acc_pinf <= 1'b0; acc_ninf <= 1'b0; acc_nan <= 1'b0;
      acc_ovf <= 1'b0;
      s3_v <= 1'b0; s3_pinf <= 1'b0; s3_ninf <= 1'b0; s3_nan <= 1'b0; s3_ovf <= 1'b0;
      s3_sum <= '0;
    end else begin
      s3_v <= 1'b0;
      if (s2_v) begin
        acc      <= sum_c;
        acc_pinf <= pinf_c;
        acc_ninf <= ninf_c;
        acc_nan  <= nan_c;
        acc_ovf  <= ovf_c;
        fresh    <= s2_last;
        s3_v     <= s2_last;
      end
      s3_sum  <= sum_c;
      s3_pinf <= pinf_c;
      s3_ninf <= ninf_c;
      s3_nan  <= nan_c;
      s3_ovf  <= ovf_c;
    end
  end

  // ---------------- stage 4: magnitude and leading one ----------------
  logic [AW-1:0] abs_c;
  logic [PW-1:0] lead_c;
  always_comb begin
    abs_c  = s3_sum[AW-1] ? AW'(-s3_sum) : AW'(s3_sum);
    lead_c = '0;
    for (int i = 0; i < int'(AW); i++)
      if (abs_c[i]) lead_c = PW'(i);
  end

  typedef enum logic [1:0] {R_NUM, R_NAN, R_PINF, R_NINF} res_e;
  res_e          s4_kind;
  logic          s4_v, s4_sign, s4_zero;
  logic [AW-1:0] s4_abs;
  logic [PW-1:0] s4_lead;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_v <= 1'b0; s4_kind <= R_NUM; s4_sign <= 1'b0; s4_zero <= 1'b0;
      s4_abs <= '0; s4_lead <= '0;
    end else begin
      s4_v    <= s3_v;
      s4_sign <= s3_sum[AW-1];
      s4_zero <= (s3_sum == '0);
      s4_abs  <= abs_c;
      s4_lead <= lead_c;
      if (s3_nan || (s3_pinf && s3_ninf)) s4_kind <= R_NAN;
      else if (s3_pinf)                   s4_kind <= R_PINF;
      else if (s3_ninf)                   s4_kind <= R_NINF;
      else if (s3_ovf)                    s4_kind <= s3_sum[AW-1] ? R_NINF : R_PINF;
      else                                s4_kind <= R_NUM;
    end
  end

  // ---------------- stage 5: normalising shift ----------------
  logic [AW-1:0]        s5_norm;        // leading one at bit AW-1
  logic signed [PW+1:0] s5_exp;         // unbiased exponent
  res_e                 s5_kind;
  logic                 s5_v, s5_sign, s5_zero;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s5_v <= 1'b0; s5_kind <= R_NUM; s5_sign <= 1'b0; s5_zero <= 1'b0;
      s5_norm <= '0; s5_exp <= '0;
    end else begin
      s5_v    <= s4_v;
      s5_kind <= s4_kind;
      s5_sign <= s4_sign;
      s5_zero <= s4_zero;
      s5_norm <= s4_abs << (PW'(AW - 1) - s4_lead);
      s5_exp  <= $signed({2'b00, s4_lead}) - (PW+2)'(ACC_FRAC);
    end
  end

  // ---------------- stage 6: round and pack ----------------
  logic [EW+FW:0] y_c;
  always_comb begin
    logic [FW:0]  fr;
    logic         rnd, stk;
    int           e;
    rnd = s5_norm[AW-2-FW];
    stk = |s5_norm[AW-3-FW:0];
    fr  = {1'b0, s5_norm[AW-2 -: FW]} + (FW+1)'(rnd && (stk || s5_norm[AW-1-FW]));
    e   = int'(s5_exp) + int'(BIAS) + int'(fr[FW]);
    unique case (s5_kind)
      R_NAN:  y_c = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};
      R_PINF: y_c = {1'b0, {EW{1'b1}}, {FW{1'b0}}};
      R_NINF: y_c = {1'b1, {EW{1'b1}}, {FW{1'b0}}};
      default: begin
        if (s5_zero || e <= 0)    y_c = '0;
        else if (e >= int'(EMAX)) y_c = {s5_sign, {EW{1'b1}}, {FW{1'b0}}};
        else                      y_c = {s5_sign, EW'(e), fr[FW-1:0]};
      end
    endcase
  end

  logic           s6_v;
  logic [EW+FW:0] s6_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s6_v <= 1'b0; s6_y <= '0;
    end else begin
      s6_v <= s5_v; s6_y <= y_c;
    end
  end

  delay_pipe #(.W(EW+FW+2), .DEPTH(LAT - STAGES)) u_pad (
    .clk, .rst_n, .d({s6_v, s6_y}), .q({out_valid, out_data})
  );

  initial assert (LAT >= STAGES) else $error("fp_acc: LAT below the arithmetic depth");
  initial assert (AW >= FW + 4) else $error("fp_acc: register narrower than the significand");
endmodule
