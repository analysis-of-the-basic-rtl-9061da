// fp_exp: pipelined IEEE-754 exponential, y = e^x, by the table/polynomial
// method.
//
// Range reduction uses e^x = 2^xi * e^r with xi = floor(x * log2(e)) and
// r = x - xi * ln(2), 0 <= r < ln(2).  The residue r is split into its top
// KB bits r_hi, which address a table of e^r_hi, and the rest r_lo < 2^-KB,
// whose exponential is a short Taylor polynomial evaluated by Horner's rule
// one step per pipeline stage.  The product of table value and polynomial is
// the significand and xi the binary exponent of the result.  The reduction
// identity and the table-plus-polynomial structure are the published method;
// the fixed-point widths, the table size (2^KB entries, computed at
// elaboration) and the polynomial degree are choices of this design.
//
// Internal format: x is converted to a two's-complement fixed-point number
// with EW-1 integer and FW+8 fraction bits; the residue keeps FW+12 fraction
// bits and the table, polynomial and product FW+10 fraction bits.
// Special cases: NaN gives NaN, +inf and x >= 2^(EW-1) give +inf, -inf and
// x <= -2^(EW-1) give +0, results below the normal range are flushed to +0,
// zero and subnormal x give 1.0.  Rounding is to nearest on the internal
// result; the error stays below one unit in the last place.  The sign bit
// of y is constant 0, since e^x is never negative.
//
// Timing: fully pipelined, one result per clock, LAT cycles after x
// (21 for single, 30 for double precision); the arithmetic takes
// 6 + POLY_DEG stages and the rest are delay registers.
module fp_exp #(
  parameter int unsigned EW       = 8,
  parameter int unsigned FW       = 23,
  parameter int unsigned LAT      = fp_pkg::exp_lat(FW),
  parameter int unsigned KB       = 8,
  parameter int unsigned POLY_DEG = fp_pkg::exp_poly_deg(FW)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [EW+FW:0] x,
  output logic           out_valid,
  output logic [EW+FW:0] y
);
  localparam int unsigned BIAS = (1 << (EW - 1)) - 1;
  localparam int unsigned EMAX = (1 << EW) - 1;
  localparam int unsigned IW   = EW - 1;            // integer bits of |x|
  localparam int unsigned XF   = FW + 8;            // fraction bits of x
  localparam int unsigned XW   = 1 + IW + XF;       // signed fixed-point x
  localparam int unsigned LF   = XF + IW + 6;       // fraction bits of log2(e)
  localparam int unsigned RF   = XF + 4;            // fraction bits of r
  localparam int unsigned NF   = RF + IW + 2;       // fraction bits of ln(2)
  localparam int unsigned XIW  = IW + 2;            // signed width of xi
  localparam int unsigned PF   = FW + 10;           // table / polynomial fraction bits
  localparam int unsigned LW   = RF - KB;           // width of r_lo
  localparam int unsigned STAGES = 6 + POLY_DEG;

  localparam logic [LF:0]   LOG2E = (LF+1)'(fp_pkg::LOG2E_Q127 >> (127 - LF));
  localparam logic [NF-1:0] LN2   = NF'(fp_pkg::LN2_Q128 >> (128 - NF));

  typedef enum logic [1:0] {SP_NONE, SP_NAN, SP_INF, SP_ZERO} special_e;

  // ---------------- stage 1: unpack, convert to fixed point ----------------
  wire           xs = x[EW+FW];
  wire [EW-1:0]  xe = x[EW+FW-1:FW];
  wire [FW-1:0]  xm = x[FW-1:0];
  logic signed [XW-1:0] xfx_c;
  special_e              sp_c;
  always_comb begin
    logic [XW-1:0] mag;
    int            sh;                      // unbiased exponent
    sh    = int'(xe) - int'(BIAS);
    mag   = '0;
    sp_c  = SP_NONE;
    if (xe == EW'(EMAX)) begin
      sp_c = (xm != '0) ? SP_NAN : (xs ? SP_ZERO : SP_INF);
    end else if (xe != '0) begin
      if (sh >= int'(IW)) sp_c = xs ? SP_ZERO : SP_INF;
      else if (sh >= 0) mag = (XW'({1'b1, xm}) << (XF - FW)) << sh;
      else              mag = (XW'({1'b1, xm}) << (XF - FW)) >> (-sh);
    end
    xfx_c = xs ? -$signed(mag) : $signed(mag);
  end

  logic                 s1_v;
  special_e             s1_sp;
  logic signed [XW-1:0] s1_x;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_sp <= SP_NONE; s1_x <= '0;
    end else begin
      s1_v <= in_valid; s1_sp <= sp_c; s1_x <= xfx_c;
    end
  end

  // ---------------- stage 2: xi = floor(x * log2(e)) ----------------
  logic signed [XW+LF+1:0] t_c;
  assign t_c = $signed({{(LF+2){s1_x[XW-1]}}, s1_x}) * $signed({{XW{1'b0}}, LOG2E});

  logic                  s2_v;
  special_e              s2_sp;
  logic signed [XW-1:0]  s2_x;
  logic signed [XIW-1:0] s2_xi;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v <= 1'b0; s2_sp <= SP_NONE; s2_x <= '0; s2_xi <= '0;
    end else begin
      s2_v <= s1_v; s2_sp <= s1_sp; s2_x <= s1_x;
      s2_xi <= XIW'(t_c >>> (XF + LF));
    end
  end

  // ---------------- stage 3: r = x - xi * ln(2) ----------------
  localparam int unsigned DW3 = XW + NF - XF + 2;
  logic signed [DW3-1:0] rfull_c;
  logic [RF-1:0]         r_c;
  always_comb begin
    logic signed [DW3-1:0] xs_ext, prod;
    xs_ext  = DW3'(s2_x) <<< (NF - XF);
    prod    = DW3'(s2_xi) * $signed(DW3'(LN2));
    rfull_c = xs_ext - prod;
    // r is in [0, ln 2) up to rounding of the constants; clamp the tiny
    // excursions outside [0, 1).
    if (rfull_c < 0)                                   r_c = '0;
    else if ((rfull_c >>> NF) != 0)                    r_c = '1;
    else                                               r_c = RF'(rfull_c >>> (NF - RF));
  end

  logic                  s3_v;
  special_e              s3_sp;
  logic signed [XIW-1:0] s3_xi;
  logic [RF-1:0]         s3_r;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v <= 1'b0; s3_sp <= SP_NONE; s3_xi <= '0; s3_r <= '0;
    end else begin
      s3_v <= s2_v; s3_sp <= s2_sp; s3_xi <= s2_xi; s3_r <= r_c;
    end
  end

  // ---------------- stage 4: table lookup of e^r_hi ----------------
  logic [PF:0] tab [1 << KB];
  for (genvar k = 0; k < (1 << KB); k++) begin : g_tab
    localparam logic [PF:0] V = (PF+1)'(fp_pkg::exp_table_entry(k, KB, PF));
    assign tab[k] = V;
  end

  // Horner pipeline registers: index 0 is the output of stage 4.
  logic                  hv  [POLY_DEG+1];
  special_e              hsp [POLY_DEG+1];
  logic signed [XIW-1:0] hxi [POLY_DEG+1];
  logic [PF:0]           ht  [POLY_DEG+1];      // table value e^r_hi
  logic [LW-1:0]         hr  [POLY_DEG+1];      // r_lo
  logic [PF+1:0]         hp  [POLY_DEG+1];      // Horner partial result

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hv[0] <= 1'b0; hsp[0] <= SP_NONE; hxi[0] <= '0; ht[0] <= '0; hr[0] <= '0; hp[0] <= '0;
    end else begin
      hv[0]  <= s3_v;
      hsp[0] <= s3_sp;
      hxi[0] <= s3_xi;
      ht[0]  <= tab[s3_r[RF-1 -: KB]];
      hr[0]  <= s3_r[LW-1:0];
      hp[0]  <= (PF+2)'(fp_pkg::inv_fact(POLY_DEG, PF));
    end
  end

  // ---------------- stages 5 .. 4+POLY_DEG: p = c_n + p * r_lo ----------------
  for (genvar s = 0; s < POLY_DEG; s++) begin : g_horner
    localparam logic [PF+1:0] C = (PF+2)'(fp_pkg::inv_fact(POLY_DEG - 1 - s, PF));
    logic [PF+1+LW:0] m;
    assign m = (PF+2+LW)'(hp[s]) * (PF+2+LW)'(hr[s]);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hv[s+1] <= 1'b0; hsp[s+1] <= SP_NONE; hxi[s+1] <= '0;
        ht[s+1] <= '0; hr[s+1] <= '0; hp[s+1] <= '0;
      end else begin
        hv[s+1]  <= hv[s];
        hsp[s+1] <= hsp[s];
        hxi[s+1] <= hxi[s];
        ht[s+1]  <= ht[s];
        hr[s+1]  <= hr[s];
        hp[s+1]  <= C + (PF+2)'(m >> RF);
      end
    end
  end

  // ---------------- stage 5+POLY_DEG: significand product, exponent ----------------
  localparam int unsigned QW = 2 * PF + 3;
  logic [QW-1:0] q_c;
  assign q_c = QW'(ht[POLY_DEG]) * QW'(hp[POLY_DEG]);

  logic                 s6_v;
  special_e             s6_sp;
  logic [PF+1:0]        s6_m;        // Q1.(PF+1) significand in [1, 2)
  logic signed [XIW+1:0] s6_e;       // biased exponent
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s6_v <= 1'b0; s6_sp <= SP_NONE; s6_m <= '0; s6_e <= '0;
    end else begin
      s6_v  <= hv[POLY_DEG];
      s6_sp <= hsp[POLY_DEG];
      if (q_c[2*PF+1]) begin
        s6_m <= q_c[2*PF+1 -: PF+2];
        s6_e <= (XIW+2)'(hxi[POLY_DEG]) + (XIW+2)'(BIAS + 1);
      end else begin
        s6_m <= q_c[2*PF -: PF+2];
        s6_e <= (XIW+2)'(hxi[POLY_DEG]) + (XIW+2)'(BIAS);
      end
    end
  end

  // ---------------- stage 6+POLY_DEG: round and pack ----------------
  logic [EW+FW:0] y_c;
  always_comb begin
    logic [FW:0]           fr;
    logic signed [XIW+1:0] e;
    logic                  rnd, stk;
    rnd = s6_m[PF-FW];
    stk = |s6_m[PF-FW-1:0];
    fr  = {1'b0, s6_m[PF -: FW]} + (FW+1)'(rnd && (stk || s6_m[PF-FW+1]));
    e   = s6_e + (XIW+2)'(fr[FW]);
    unique case (s6_sp)
      SP_NAN:  y_c = {1'b0, {EW{1'b1}}, 1'b1, {(FW-1){1'b0}}};
      SP_INF:  y_c = {1'b0, {EW{1'b1}}, {FW{1'b0}}};
      SP_ZERO: y_c = '0;
      default: begin
        if (e >= $signed((XIW+2)'(EMAX))) y_c = {1'b0, {EW{1'b1}}, {FW{1'b0}}};
        else if (e <= 0)                  y_c = '0;
        else                              y_c = {1'b0, e[EW-1:0], fr[FW-1:0]};
      end
    endcase
  end

  logic           s7_v;
  logic [EW+FW:0] s7_y;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s7_v <= 1'b0; s7_y <= '0;
    end else begin
      s7_v <= s6_v; s7_y <= y_c;
    end
  end

  delay_pipe #(.W(EW+FW+2), .DEPTH(LAT - STAGES)) u_pad (
    .clk, .rst_n, .d({s7_v, s7_y}), .q({out_valid, y})
  );

  initial assert (LAT >= STAGES) else $error("fp_exp: LAT below the arithmetic depth");
endmodule
