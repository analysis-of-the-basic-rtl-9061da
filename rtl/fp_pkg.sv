// fp_pkg: constants and elaboration-time helpers shared by the floating-point
// units of the exponential-part (EP) datapath.
//
// The units are written for a generic IEEE-754 binary format with EW exponent
// bits and FW stored fraction bits (8/23 single, 11/52 double).  The pipeline
// depths of the three arithmetic units follow the published figures for the
// two standard formats: multiplier 4/5, exp 21/30, accumulator 8/10 clock
// cycles (single/double).  Widths between the two standard formats take the
// double-precision depths, which is a choice of this design.
//
// The exp table and the polynomial coefficients are computed here, at
// elaboration, from Taylor series in wide fixed point, so no data file is
// needed:  exp_table_entry(k, K, PF) = round(e^(k / 2^K) * 2^PF) and
// inv_fact(n, PF) = round(2^PF / n!).
package fp_pkg;

  // ln(2) as a 128-bit binary fraction (Q0.128) and log2(e) as Q1.127.
  localparam logic [127:0] LN2_Q128   = 128'hb17217f7d1cf79abc9e3b39803f2f6af;
  localparam logic [127:0] LOG2E_Q127 = 128'hb8aa3b295c17f0bbbe87fed0691d3e88;

  // Pipeline depths in clock cycles.
  function automatic int unsigned mul_lat(int unsigned fw);
    return (fw <= 23) ? 4 : 5;
  endfunction

  function automatic int unsigned exp_lat(int unsigned fw);
    return (fw <= 23) ? 21 : 30;
  endfunction

  function automatic int unsigned acc_lat(int unsigned fw);
    return (fw <= 23) ? 8 : 10;
  endfunction

  // Degree of the polynomial that evaluates e^r on the residue below the
  // table step (2^-8): degree 2 leaves < 2^-26 relative error, enough for
  // single precision; degree 5 leaves < 2^-57, enough for double.
  function automatic int unsigned exp_poly_deg(int unsigned fw);
    return (fw <= 23) ? 2 : 5;
  endfunction

  localparam int unsigned TP = 120;   // fraction bits of the elaboration-time arithmetic

  // round(e^(k / 2^kbits) * 2^pf), k < 2^kbits, pf <= 100.
  function automatic logic [127:0] exp_table_entry(int unsigned k, int unsigned kbits,
                                                   int unsigned pf);
    logic [255:0] y, term, sum;
    y    = 256'(k) << (TP - kbits);
    term = 256'(1) << TP;
    sum  = term;
    for (int unsigned n = 1; n < 60; n++) begin
      term = ((term * y) >> TP) / 256'(n);
      sum  = sum + term;
    end
    sum = (sum + (256'(1) << (TP - pf - 1))) >> (TP - pf);
    return sum[127:0];
  endfunction

  // round(2^pf / n!), pf <= 100.
  function automatic logic [127:0] inv_fact(int unsigned n, int unsigned pf);
    logic [255:0] v;
    v = 256'(1) << TP;
    for (int unsigned i = 2; i <= n; i++) v = v / 256'(i);
    v = (v + (256'(1) << (TP - pf - 1))) >> (TP - pf);
    return v[127:0];
  endfunction

endpackage
