// tb_fp_util: helpers for the testbenches that convert between real numbers
// and IEEE-754 bit patterns of any format with EW exponent and FW fraction
// bits (FW <= 52) using only double-precision reals, plus the distance of two
// patterns in units in the last place.  Subnormals are flushed to zero like
// the design does.
package tb_fp_util;

  function automatic real bits_to_real(logic [63:0] b, int ew, int fw);
    longint e, bias;
    real    m;
    bias = (longint'(1) << (ew - 1)) - 1;
    e    = longint'((b >> fw) & ((64'(1) << ew) - 1));
    if (e == 0) return 0.0;
    m = 1.0 + real'(b & ((64'(1) << fw) - 1)) / $pow(2.0, real'(fw));
    m = m * $pow(2.0, real'(e - bias));
    return b[ew + fw] ? -m : m;
  endfunction

  // Round-to-nearest-even conversion; overflow gives infinity, values below
  // the normal range give zero.
  function automatic logic [63:0] real_to_bits(real r, int ew, int fw);
    logic [63:0] d, frac, res;
    longint      e, bias, emax;
    logic        s, rnd, stk;
    d    = $realtobits(r);
    s    = d[63];
    bias = (longint'(1) << (ew - 1)) - 1;
    emax = (longint'(1) << ew) - 1;
    if (d[62:52] == 0) return 64'(s) << (ew + fw);
    e    = longint'(d[62:52]) - 1023 + bias;
    frac = {12'h0, d[51:0]};
    if (fw < 52) begin
      rnd  = frac[51 - fw];
      stk  = (fw < 51) ? ((frac & ((64'(1) << (51 - fw)) - 1)) != 0) : 1'b0;
      frac = frac >> (52 - fw);
      if (rnd && (stk || frac[0])) frac = frac + 1;
      if (frac[fw]) begin
        frac = 0;
        e    = e + 1;
      end
    end
    if (e >= emax) res = 64'(emax) << fw;
    else if (e <= 0) res = 0;
    else res = (64'(e) << fw) | frac;
    return res | (64'(s) << (ew + fw));
  endfunction

  function automatic longint ulp_dist(logic [63:0] a, logic [63:0] b);
    return (a > b) ? longint'(a - b) : longint'(b - a);
  endfunction

endpackage
