// tb_fp_mul_double: self-checking testbench of the truncated multiplier built
// for IEEE-754 double precision (EW = 11, FW = 52).  Feeds one operand pair
// per clock (special values, then random operands over a wide exponent
// range) and compares each product with the simulator's own double-precision
// multiplication, which is correctly rounded, allowing one unit in the last
// place for the truncated low columns; at least 90 % must be exact.  Checks
// the 5-cycle latency and one result per clock.
module tb_fp_mul_double;
  import tb_fp_util::*;
  localparam int unsigned LAT = 5;
  localparam int          N   = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [63:0] a = '0, b = '0, y;

  fp_mul #(.EW(11), .FW(52)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, exact = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [127:0] op_q [$];
  int          t_q [$];

  function automatic logic [63:0] ref_mul(logic [63:0] p, logic [63:0] q);
    logic pz, qz, pi, qi, pn, qn, s;
    pz = p[62:52] == 0; qz = q[62:52] == 0;
    pi = p[62:52] == 11'h7ff && p[51:0] == 0; qi = q[62:52] == 11'h7ff && q[51:0] == 0;
    pn = p[62:52] == 11'h7ff && p[51:0] != 0; qn = q[62:52] == 11'h7ff && q[51:0] != 0;
    s  = p[63] ^ q[63];
    if (pn || qn || (pi && qz) || (qi && pz)) return 64'h7ff8000000000000;
    if (pi || qi) return {s, 63'h7ff0000000000000};
    if (pz || qz) return {s, 63'h0};
    // flush results below the normal range to zero, like the unit
    return real_to_bits($bitstoreal(p) * $bitstoreal(q), 11, 52) | {s, 63'h0};
  endfunction

  function automatic logic [63:0] rnd_op();
    logic [63:0] v;
    v = {$urandom, $urandom};
    v[62:52] = 11'(511 + ($urandom % 1024));
    return v;
  endfunction

  logic [63:0] sa [8] = '{64'h0, 64'h7ff0000000000000, 64'h7ff8000000000000,
                          64'h3ff0000000000000, 64'h7fe0000000000000, 64'h0010000000000000,
                          64'hc000000000000000, 64'h7ff0000000000000};
  logic [63:0] sb [8] = '{64'h400921fb54442d18, 64'h0, 64'h3ff0000000000000,
                          64'hbff0000000000000, 64'h7fe0000000000000, 64'h0010000000000000,
                          64'h4008000000000000, 64'hc000000000000000};

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      op_q.push_back({a, b});
      t_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      logic [127:0] ab;
      logic [63:0] e;
      int t0;
      if (op_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected product %h", y);
      end else begin
        ab = op_q.pop_front();
        t0 = t_q.pop_front();
        e  = ref_mul(ab[127:64], ab[63:0]);
        checks++;
        if (e == y) exact++;
        if (ulp_dist(e, y) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL: %h * %h = %h expected %h", ab[127:64], ab[63:0], y, e);
        end
        checks++;
        if (cyc - t0 != LAT) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d", cyc - t0);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N + 8; i++) begin
      in_valid = 1'b1;
      a = (i < 8) ? sa[i] : rnd_op();
      b = (i < 8) ? sb[i] : rnd_op();
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (op_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d products missing", op_q.size());
    end
    // the truncation must stay rare: at least 90 % correctly rounded
    checks++;
    if (exact * 10 < N * 9) begin
      failures++;
      $display("FAIL: only %0d of %0d products correctly rounded", exact, N);
    end
    $display("%0d of %0d products correctly rounded", exact, N + 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
