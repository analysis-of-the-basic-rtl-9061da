// tb_fp_mul: self-checking testbench of the single-precision truncated
// multiplier.  Feeds one operand pair per clock (special values, then random
// operands over a wide exponent range) and compares each product with the
// correctly rounded product from double-precision reals (exact for 24-bit
// significands), allowing one unit in the last place for the truncated low
// columns.  Checks the 4-cycle latency and one result per clock.
module tb_fp_mul;
  import tb_fp_util::*;
  localparam int unsigned LAT = 4;
  localparam int          N   = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [31:0] a = '0, b = '0, y;

  fp_mul #(.EW(8), .FW(23)) dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .y);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0, exact = 0;
  always @(posedge clk) cyc <= cyc + 1;
  logic [63:0] op_q [$];
  int          t_q [$];

  function automatic logic [31:0] ref_mul(logic [31:0] p, logic [31:0] q);
    logic pz, qz, pi, qi, pn, qn, s;
    pz = p[30:23] == 0; qz = q[30:23] == 0;
    pi = p[30:23] == 8'hff && p[22:0] == 0; qi = q[30:23] == 8'hff && q[22:0] == 0;
    pn = p[30:23] == 8'hff && p[22:0] != 0; qn = q[30:23] == 8'hff && q[22:0] != 0;
    s  = p[31] ^ q[31];
    if (pn || qn || (pi && qz) || (qi && pz)) return 32'h7fc00000;
    if (pi || qi) return {s, 31'h7f800000};
    if (pz || qz) return {s, 31'h0};
    return 32'(real_to_bits(bits_to_real(64'(p), 8, 23) * bits_to_real(64'(q), 8, 23), 8, 23))
           | {s, 31'h0};
  endfunction

  function automatic logic [31:0] rnd_op();
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(63 + ($urandom % 128));
    return v;
  endfunction

  logic [31:0] sa [8] = '{32'h0, 32'h7f800000, 32'h7fc00000, 32'h3f800000,
                          32'h7f000000, 32'h00800000, 32'hc0000000, 32'h7f800000};
  logic [31:0] sb [8] = '{32'h40490fdb, 32'h0, 32'h3f800000, 32'hbf800000,
                          32'h7f000000, 32'h00800000, 32'h40400000, 32'hc0000000};

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      op_q.push_back({a, b});
      t_q.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      logic [63:0] ab;
      logic [31:0] e;
      int t0;
      if (op_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected product %h", y);
      end else begin
        ab = op_q.pop_front();
        t0 = t_q.pop_front();
        e  = ref_mul(ab[63:32], ab[31:0]);
        checks++;
        if (e == y) exact++;
        if (ulp_dist(64'(e), 64'(y)) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL: %h * %h = %h expected %h", ab[63:32], ab[31:0], y, e);
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
