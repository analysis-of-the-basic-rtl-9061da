// tb_fp_exp_double: self-checking testbench of the exponential unit built for
// IEEE-754 double precision (EW = 11, FW = 52).  Feeds one operand per clock
// (special values, then random arguments over the whole range of normal
// results, -708 .. 709, and small arguments) and compares each result with
// the simulator's double-precision exp(), allowing one unit in the last
// place.  It also checks that results arrive exactly 30 cycles after their
// operands and that the unit takes one per clock.
module tb_fp_exp_double;
  localparam int unsigned LAT = 30;
  localparam int          N   = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [63:0] x = '0, y;

  fp_exp #(.EW(11), .FW(52)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [63:0] xq [$];
  int          tq [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  import tb_fp_util::*;

  function automatic logic [63:0] ref_exp(logic [63:0] a);
    real r;
    if (a[62:52] == 11'h7ff) begin
      if (a[51:0] != 0) return 64'h7ff8000000000000;
      return a[63] ? 64'h0 : 64'h7ff0000000000000;
    end
    if (a[62:52] == 0) return 64'h3ff0000000000000;
    r = $exp(bits_to_real(a, 11, 52));
    return 64'(real_to_bits(r, 11, 52));
  endfunction

  // Random argument: mostly in (-90, 90), some in (-40, 0].
  function automatic logic [63:0] rnd_arg(int i);
    real r;
    int  u;
    u = int'($urandom % 1000000);
    r = real'(u) / 1000000.0;
    if (i % 3 == 0) r = -700.0 * r;
    else if (i % 3 == 1) r = 1420.0 * r - 710.0;
    else begin
      u = int'($urandom % 20) - 16;
      r = (r - 0.5) * $pow(2.0, real'(u));
    end
    return 64'(real_to_bits(r, 11, 52));
  endfunction

  logic [63:0] specials [12] = '{64'h0, 64'h8000000000000000, 64'h3ff0000000000000,
                                 64'hbff0000000000000, 64'h7ff0000000000000,
                                 64'hfff0000000000000, 64'h7ff8000000000001,
                                 64'h40862e42fefa39ef, 64'hc086232bdd7abcd2,
                                 64'h4090000000000000, 64'hc090000000000000,
                                 64'h3fe62e42fefa39ef};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // inputs change on the falling edge, away from the sampling edge
    for (int i = 0; i < N + 12; i++) begin
      in_valid = 1'b1;
      x = (i < 12) ? specials[i] : rnd_arg(i);
      @(negedge clk);
    end
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    if (xq.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", xq.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      xq.push_back(x);
      tq.push_back(cyc);
    end
    if (rst_n && out_valid) begin
      logic [63:0] a, e;
      int          t0, d;
      if (xq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", y);
      end else begin
        a  = xq.pop_front();
        t0 = tq.pop_front();
        e  = ref_exp(a);
        d  = int'(ulp_dist(e, y));
        checks++;
        if (d > 1 && !(e[62:52] == 11'h7ff && y[62:52] == 11'h7ff)) begin
          failures++;
          if (failures < 10) $display("FAIL: exp(%h = %f) = %h expected %h", a,
                                      bits_to_real(a, 11, 52), y, e);
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
    repeat (N + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
