// tb_fp_acc_double: self-checking testbench of the accumulator built for
// IEEE-754 double precision (EW = 11, FW = 52, depth 10 clocks), with
// operands of 24 significant bits between 2^-10 and 2^11 so that the
// double-precision reference sum is exact.
// Sends random groups of 1..20 data, mostly back to back and sometimes with
// idle cycles inside or between groups, and compares every group sum with a
// double-precision reference (exact for the chosen operand range), allowing
// one unit in the last place.  Also checks infinity, NaN and out-of-window
// inputs, and that each sum appears exactly 10 cycles after its last datum.
module tb_fp_acc_double;
  import tb_fp_util::*;
  localparam int unsigned LAT = 10;
  localparam int          NGROUPS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, out_valid;
  logic [63:0] in_data = '0, out_data;

  fp_acc #(.EW(11), .FW(52)) dut (.clk, .rst_n, .in_valid, .in_last, .in_data,
                                 .out_valid, .out_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [63:0] exp_q [$];
  int          t_q [$];
  real         run_sum = 0.0;
  logic        grp_inf = 1'b0, grp_nan = 1'b0, ovf_next = 1'b0;
  int          groups = 0;

  function automatic logic [63:0] rnd_val();
    real r;
    int  u, k;
    u = int'($urandom % 16777216);
    k = int'($urandom % 21) - 10;
    r = (1.0 + real'(u) / 16777216.0) * $pow(2.0, real'(k));
    if ($urandom % 2) r = -r;
    return 64'(real_to_bits(r, 11, 52));
  endfunction

  task automatic send(logic [63:0] d, logic last);
    // inputs change on the falling edge, away from the sampling edge
    in_valid = 1'b1;
    in_data  = d;
    in_last  = last;
    @(negedge clk);
    in_valid = 1'b0;
    in_last  = 1'b0;
    if ($urandom % 8 == 0) @(negedge clk);
  endtask

  // Reference model: follows what was sampled at the input.
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (in_data[62:52] == 11'h7ff) begin
        if (in_data[51:0] != 0) grp_nan = 1'b1; else grp_inf = 1'b1;
      end else run_sum = run_sum + bits_to_real(in_data, 11, 52);
      if (in_last) begin
        if (ovf_next)     exp_q.push_back(64'h7ff0000000000000);
        else if (grp_nan) exp_q.push_back(64'h7ff8000000000000);
        else if (grp_inf) exp_q.push_back(64'h7ff0000000000000);
        else              exp_q.push_back(64'(real_to_bits(run_sum, 11, 52)));
        t_q.push_back(cyc);
        groups++;
        run_sum = 0.0;
        grp_inf = 1'b0;
        grp_nan = 1'b0;
      end
    end
    if (rst_n && out_valid) begin
      logic [63:0] e;
      int t0;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sum %h", out_data);
      end else begin
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        checks++;
        if (ulp_dist(e, out_data) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL: sum %h expected %h", out_data, e);
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
    // special groups: infinity, NaN, a value beyond the 2^53 window, exact cancel
    send(64'h3ff0000000000000, 1'b0); send(64'h7ff0000000000000, 1'b1);
    send(64'h7ff8000000000000, 1'b0); send(64'h3ff0000000000000, 1'b1);
    send(64'h3ff0000000000000, 1'b1);
    send(64'h3ff8000000000000, 1'b0); send(64'hbff8000000000000, 1'b1);
    for (int g = 0; g < NGROUPS; g++) begin
      int n;
      n = 1 + int'($urandom % 20);
      for (int i = 0; i < n; i++) send(rnd_val(), i == n - 1);
    end
    repeat (LAT + 4) @(posedge clk);
    // overflow group, checked on its own: 2^60 lies beyond the register
    ovf_next = 1'b1;
    send(64'h43b0000000000000, 1'b1);
    repeat (LAT + 4) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d sums missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
