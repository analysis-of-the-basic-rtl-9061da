// tb_fp_acc: self-checking testbench of the single-precision accumulator.
// Sends random groups of 1..20 data, mostly back to back and sometimes with
// idle cycles inside or between groups, and compares every group sum with a
// double-precision reference (exact for the chosen operand range), allowing
// one unit in the last place.  Also checks infinity, NaN and out-of-window
// inputs, and that each sum appears exactly 8 cycles after its last datum.
module tb_fp_acc;
  import tb_fp_util::*;
  localparam int unsigned LAT = 8;
  localparam int          NGROUPS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_last = 1'b0, out_valid;
  logic [31:0] in_data = '0, out_data;

  fp_acc #(.EW(8), .FW(23)) dut (.clk, .rst_n, .in_valid, .in_last, .in_data,
                                 .out_valid, .out_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] exp_q [$];
  int          t_q [$];
  real         run_sum = 0.0;
  logic        grp_inf = 1'b0, grp_nan = 1'b0, ovf_next = 1'b0;
  int          groups = 0;

  function automatic logic [31:0] rnd_val();
    real r;
    int  u, k;
    u = int'($urandom % 16777216);
    k = int'($urandom % 30) - 20;
    r = (1.0 + real'(u) / 16777216.0) * $pow(2.0, real'(k));
    if ($urandom % 2) r = -r;
    return 32'(real_to_bits(r, 8, 23));
  endfunction

  task automatic send(logic [31:0] d, logic last);
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
      if (in_data[30:23] == 8'hff) begin
        if (in_data[22:0] != 0) grp_nan = 1'b1; else grp_inf = 1'b1;
      end else run_sum = run_sum + bits_to_real(64'(in_data), 8, 23);
      if (in_last) begin
        if (ovf_next)     exp_q.push_back(32'h7f800000);
        else if (grp_nan) exp_q.push_back(32'h7fc00000);
        else if (grp_inf) exp_q.push_back(32'h7f800000);
        else              exp_q.push_back(32'(real_to_bits(run_sum, 8, 23)));
        t_q.push_back(cyc);
        groups++;
        run_sum = 0.0;
        grp_inf = 1'b0;
        grp_nan = 1'b0;
      end
    end
    if (rst_n && out_valid) begin
      logic [31:0] e;
      int t0;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sum %h", out_data);
      end else begin
        e  = exp_q.pop_front();
        t0 = t_q.pop_front();
        checks++;
        if (ulp_dist(64'(e), 64'(out_data)) > 1) begin
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
    // special groups: infinity, NaN, a value beyond the 2^24 window, exact cancel
    send(32'h3f800000, 1'b0); send(32'h7f800000, 1'b1);
    send(32'h7fc00000, 1'b0); send(32'h3f800000, 1'b1);
    send(32'h3f800000, 1'b1);
    send(32'h3fc00000, 1'b0); send(32'hbfc00000, 1'b1);
    for (int g = 0; g < NGROUPS; g++) begin
      int n;
      n = 1 + int'($urandom % 20);
      for (int i = 0; i < n; i++) send(rnd_val(), i == n - 1);
    end
    repeat (LAT + 4) @(posedge clk);
    // overflow group, checked on its own: 2^30 lies beyond the register
    ovf_next = 1'b1;
    send(32'h4e800000, 1'b1);
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
