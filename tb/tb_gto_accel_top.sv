// tb_gto_accel_top: end-to-end testbench of the accelerator at its default
// parameters (single precision, four EP modules, 16 coefficients).
// Phases:
//   1. orbital A (n_prim = 3): isolated grid points, checking the latency of
//      n_prim + 35 clocks from acceptance to sum;
//   2. orbital B (n_prim = 16, coefficients rewritten): a continuous stream
//      with the output stalled at random, so that busy EP modules and then
//      exhausted output credits hold off the input;
//   3. orbital C (n_prim = 4): 100,000 grid points = 400,000 exponentials
//      streamed with the output always ready; four EP modules must sustain
//      four exponentials per clock (one grid point per clock).
// Every sum is checked, in order, against sum_i exp(-alpha_i*r2) computed in
// double precision from the single-precision product.  The testbench counts
// how often each mechanism happened (each EP used, input held by a busy EP,
// input held for lack of output credit, coefficient reload) and fails if
// one never did.
module tb_gto_accel_top;
  import tb_fp_util::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        coef_we = 1'b0;
  logic [3:0]  coef_waddr = '0;
  logic [31:0] coef_wdata = '0;
  logic [4:0]  n_prim = 5'd1;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic [31:0] in_r2 = '0, out_sum;

  gto_accel_top dut (
    .clk, .rst_n, .coef_we, .coef_waddr, .coef_wdata, .n_prim,
    .in_valid, .in_ready, .in_r2, .out_valid, .out_ready, .out_sum
  );
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [31:0] alpha [16];
  real exp_q [$];
  real tol_q [$];
  int  t_q [$];
  int  check_lat = 0, sums = 0;
  // mechanism counters
  int  ep_used [4];
  int  held_busy = 0, held_credit = 0, reloads = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      for (int e = 0; e < 4; e++)
        if (dut.ep_in_valid[e] && dut.ep_in_ready[e]) ep_used[e]++;
      if (in_valid && !in_ready) begin
        int oc [4];
        oc[0] = int'(dut.g_ep[0].u_ep.outstanding);
        oc[1] = int'(dut.g_ep[1].u_ep.outstanding);
        oc[2] = int'(dut.g_ep[2].u_ep.outstanding);
        oc[3] = int'(dut.g_ep[3].u_ep.outstanding);
        if (oc[dut.u_dist.ptr] >= 64) held_credit++;
        else held_busy++;
      end
    end
    if (rst_n && in_valid && in_ready) begin
      real s, tl;
      s = 0.0; tl = 0.0;
      for (int i = 0; i < int'(n_prim); i++) begin
        real p;
        p  = bits_to_real(real_to_bits(bits_to_real(64'(alpha[i]), 8, 23) *
                                       bits_to_real(64'(in_r2), 8, 23), 8, 23), 8, 23);
        s  = s + $exp(-p);
        tl = tl + $exp(-p) * (2.0 + p) * $pow(2.0, -23.0);
      end
      exp_q.push_back(s);
      tol_q.push_back(tl + s * $pow(2.0, -23.0) + real'(n_prim) * $pow(2.0, -64.0));
      t_q.push_back(cyc);
    end
    if (rst_n && out_valid && out_ready) begin
      real s, tl, y;
      int  t0;
      sums++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sum %h", out_sum);
      end else begin
        s  = exp_q.pop_front();
        tl = tol_q.pop_front();
        t0 = t_q.pop_front();
        y  = bits_to_real(64'(out_sum), 8, 23);
        checks++;
        if ((y - s > tl) || (s - y > tl)) begin
          failures++;
          if (failures < 10) $display("FAIL: sum %g expected %g", y, s);
        end
        if (check_lat != 0) begin
          checks++;
          if (cyc - t0 != int'(n_prim) + 35) begin
            failures++;
            $display("FAIL: latency %0d expected %0d", cyc - t0, n_prim + 35);
          end
        end
      end
    end
  end

  function automatic logic [31:0] rnd_real(real lo, real hi);
    int u;
    u = int'($urandom % 1000000);
    return 32'(real_to_bits(lo + (hi - lo) * real'(u) / 1000000.0, 8, 23));
  endfunction

  task automatic load_orbital(int n, real amin, real amax);
    n_prim = 5'(n);
    for (int i = 0; i < 16; i++) begin
      alpha[i]   = rnd_real(amin, amax);
      coef_we    = 1'b1;
      coef_waddr = 4'(i);
      coef_wdata = alpha[i];
      @(negedge clk);
    end
    coef_we = 1'b0;
    reloads++;
    @(negedge clk);
  endtask

  task automatic send(logic [31:0] r2);
    in_valid = 1'b1;
    in_r2    = r2;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  int t_start, t_end, n_big;

  initial begin
    for (int e = 0; e < 4; e++) ep_used[e] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. latency
    load_orbital(3, 0.05, 20.0);
    check_lat = 1;
    for (int j = 0; j < 8; j++) begin
      send(rnd_real(0.0, 3.0));
      drain();
    end
    check_lat = 0;

    // 2. back-pressure
    load_orbital(16, 0.01, 50.0);
    fork
      for (int j = 0; j < 1200; j++) send(rnd_real(0.0, 8.0));
      begin
        repeat (1500) begin
          out_ready = ($urandom % 16 == 0);
          @(negedge clk);
        end
        out_ready = 1'b1;
      end
    join
    drain();

    // 3. 400,000 exponentials, rate
    load_orbital(4, 0.1, 30.0);
    n_big   = 100000;
    t_start = cyc;
    for (int j = 0; j < n_big; j++) begin
      in_valid = 1'b1;
      in_r2    = rnd_real(0.0, 5.0);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    t_end = cyc;
    drain();
    checks++;
    // one grid point (four exponentials) per clock, after the first round
    if (t_end - t_start > n_big + 8) begin
      failures++;
      $display("FAIL: %0d grid points took %0d clocks", n_big, t_end - t_start);
    end
    $display("400000 exponentials accepted in %0d clocks", t_end - t_start);

    foreach (ep_used[e]) begin
      checks++;
      if (ep_used[e] == 0) begin
        failures++;
        $display("FAIL: EP module %0d never used", e);
      end
    end
    checks++;
    if (held_busy == 0 || held_credit == 0 || reloads < 3) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("grid points per EP: %0d %0d %0d %0d; input held by busy EP %0d, by credit %0d; reloads %0d; sums %0d",
             ep_used[0], ep_used[1], ep_used[2], ep_used[3], held_busy, held_credit, reloads, sums);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
