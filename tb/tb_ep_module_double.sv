// tb_ep_module_double: the EP module testbench run with the module set to
// IEEE-754 double precision (EW = 11, FW = 52), where the unit depths are
// 5 + 30 + 10 = 45 clocks.  The coefficient store is modelled here
// (one-cycle read).  For several primitive counts it checks
//   - every sum against sum_i exp(-p_i) with p_i = alpha_i*r2 rounded to
//     double precision, using the simulator's double-precision exp()
//     (tolerance a few units in the last place of each term, scaled by the
//     term's exponent argument);
//   - the latency: 45 clocks from the last term entering the multiplier to
//     the accumulator output and n_prim + 47 clocks from acceptance of an r2
//     to its sum at the output;
//   - the rate: in a continuous stream one r2 is accepted every n_prim clocks;
//   - back-pressure: with the output randomly stalled the credit counter
//     stops the input and no result is lost or reordered.
module tb_ep_module_double;
  import tb_fp_util::*;
  localparam int unsigned MAXP = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  n_prim = 5'd1;
  logic [3:0]  coef_addr;
  logic [63:0] coef_rdata = '0;
  logic        in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b1;
  logic [63:0] in_r2 = '0, out_data;

  ep_module #(.EW(11), .FW(52), .MAX_PRIM(MAXP), .OUT_DEPTH(64)) dut (
    .clk, .rst_n, .n_prim, .coef_addr, .coef_rdata,
    .in_valid, .in_ready, .in_r2, .out_valid, .out_ready, .out_data
  );
  always #5 clk = ~clk;

  logic [63:0] alpha [MAXP];
  always @(posedge clk) coef_rdata <= alpha[coef_addr];

  int checks = 0, failures = 0, cyc = 0;
  int stalls = 0;
  always @(posedge clk) cyc <= cyc + 1;

  real exp_q [$];
  real tol_q [$];
  int  t_q [$];
  int  last_acc = -1, acc_gap_err = 0, gaps = 0;
  int  check_lat = 0;

  function automatic real term(logic [63:0] a, logic [63:0] r2);
    real p;
    p = bits_to_real(real_to_bits(bits_to_real(a, 11, 52) * bits_to_real(r2, 11, 52),
                                  11, 52), 11, 52);
    return p;
  endfunction

  // reference and timing monitor
  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      real s, tl;
      s = 0.0; tl = 0.0;
      for (int i = 0; i < int'(n_prim); i++) begin
        real p;
        p  = term(alpha[i], in_r2);
        s  = s + $exp(-p);
        tl = tl + $exp(-p) * (2.0 + p) * $pow(2.0, -52.0);
      end
      exp_q.push_back(s);
      // the accumulator resolves 2^-122: each term may lose up to that much
      tol_q.push_back(tl + s * $pow(2.0, -52.0) + real'(n_prim) * $pow(2.0, -122.0));
      t_q.push_back(cyc);
      if (last_acc >= 0 && in_valid && check_lat == 2) begin
        gaps++;
        if (cyc - last_acc != int'(n_prim)) acc_gap_err++;
      end
      last_acc = cyc;
    end
    if (rst_n && in_valid && !in_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      real s, tl, y;
      int  t0;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected sum %h", out_data);
      end else begin
        s  = exp_q.pop_front();
        tl = tol_q.pop_front();
        t0 = t_q.pop_front();
        y  = bits_to_real(out_data, 11, 52);
        checks++;
        if ((y - s > tl) || (s - y > tl)) begin
          failures++;
          if (failures < 10) $display("FAIL: n=%0d sum %g expected %g", n_prim, y, s);
        end
        if (check_lat == 1) begin
          checks++;
          if (cyc - t0 != int'(n_prim) + 47) begin
            failures++;
            $display("FAIL: n=%0d latency %0d expected %0d", n_prim, cyc - t0, n_prim + 47);
          end
        end
      end
    end
  end

  // internal latency: last term into the multiplier -> accumulator output
  int last_in_q [$];
  always @(posedge clk) begin
    if (rst_n && dut.op_v && dut.op_last) last_in_q.push_back(cyc);
    if (rst_n && dut.acc_v) begin
      checks++;
      if (last_in_q.size() == 0 || cyc - last_in_q.pop_front() != 45) begin
        failures++;
        $display("FAIL: multiplier-to-accumulator latency is not 45");
      end
    end
  end

  function automatic logic [63:0] rnd_real(real lo, real hi);
    int u;
    u = int'($urandom % 1000000);
    return 64'(real_to_bits(lo + (hi - lo) * real'(u) / 1000000.0, 11, 52));
  endfunction

  task automatic drain();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  int nlist [5] = '{1, 3, 6, 11, 16};

  initial begin
    for (int i = 0; i < int'(MAXP); i++) alpha[i] = rnd_real(0.01, 8.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    foreach (nlist[k]) begin
      n_prim = 5'(nlist[k]);
      // 1) isolated points: latency
      check_lat = 1;
      for (int j = 0; j < 3; j++) begin
        in_valid = 1'b1;
        in_r2 = rnd_real(0.0, 4.0);
        @(negedge clk);
        while (!in_ready) @(negedge clk);
        in_valid = 1'b0;
        drain();
      end
      // 2) continuous stream: rate
      check_lat = 2;
      last_acc = -1;
      for (int j = 0; j < 40; j++) begin
        in_valid = 1'b1;
        in_r2 = rnd_real(0.0, 6.0);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
      end
      in_valid = 1'b0;
      drain();
      // 3) stalled output: back-pressure
      check_lat = 0;
      fork
        begin
          for (int j = 0; j < 120; j++) begin
            in_valid = 1'b1;
            in_r2 = rnd_real(0.0, 10.0);
            @(posedge clk);
            while (!in_ready) @(posedge clk);
            @(negedge clk);
          end
          in_valid = 1'b0;
        end
        begin
          for (int j = 0; j < 1500; j++) begin
            out_ready = ($urandom % 4 == 0);
            @(negedge clk);
          end
          out_ready = 1'b1;
        end
      join
      drain();
    end
    checks++;
    if (acc_gap_err != 0 || gaps == 0) begin
      failures++;
      $display("FAIL: %0d of %0d acceptance intervals differ from n_prim", acc_gap_err, gaps);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL: back-pressure never stopped the input");
    end
    $display("stalled input cycles %0d, rate checks %0d", stalls, gaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
