// tb_ep_scaling: throughput of the accelerator with 1, 2 and 4 EP modules.
// Three copies of gto_accel_top (N_EP = 1, 2, 4) run the same benchmark side
// by side: an orbital of four primitives evaluated at 100,000 grid points,
// i.e. 400,000 exponentials, with the output always ready.  Each copy must
// accept the stream in 400,000 / N_EP clocks (one exponential per clock and
// module) and every sum is checked against a double-precision reference.
module tb_ep_scaling;
  import tb_fp_util::*;
  localparam int NPTS = 100000;
  localparam int NPRIM = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0, done = 0;
  logic [31:0] alpha [NPRIM];
  logic        coef_we = 1'b0;
  logic [3:0]  coef_waddr = '0;
  logic [31:0] coef_wdata = '0;
  logic        started = 1'b0;

  function automatic logic [31:0] rnd_real(real lo, real hi);
    int u;
    u = int'($urandom % 1000000);
    return 32'(real_to_bits(lo + (hi - lo) * real'(u) / 1000000.0, 8, 23));
  endfunction

  function automatic real ref_sum(logic [31:0] r2);
    real s;
    s = 0.0;
    for (int i = 0; i < NPRIM; i++)
      s = s + $exp(-bits_to_real(real_to_bits(bits_to_real(64'(alpha[i]), 8, 23) *
                                              bits_to_real(64'(r2), 8, 23), 8, 23), 8, 23));
    return s;
  endfunction

  for (genvar g = 0; g < 3; g++) begin : g_cfg
    localparam int NEP = 1 << g;
    logic        in_valid = 1'b0, in_ready, out_valid;
    logic [31:0] in_r2 = '0, out_sum;
    logic [31:0] sent_q [$];
    int          t0 = 0, t1 = 0;

    gto_accel_top #(.N_EP(NEP)) u_top (
      .clk, .rst_n, .coef_we, .coef_waddr, .coef_wdata, .n_prim(5'(NPRIM)),
      .in_valid, .in_ready, .in_r2, .out_valid, .out_ready(1'b1), .out_sum
    );

    always @(posedge clk) begin
      if (rst_n && in_valid && in_ready) sent_q.push_back(in_r2);
      if (rst_n && out_valid) begin
        real s, y;
        s = ref_sum(sent_q.pop_front());
        y = bits_to_real(64'(out_sum), 8, 23);
        checks++;
        if (y - s > s * 32.0 * $pow(2.0, -23.0) || s - y > s * 32.0 * $pow(2.0, -23.0)) begin
          failures++;
          if (failures < 10) $display("FAIL: N_EP=%0d sum %g expected %g", NEP, y, s);
        end
      end
    end

    initial begin
      wait (started);
      @(negedge clk);
      t0 = cyc;
      for (int j = 0; j < NPTS; j++) begin
        in_valid = 1'b1;
        in_r2    = rnd_real(0.0, 2.0);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        #1;
      end
      in_valid = 1'b0;
      t1 = cyc;
      while (sent_q.size() != 0) @(negedge clk);
      checks++;
      // within one grid-point period of 400,000 / N_EP
      if (t1 - t0 < NPTS * NPRIM / NEP - NPRIM || t1 - t0 > NPTS * NPRIM / NEP + NPRIM) begin
        failures++;
        $display("FAIL: N_EP=%0d took %0d clocks", NEP, t1 - t0);
      end
      $display("N_EP=%0d: %0d exponentials in %0d clocks", NEP, NPTS * NPRIM, t1 - t0);
      done++;
    end
  end

  initial begin
    for (int i = 0; i < NPRIM; i++) alpha[i] = rnd_real(0.1, 10.0);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NPRIM; i++) begin
      coef_we = 1'b1; coef_waddr = 4'(i); coef_wdata = alpha[i];
      @(negedge clk);
    end
    coef_we = 1'b0;
    started = 1'b1;
    wait (done == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * NPRIM + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
