// tb_fp_exp: self-checking testbench of the single-precision exponential unit.
// Feeds one operand per clock (special values, then random arguments over
// the whole useful range and the small negative range of the EP datapath)
// and compares each result with the simulator's real-valued exp(), allowing
// one unit in the last place.  It also checks that results arrive exactly
// 21 cycles after their operands and that the unit takes one per clock.
module tb_fp_exp;
  localparam int unsigned LAT = 21;
  localparam int          N   = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [31:0] x = '0, y;

  fp_exp #(.EW(8), .FW(23)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [31:0] xq [$];
  int          tq [$];
  int          cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  import tb_fp_util::*;

  function automatic logic [31:0] ref_exp(logic [31:0] a);
    real r;
    if (a[30:23] == 8'hff) begin
      if (a[22:0] != 0) return 32'h7fc00000;
      return a[31] ? 32'h0 : 32'h7f800000;
    end
    if (a[30:23] == 0) return 32'h3f800000;
    r = $exp(bits_to_real(64'(a), 8, 23));
    return 32'(real_to_bits(r, 8, 23));
  endfunction

  // Random argument: mostly in (-90, 90), some in (-40, 0].
  function automatic logic [31:0] rnd_arg(int i);
    real r;
    int  u;
    u = int'($urandom % 1000000);
    r = real'(u) / 1000000.0;
    if (i % 3 == 0) r = -40.0 * r;
    else if (i % 3 == 1) r = 180.0 * r - 90.0;
    else begin
      u = int'($urandom % 20) - 16;
      r = (r - 0.5) * $pow(2.0, real'(u));
    end
    return 32'(real_to_bits(r, 8, 23));
  endfunction

  logic [31:0] specials [12] = '{32'h00000000, 32'h80000000, 32'h3f800000, 32'hbf800000,
                                 32'h7f800000, 32'hff800000, 32'h7fc00001, 32'h42b17218,
                                 32'hc2ae0000, 32'h43000000, 32'hc3000000, 32'h3f317218};

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
      logic [31:0] a, e;
      int          t0, d;
      if (xq.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", y);
      end else begin
        a  = xq.pop_front();
        t0 = tq.pop_front();
        e  = ref_exp(a);
        d  = (e > y) ? int'(e - y) : int'(y - e);
        checks++;
        if (d > 1 && !(e[30:23] == 8'hff && y[30:23] == 8'hff)) begin
          failures++;
          if (failures < 10) $display("FAIL: exp(%h = %f) = %h expected %h", a,
                                      bits_to_real(64'(a), 8, 23), y, e);
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
