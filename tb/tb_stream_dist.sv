// tb_stream_dist: self-checking testbench of the round-robin distributor with
// four outputs whose ready signals toggle at random.  Checks that word k
// arrives at output k mod 4 in order and unchanged, that only one output is
// offered a word at a time, and that the input is held off while the output
// whose turn it is is not ready.
module tb_stream_dist;
  localparam int N = 4, NW = 2000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [31:0] in_data = '0, out_data;
  logic [N-1:0] out_valid, out_ready = '0;

  stream_dist #(.DW(32), .N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                     .out_valid, .out_ready, .out_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, sent = 0, got = 0, held = 0;
  logic [31:0] q [N][$];

  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if ($countones(out_valid) > 1) begin
        failures++;
        $display("FAIL: several outputs valid");
      end
      if (in_valid && in_ready) begin
        q[sent % N].push_back(in_data);
        sent++;
      end
      if (in_valid && !in_ready) held++;
      for (int p = 0; p < N; p++)
        if (out_valid[p] && out_ready[p]) begin
          checks++;
          if (q[p].size() == 0 || q[p].pop_front() !== out_data) begin
            failures++;
            if (failures < 10) $display("FAIL: output %0d got %h", p, out_data);
          end
          got++;
        end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    fork
      for (int i = 0; i < NW; i++) begin
        in_valid = 1'b1;
        in_data  = $urandom;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom % 4 == 0) @(negedge clk);
      end
      repeat (NW * 4) begin
        out_ready = N'($urandom);
        @(negedge clk);
      end
    join_any
    in_valid = 1'b0;
    repeat (2) @(negedge clk);
    checks++;
    if (got != NW || held == 0) begin
      failures++;
      $display("FAIL: %0d of %0d words delivered, %0d held cycles", got, NW, held);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * 10) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
