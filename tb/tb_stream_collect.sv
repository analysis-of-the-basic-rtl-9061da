// tb_stream_collect: self-checking testbench of the round-robin collector with
// four inputs, each offering its own numbered sequence with random gaps, and
// a randomly stalled output.  Checks that the output carries word k of input
// k mod 4 strictly in turn, that exactly one input is acknowledged per
// transfer, and that nothing is taken while the output is stalled.
module tb_stream_collect;
  localparam int N = 4, NW = 500;   // words per input
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in_valid = '0, in_ready;
  logic [31:0]  in_data [N];
  logic out_valid, out_ready = 1'b0;
  logic [31:0] out_data;

  stream_collect #(.DW(32), .N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
                                        .out_valid, .out_ready, .out_data);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, got = 0, stalled = 0;
  int cnt [N];

  // word j of input p is {p, j}
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N; p++)
        if (in_valid[p] && in_ready[p]) cnt[p] <= cnt[p] + 1;
      checks++;
      if ($countones(in_valid & in_ready) != ((out_valid && out_ready) ? 1 : 0)) begin
        failures++;
        $display("FAIL: acknowledged inputs do not match the transfer");
      end
      if (out_valid && !out_ready) stalled++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== {8'(got % N), 24'(got / N)}) begin
          failures++;
          if (failures < 10) $display("FAIL: word %0d is %h", got, out_data);
        end
        got++;
      end
    end
  end

  always_comb
    for (int p = 0; p < N; p++) in_data[p] = {8'(p), 24'(cnt[p])};

  initial begin
    for (int p = 0; p < N; p++) cnt[p] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    while (got < NW * N) begin
      for (int p = 0; p < N; p++) in_valid[p] = (cnt[p] < NW) && ($urandom % 3 != 0);
      out_ready = ($urandom % 4 != 0);
      @(negedge clk);
    end
    checks++;
    if (stalled == 0) begin
      failures++;
      $display("FAIL: output never stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * N * 10) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
