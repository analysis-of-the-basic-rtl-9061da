// tb_coef_store: self-checking testbench of the coefficient store.  Writes
// random words, then reads them back on all four ports at independent random
// addresses every clock and checks each word one clock after its address;
// finally overwrites some entries and checks that reads see the new values.
module tb_coef_store;
  localparam int DEPTH = 16, NRD = 4;
  logic clk = 1'b0;
  logic we = 1'b0;
  logic [3:0]  waddr = '0;
  logic [31:0] wdata = '0;
  logic [3:0]  raddr [NRD];
  logic [31:0] rdata [NRD];

  coef_store #(.DW(32), .DEPTH(DEPTH), .NRD(NRD)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  always #5 clk = ~clk;

  logic [31:0] model [DEPTH];
  logic [3:0]  prev_addr [NRD];
  logic        rd_check = 1'b0;
  int checks = 0, failures = 0;

  always @(posedge clk) begin
    if (rd_check)
      for (int p = 0; p < NRD; p++) begin
        checks++;
        if (rdata[p] !== model[prev_addr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL: port %0d addr %0d read %h expected %h", p,
                                      prev_addr[p], rdata[p], model[prev_addr[p]]);
        end
      end
    for (int p = 0; p < NRD; p++) prev_addr[p] <= raddr[p];
    if (we) model[waddr] <= wdata;
  end

  initial begin
    for (int p = 0; p < NRD; p++) raddr[p] = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      we = 1'b1; waddr = 4'(i); wdata = $urandom;
      @(negedge clk);
    end
    we = 1'b0;
    @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      for (int i = 0; i < 200; i++) begin
        for (int p = 0; p < NRD; p++) raddr[p] = 4'($urandom);
        rd_check = 1'b1;
        @(negedge clk);
      end
      rd_check = 1'b0;
      for (int i = 0; i < 5; i++) begin
        we = 1'b1; waddr = 4'($urandom); wdata = $urandom;
        @(negedge clk);
      end
      we = 1'b0;
      @(negedge clk);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
