// delay_pipe: a W-bit wide shift register of DEPTH clock cycles (DEPTH = 0 is
// a plain wire).  The arithmetic units use it to bring their pipelines to the
// published depths and the EP module uses it to carry the end-of-sum flag
// beside the data; synthesis may retime these registers into the logic ahead.
// Reset clears the contents so that valid bits carried through it start low.
module delay_pipe #(
  parameter int unsigned W     = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(DEPTH); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[DEPTH-1];
  end
endmodule
