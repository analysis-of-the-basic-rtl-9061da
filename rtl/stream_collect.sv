// stream_collect: merges N valid/ready streams into one, taking one word from
// each input in strict round-robin order (input k mod N for output word k).
// Paired with stream_dist it returns the results of the EP modules in the
// order their r2 values arrived.  The round-robin scheme is a choice of this
// design.  Combinational from inputs to output; the pointer advances on each
// transfer.
module stream_collect #(
  parameter int unsigned DW = 32,
  parameter int unsigned N  = 4,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  in_valid,
  output logic [N-1:0]  in_ready,
  input  logic [DW-1:0] in_data [N],
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data
);
  logic [PW-1:0] ptr;

  assign out_valid = in_valid[ptr];
  assign out_data  = in_data[ptr];
  always_comb begin
    in_ready      = '0;
    in_ready[ptr] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      ptr <= '0;
    else if (out_valid && out_ready) ptr <= (ptr == PW'(N - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
