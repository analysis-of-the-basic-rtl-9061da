// stream_dist: deals one valid/ready input stream to N output streams in
// strict round-robin order: word k goes to output k mod N.  A word waits
// until its output is ready, so the order is fixed and stream_collect can
// restore it by visiting the outputs in the same order.  This is how the
// single r2 stream is shared by the EP modules of one FPGA; the round-robin
// scheme is a choice of this design.  Combinational from input to outputs;
// the pointer advances on each transfer.  out_data is the input word itself,
// shared by all outputs; only the valid bits select the receiver.
module stream_dist #(
  parameter int unsigned DW = 32,
  parameter int unsigned N  = 4,
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic [N-1:0]  out_valid,
  input  logic [N-1:0]  out_ready,
  output logic [DW-1:0] out_data
);
  logic [PW-1:0] ptr;

  assign in_ready = out_ready[ptr];
  assign out_data = in_data;
  always_comb begin
    out_valid      = '0;
    out_valid[ptr] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     ptr <= '0;
    else if (in_valid && in_ready)  ptr <= (ptr == PW'(N - 1)) ? '0 : ptr + 1'b1;
  end
endmodule
