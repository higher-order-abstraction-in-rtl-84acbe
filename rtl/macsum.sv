// macsum: two multiply-accumulators whose results are added.
//
// Composition example: one mac accumulates a*b, the other c*d, both start
// from 0, and sum = r1 + r2 is their (new) accumulator values added. Like
// mac, the output is combinational from the inputs and the two registers.
// sum is one bit wider than the accumulators so the addition cannot wrap.
module macsum #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [IN_W-1:0] a,
  input  logic signed [IN_W-1:0] b,
  input  logic signed [IN_W-1:0] c,
  input  logic signed [IN_W-1:0] d,
  output logic signed [ACC_W:0]  sum
);

  logic signed [ACC_W-1:0] r1, r2;

  mac #(.IN_W(IN_W), .ACC_W(ACC_W)) u_mac1 (.clk, .rst_n, .x(a), .y(b), .acc_out(r1));
  mac #(.IN_W(IN_W), .ACC_W(ACC_W)) u_mac2 (.clk, .rst_n, .x(c), .y(d), .acc_out(r2));

  assign sum = (ACC_W+1)'(r1) + (ACC_W+1)'(r2);

endmodule
