// mac: multiply-accumulate, the basic state-plus-transition-function example.
//
// State: the accumulator acc (reset to the initial state 0). Transition:
// acc' = acc + x * y; the output is acc' itself, so acc_out is the new sum in
// the same cycle (combinational from x, y and the register) and becomes the
// stored state at the clock edge. Signed operands; IN_W and ACC_W are this
// design's choices. The accumulator wraps around on overflow, like the
// fixed-width integer types of the modelling language.
module mac #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned ACC_W = 40
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [IN_W-1:0]  y,
  output logic signed [ACC_W-1:0] acc_out
);

  logic signed [ACC_W-1:0] acc;
  logic signed [2*IN_W-1:0] prod;

  always_comb begin
    prod    = x * y;
    acc_out = acc + ACC_W'(prod);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc_out;
  end

endmodule
