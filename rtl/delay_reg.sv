// delay_reg: the polymorphic "delay" component, a register that outputs
// the value it was given one clock earlier.
//
// Its transition function returns the stored value and keeps the new input
// as the next state, so q(t+1) = d(t); reset loads the initial state INIT.
// Chains of delay_reg are used as pipeline registers between components (the
// pipelined operator of the reduction circuit and the pipelined adders of
// the complex adder are built from them). Width and reset style (active-low,
// synchronous) are this design's choices.
module delay_reg #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n) q <= INIT;
    else        q <= d;
  end

endmodule
