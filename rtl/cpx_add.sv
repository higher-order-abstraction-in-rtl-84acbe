// cpx_add: complex adder built from a given adder (parameterisation example).
//
// The real parts and the imaginary parts are each added by one instance of
// the same pipe_adder; which adder (floating point or integer, FLOAT) and
// its pipeline depth (LATENCY) are parameters, so the adder can be replaced
// without touching this module, and S0 is the adder's initial state (the
// value its pipeline registers hold after reset). The complex adder inherits the adder's
// delay: z is x + y of the inputs LATENCY cycles earlier. in_valid travels
// alongside as out_valid (reset to 0).
module cpx_add
  import cpx_pkg::*;
#(
  parameter bit          FLOAT   = 1'b1,
  parameter int unsigned LATENCY = 1,
  parameter logic [31:0] S0      = '0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  cpx_t x,
  input  cpx_t y,
  output logic out_valid,
  output cpx_t z
);

  logic v [LATENCY+1];

  pipe_adder #(.FLOAT(FLOAT), .LATENCY(LATENCY), .W(32), .INIT(S0)) u_re (
    .clk, .rst_n, .a(x.re), .b(y.re), .s(z.re));
  pipe_adder #(.FLOAT(FLOAT), .LATENCY(LATENCY), .W(32), .INIT(S0)) u_im (
    .clk, .rst_n, .a(x.im), .b(y.im), .s(z.im));

  assign v[0] = in_valid;
  for (genvar k = 0; k < LATENCY; k++) begin : g_valid
    delay_reg #(.W(1), .INIT(1'b0)) u_v (.clk, .rst_n, .d(v[k]), .q(v[k+1]));
  end
  assign out_valid = v[LATENCY];

endmodule
