// pipe_adder: an adder with state, the building block handed to cpx_add.
//
// s = a + b is computed as the operands enter (fp_add when FLOAT = 1, a
// wrapping W-bit integer add when FLOAT = 0) and then delayed by LATENCY
// delay_reg stages whose initial state is INIT, so the result of the
// operands given in cycle t appears in cycle t + LATENCY. LATENCY = 0 gives
// a combinational adder.
module pipe_adder #(
  parameter bit           FLOAT   = 1'b1,
  parameter int unsigned  LATENCY = 1,
  parameter int unsigned  W       = 32,
  parameter logic [W-1:0] INIT    = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  logic [W-1:0] stage [LATENCY+1];

  if (FLOAT) begin : g_float
    logic [31:0] fs;
    fp_add u_fp (.a(32'(a)), .b(32'(b)), .s(fs));
    assign stage[0] = W'(fs);
  end else begin : g_int
    assign stage[0] = a + b;
  end

  for (genvar k = 0; k < LATENCY; k++) begin : g_stage
    delay_reg #(.W(W), .INIT(INIT)) u_reg (.clk, .rst_n, .d(stage[k]), .q(stage[k+1]));
  end

  assign s = stage[LATENCY];

endmodule
