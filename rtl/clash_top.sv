// clash_top: the streaming reduction circuit and the two smaller example
// circuits (macsum and the parameterised complex adder), side by side.
//
// The three share only clock and reset; each has its own ports:
//   rc_*   reduction_circuit (one value per cycle in, row sums out in order);
//   ms_*   macsum (two multiply-accumulators, sum of their results);
//   cx_*   cpx_add built from a floating-point adder with CX_LATENCY stages.
// Defaults: 14-stage floating-point adder in the reduction circuit (RC_OP),
// 32-entry input buffer,
// 16-bit row index, 16-bit MAC operands with 40-bit accumulators, complex
// adder with 1 pipeline stage (the last three are this design's choices).
module clash_top
  import rc_pkg::*;
  import cpx_pkg::*;
#(
  parameter int unsigned ALPHA      = 14,
  parameter int unsigned IBUF_DEPTH = 32,
  parameter int unsigned ROW_W      = 16,
  parameter op_t         RC_OP      = OP_FADD,
  parameter int unsigned MAC_IN_W   = 16,
  parameter int unsigned MAC_ACC_W  = 40,
  parameter int unsigned CX_LATENCY = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // reduction circuit
  input  logic                        rc_in_valid,
  input  val_t                        rc_in_value,
  input  logic [ROW_W-1:0]            rc_in_row,
  output logic                        rc_out_valid,
  output val_t                        rc_out_value,
  output disc_t                       rc_out_disc,
  output rule_t                       rc_rule,
  output logic                        rc_overflow,
  // macsum
  input  logic signed [MAC_IN_W-1:0]  ms_a,
  input  logic signed [MAC_IN_W-1:0]  ms_b,
  input  logic signed [MAC_IN_W-1:0]  ms_c,
  input  logic signed [MAC_IN_W-1:0]  ms_d,
  output logic signed [MAC_ACC_W:0]   ms_sum,
  // complex adder
  input  logic                        cx_in_valid,
  input  cpx_t                        cx_x,
  input  cpx_t                        cx_y,
  output logic                        cx_out_valid,
  output cpx_t                        cx_z
);

  reduction_circuit #(.ALPHA(ALPHA), .IBUF_DEPTH(IBUF_DEPTH), .ROW_W(ROW_W), .OP(RC_OP)) u_rc (
    .clk, .rst_n,
    .in_valid(rc_in_valid), .in_value(rc_in_value), .in_row(rc_in_row),
    .out_valid(rc_out_valid), .out_value(rc_out_value), .out_disc(rc_out_disc),
    .rule_fired(rc_rule), .overflow(rc_overflow)
  );

  macsum #(.IN_W(MAC_IN_W), .ACC_W(MAC_ACC_W)) u_ms (
    .clk, .rst_n, .a(ms_a), .b(ms_b), .c(ms_c), .d(ms_d), .sum(ms_sum)
  );

  cpx_add #(.FLOAT(1'b1), .LATENCY(CX_LATENCY)) u_cx (
    .clk, .rst_n, .in_valid(cx_in_valid), .x(cx_x), .y(cx_y),
    .out_valid(cx_out_valid), .z(cx_z)
  );

endmodule
