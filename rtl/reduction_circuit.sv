// reduction_circuit: streaming reduction circuit with one pipelined adder.
//
// The reducing operator is a parameter (OP): single-precision addition by
// default, or integer addition; values are then 32-bit integers.
//
// Input: one value per cycle (in_valid, in_value, in_row). Values of a row
// arrive back to back (idle cycles allowed); a change of row index starts a
// new row. Output: for every row, its sum on out_valid/out_value, in the
// order the rows arrived, each row once. Rows of any length share the single
// ALPHA-stage adder, and several rows are reduced at the same time.
//
// Five components, connected as in the circuit's signal diagram:
//   D  discriminator_alloc   tags each value with its row's discriminator;
//   I  input_buffer          FIFO of tagged values waiting for the adder;
//   P  op_pipeline           the pipelined adder, result rho = P_alpha;
//   R  partial_result_buffer partial sums by discriminator, ordered output;
//   C  rc_controller         the five rules choosing the adder's operands.
// C and P form a loop (C needs rho, P needs C's operands); it is broken by
// P's registers, since rho comes from state only. A row's sum appears a few
// cycles after the last item of the row leaves the pipeline and the next
// row has started. The last row of a stream is summed only once a value of
// a following row arrives, because rule 5 keeps a lone value in I.
//
// rule_fired exposes which rule C applied (for monitoring); overflow is a
// sticky flag for an input buffer overrun or a discriminator reused while
// its row was still in the circuit, both impossible with buffers of
// sufficient size. Buffer sizes (IBUF_DEPTH, 32 discriminators) are this
// design's choices; ALPHA = 14 is the adder depth used in the description.
module reduction_circuit
  import rc_pkg::*;
#(
  parameter int unsigned ALPHA      = 14,
  parameter int unsigned IBUF_DEPTH = 32,
  parameter int unsigned ROW_W      = 16,
  parameter op_t         OP         = OP_FADD
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  val_t             in_value,
  input  logic [ROW_W-1:0] in_row,
  output logic             out_valid,
  output val_t             out_value,
  output disc_t            out_disc,
  output rule_t            rule_fired,
  output logic             overflow
);

  logic       new_row;
  disc_t      disc;
  dval_t      x_tagged, i1, i2, a1, a2, rho, r;
  logic [1:0] delta;
  r_ctrl_t    r_ctrl;
  logic       overrun, disc_reuse;

  discriminator_alloc #(.ROW_W(ROW_W)) u_d (
    .clk, .rst_n, .in_valid, .in_row, .new_row, .disc
  );

  assign x_tagged = '{valid: in_valid, disc: disc, value: in_value};

  input_buffer #(.DEPTH(IBUF_DEPTH)) u_i (
    .clk, .rst_n, .push(x_tagged), .pop(delta), .i1, .i2, .overrun
  );

  op_pipeline #(.ALPHA(ALPHA), .OP(OP)) u_p (
    .clk, .rst_n, .a1, .a2, .rho
  );

  partial_result_buffer #(.CNT_W($clog2(IBUF_DEPTH + ALPHA + 2) + 1)) u_r (
    .clk, .rst_n, .new_row, .disc, .in_valid, .rho, .ctrl(r_ctrl), .r,
    .y_valid(out_valid), .y(out_value), .y_disc(out_disc), .disc_reuse
  );

  rc_controller #(.OP(OP)) u_c (
    .i1, .i2, .rho, .r, .a1, .a2, .delta, .ctrl(r_ctrl), .rule(rule_fired)
  );

  assign overflow = overrun | disc_reuse;

endmodule
