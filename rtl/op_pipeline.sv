// op_pipeline: the pipelined binary operator P of the reduction circuit.
//
// Every cycle one pair of operands (a1, a2) may enter. Following the
// abstract pipeline view of the circuit, the operation (selected by OP:
// floating-point addition with fp_add, or integer addition) is applied as
// the pair enters, and the result, tagged
// with a1's discriminator, then moves one stage per cycle through ALPHA
// delay_reg stages. rho is the last stage (P_alpha): a pair entering in
// cycle t is presented at rho in cycle t + ALPHA. The operator can be any
// commutative, associative one; another operator is one more branch of the
// OP choice and its unit element in rc_pkg. Only the valid bit of each stage is reset.
module op_pipeline
  import rc_pkg::*;
#(
  parameter int unsigned ALPHA = 14,
  parameter op_t         OP    = OP_FADD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  dval_t a1,
  input  dval_t a2,
  output dval_t rho
);

  val_t  result;
  dval_t stage [ALPHA+1];

  if (OP == OP_FADD) begin : g_fadd
    fp_add u_op (.a(a1.value), .b(a2.value), .s(result));
  end else begin : g_iadd
    assign result = a1.value + a2.value;
  end

  assign stage[0] = '{valid: a1.valid, disc: a1.disc, value: result};

  for (genvar k = 0; k < ALPHA; k++) begin : g_stage
    delay_reg #(.W($bits(dval_t)), .INIT('0)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .d    (stage[k]),
      .q    (stage[k+1])
    );
  end

  assign rho = stage[ALPHA];

  // Both operands of a pair belong to the same row.
  a_same_row: assert property (@(posedge clk) disable iff (!rst_n)
    a1.valid |-> (a2.valid && a2.disc == a1.disc));

endmodule
