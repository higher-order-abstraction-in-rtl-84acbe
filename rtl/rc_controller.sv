// rc_controller: the controller C of the reduction circuit.
//
// Purely combinational. From the two head values of the input buffer (i1,
// i2), the value leaving the pipeline (rho = P_alpha) and the partial result
// stored for rho's row (r), it applies the five scheduling rules in priority
// order:
//   1. r holds a value of rho's row:     r  + rho enter the pipeline;
//   2. i1 belongs to rho's row:          i1 + rho enter, one value leaves I;
//   3. I holds two values of one row:    i1 + i2 enter, two values leave I;
//   4. I holds two values of two rows:   i1 + unit element of OP enter,
//                                        one value leaves I;
//   5. fewer than two values in I:       nothing enters.
// A rho not used by rule 1 or 2 is sent to R for storage (ctrl.store).
// delta is the number of values taken from I; ctrl.merge marks a cycle in
// which two values of one row become one, which R uses to count the values
// each row still has in the circuit. rule reports which rule fired.
module rc_controller
  import rc_pkg::*;
#(
  parameter op_t OP = OP_FADD
) (
  input  dval_t      i1,
  input  dval_t      i2,
  input  dval_t      rho,
  input  dval_t      r,
  output dval_t      a1,
  output dval_t      a2,
  output logic [1:0] delta,
  output r_ctrl_t    ctrl,
  output rule_t      rule
);

  always_comb begin
    a1    = '0;
    a2    = '0;
    delta = 2'd0;
    ctrl  = '0;
    if (rho.valid && r.valid && r.disc == rho.disc) begin
      rule         = RULE_R_P;
      a1           = rho;
      a2           = r;
      ctrl.consume = 1'b1;
      ctrl.merge   = 1'b1;
    end else if (rho.valid && i1.valid && i1.disc == rho.disc) begin
      rule       = RULE_I1_P;
      a1         = i1;
      a2         = rho;
      delta      = 2'd1;
      ctrl.merge = 1'b1;
    end else if (i2.valid && i1.disc == i2.disc) begin
      rule       = RULE_I1_I2;
      a1         = i1;
      a2         = i2;
      delta      = 2'd2;
      ctrl.store = rho.valid;
      ctrl.merge = 1'b1;
    end else if (i2.valid) begin
      rule       = RULE_I1_UNIT;
      a1         = i1;
      a2         = '{valid: 1'b1, disc: i1.disc, value: unit_of(OP)};
      delta      = 2'd1;
      ctrl.store = rho.valid;
    end else begin
      rule       = RULE_IDLE;
      ctrl.store = rho.valid;
    end
    ctrl.merge_disc = a1.disc;
  end

endmodule
