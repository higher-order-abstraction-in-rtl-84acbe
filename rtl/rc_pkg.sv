// rc_pkg: types and constants shared by the streaming reduction circuit.
//
// A value travelling through the reduction circuit is a DVal: an operand
// (IEEE-754 single precision) tagged with the discriminator of its row and a
// valid bit. Discriminators are short tags handed out round-robin to rows
// while they are inside the circuit; DISC_W = 7 (128 rows in flight) and the
// 32-bit operand width are this design's choices, the discriminator idea and
// the choice of operator with its unit element follow the circuit's description.
package rc_pkg;

  localparam int unsigned VAL_W    = 32;
  localparam int unsigned DISC_W   = 7;
  localparam int unsigned NUM_DISC = 1 << DISC_W;

  typedef logic [VAL_W-1:0]  val_t;
  typedef logic [DISC_W-1:0] disc_t;

  // Operand with its row tag; valid = 0 means "no value" (empty slot).
  typedef struct packed {
    logic  valid;
    disc_t disc;
    val_t  value;
  } dval_t;

  // The binary operator of the pipeline (commutative and associative).
  typedef enum logic [0:0] {
    OP_FADD = 1'b0,   // IEEE-754 single-precision addition
    OP_IADD = 1'b1    // 32-bit two's complement addition, wrapping
  } op_t;

  // Unit element of an operator: +0.0 and integer 0 are both all zeros.
  function automatic val_t unit_of(input op_t op);
    case (op)
      OP_FADD: return val_t'(32'h0000_0000);
      default: return val_t'(0);
    endcase
  endfunction

  // Which of the five scheduling rules the controller applied this cycle.
  typedef enum logic [2:0] {
    RULE_NONE     = 3'd0,  // only used before the first decision
    RULE_R_P      = 3'd1,  // R entry + P_alpha
    RULE_I1_P     = 3'd2,  // I1 + P_alpha
    RULE_I1_I2    = 3'd3,  // I1 + I2
    RULE_I1_UNIT  = 3'd4,  // I1 + unit element
    RULE_IDLE     = 3'd5   // fewer than two values in I, nothing enters
  } rule_t;

  // r': the controller's command to the partial result buffer R.
  typedef struct packed {
    logic  consume;     // rule 1: R entry of P_alpha's row enters the pipeline
    logic  store;       // P_alpha is not used this cycle: write it into R
    logic  merge;       // two items of one row were combined (rules 1-3)
    disc_t merge_disc;  // row of that combination
  } r_ctrl_t;

endpackage
