// discriminator_alloc: the discriminator assigner D of the reduction circuit.
//
// Values of one row arrive on consecutive valid cycles and carry the row
// index. D compares each valid value's row index with the previous one; a
// different index (or the very first value) starts a new row, which gets the
// next discriminator in round-robin order (0, 1, ..., NUM_DISC-1, 0, ...).
// new_row and disc are combinational in the current input (a Mealy output);
// the state (last row index, last discriminator) updates at the clock edge.
// A discriminator comes free again when its row has left the circuit; that
// the round-robin order never meets a busy one is checked in the partial
// result buffer. Idle cycles between values of one row are allowed. Rows
// are told apart only from their neighbour, so two consecutive rows must
// have different indices.
module discriminator_alloc
  import rc_pkg::*;
#(
  parameter int unsigned ROW_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [ROW_W-1:0] in_row,
  output logic             new_row,
  output disc_t            disc
);

  logic             seen;
  logic [ROW_W-1:0] last_row;
  disc_t            last_disc;

  always_comb begin
    new_row = in_valid && (!seen || in_row != last_row);
    disc    = new_row ? disc_t'(last_disc + 1'b1) : last_disc;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      seen      <= 1'b0;
      last_row  <= '0;
      last_disc <= '1;       // first row receives discriminator 0
    end else if (in_valid) begin
      seen      <= 1'b1;
      last_row  <= in_row;
      last_disc <= disc;
    end
  end

endmodule
