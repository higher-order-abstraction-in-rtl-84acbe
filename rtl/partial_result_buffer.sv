// partial_result_buffer: the partial result buffer R of the reduction circuit.
//
// R holds at most one partial result per discriminator (one slot per row in
// flight): a second value of the same row can never wait here, because the
// controller's rule 1 combines it with the stored one first. Besides storing
// pipeline results it does the book-keeping that decides when a row is
// finished, and it restores the rows' arrival order at the output.
//
// Per discriminator it keeps: busy (row in the circuit), closed (a later row
// has started, so no more values will arrive), items (values of the row now
// in the input buffer, the pipeline or R: +1 per arriving value, -1 per
// combination of two values) and the stored partial result. A row is
// finished when it is closed, has one item left and that item is in R. The
// output pointer walks the discriminators in allocation order; when its row
// is finished the sum is presented on y for one cycle and the slot is freed.
// r is read combinationally at rho's discriminator. A new row that meets a
// still-busy discriminator sets the sticky disc_reuse flag.
//
// The item counting and the in-order output pointer are this design's way of
// meeting the described duties (find finished rows, keep their order).
module partial_result_buffer
  import rc_pkg::*;
#(
  parameter int unsigned CNT_W = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    new_row,
  input  disc_t   disc,
  input  logic    in_valid,
  input  dval_t   rho,
  input  r_ctrl_t ctrl,
  output dval_t   r,
  output logic    y_valid,
  output val_t    y,
  output disc_t   y_disc,
  output logic    disc_reuse
);

  logic [NUM_DISC-1:0] busy, closed, stored;
  logic [CNT_W-1:0]    items [NUM_DISC];
  val_t                value [NUM_DISC];
  disc_t               out_ptr;
  logic                finished;

  always_comb begin
    r        = '{valid: stored[rho.disc], disc: rho.disc, value: value[rho.disc]};
    finished = busy[out_ptr] && closed[out_ptr] && stored[out_ptr] &&
               items[out_ptr] == CNT_W'(1);
    y_valid  = finished;
    y        = value[out_ptr];
    y_disc   = out_ptr;
  end

  always_ff @(posedge clk) begin
    if (ctrl.store) value[rho.disc] <= rho.value;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= '0;
      closed     <= '0;
      stored     <= '0;
      out_ptr    <= '0;
      disc_reuse <= 1'b0;
      for (int k = 0; k < NUM_DISC; k++) items[k] <= '0;
    end else begin
      // Item counts: one per arriving value, minus one per combination.
      for (int k = 0; k < NUM_DISC; k++) begin
        if (in_valid && disc == disc_t'(k) && new_row)
          items[k] <= CNT_W'(1);
        else
          items[k] <= items[k]
                      + CNT_W'(in_valid && disc == disc_t'(k))
                      - CNT_W'(ctrl.merge && ctrl.merge_disc == disc_t'(k));
      end
      if (new_row) begin
        if (busy[disc]) disc_reuse <= 1'b1;
        busy[disc]                  <= 1'b1;
        closed[disc]                <= 1'b0;
        closed[disc_t'(disc - 1'b1)] <= 1'b1;
      end
      if (ctrl.consume) stored[rho.disc] <= 1'b0;
      if (ctrl.store)   stored[rho.disc] <= 1'b1;
      if (finished) begin
        busy[out_ptr]   <= 1'b0;
        stored[out_ptr] <= 1'b0;
        out_ptr         <= disc_t'(out_ptr + 1'b1);
      end
    end
  end

  // R never needs two values of one row.
  a_no_double: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.store |-> !stored[rho.disc]);

endmodule
