// input_buffer: the FIFO input buffer I of the reduction circuit.
//
// A circular buffer: a vector of DEPTH entries with a read and a write index
// (plus an occupancy count). Each cycle it may take one tagged value (push,
// stored when push.valid) and it removes pop = 0, 1 or 2 values from the
// head, as the controller decides. i1 and i2 are the two head entries, read
// combinationally from the stored state; their valid bits say whether the
// buffer holds at least one and at least two values. A value pushed in
// cycle t is visible from cycle t+1. A push that would overfill the buffer
// is dropped and raises the sticky overrun flag. DEPTH (a power of two) is
// this design's choice; the circuit's description gives no size.
module input_buffer
  import rc_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  dval_t      push,
  input  logic [1:0] pop,
  output dval_t      i1,
  output dval_t      i2,
  output logic       overrun
);

  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    disc_t disc;
    val_t  value;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [AW-1:0] rd_idx, wr_idx;
  logic [AW:0]   count;
  logic [AW:0]   after_pop;
  logic          do_push;

  always_comb begin
    i1 = '{valid: (count >= 1), disc: mem[rd_idx].disc, value: mem[rd_idx].value};
    i2 = '{valid: (count >= 2), disc: mem[AW'(rd_idx + 1'b1)].disc,
           value: mem[AW'(rd_idx + 1'b1)].value};
    after_pop = count - (AW+1)'(pop);
    do_push   = push.valid && (after_pop < (AW+1)'(DEPTH));
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_idx] <= '{disc: push.disc, value: push.value};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_idx  <= '0;
      wr_idx  <= '0;
      count   <= '0;
      overrun <= 1'b0;
    end else begin
      rd_idx <= AW'(rd_idx + pop);
      if (do_push) wr_idx <= AW'(wr_idx + 1'b1);
      count <= after_pop + (AW+1)'(do_push);
      if (push.valid && !do_push) overrun <= 1'b1;
    end
  end

  a_pop_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (AW+1)'(pop) <= count);

endmodule
