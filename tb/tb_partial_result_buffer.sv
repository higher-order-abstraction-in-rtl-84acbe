// tb_partial_result_buffer: directed sequences of row starts, arriving
// values, combinations and pipeline results, as the controller would issue
// them. Checks the lookup r for P_alpha's row, that a row is emitted only
// once it is closed and down to its last value, that rows leave in
// allocation order even when a later row finishes first, that a rule-1
// consume empties the slot, and that reusing a busy discriminator is flagged.
module tb_partial_result_buffer;
  import rc_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0;
  logic    new_row, in_valid, y_valid, disc_reuse;
  disc_t   disc, y_disc;
  dval_t   rho, r;
  r_ctrl_t ctrl;
  val_t    y;
  int checks = 0, failures = 0;

  partial_result_buffer #(.CNT_W(8)) dut (
    .clk, .rst_n, .new_row, .disc, .in_valid, .rho, .ctrl, .r, .y_valid, .y, .y_disc, .disc_reuse);

  always #5 clk = ~clk;

  // Apply one cycle of inputs; check the outputs seen during that cycle.
  task automatic cyc(input logic nr, input int d, input logic iv,
                     input logic pv, input int pd, input val_t pval,
                     input logic st, input logic con, input logic mg, input int md,
                     input logic exp_y, input int exp_yd, input val_t exp_yv,
                     input logic exp_r, input val_t exp_rv);
    @(negedge clk);
    new_row  = nr; disc = disc_t'(d); in_valid = iv;
    rho      = '{valid: pv, disc: disc_t'(pd), value: pval};
    ctrl     = '{consume: con, store: st, merge: mg, merge_disc: disc_t'(md)};
    #1;
    checks++;
    if (y_valid !== exp_y || (exp_y && (y_disc !== disc_t'(exp_yd) || y !== exp_yv))) begin
      failures++;
      $display("FAIL y: valid=%b disc=%0d y=%h, expected %b %0d %h", y_valid, y_disc, y, exp_y, exp_yd, exp_yv);
    end
    if (pv) begin
      checks++;
      if (r.valid !== exp_r || (exp_r && r.value !== exp_rv)) begin
        failures++;
        $display("FAIL r: valid=%b value=%h, expected %b %h", r.valid, r.value, exp_r, exp_rv);
      end
    end
  endtask

  //                     nr d  iv   pv pd  val     st con mg md  y  yd yv      r  rv
  initial begin
    new_row = 0; disc = '0; in_valid = 0; rho = '0; ctrl = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    cyc(1, 0, 1,  0, 0, 0,      0, 0, 0, 0,  0, 0, 0,      0, 0);      // row 0, value 1
    cyc(0, 0, 1,  0, 0, 0,      0, 0, 0, 0,  0, 0, 0,      0, 0);      // row 0, value 2
    cyc(1, 1, 1,  0, 0, 0,      0, 0, 1, 0,  0, 0, 0,      0, 0);      // row 1 starts; row 0 values combined
    cyc(0, 0, 0,  1, 1, 'h11,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // row 1 result stored, row 1 still open
    cyc(0, 0, 0,  1, 0, 'h10,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // row 0 last value stored
    cyc(1, 2, 1,  0, 0, 0,      0, 0, 0, 0,  1, 0, 'h10,   0, 0);      // row 0 emitted; row 2 starts, closes row 1
    cyc(0, 2, 1,  0, 0, 0,      0, 0, 0, 0,  1, 1, 'h11,   0, 0);      // row 1 emitted
    cyc(0, 2, 0,  1, 2, 'h20,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // row 2 partial stored
    cyc(0, 2, 0,  1, 2, 'h21,   0, 1, 1, 2,  0, 0, 0,      1, 'h20);   // rule 1: R entry consumed
    cyc(0, 2, 0,  1, 2, 'h22,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // slot was emptied; final value stored
    cyc(1, 3, 1,  0, 0, 0,      0, 0, 0, 0,  0, 0, 0,      0, 0);      // row 3 starts, closes row 2
    cyc(1, 4, 1,  0, 0, 0,      0, 0, 0, 0,  1, 2, 'h22,   0, 0);      // row 2 emitted; row 4 starts
    cyc(1, 5, 1,  1, 4, 'h40,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // row 4 finishes before row 3
    cyc(0, 5, 0,  0, 0, 0,      0, 0, 0, 0,  0, 0, 0,      0, 0);      // row 4 must wait
    cyc(0, 5, 0,  1, 3, 'h30,   1, 0, 0, 0,  0, 0, 0,      0, 0);      // row 3 finishes
    cyc(0, 5, 0,  0, 0, 0,      0, 0, 0, 0,  1, 3, 'h30,   0, 0);      // row 3 out first
    cyc(0, 5, 0,  0, 0, 0,      0, 0, 0, 0,  1, 4, 'h40,   0, 0);      // then row 4
    cyc(0, 5, 0,  0, 0, 0,      0, 0, 0, 0,  0, 0, 0,      0, 0);
    checks++;
    if (disc_reuse !== 1'b0) failures++;
    // Start rows 6 .. 31, 0 .. 5 while row 5 is still open: 5 is reused.
    for (int k = 6; k < 6 + NUM_DISC; k++)
      cyc(1, k % NUM_DISC, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    @(negedge clk);
    new_row = 0; in_valid = 0;
    checks++;
    if (disc_reuse !== 1'b1) begin
      failures++;
      $display("FAIL reuse of a busy discriminator not flagged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
