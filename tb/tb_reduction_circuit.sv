// tb_reduction_circuit: end-to-end test of the streaming reduction circuit.
//
// A stream of rows of random length (mostly 1..20, some up to 80) is fed at
// one value per cycle, with idle cycles in some phases. Values are small
// integers in single precision, so every summation order gives the exact
// row sum. The test checks that every row sum leaves once, in row order,
// that the overflow flag stays low, that a two-value row takes the expected
// number of cycles, that in a three-value row the third value joins the
// sum of the first two exactly ALPHA cycles later, and that each of the
// five rules was applied. A final
// one-value row closes the last real row; it stays in the buffer by rule 5.
// A second instance built with integer addition runs on the same stream and
// must produce the same rows in the same cycles. A worst-case phase (long
// rows, each followed by 149 one-value rows) reports the most rows in flight
// and the fullest the input buffer got.
module tb_reduction_circuit;
  import rc_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned ALPHA = 14;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid, out_valid, overflow;
  val_t        in_value, out_value;
  logic [15:0] in_row;
  disc_t       out_disc;
  rule_t       rule_fired;
  int checks = 0, failures = 0, cycle = 0, outputs = 0;
  int expq [$];
  int rule_cnt [6];
  int maxbusy = 0, maxi = 0;
  logic three_phase = 1'b0;
  int   t_rule3 = -1, t_rule2 = -1;

  reduction_circuit #(.ALPHA(ALPHA), .IBUF_DEPTH(32), .ROW_W(16)) dut (
    .clk, .rst_n, .in_valid, .in_value, .in_row,
    .out_valid, .out_value, .out_disc, .rule_fired, .overflow);

  // The same circuit built with integer addition, fed the same stream as
  // 32-bit integers. Scheduling depends only on row tags, so it must emit
  // the same rows in the same cycles.
  val_t  in_int, out_int;
  logic  out_valid_i, overflow_i;
  disc_t out_disc_i;
  rule_t rule_i;

  reduction_circuit #(.ALPHA(ALPHA), .IBUF_DEPTH(32), .ROW_W(16), .OP(OP_IADD)) dut_i (
    .clk, .rst_n, .in_valid, .in_value(in_int), .in_row,
    .out_valid(out_valid_i), .out_value(out_int), .out_disc(out_disc_i),
    .rule_fired(rule_i), .overflow(overflow_i));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cycle++;
    rule_cnt[int'(rule_fired)]++;
    if (three_phase && rule_fired == RULE_I1_I2 && t_rule3 < 0) t_rule3 = cycle;
    if (three_phase && rule_fired == RULE_I1_P && t_rule3 >= 0 && t_rule2 < 0) t_rule2 = cycle;
    if ($countones(dut.u_r.busy) > maxbusy) maxbusy = $countones(dut.u_r.busy);
    if (int'(dut.u_i.count) > maxi) maxi = int'(dut.u_i.count);
    if (dut.overrun && !$past(dut.overrun)) $display("input buffer overrun in cycle %0d", cycle);
    if (dut.disc_reuse && !$past(dut.disc_reuse)) $display("discriminator reused in cycle %0d", cycle);
    checks++;
    if (out_valid_i !== out_valid || rule_i !== rule_fired) begin
      failures++;
      if (failures < 10) $display("FAIL integer instance out of step in cycle %0d", cycle);
    end
    if (out_valid) begin
      checks++;
      outputs++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", out_value);
      end else begin
        int e;
        e = expq.pop_front();
        checks++;
        if (out_int !== val_t'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL integer row sum %0d, expected %0d", int'(out_int), e);
        end
        if (out_value !== int2f(e)) begin
          failures++;
          if (failures < 10) $display("cycle %0d outputs %0d", cycle, outputs);
          if (failures < 10) $display("FAIL row sum %h, expected %0d (%h)", out_value, e, int2f(e));
        end
      end
    end
  end

  task automatic send_row(input int row, input int len, input int idle_pct);
    int sum = 0;
    for (int k = 0; k < len; k++) begin
      int v = $urandom_range(0, 200) - 100;
      while ($urandom_range(0, 99) < idle_pct) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_row   = 16'(row);
      in_value = int2f(v);
      in_int   = val_t'(v);
      sum += v;
    end
    expq.push_back(sum);
  endtask

  initial begin
    int t0, first_out;
    in_valid = 1'b0; in_row = '0; in_value = '0; in_int = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // Latency of a two-value row: enters I, pair enters P, leaves after ALPHA
    // cycles, stored in R, emitted once the next row has started.
    @(negedge clk);
    t0 = cycle;
    in_valid = 1'b1; in_row = 16'd1; in_value = int2f(5); in_int = 5;
    @(negedge clk);
    in_value = int2f(7); in_int = 7;
    @(negedge clk);
    in_row = 16'd2; in_value = int2f(1); in_int = 1;
    expq.push_back(12);
    expq.push_back(1);       // row 2 = {1}, closed by the first random row
    @(negedge clk);
    in_valid = 1'b0;
    while (outputs == 0 && cycle < t0 + 100) @(negedge clk);
    first_out = cycle - t0;
    checks++;
    if (first_out != ALPHA + 4) begin
      failures++;
      $display("FAIL two-value row took %0d cycles, expected %0d", first_out, ALPHA + 4);
    end
    // Three-value row followed by idle input: the first two values enter
    // together (rule 3); the third must wait in I until their sum leaves the
    // adder ALPHA cycles later and then joins it (rule 2).
    three_phase = 1'b1;
    send_row(500, 3, 0);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (ALPHA + 10) @(negedge clk);
    three_phase = 1'b0;
    checks++;
    if (t_rule3 < 0 || t_rule2 - t_rule3 != ALPHA) begin
      failures++;
      $display("FAIL three-value row: rule 3 in cycle %0d, rule 2 in cycle %0d", t_rule3, t_rule2);
    end
    // Random stream: dense phase, sparse phase, long rows, single-value rows.
    for (int r = 0; r < 300; r++) begin
      int len;
      case (r / 75)
        0: len = $urandom_range(1, 20);
        1: len = ($urandom_range(0, 9) == 0) ? $urandom_range(40, 80) : $urandom_range(1, 6);
        2: len = 1;
        default: len = $urandom_range(1, 30);
      endcase
      send_row(1000 + r, len, (r / 75 == 3) ? 30 : 0);
    end
    // Worst case for rows in flight: a long row followed by one-value rows,
    // whose sums must wait until the long row's sum has left.
    for (int l = 0; l < 6; l++) begin
      send_row(3000 + 200 * l, (l == 5) ? 200 : 14 * (l + 1) + (l % 2), 0);
      for (int q = 1; q < 150; q++) send_row(3000 + 200 * l + q, 1, 0);
    end
    send_row(7, 1, 0);           // closes the last row
    void'(expq.pop_back());      // its own sum stays inside (rule 5)
    @(negedge clk);
    in_valid = 1'b0;
    repeat (400) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d row sums missing", expq.size());
    end
    checks++;
    if (overflow !== 1'b0 || overflow_i !== 1'b0) begin
      failures++;
      $display("FAIL overflow flag raised");
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (rule_cnt[k] == 0) begin
        failures++;
        $display("FAIL rule %0d never applied", k);
      end
    end
    $display("rows out %0d; rules 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d", outputs,
             rule_cnt[1], rule_cnt[2], rule_cnt[3], rule_cnt[4], rule_cnt[5]);
    $display("most rows in flight %0d, most values in input buffer %0d", maxbusy, maxi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
