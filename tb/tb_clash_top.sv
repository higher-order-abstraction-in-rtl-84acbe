// tb_clash_top: end-to-end test of the top with every parameter at its
// default (14-stage adder, 32-entry input buffer, 128 discriminators).
//
// Reduction circuit: 400 rows of random length (1..40, with runs of
// one-value rows after long rows), integer values in single precision so
// every summation order is exact, idle input cycles in part of the stream.
// Each row sum must leave once and in row order, and the overflow flag must
// stay low. The test counts how often each mechanism occurred and fails if
// one never did: each of the five rules, a finished row waiting in R for an
// earlier row, discriminator wrap-around, and idle input cycles.
// macsum and the complex adder run alongside and are checked every cycle.
module tb_clash_top;
  import rc_pkg::*;
  import cpx_pkg::*;
  import fp_ref_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        rc_in_valid, rc_out_valid, rc_overflow;
  val_t        rc_in_value, rc_out_value;
  logic [15:0] rc_in_row;
  disc_t       rc_out_disc;
  rule_t       rc_rule;
  logic signed [15:0] ms_a, ms_b, ms_c, ms_d;
  logic signed [40:0] ms_sum;
  logic        cx_in_valid, cx_out_valid;
  cpx_t        cx_x, cx_y, cx_z;

  int checks = 0, failures = 0, outputs = 0;
  int expq [$];
  int rule_cnt [6];
  int reorder_waits = 0, wraps = 0, idle_cycles = 0;
  longint ms_model = 0;
  cpx_t   cx_prev;
  logic   cx_prev_v = 1'b0;

  clash_top dut (.*);

  always #5 clk = ~clk;

  // Reduction circuit output and mechanism counters.
  always @(posedge clk) if (rst_n) begin
    rule_cnt[int'(rc_rule)]++;
    if (!rc_in_valid) idle_cycles++;
    for (int k = 0; k < NUM_DISC; k++)
      if (dut.u_rc.u_r.busy[k] && dut.u_rc.u_r.closed[k] && dut.u_rc.u_r.stored[k] &&
          dut.u_rc.u_r.items[k] == 1 && disc_t'(k) != dut.u_rc.u_r.out_ptr)
        reorder_waits++;
    if (rc_out_valid) begin
      int e;
      checks++;
      outputs++;
      if (rc_out_disc == 0 && outputs > 1) wraps++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected row sum %h", rc_out_value);
      end else begin
        e = expq.pop_front();
        if (rc_out_value !== int2f(e)) begin
          failures++;
          if (failures < 10) $display("FAIL row sum %h, expected %0d", rc_out_value, e);
        end
      end
    end
  end

  // macsum and complex adder: new random operands every cycle, checked.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (cx_out_valid !== cx_prev_v ||
        (cx_prev_v && (cx_z.re !== cx_prev.re || cx_z.im !== cx_prev.im))) begin
      failures++;
      if (failures < 10) $display("FAIL complex add %h expected %h", cx_z, cx_prev);
    end
  end

  always @(posedge clk) if (rst_n) begin
    // macsum output is the new accumulator sum, including this cycle's products
    checks++;
    if (ms_sum !== 41'(ms_model + longint'(ms_a) * longint'(ms_b) + longint'(ms_c) * longint'(ms_d))) begin
      failures++;
      if (failures < 10) $display("FAIL macsum %0d", ms_sum);
    end
    ms_model  <= ms_model + longint'(ms_a) * longint'(ms_b) + longint'(ms_c) * longint'(ms_d);
    cx_prev   <= '{re: fadd_ref(cx_x.re, cx_y.re), im: fadd_ref(cx_x.im, cx_y.im)};
    cx_prev_v <= cx_in_valid;
  end

  always @(negedge clk) begin
    ms_a <= 16'($urandom); ms_b <= 16'($urandom);
    ms_c <= 16'($urandom); ms_d <= 16'($urandom);
    cx_in_valid <= ($urandom_range(0, 1) == 1);
    cx_x <= '{re: int2f($urandom_range(0, 999)), im: int2f(-$urandom_range(0, 999))};
    cx_y <= '{re: int2f($urandom_range(0, 999)), im: int2f($urandom_range(0, 99))};
  end

  task automatic send_row(input int row, input int len, input int idle_pct);
    int sum = 0;
    for (int k = 0; k < len; k++) begin
      int v;
      v = $urandom_range(0, 200) - 100;
      while ($urandom_range(0, 99) < idle_pct) begin
        @(negedge clk);
        rc_in_valid = 1'b0;
      end
      @(negedge clk);
      rc_in_valid = 1'b1;
      rc_in_row   = 16'(row);
      rc_in_value = int2f(v);
      sum += v;
    end
    expq.push_back(sum);
  endtask

  initial begin
    rc_in_valid = 1'b0; rc_in_row = '0; rc_in_value = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 400; r++) begin
      int len;
      if (r % 50 == 0)      len = $urandom_range(30, 40);
      else if (r % 50 < 20) len = 1;
      else                  len = $urandom_range(1, 12);
      send_row(r + 1, len, (r >= 200 && r < 300) ? 25 : 0);
    end
    send_row(9999, 1, 0);        // closes the last row; stays inside by rule 5
    void'(expq.pop_back());
    @(negedge clk);
    rc_in_valid = 1'b0;
    repeat (400) @(negedge clk);
    checks++;
    if (expq.size() != 0) begin
      failures++;
      $display("FAIL %0d row sums missing", expq.size());
    end
    checks++;
    if (rc_overflow !== 1'b0) begin
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
    checks++;
    if (reorder_waits == 0) begin failures++; $display("FAIL no finished row ever waited"); end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL discriminators never wrapped"); end
    checks++;
    if (idle_cycles == 0) begin failures++; $display("FAIL no idle input cycle"); end
    $display("rows out %0d; rules 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d; reorder waits %0d; wraps %0d; idle %0d",
             outputs, rule_cnt[1], rule_cnt[2], rule_cnt[3], rule_cnt[4], rule_cnt[5],
             reorder_waits, wraps, idle_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
