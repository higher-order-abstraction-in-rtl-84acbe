// tb_rc_controller: random combinations of I1, I2, P_alpha and the R entry,
// with few discriminators so that rows often match. For each, the expected
// rule is worked out from the five rules in order, and the operands, the
// number of values taken from I and the command to R are checked. Every
// rule must have been seen.
module tb_rc_controller;
  import rc_pkg::*;

  dval_t      i1, i2, rho, r, a1, a2;
  logic [1:0] delta;
  r_ctrl_t    ctrl;
  rule_t      rule;
  int checks = 0, failures = 0;
  int seen [6];

  rc_controller dut (.i1, .i2, .rho, .r, .a1, .a2, .delta, .ctrl, .rule);

  function automatic dval_t rnd(input int pvalid);
    dval_t v;
    v.valid = ($urandom_range(0, 99) < pvalid);
    v.disc  = disc_t'($urandom_range(0, 2));
    v.value = val_t'($urandom);
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      int    er, ed;
      dval_t e1, e2;
      logic  est, econ, emrg;
      i1  = rnd(80);
      i2  = rnd(70);
      if (!i1.valid) i2.valid = 1'b0;      // I holds values from the head
      rho = rnd(60);
      r   = rnd(50);
      r.disc = rho.disc;                    // R is read at P_alpha's row
      // expected decision
      e1 = '0; e2 = '0; ed = 0; est = 1'b0; econ = 1'b0; emrg = 1'b0;
      if (rho.valid && r.valid) begin
        er = 1; e1 = rho; e2 = r; econ = 1'b1; emrg = 1'b1;
      end else if (rho.valid && i1.valid && i1.disc == rho.disc) begin
        er = 2; e1 = i1; e2 = rho; ed = 1; emrg = 1'b1;
      end else if (i1.valid && i2.valid && i1.disc == i2.disc) begin
        er = 3; e1 = i1; e2 = i2; ed = 2; emrg = 1'b1; est = rho.valid;
      end else if (i1.valid && i2.valid) begin
        er = 4; e1 = i1; e2 = '{valid: 1'b1, disc: i1.disc, value: 32'h0000_0000}; ed = 1; est = rho.valid;
      end else begin
        er = 5; est = rho.valid;
      end
      #1;
      checks++;
      if (int'(rule) != er || delta != 2'(ed) || ctrl.store != est || ctrl.consume != econ ||
          ctrl.merge != emrg || a1.valid != e1.valid || a2.valid != e2.valid ||
          (e1.valid && (a1 != e1 || a2 != e2)) || (emrg && ctrl.merge_disc != e1.disc)) begin
        failures++;
        if (failures < 10) $display("FAIL rule=%0d expected %0d delta=%0d", rule, er, delta);
      end
      seen[er]++;
    end
    for (int k = 1; k <= 5; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL rule %0d never applied", k);
      end
    end
    $display("rules applied: 1:%0d 2:%0d 3:%0d 4:%0d 5:%0d", seen[1], seen[2], seen[3], seen[4], seen[5]);
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
