// tb_fp_add: checks the single-precision adder against a double-precision
// reference (fp_ref_pkg) on directed cases (exact integers, cancellation,
// signed zero, infinities, NaN, rounding ties) and on random operands whose
// exponents keep results in the normal range.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .s);

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, s, exp);
    end
  endtask

  function automatic logic [31:0] rnd_normal();
    logic [7:0] e;
    e = 8'(100 + $urandom_range(0, 54));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  initial begin
    check(int2f(1), int2f(1), 32'h4000_0000);
    check(int2f(3), int2f(-5), int2f(-2));
    check(int2f(100), int2f(-100), 32'h0000_0000);
    check(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    check(32'h0000_0000, 32'h3fc0_0000, 32'h3fc0_0000);
    check(32'h7f80_0000, int2f(7), 32'h7f80_0000);
    check(32'h7f80_0000, 32'hff80_0000, 32'h7fc0_0000);
    check(32'h7fc0_0001, int2f(1), 32'h7fc0_0000);
    check(32'h7f7f_ffff, 32'h7f7f_ffff, 32'h7f80_0000);   // overflow to inf
    check(32'h3f80_0000, 32'h3380_0000, 32'h3f80_0000);   // 1 + 2^-24: tie, stays even
    check(32'h3f80_0001, 32'h3380_0000, 32'h3f80_0002);   // tie, rounds up to even
    check(32'h3f80_0000, 32'hb380_0000, 32'h3f7f_ffff);   // 1 - 2^-24 exact
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] x, y;
      x = rnd_normal();
      y = rnd_normal();
      if (n % 3 == 0) y = {~x[31], x[30:23], 23'($urandom)};  // near cancellation
      check(x, y, fadd_ref(x, y));
    end
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
