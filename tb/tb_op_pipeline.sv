// tb_op_pipeline: drives random operand pairs (random valid, random
// discriminator) into the pipelined adder and checks that each result leaves
// exactly ALPHA cycles after it entered, with the reference sum and the
// entering discriminator, and that no result appears where none entered.
module tb_op_pipeline;
  import rc_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned ALPHA = 14;

  logic  clk = 1'b0, rst_n = 1'b0;
  dval_t a1, a2, rho;
  dval_t expq [$];
  int checks = 0, failures = 0, cycle = 0;

  op_pipeline #(.ALPHA(ALPHA)) dut (.clk, .rst_n, .a1, .a2, .rho);

  always #5 clk = ~clk;

  initial begin
    a1 = '0; a2 = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // expected queue holds ALPHA entries (the pipeline contents), all empty
    for (int k = 0; k < ALPHA; k++) expq.push_back('0);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // compare the current output with what entered ALPHA cycles ago
      begin
        dval_t e;
        e = expq.pop_front();
        checks++;
        if (rho.valid !== e.valid || (e.valid && (rho.disc !== e.disc || rho.value !== e.value))) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d: rho=%p expected=%p", n, rho, e);
        end
      end
      a1 = '0; a2 = '0;
      if ($urandom_range(0, 3) != 0) begin
        a1.valid = 1'b1;
        a1.disc  = disc_t'($urandom);
        a1.value = int2f($urandom_range(0, 2000) - 1000);
        a2       = a1;
        a2.value = {1'($urandom), 8'(110 + $urandom_range(0, 30)), 23'($urandom)};
      end
      expq.push_back(a1.valid ? '{valid: 1'b1, disc: a1.disc, value: fadd_ref(a1.value, a2.value)} : '0);
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
