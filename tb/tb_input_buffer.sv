// tb_input_buffer: random pushes and pops (0, 1 or 2, never more than held)
// against a queue model; checks the two head entries and their valid bits
// every cycle, fills the buffer completely, and checks that a push into a
// full buffer is dropped and raises overrun.
module tb_input_buffer;
  import rc_pkg::*;

  localparam int unsigned DEPTH = 32;

  logic       clk = 1'b0, rst_n = 1'b0;
  dval_t      push, i1, i2;
  logic [1:0] pop;
  logic       overrun;
  dval_t      model [$];
  int checks = 0, failures = 0;

  input_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .pop, .i1, .i2, .overrun);

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (i1.valid !== (model.size() >= 1) || i2.valid !== (model.size() >= 2) ||
        (model.size() >= 1 && (i1.disc !== model[0].disc || i1.value !== model[0].value)) ||
        (model.size() >= 2 && (i2.disc !== model[1].disc || i2.value !== model[1].value))) begin
      failures++;
      if (failures < 10) $display("FAIL size=%0d i1=%p i2=%p", model.size(), i1, i2);
    end
  endtask

  task automatic step(input int push_prob, input int max_pop);
    int p;
    @(negedge clk);
    compare();
    p = $urandom_range(0, max_pop);
    if (p > model.size()) p = model.size();
    pop  = 2'(p);
    push = '0;
    if ($urandom_range(0, 99) < push_prob)
      push = '{valid: 1'b1, disc: disc_t'($urandom), value: val_t'($urandom)};
    @(posedge clk);
    for (int k = 0; k < p; k++) void'(model.pop_front());
    if (push.valid && model.size() < DEPTH) model.push_back(push);
  endtask

  initial begin
    push = '0; pop = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int n = 0; n < 3000; n++) step(60, 2);
    checks++;
    if (overrun !== 1'b0) failures++;
    // fill up, then one push too many
    while (model.size() < DEPTH) step(100, 0);
    checks++;
    if (overrun !== 1'b0) failures++;
    step(100, 0);
    @(negedge clk);
    compare();
    checks++;
    if (overrun !== 1'b1) begin
      failures++;
      $display("FAIL overrun not raised");
    end
    // drain
    while (model.size() > 0) step(0, 2);
    @(negedge clk);
    compare();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
