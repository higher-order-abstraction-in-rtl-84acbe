// tb_mac: random signed operands into the multiply-accumulator; checks that
// the output equals the running sum of products including the current one,
// that the state starts at 0 after reset, and that a second reset clears it.
module tb_mac;
  localparam int unsigned IN_W = 16, ACC_W = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [IN_W-1:0]  x, y;
  logic signed [ACC_W-1:0] acc_out;
  longint model;
  int checks = 0, failures = 0;

  mac #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.clk, .rst_n, .x, .y, .acc_out);

  always #5 clk = ~clk;

  task automatic run(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      x = IN_W'($urandom);
      y = IN_W'($urandom);
      #1;
      model = model + longint'(x) * longint'(y);
      checks++;
      if (acc_out !== ACC_W'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL acc=%0d expected %0d", acc_out, model);
      end
      @(posedge clk);
    end
  endtask

  initial begin
    x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    model = 0;
    run(500);
    @(negedge clk);
    rst_n = 1'b0;
    x = '0;
    y = '0;
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    model = 0;
    run(200);
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
