// tb_macsum: random operands on a, b, c, d; checks sum = (sum of a*b) +
// (sum of c*d) over all cycles so far, both accumulators starting at 0.
module tb_macsum;
  localparam int unsigned IN_W = 16, ACC_W = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [IN_W-1:0] a, b, c, d;
  logic signed [ACC_W:0]  sum;
  longint m1 = 0, m2 = 0;
  int checks = 0, failures = 0;

  macsum #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.clk, .rst_n, .a, .b, .c, .d, .sum);

  always #5 clk = ~clk;

  initial begin
    a = '0; b = '0; c = '0; d = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < 1000; k++) begin
      @(negedge clk);
      a = IN_W'($urandom); b = IN_W'($urandom);
      c = IN_W'($urandom); d = IN_W'($urandom);
      #1;
      m1 += longint'(a) * longint'(b);
      m2 += longint'(c) * longint'(d);
      checks++;
      if (sum !== (ACC_W+1)'(m1 + m2)) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%0d expected %0d", sum, m1 + m2);
      end
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
