// tb_delay_reg: checks that the register shows its initial state after
// reset and then each input exactly one cycle later.
module tb_delay_reg;
  localparam int unsigned W = 32;
  localparam logic [W-1:0] INIT = 32'h1234_5678;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q, prev;
  int checks = 0, failures = 0;

  delay_reg #(.W(W), .INIT(INIT)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    d = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (q !== INIT) begin
      failures++;
      $display("FAIL reset value %h", q);
    end
    rst_n = 1'b1;
    prev  = INIT;
    for (int k = 0; k < 500; k++) begin
      d = $urandom;
      @(posedge clk);
      @(negedge clk);
      checks++;
      if (q !== d) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h expected %h", q, d);
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
