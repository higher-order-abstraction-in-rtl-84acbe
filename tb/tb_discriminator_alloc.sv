// tb_discriminator_alloc: a stream of rows of random length with random idle
// cycles; checks new_row on the first value of each row only, and that rows
// receive discriminators 0, 1, 2, ... wrapping after NUM_DISC.
module tb_discriminator_alloc;
  import rc_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        in_valid;
  logic [15:0] in_row;
  logic        new_row;
  disc_t       disc;
  int checks = 0, failures = 0, wraps = 0;

  discriminator_alloc #(.ROW_W(16)) dut (.clk, .rst_n, .in_valid, .in_row, .new_row, .disc);

  always #5 clk = ~clk;

  initial begin
    int row_no = 0;
    in_valid = 1'b0; in_row = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 2 * NUM_DISC + 20; r++) begin
      int len = $urandom_range(1, 6);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        in_valid = 1'b0;
        checks++;
        if (new_row !== 1'b0) failures++;
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          checks++;
          if (new_row !== 1'b0) failures++;
        end
        in_valid = 1'b1;
        in_row   = 16'(3 * r + 7);
        #1;
        checks++;
        if (new_row !== (k == 0) || disc !== disc_t'(r)) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d item %0d: new=%b disc=%0d", r, k, new_row, disc);
        end
        if (k == 0 && r > 0 && disc == 0) wraps++;
      end
      row_no++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL discriminators never wrapped");
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
