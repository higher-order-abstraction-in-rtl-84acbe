// tb_cpx_add: builds the complex adder twice, from a 3-stage floating-point
// adder and from a combinational integer adder, drives random operands with
// random valid, and checks z and out_valid against a model delayed by each
// instance's latency.
module tb_cpx_add;
  import cpx_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned LAT_F = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, vf, vi;
  cpx_t x, y, zf, zi;
  cpx_t qz [$];
  logic qv [$];
  int checks = 0, failures = 0;

  cpx_add #(.FLOAT(1'b1), .LATENCY(LAT_F)) dut_f (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(vf), .z(zf));
  cpx_add #(.FLOAT(1'b0), .LATENCY(0)) dut_i (
    .clk, .rst_n, .in_valid, .x, .y, .out_valid(vi), .z(zi));

  always #5 clk = ~clk;

  function automatic logic [31:0] rnd_f();
    return {1'($urandom), 8'(110 + $urandom_range(0, 30)), 23'($urandom)};
  endfunction

  initial begin
    in_valid = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < LAT_F; k++) begin
      qz.push_back('0);
      qv.push_back(1'b0);
    end
    for (int n = 0; n < 1000; n++) begin
      cpx_t ez;
      logic ev;
      in_valid = ($urandom_range(0, 3) != 0);
      x = '{re: rnd_f(), im: rnd_f()};
      y = '{re: rnd_f(), im: rnd_f()};
      #1;
      // integer instance: combinational
      checks++;
      if (zi.re !== x.re + y.re || zi.im !== x.im + y.im || vi !== in_valid) begin
        failures++;
        if (failures < 10) $display("FAIL integer complex add");
      end
      // float instance: LAT_F cycles late
      qz.push_back('{re: fadd_ref(x.re, y.re), im: fadd_ref(x.im, y.im)});
      qv.push_back(in_valid);
      ez = qz.pop_front();
      ev = qv.pop_front();
      checks++;
      if (vf !== ev || (n >= LAT_F && zf !== ez)) begin
        failures++;
        if (failures < 10) $display("FAIL float complex add: z=%h expected %h", zf, ez);
      end
      @(negedge clk);
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
