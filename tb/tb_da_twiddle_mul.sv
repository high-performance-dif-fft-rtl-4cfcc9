// tb_da_twiddle_mul: checks the complex DA twiddle multiplier for every
// nontrivial twiddle the FFT uses (W16^1, ^2, ^3, ^6, ^9), each with a
// different adder architecture where possible. Inputs are corner values
// (0, +/-1, +/-510, 511, 80) and random stage-2 words. The expected products
// come from fft_ref_pkg: coefficients taken from $cos/$sin truncated to 8
// fractional bits and multiplied with the * operator.
`timescale 1ns/1ps
module tb_da_twiddle_mul;
  import fft_da_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NK = 5;
  localparam int KS [NK] = '{1, 2, 3, 6, 9};

  logic signed [S2_W-1:0] a, b;
  logic signed [TW_W-1:0] re [NK], im [NK];
  logic                   sat [NK];

  da_twiddle_mul #(.K(1), .KIND(ADDER_RCA))      u1 (.in_re(a), .in_im(b), .out_re(re[0]), .out_im(im[0]), .sat(sat[0]));
  da_twiddle_mul #(.K(2), .KIND(ADDER_CLA))      u2 (.in_re(a), .in_im(b), .out_re(re[1]), .out_im(im[1]), .sat(sat[1]));
  da_twiddle_mul #(.K(3), .KIND(ADDER_SKLANSKY)) u3 (.in_re(a), .in_im(b), .out_re(re[2]), .out_im(im[2]), .sat(sat[2]));
  da_twiddle_mul #(.K(6), .KIND(ADDER_RCA))      u6 (.in_re(a), .in_im(b), .out_re(re[3]), .out_im(im[3]), .sat(sat[3]));
  da_twiddle_mul #(.K(9), .KIND(ADDER_CLA))      u9 (.in_re(a), .in_im(b), .out_re(re[4]), .out_im(im[4]), .sat(sat[4]));

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y);
    int er, ei;
    a = S2_W'(x); b = S2_W'(y);
    @(posedge clk);
    for (int i = 0; i < NK; i++) begin
      tw_mul(x, y, KS[i], er, ei);
      checks++;
      if (int'(re[i]) != er || int'(im[i]) != ei || sat[i] != (x == -512 || y == -512)) begin
        failures++;
        if (failures < 20)
          $display("FAIL W^%0d (%0d,%0d): got %0d,%0d expected %0d,%0d", KS[i], x, y, re[i], im[i], er, ei);
      end
    end
  endtask

  initial begin
    int c[8] = '{0, 1, -1, 510, -510, 511, 80, -512};
    foreach (c[i]) foreach (c[j]) apply(c[i], c[j]);
    for (int i = 0; i < 3000; i++)
      apply(int'($urandom_range(1020)) - 510, int'($urandom_range(1020)) - 510);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
