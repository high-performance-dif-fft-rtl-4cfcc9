// tb_da_const_mul: exhaustive test of the partitioned-LUT constant multiplier
// over every 10-bit signed input, for +0.923 (236/256) with ripple carry
// adders, -0.382 (97/256) with carry lookahead adders and +0.707 (181/256)
// with Sklansky adders. The result must be x * coefficient exactly, in units
// of 2^-8, with the magnitude of -512 clipped to 511 and flagged. The worked
// example 80 * 0.923 (73.75) and 80 * -0.382 (-30.3125) is checked apart.
`timescale 1ns/1ps
module tb_da_const_mul;
  import fft_da_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [S2_W-1:0]  x;
  logic signed [PROD_W:0]  y [3];
  logic                    sat [3];
  localparam int C [3] = '{236, -97, 181};

  da_const_mul #(.COEF_MAG(8'd236), .COEF_NEG(1'b0), .KIND(ADDER_RCA))      u0 (.x(x), .y(y[0]), .sat(sat[0]));
  da_const_mul #(.COEF_MAG(8'd97),  .COEF_NEG(1'b1), .KIND(ADDER_CLA))      u1 (.x(x), .y(y[1]), .sat(sat[1]));
  da_const_mul #(.COEF_MAG(8'd181), .COEF_NEG(1'b0), .KIND(ADDER_SKLANSKY)) u2 (.x(x), .y(y[2]), .sat(sat[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -512; v < 512; v++) begin
      int m, xs;
      x = S2_W'(v);
      @(posedge clk);
      m  = (v < 0) ? -v : v;
      if (m > 511) m = 511;
      xs = (v < 0) ? -m : m;
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(y[k]) != xs * C[k] || sat[k] != (v == -512)) begin
          failures++;
          if (failures < 20) $display("FAIL coef %0d x=%0d: y=%0d expected %0d", C[k], v, y[k], xs * C[k]);
        end
      end
    end
    x = S2_W'(80);
    @(posedge clk);
    checks += 2;
    if (real'(y[0]) / 256.0 != 73.75)    begin failures++; $display("FAIL 80*0.923 = %f", real'(y[0]) / 256.0); end
    if (real'(y[1]) / 256.0 != -30.3125) begin failures++; $display("FAIL 80*-0.382 = %f", real'(y[1]) / 256.0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
