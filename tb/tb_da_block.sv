// tb_da_block: checks the 16-lane twiddle block (Sklansky adders). Lane 4g+n
// must equal its input times W16^(g*n) in units of 2^-8: lanes with exponent
// 0 only rescaled, the exponent-4 lane rotated by -j, the others matching the
// truncated-coefficient reference products of fft_ref_pkg. Random words in
// the range a stage-2 output can take (+/-510) and corner words are used.
`timescale 1ns/1ps
module tb_da_block;
  import fft_da_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [S2_W-1:0] in_re [N_POINTS], in_im [N_POINTS];
  logic signed [TW_W-1:0] out_re [N_POINTS], out_im [N_POINTS];
  logic [N_POINTS-1:0]    sat;

  da_block #(.KIND(ADDER_SKLANSKY)) dut (.in_re, .in_im, .out_re, .out_im, .sat);

  int checks = 0, failures = 0;
  localparam int EXP [16] = '{0,0,0,0, 0,1,2,3, 0,2,4,6, 0,3,6,9};

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int xr[16], xi[16];
      for (int l = 0; l < 16; l++) begin
        case (t)
          0: begin xr[l] = 510; xi[l] = -510; end
          1: begin xr[l] = -510; xi[l] = 511; end
          2: begin xr[l] = 80; xi[l] = 0; end
          default: begin
            xr[l] = int'($urandom_range(1020)) - 510;
            xi[l] = int'($urandom_range(1020)) - 510;
          end
        endcase
        in_re[l] = S2_W'(xr[l]);
        in_im[l] = S2_W'(xi[l]);
      end
      @(posedge clk);
      for (int l = 0; l < 16; l++) begin
        int er, ei;
        tw_mul(xr[l], xi[l], EXP[l], er, ei);
        checks++;
        if (int'(out_re[l]) != er || int'(out_im[l]) != ei || sat[l]) begin
          failures++;
          if (failures < 20)
            $display("FAIL lane %0d W^%0d (%0d,%0d): got %0d,%0d expected %0d,%0d",
                     l, EXP[l], xr[l], xi[l], out_re[l], out_im[l], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
