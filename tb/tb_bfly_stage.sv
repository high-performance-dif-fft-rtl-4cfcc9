// tb_bfly_stage: checks the four butterfly layers as the FFT uses them:
// first and second layer at distance S = 4 (stages 1, 2) and at S = 1
// (stages 3, 4), each with another adder architecture. Expected outputs are
// worked out in the testbench from the layer equations: first layer
// a+c, a-c, b+d, -j(b-d); second layer y0 = u+u', y1 = v+v', y2 = u-u',
// y3 = v-v'. A chained pair (stage 1 then stage 2) must also produce the
// radix-4 butterfly sum_m x(n+4m)(-j)^(g m) at lane 4g+n.
`timescale 1ns/1ps
module tb_bfly_stage;
  import fft_da_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0] xr [16], xi [16];
  logic signed [8:0] a4r [16], a4i [16], a1r [16], a1i [16];
  logic signed [8:0] b4r [16], b4i [16], b1r [16], b1i [16];
  logic signed [9:0] cr [16], ci [16];

  bfly_stage #(.W(8), .S(4), .LAYER(1'b0), .KIND(ADDER_RCA))      u_a4 (.in_re(xr), .in_im(xi), .out_re(a4r), .out_im(a4i));
  bfly_stage #(.W(8), .S(1), .LAYER(1'b0), .KIND(ADDER_CLA))      u_a1 (.in_re(xr), .in_im(xi), .out_re(a1r), .out_im(a1i));
  bfly_stage #(.W(8), .S(4), .LAYER(1'b1), .KIND(ADDER_SKLANSKY)) u_b4 (.in_re(xr), .in_im(xi), .out_re(b4r), .out_im(b4i));
  bfly_stage #(.W(8), .S(1), .LAYER(1'b1), .KIND(ADDER_RCA))      u_b1 (.in_re(xr), .in_im(xi), .out_re(b1r), .out_im(b1i));
  bfly_stage #(.W(9), .S(4), .LAYER(1'b1), .KIND(ADDER_CLA))      u_ch (.in_re(a4r), .in_im(a4i), .out_re(cr), .out_im(ci));

  int checks = 0, failures = 0;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string name, input int l, input int gr, input int gi,
                     input int er, input int ei);
    checks++;
    if (gr != er || gi != ei) begin
      failures++;
      if (failures < 20) $display("FAIL %s lane %0d: got %0d,%0d expected %0d,%0d", name, l, gr, gi, er, ei);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int r[16], i[16], yr[16], yi[16];
      for (int l = 0; l < 16; l++) begin
        r[l] = (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom_range(255)) - 128;
        i[l] = (t == 0) ? 127 : (t == 1) ? -128 : int'($urandom_range(255)) - 128;
        xr[l] = 8'(r[l]); xi[l] = 8'(i[l]);
      end
      @(posedge clk);
      for (int s = 1; s <= 4; s *= 4) begin
        for (int blk = 0; blk < 16; blk += 4*s)
          for (int j = 0; j < s; j++) begin
            int p0, p1, p2, p3;
            p0 = blk + j; p1 = p0 + s; p2 = p0 + 2*s; p3 = p0 + 3*s;
            if (s == 4) begin
              cmp("A4", p0, a4r[p0], a4i[p0], r[p0] + r[p2], i[p0] + i[p2]);
              cmp("A4", p2, a4r[p2], a4i[p2], r[p0] - r[p2], i[p0] - i[p2]);
              cmp("A4", p1, a4r[p1], a4i[p1], r[p1] + r[p3], i[p1] + i[p3]);
              cmp("A4", p3, a4r[p3], a4i[p3], i[p1] - i[p3], -(r[p1] - r[p3]));
              cmp("B4", p0, b4r[p0], b4i[p0], r[p0] + r[p1], i[p0] + i[p1]);
              cmp("B4", p1, b4r[p1], b4i[p1], r[p2] + r[p3], i[p2] + i[p3]);
              cmp("B4", p2, b4r[p2], b4i[p2], r[p0] - r[p1], i[p0] - i[p1]);
              cmp("B4", p3, b4r[p3], b4i[p3], r[p2] - r[p3], i[p2] - i[p3]);
            end else begin
              cmp("A1", p0, a1r[p0], a1i[p0], r[p0] + r[p2], i[p0] + i[p2]);
              cmp("A1", p2, a1r[p2], a1i[p2], r[p0] - r[p2], i[p0] - i[p2]);
              cmp("A1", p1, a1r[p1], a1i[p1], r[p1] + r[p3], i[p1] + i[p3]);
              cmp("A1", p3, a1r[p3], a1i[p3], i[p1] - i[p3], -(r[p1] - r[p3]));
              cmp("B1", p0, b1r[p0], b1i[p0], r[p0] + r[p1], i[p0] + i[p1]);
              cmp("B1", p1, b1r[p1], b1i[p1], r[p2] + r[p3], i[p2] + i[p3]);
              cmp("B1", p2, b1r[p2], b1i[p2], r[p0] - r[p1], i[p0] - i[p1]);
              cmp("B1", p3, b1r[p3], b1i[p3], r[p2] - r[p3], i[p2] - i[p3]);
            end
          end
      end
      stage2_model(r, i, yr, yi);
      for (int l = 0; l < 16; l++) cmp("radix-4", l, cr[l], ci[l], yr[l], yi[l]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
