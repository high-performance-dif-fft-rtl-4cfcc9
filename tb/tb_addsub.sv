// tb_addsub: self-checking test of the signed adder/subtractor with each of
// the three adder architectures at 10 bits (exhaustive corners, random) and
// at 18 bits (random). y must equal a + b or a - b computed with integers;
// the one extra result bit means no result may overflow.
`timescale 1ns/1ps
module tb_addsub;
  import fft_da_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [9:0]  a10, b10;
  logic signed [17:0] a18, b18;
  logic               sub;
  logic signed [10:0] y10 [3];
  logic signed [18:0] y18 [3];

  addsub #(.WIDTH(10), .KIND(ADDER_RCA))      r10 (.a(a10), .b(b10), .sub(sub), .y(y10[0]));
  addsub #(.WIDTH(10), .KIND(ADDER_CLA))      c10 (.a(a10), .b(b10), .sub(sub), .y(y10[1]));
  addsub #(.WIDTH(10), .KIND(ADDER_SKLANSKY)) s10 (.a(a10), .b(b10), .sub(sub), .y(y10[2]));
  addsub #(.WIDTH(18), .KIND(ADDER_RCA))      r18 (.a(a18), .b(b18), .sub(sub), .y(y18[0]));
  addsub #(.WIDTH(18), .KIND(ADDER_CLA))      c18 (.a(a18), .b(b18), .sub(sub), .y(y18[1]));
  addsub #(.WIDTH(18), .KIND(ADDER_SKLANSKY)) s18 (.a(a18), .b(b18), .sub(sub), .y(y18[2]));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y, input int x2, input int y2, input bit s);
    int e10, e18;
    a10 = 10'(x); b10 = 10'(y); a18 = 18'(x2); b18 = 18'(y2); sub = s;
    @(posedge clk);
    e10 = s ? int'(a10) - int'(b10) : int'(a10) + int'(b10);
    e18 = s ? int'(a18) - int'(b18) : int'(a18) + int'(b18);
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (int'(y10[k]) != e10) begin failures++; $display("FAIL kind %0d: %0d %s %0d = %0d", k, a10, s ? "-" : "+", b10, y10[k]); end
      if (int'(y18[k]) != e18) begin failures++; $display("FAIL kind %0d: %0d %s %0d = %0d", k, a18, s ? "-" : "+", b18, y18[k]); end
    end
  endtask

  initial begin
    int c[6] = '{-512, -511, -1, 0, 1, 511};
    int d[6] = '{-131072, -131071, -1, 0, 1, 131071};
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++)
        for (int s = 0; s < 2; s++) apply(c[i], c[j], d[i], d[j], s[0]);
    for (int i = 0; i < 20000; i++)
      apply(int'($urandom), int'($urandom), int'($urandom), int'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
