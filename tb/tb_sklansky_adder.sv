// tb_sklansky_adder: self-checking test of the Sklansky prefix adder at its default
// width (16) and at 17 and 5 bits. Corner operands (0, all ones, carry
// chains through every bit) and random operands with both carry-in values
// are applied; {cout, sum} must equal a + b + cin computed with integers.
`timescale 1ns/1ps
module tb_sklansky_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] a16, b16, s16;
  logic [16:0] a17, b17, s17;
  logic [4:0]  a5,  b5,  s5;
  logic        cin, co16, co17, co5;

  sklansky_adder                u16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(co16));
  sklansky_adder #(.WIDTH(17))  u17 (.a(a17), .b(b17), .cin(cin), .sum(s17), .cout(co17));
  sklansky_adder #(.WIDTH(5))   u5  (.a(a5),  .b(b5),  .cin(cin), .sum(s5),  .cout(co5));

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input longint unsigned x, input longint unsigned y, input bit c);
    longint unsigned e16, e17, e5;
    a16 = 16'(x); b16 = 16'(y);
    a17 = 17'(x); b17 = 17'(y);
    a5  = 5'(x);  b5  = 5'(y);
    cin = c;
    @(posedge clk);
    e16 = longint'(a16) + longint'(b16) + longint'(c);
    e17 = longint'(a17) + longint'(b17) + longint'(c);
    e5  = longint'(a5)  + longint'(b5)  + longint'(c);
    checks += 3;
    if ({co16, s16} != 17'(e16)) begin failures++; $display("FAIL w16 %h+%h+%0d=%h", a16, b16, c, {co16, s16}); end
    if ({co17, s17} != 18'(e17)) begin failures++; $display("FAIL w17 %h+%h+%0d=%h", a17, b17, c, {co17, s17}); end
    if ({co5, s5}   != 6'(e5))   begin failures++; $display("FAIL w5 %h+%h+%0d=%h", a5, b5, c, {co5, s5}); end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      apply(0, 0, c[0]);
      apply('1, 0, c[0]);
      apply('1, 1, c[0]);
      apply('1, '1, c[0]);
      for (int i = 0; i < 17; i++) apply((64'd1 << i) - 1, 1, c[0]);  // carry chains of every length
    end
    // exhaustive at 5 bits
    for (int x = 0; x < 32; x++)
      for (int y = 0; y < 32; y++)
        for (int c = 0; c < 2; c++) apply(x, y, c[0]);
    for (int i = 0; i < 20000; i++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
