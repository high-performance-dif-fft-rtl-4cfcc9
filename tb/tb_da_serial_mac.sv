// tb_da_serial_mac: checks the bit-serial DA sum of products with its
// default coefficients (0.72, -0.30, 0.95, 0.11).
//  * ROM contents: with inputs X_k in {0, 1} the result is the ROM word for
//    address {b1n..b4n}; each of the 16 is compared with the coefficient-sum
//    table of the design (0, 0.11, 0.95, 1.06, -0.30, ...) within 0.01.
//  * Random and extreme 8-bit inputs: y must equal sum T_k * X_k computed
//    with integer multiplication.
//  * Timing: done must come exactly B = 8 clocks after start, and a start
//    while busy must be ignored.
`timescale 1ns/1ps
module tb_da_serial_mac;
  import fft_da_pkg::*;

  localparam int B = 8;
  localparam int T [4] = '{184, -77, 243, 28};
  localparam real TABLE [16] = '{0.0, 0.11, 0.95, 1.06, -0.30, -0.19, 0.65, 0.75,
                                 0.72, 0.83, 1.67, 1.78, 0.42, 0.53, 1.37, 1.48};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [B-1:0] x [4];
  logic busy, done;
  logic signed [19:0] y;

  da_serial_mac #(.KIND(ADDER_CLA)) dut (.clk, .rst_n, .start, .x, .busy, .done, .y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input int v[4], output int result);
    int n;
    for (int k = 0; k < 4; k++) x[k] = B'(v[k]);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int k = 0; k < 4; k++) x[k] = B'($urandom);  // must not matter now
    n = 0;
    while (!done && n < 20) begin
      if (n == 3) start = 1'b1;   // ignored while busy
      @(posedge clk);
      #1 start = 1'b0;
      n++;
    end
    check(n == B, $sformatf("done after %0d clocks, expected %0d", n, B));
    result = int'(y);
  endtask

  initial begin
    int v[4], r, e;
    for (int k = 0; k < 4; k++) x[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // ROM contents
    for (int a = 0; a < 16; a++) begin
      for (int k = 0; k < 4; k++) v[k] = (a >> (3 - k)) & 1;
      run(v, r);
      check(real'(r) / 256.0 - TABLE[a] < 0.01 && real'(r) / 256.0 - TABLE[a] > -0.01,
            $sformatf("address %0d: %f, table %f", a, real'(r) / 256.0, TABLE[a]));
    end
    // products
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 4; k++)
        v[k] = (t == 0) ? -128 : (t == 1) ? 127 : int'($urandom_range(255)) - 128;
      run(v, r);
      e = 0;
      for (int k = 0; k < 4; k++) e += T[k] * v[k];
      check(r == e, $sformatf("x=%0d,%0d,%0d,%0d: y=%0d expected %0d", v[0], v[1], v[2], v[3], r, e));
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
