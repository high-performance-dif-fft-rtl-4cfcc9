// tb_da_partition: exhaustive test of the stage-2 word partition over every
// 10-bit signed value. For x the sign flag must be x < 0, the LUT-1 address
// the four low bits of |x| and the LUT-2 address the five high bits; -512,
// the one word whose magnitude does not fit 9 bits, must be clipped to 511
// and flagged. Includes the example 80 -> LUT-2 00101, LUT-1 0000.
`timescale 1ns/1ps
module tb_da_partition;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [9:0] x;
  logic              neg, sat;
  logic [4:0]        hi;
  logic [3:0]        lo;

  da_partition dut (.x(x), .neg(neg), .addr_hi(hi), .addr_lo(lo), .sat(sat));

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
      int m;
      x = 10'(v);
      @(posedge clk);
      m = (v < 0) ? -v : v;
      if (m > 511) m = 511;
      checks++;
      if (neg != (v < 0) || int'(lo) != m % 16 || int'(hi) != m / 16 || sat != (v == -512)) begin
        failures++;
        $display("FAIL x=%0d: neg=%0d hi=%b lo=%b sat=%0d", v, neg, hi, lo, sat);
      end
    end
    x = 10'sd80;
    @(posedge clk);
    checks++;
    if (hi != 5'b00101 || lo != 4'b0000) begin failures++; $display("FAIL example 80"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
