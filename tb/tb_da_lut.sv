// tb_da_lut: checks the four tables of the W16^1 multiplier: LUT-1 and LUT-2
// of the real part (coefficient 0.11101100 = 236/256) and of the imaginary
// part (0.01100001 = 97/256). Every entry must equal address * coefficient;
// a set of entries is also compared with the words printed in the design's
// table listings (e.g. LUT-2 real entry 31 = 1110010010100).
`timescale 1ns/1ps
module tb_da_lut;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  a1;
  logic [4:0]  a2;
  logic [11:0] l1_re, l1_im;
  logic [12:0] l2_re, l2_im;

  da_lut #(.ADDR_W(4), .DATA_W(12), .COEF_W(8), .COEF(8'd236)) u_l1_re (.addr(a1), .data(l1_re));
  da_lut #(.ADDR_W(5), .DATA_W(13), .COEF_W(8), .COEF(8'd236)) u_l2_re (.addr(a2), .data(l2_re));
  da_lut #(.ADDR_W(4), .DATA_W(12), .COEF_W(8), .COEF(8'd97))  u_l1_im (.addr(a1), .data(l1_im));
  da_lut #(.ADDR_W(5), .DATA_W(13), .COEF_W(8), .COEF(8'd97))  u_l2_im (.addr(a2), .data(l2_im));

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // printed words: {table, address, word}; table 0 = LUT-1 re, 1 = LUT-2 re,
  // 2 = LUT-1 im, 3 = LUT-2 im
  typedef struct { int t; int a; int w; } printed_t;
  printed_t printed[] = '{
    '{0, 1, 'b000011101100}, '{0, 2, 'b000111011000}, '{0, 3, 'b001011000100},
    '{1, 1, 'b0000011101100}, '{1, 2, 'b0000111011000}, '{1, 3, 'b0001011000100},
    '{1, 30, 'b1101110101000}, '{1, 31, 'b1110010010100},
    '{2, 1, 'b000001100001}, '{2, 2, 'b000011000010}, '{2, 3, 'b000100100011},
    '{2, 4, 'b000110000100}, '{2, 5, 'b000111100101}, '{2, 15, 'b010110101111},
    '{3, 1, 'b0000001100001}, '{3, 4, 'b0000110000100}, '{3, 5, 'b0000111100101},
    '{3, 30, 'b0101101011110}, '{3, 31, 'b0101110111111}
  };

  initial begin
    for (int a = 0; a < 32; a++) begin
      a1 = 4'(a); a2 = 5'(a);
      @(posedge clk);
      if (a < 16) begin
        check(int'(l1_re) == a * 236, $sformatf("LUT-1 re[%0d] = %0d", a, l1_re));
        check(int'(l1_im) == a * 97,  $sformatf("LUT-1 im[%0d] = %0d", a, l1_im));
      end
      check(int'(l2_re) == a * 236, $sformatf("LUT-2 re[%0d] = %0d", a, l2_re));
      check(int'(l2_im) == a * 97,  $sformatf("LUT-2 im[%0d] = %0d", a, l2_im));
      foreach (printed[i]) begin
        if (printed[i].a == a) begin
          case (printed[i].t)
            0: if (a < 16) check(int'(l1_re) == printed[i].w, $sformatf("printed LUT-1 re[%0d]", a));
            1: check(int'(l2_re) == printed[i].w, $sformatf("printed LUT-2 re[%0d]", a));
            2: if (a < 16) check(int'(l1_im) == printed[i].w, $sformatf("printed LUT-1 im[%0d]", a));
            default: check(int'(l2_im) == printed[i].w, $sformatf("printed LUT-2 im[%0d]", a));
          endcase
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
