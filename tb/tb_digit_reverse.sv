// tb_digit_reverse: the stage-4 lanes carry the frequencies in the order
// X0, X4, X8, X12, X1, X5, X9, X13, X2, X6, X10, X14, X3, X7, X11, X15.
// Random words are placed on the lanes; output k must carry the word of the
// lane labelled X(k).
`timescale 1ns/1ps
module tb_digit_reverse;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [20:0] in_re [16], in_im [16], out_re [16], out_im [16];

  digit_reverse #(.W(21)) dut (.in_re, .in_im, .out_re, .out_im);

  localparam int LABEL [16] = '{0, 4, 8, 12, 1, 5, 9, 13, 2, 6, 10, 14, 3, 7, 11, 15};

  int checks = 0, failures = 0;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      for (int l = 0; l < 16; l++) begin
        in_re[l] = 21'($urandom);
        in_im[l] = 21'($urandom);
      end
      @(posedge clk);
      for (int l = 0; l < 16; l++) begin
        checks++;
        if (out_re[LABEL[l]] != in_re[l] || out_im[LABEL[l]] != in_im[l]) begin
          failures++;
          if (failures < 20) $display("FAIL lane %0d should be X(%0d)", l, LABEL[l]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
