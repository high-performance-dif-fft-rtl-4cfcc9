// digit_reverse: output reordering of the radix-4 16-point FFT.
// After the second radix-4 layer, lane 4g+q holds frequency X(4q+g): the two
// base-4 digits of the index are swapped (X0, X4, X8, X12, X1, X5, ...).
// This block undoes that, so out[k] = in[4*(k mod 4) + k div 4] and the
// outputs leave in natural order X0..X15. Pure wiring, no logic.
// The lane labels follow the design's butterfly diagram; the design's prose
// calls the step bit reversal, but with this radix-4 lane order it is the
// base-4 digit swap that restores natural order.
module digit_reverse
  import fft_da_pkg::*;
#(
  parameter int unsigned W = OUT_W
) (
  input  logic signed [W-1:0] in_re  [N_POINTS],
  input  logic signed [W-1:0] in_im  [N_POINTS],
  output logic signed [W-1:0] out_re [N_POINTS],
  output logic signed [W-1:0] out_im [N_POINTS]
);

  for (genvar k = 0; k < N_POINTS; k++) begin : g_map
    localparam int unsigned SRC = 4 * (k % 4) + k / 4;
    assign out_re[k] = in_re[SRC];
    assign out_im[k] = in_im[SRC];
  end

endmodule
