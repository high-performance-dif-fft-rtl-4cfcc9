// bfly_stage: one radix-2 layer of the 16-lane radix-4 DIF butterfly network.
// Two layers in a row form a radix-4 butterfly (4 inputs a,b,c,d ->
// y0 = a+b+c+d, y1 = a-jb-c+jd, y2 = a-b+c-d, y3 = a+jb-c-jd).
//   LAYER 0 (first half): lanes i, i+2S, i+S, i+3S of each 4S-lane block
//     are paired at distance 2S:  i <- a+c,  i+2S <- a-c,  i+S <- b+d,
//     i+3S <- -j(b-d). The -j rotation is a swap of real and imaginary part
//     with one sign change, so it costs no multiplier.
//   LAYER 1 (second half): pairs at distance S, outputs placed in natural
//     butterfly order: i <- y0, i+S <- y1, i+2S <- y2, i+3S <- y3.
// The FFT uses LAYER 0/1 with S = 4 as stages 1 and 2 (spans 8 and 4) and
// with S = 1 as stages 3 and 4 (spans 2 and 1). Every output is one bit wider
// than the inputs, so nothing overflows. All additions use the adder picked
// by KIND. Purely combinational.
// The layer spans and the positions of the -j rotations follow the design's
// butterfly diagram; the output placement of the second layer (derived so
// that lanes 4..7 carry the group multiplied by W16^n) and the one-bit word
// growth are choices of this design.
module bfly_stage
  import fft_da_pkg::*;
#(
  parameter int unsigned W     = IN_W,
  parameter int unsigned S     = 4,
  parameter bit          LAYER = 1'b0,
  parameter adder_kind_e KIND  = ADDER_RCA
) (
  input  logic signed [W-1:0] in_re  [N_POINTS],
  input  logic signed [W-1:0] in_im  [N_POINTS],
  output logic signed [W:0]   out_re [N_POINTS],
  output logic signed [W:0]   out_im [N_POINTS]
);

  for (genvar blk = 0; blk < N_POINTS; blk += 4*S) begin : g_blk
    for (genvar i = 0; i < S; i++) begin : g_bf
      localparam int unsigned P0 = blk + i;
      localparam int unsigned P1 = blk + i + S;
      localparam int unsigned P2 = blk + i + 2*S;
      localparam int unsigned P3 = blk + i + 3*S;
      if (LAYER == 1'b0) begin : g_first
        // a = P0, b = P1, c = P2, d = P3
        addsub #(.WIDTH(W), .KIND(KIND)) u_ac_sum_re (.a(in_re[P0]), .b(in_re[P2]), .sub(1'b0), .y(out_re[P0]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_ac_sum_im (.a(in_im[P0]), .b(in_im[P2]), .sub(1'b0), .y(out_im[P0]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_ac_dif_re (.a(in_re[P0]), .b(in_re[P2]), .sub(1'b1), .y(out_re[P2]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_ac_dif_im (.a(in_im[P0]), .b(in_im[P2]), .sub(1'b1), .y(out_im[P2]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_bd_sum_re (.a(in_re[P1]), .b(in_re[P3]), .sub(1'b0), .y(out_re[P1]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_bd_sum_im (.a(in_im[P1]), .b(in_im[P3]), .sub(1'b0), .y(out_im[P1]));
        // -j(b-d): real part = Im(b) - Im(d), imaginary part = Re(d) - Re(b)
        addsub #(.WIDTH(W), .KIND(KIND)) u_bd_rot_re (.a(in_im[P1]), .b(in_im[P3]), .sub(1'b1), .y(out_re[P3]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_bd_rot_im (.a(in_re[P3]), .b(in_re[P1]), .sub(1'b1), .y(out_im[P3]));
      end else begin : g_second
        // u = P0, u' = P1 -> y0, y2;  v = P2, v' = P3 -> y1, y3
        addsub #(.WIDTH(W), .KIND(KIND)) u_y0_re (.a(in_re[P0]), .b(in_re[P1]), .sub(1'b0), .y(out_re[P0]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y0_im (.a(in_im[P0]), .b(in_im[P1]), .sub(1'b0), .y(out_im[P0]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y2_re (.a(in_re[P0]), .b(in_re[P1]), .sub(1'b1), .y(out_re[P2]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y2_im (.a(in_im[P0]), .b(in_im[P1]), .sub(1'b1), .y(out_im[P2]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y1_re (.a(in_re[P2]), .b(in_re[P3]), .sub(1'b0), .y(out_re[P1]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y1_im (.a(in_im[P2]), .b(in_im[P3]), .sub(1'b0), .y(out_im[P1]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y3_re (.a(in_re[P2]), .b(in_re[P3]), .sub(1'b1), .y(out_re[P3]));
        addsub #(.WIDTH(W), .KIND(KIND)) u_y3_im (.a(in_im[P2]), .b(in_im[P3]), .sub(1'b1), .y(out_im[P3]));
      end
    end
  end

endmodule
