// da_twiddle_mul: multiplier-less complex product (a + jb) * W16^K.
// With W16^K = wr + j*wi, the four real products a*wr, b*wi, a*wi and b*wr
// each come from a da_const_mul: the real-part coefficient |wr| has its own
// LUT-1/LUT-2 pair and the imaginary-part coefficient |wi| another pair,
// each pair read once with the real input and once with the imaginary input.
// The coefficient signs are fixed at elaboration and folded into each
// product's sign selector. Two adders then form
//   Re = a*wr - b*wi,   Im = a*wi + b*wr     (signed, 8 fractional bits).
// K must not be a multiple of 4 (those twiddles are 1, -j, -1, j and need no
// table). Purely combinational.
module da_twiddle_mul
  import fft_da_pkg::*;
#(
  parameter int unsigned K    = 1,
  parameter adder_kind_e KIND = ADDER_RCA
) (
  input  logic signed [S2_W-1:0] in_re,
  input  logic signed [S2_W-1:0] in_im,
  output logic signed [TW_W-1:0] out_re,
  output logic signed [TW_W-1:0] out_im,
  output logic                   sat
);

  localparam logic [FRAC-1:0] WR_MAG = tw_re_mag(K);
  localparam logic            WR_NEG = tw_re_neg(K);
  localparam logic [FRAC-1:0] WI_MAG = tw_im_mag(K);
  localparam logic            WI_NEG = tw_im_neg(K);

  logic signed [PROD_W:0] a_wr, b_wi, a_wi, b_wr;
  logic [3:0]             sat_v;

  da_const_mul #(.COEF_MAG(WR_MAG), .COEF_NEG(WR_NEG), .KIND(KIND)) u_a_wr (.x(in_re), .y(a_wr), .sat(sat_v[0]));
  da_const_mul #(.COEF_MAG(WI_MAG), .COEF_NEG(WI_NEG), .KIND(KIND)) u_b_wi (.x(in_im), .y(b_wi), .sat(sat_v[1]));
  da_const_mul #(.COEF_MAG(WI_MAG), .COEF_NEG(WI_NEG), .KIND(KIND)) u_a_wi (.x(in_re), .y(a_wi), .sat(sat_v[2]));
  da_const_mul #(.COEF_MAG(WR_MAG), .COEF_NEG(WR_NEG), .KIND(KIND)) u_b_wr (.x(in_im), .y(b_wr), .sat(sat_v[3]));

  addsub #(.WIDTH(PROD_W+1), .KIND(KIND)) u_re (.a(a_wr), .b(b_wi), .sub(1'b1), .y(out_re));
  addsub #(.WIDTH(PROD_W+1), .KIND(KIND)) u_im (.a(a_wi), .b(b_wr), .sub(1'b0), .y(out_im));

  assign sat = |sat_v;

  initial begin
    assert (K % 4 != 0) else $error("da_twiddle_mul: K=%0d is a trivial twiddle", K);
  end

endmodule
