// da_block: the twiddle multiplication between butterfly stages 2 and 3.
// Lane 4g+n (g = radix-4 output group, n = 0..3) is multiplied by
// W16^(g*n): exponents 0,0,0,0 | 0,1,2,3 | 0,2,4,6 | 0,3,6,9.
//   W16^0  : no rotation, the word is only rescaled to 8 fractional bits;
//   W16^4  : = -j, real and imaginary part swapped and one negated;
//   others : da_twiddle_mul, i.e. partitioned LUT distributed arithmetic.
// All outputs are signed TW_W-bit words with FRAC = 8 fractional bits.
// sat flags a lane whose magnitude had to be clipped by the partition.
// Purely combinational. The exponents per lane are the design's; handling
// W16^4 as a swap instead of through a table is a choice of this design. The
// 8 fractional bits of the W16^0 and -j lanes are always zero.
module da_block
  import fft_da_pkg::*;
#(
  parameter adder_kind_e KIND = ADDER_RCA
) (
  input  logic signed [S2_W-1:0] in_re  [N_POINTS],
  input  logic signed [S2_W-1:0] in_im  [N_POINTS],
  output logic signed [TW_W-1:0] out_re [N_POINTS],
  output logic signed [TW_W-1:0] out_im [N_POINTS],
  output logic [N_POINTS-1:0]    sat
);

  for (genvar l = 0; l < N_POINTS; l++) begin : g_lane
    localparam int unsigned K = tw_exp(l);
    if (tw_kind(K) == TW_ONE) begin : g_one
      assign out_re[l] = TW_W'(in_re[l]) <<< FRAC;
      assign out_im[l] = TW_W'(in_im[l]) <<< FRAC;
      assign sat[l]    = 1'b0;
    end else if (tw_kind(K) == TW_MINJ) begin : g_minj
      // (a + jb)(-j) = b - ja
      logic signed [S2_W:0] neg_re;
      addsub #(.WIDTH(S2_W), .KIND(KIND)) u_neg (.a('0), .b(in_re[l]), .sub(1'b1), .y(neg_re));
      assign out_re[l] = TW_W'(in_im[l]) <<< FRAC;
      assign out_im[l] = TW_W'(neg_re) <<< FRAC;
      assign sat[l]    = 1'b0;
    end else begin : g_da
      da_twiddle_mul #(.K(K), .KIND(KIND)) u_tw (
        .in_re(in_re[l]), .in_im(in_im[l]),
        .out_re(out_re[l]), .out_im(out_im[l]), .sat(sat[l])
      );
    end
  end

endmodule
