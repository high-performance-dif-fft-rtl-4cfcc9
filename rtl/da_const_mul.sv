// da_const_mul: multiplier-less product of a signed stage-2 word and a fixed
// real coefficient, using the dissimilar partitioned LUT. da_partition splits
// |x| into a 4-bit and a 5-bit address; LUT-1 (16 words, Q4.8) and LUT-2
// (32 words, Q9.4) are read; the LUT-2 word is aligned to LUT-1's notation
// by four zero fraction bits (Q9.4 -> Q9.8); a 17-bit adder sums the two
// into |x| * COEF_MAG in Q9.8. The sign of the result (sign of x xor sign of
// the coefficient) then picks add or subtract against zero, giving a signed
// Q10.8 product. Exact: no bits are dropped. Purely combinational.
//   x : signed integer, S2_W bits     y : x * (+/-COEF_MAG / 2^FRAC), Q10.8
//   sat : the magnitude of x was clipped to 2^9-1 (only for x = -512)
// The split, the two LUT notations and the alignment follow the design's
// worked example (LUT-1 Q4.8, LUT-2 Q9.4, 17-bit sum); the sign-magnitude
// handling of negative words is a choice of this design. The sign stage's
// two top result bits are unused: the product always fits 18 bits.
module da_const_mul
  import fft_da_pkg::*;
#(
  parameter logic [FRAC-1:0] COEF_MAG = C_PI8,
  parameter logic            COEF_NEG = 1'b0,
  parameter adder_kind_e     KIND     = ADDER_RCA
) (
  input  logic signed [S2_W-1:0]   x,
  output logic signed [PROD_W:0]   y,
  output logic                     sat
);

  localparam int unsigned L1_W = LO_W + FRAC;       // 12: Q4.8
  localparam int unsigned L2_W = HI_W + FRAC;        // 13: Q9.4

  logic              neg;
  logic [HI_W-1:0]   addr_hi;
  logic [LO_W-1:0]   addr_lo;
  logic [L1_W-1:0]   lut1;
  logic [L2_W-1:0]   lut2;
  logic [PROD_W:0]   op1, op2;     // both Q9.8, one guard bit so the adder sees them as non-negative
  logic signed [PROD_W+1:0] mag_sum;
  logic signed [PROD_W+2:0] prod;

  da_partition #(.WIDTH(S2_W), .LO(LO_W)) u_part (
    .x(x), .neg(neg), .addr_hi(addr_hi), .addr_lo(addr_lo), .sat(sat)
  );

  da_lut #(.ADDR_W(LO_W), .DATA_W(L1_W), .COEF_W(FRAC), .COEF(COEF_MAG)) u_lut1 (
    .addr(addr_lo), .data(lut1)
  );

  da_lut #(.ADDR_W(HI_W), .DATA_W(L2_W), .COEF_W(FRAC), .COEF(COEF_MAG)) u_lut2 (
    .addr(addr_hi), .data(lut2)
  );

  // notation adjustment: LUT-2 Q9.4 -> Q9.8, LUT-1 Q4.8 -> Q9.8
  assign op1 = (PROD_W+1)'(lut1);
  assign op2 = (PROD_W+1)'({lut2, {LO_W{1'b0}}});

  addsub #(.WIDTH(PROD_W+1), .KIND(KIND)) u_sum (
    .a(signed'(op1)), .b(signed'(op2)), .sub(1'b0), .y(mag_sum)
  );

  // sign selector: 0 + |p| or 0 - |p|
  addsub #(.WIDTH(PROD_W+2), .KIND(KIND)) u_sign (
    .a('0), .b(mag_sum), .sub(neg ^ COEF_NEG), .y(prod)
  );

  // |x| * COEF_MAG < 2^17, so the value fits PROD_W+1 signed bits
  assign y = prod[PROD_W:0];

endmodule
