// fft_da_pkg: types and constants shared by the 16-point radix-4 DIF-FFT
// built with dissimilar partitioned LUT distributed arithmetic (DA).
//
// The word widths follow the worked example of the design: 8-bit signed
// input samples, a 9-bit stage-2 magnitude split into a 4-bit LUT-1 address
// and a 5-bit LUT-2 address, LUT-1 words in Q4.8 and LUT-2 words in Q9.4,
// combined by a 17-bit adder. Twiddle magnitudes are held with 8 fractional
// bits, truncated: floor(cos(pi/8)*2^8)=236 (0.11101100),
// floor(sin(pi/8)*2^8)=97 (0.01100001), floor(cos(pi/4)*2^8)=181.
// The adder family (ripple carry, carry lookahead, Sklansky prefix) is the
// only difference between the three variants of the design.
package fft_da_pkg;

  // Adder architecture used by every addition of the datapath.
  typedef enum logic [1:0] {
    ADDER_RCA      = 2'd0,
    ADDER_CLA      = 2'd1,
    ADDER_SKLANSKY = 2'd2
  } adder_kind_e;

  localparam int unsigned N_POINTS = 16;   // transform length
  localparam int unsigned IN_W     = 8;    // input sample width (signed)
  localparam int unsigned S1_W     = IN_W + 1;   // after stage 1
  localparam int unsigned S2_W     = IN_W + 2;   // after stage 2 (DA input)
  localparam int unsigned MAG_W    = S2_W - 1;   // magnitude seen by the LUTs (9)
  localparam int unsigned LO_W     = 4;          // LUT-1 address bits (2^3..2^0)
  localparam int unsigned HI_W     = MAG_W - LO_W; // LUT-2 address bits (2^8..2^4)
  localparam int unsigned FRAC     = 8;          // fractional bits of twiddles and products
  localparam int unsigned PROD_W   = MAG_W + FRAC; // unsigned product, Q9.8 = 17 bits
  localparam int unsigned TW_W     = PROD_W + 2;   // signed complex twiddle output (19)
  localparam int unsigned S3_W     = TW_W + 1;     // after stage 3
  localparam int unsigned OUT_W    = TW_W + 2;     // after stage 4 (21), FRAC fractional bits

  // Twiddle magnitudes, unsigned with FRAC fractional bits.
  localparam logic [FRAC-1:0] C_PI8  = 8'd236; // cos(pi/8)  = sin(3pi/8)
  localparam logic [FRAC-1:0] S_PI8  = 8'd97;  // sin(pi/8)  = cos(3pi/8)
  localparam logic [FRAC-1:0] C_PI4  = 8'd181; // cos(pi/4)  = sin(pi/4)

  // How one lane of the DA block treats its twiddle factor W16^k.
  typedef enum logic [1:0] {
    TW_ONE   = 2'd0,  // k = 0: no rotation
    TW_MINJ  = 2'd1,  // k = 4: -j, a swap and a negation
    TW_DA    = 2'd2   // any other k: partitioned-LUT DA multiply
  } tw_kind_e;

  // Twiddle exponent of lane 4*g + n (g = butterfly output group, n = 0..3),
  // W16^(g*n), as printed next to stage 2 of the butterfly diagram.
  function automatic int unsigned tw_exp(input int unsigned lane);
    return (lane / 4) * (lane % 4);
  endfunction

  function automatic tw_kind_e tw_kind(input int unsigned k);
    if (k % 16 == 0) return TW_ONE;
    if (k % 16 == 4) return TW_MINJ;
    return TW_DA;
  endfunction

  // Magnitude and sign of Re(W16^k) = cos(2*pi*k/16).
  function automatic logic [FRAC-1:0] tw_re_mag(input int unsigned k);
    case (k % 8)
      0:       return '0;     // only reached for k = 0 mod 16 (1) or 8 (-1): handled apart
      1, 7:    return C_PI8;
      2, 6:    return C_PI4;
      3, 5:    return S_PI8;
      default: return '0;     // 4: cos(pi/2) = 0
    endcase
  endfunction

  function automatic logic tw_re_neg(input int unsigned k);
    // cos(2*pi*k/16) < 0 for 4 < k < 12
    return (k % 16 > 4) && (k % 16 < 12);
  endfunction

  // Magnitude and sign of Im(W16^k) = -sin(2*pi*k/16).
  function automatic logic [FRAC-1:0] tw_im_mag(input int unsigned k);
    return tw_re_mag(k + 12);  // |sin(a)| = |cos(a - pi/2)|, k - 4 = k + 12 mod 16
  endfunction

  function automatic logic tw_im_neg(input int unsigned k);
    // -sin(2*pi*k/16) < 0 for 0 < k < 8
    return (k % 16 > 0) && (k % 16 < 8);
  endfunction

endpackage
