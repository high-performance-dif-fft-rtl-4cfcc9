// fft16_da_top: 16-point radix-4 decimation-in-frequency FFT whose twiddle
// multiplications are done by distributed arithmetic (DA) with dissimilar
// partitioned look-up tables instead of multipliers.
//
// Datapath (one whole transform per clock, fully parallel):
//   input regs -> stage 1 -> stage 2 -> DA block -> stage 3 -> stage 4
//              -> digit reversal -> output regs
// Stages 1+2 are four radix-4 butterflies over x(n), x(n+4), x(n+8), x(n+12);
// the DA block multiplies lane 4g+n by W16^(g*n); stages 3+4 are four
// radix-4 butterflies over lanes 4g..4g+3; the last block restores natural
// frequency order. ADDER selects the adder used everywhere: ripple carry,
// carry lookahead or Sklansky prefix (the three variants of the design).
//
// Interface: x_re/x_im are 8-bit signed integers sampled with in_valid. The
// result X(k) = sum_n x(n) W16^(nk) appears on X_re/X_im two clocks later with
// out_valid, as 21-bit signed words with 8 fractional bits (twiddles are
// 8-bit truncated, so X is exact up to that rounding of W). No scaling is
// applied. The LUT addressing covers magnitudes up to 511; a lane that
// needs a table twiddle (g and n both nonzero) mixes its four inputs with at
// least one sign change, so its stage-2 words stay within +/-510 and never
// need clipping (an assertion watches this). The registers at both ends, the valid flags and the reset are
// choices of this design: the datapath itself is combinational.
//
// Beside the FFT, and independent of it, the top also carries the basic
// bit-serial DA sum-of-products unit (da_serial_mac, four fixed
// coefficients, 8-bit inputs, result after 8 clocks) with its own ports
// mac_*; it shares only the clock, the reset and the adder choice.
module fft16_da_top
  import fft_da_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_RCA
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [IN_W-1:0]      x_re [N_POINTS],
  input  logic signed [IN_W-1:0]      x_im [N_POINTS],
  output logic                        out_valid,
  output logic signed [OUT_W-1:0]     X_re [N_POINTS],
  output logic signed [OUT_W-1:0]     X_im [N_POINTS],
  // bit-serial DA sum of products
  input  logic                        mac_start,
  input  logic signed [7:0]           mac_x [4],
  output logic                        mac_busy,
  output logic                        mac_done,
  output logic signed [19:0]          mac_y
);

  logic                      v_q;
  logic signed [IN_W-1:0]    xr_q [N_POINTS], xi_q [N_POINTS];
  logic signed [S1_W-1:0]    s1_re [N_POINTS], s1_im [N_POINTS];
  logic signed [S2_W-1:0]    s2_re [N_POINTS], s2_im [N_POINTS];
  logic signed [TW_W-1:0]    tw_re [N_POINTS], tw_im [N_POINTS];
  logic signed [S3_W-1:0]    s3_re [N_POINTS], s3_im [N_POINTS];
  logic signed [OUT_W-1:0]   s4_re [N_POINTS], s4_im [N_POINTS];
  logic signed [OUT_W-1:0]   nat_re [N_POINTS], nat_im [N_POINTS];
  logic [N_POINTS-1:0]       sat_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      for (int i = 0; i < N_POINTS; i++) begin
        xr_q[i] <= '0;
        xi_q[i] <= '0;
      end
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        xr_q <= x_re;
        xi_q <= x_im;
      end
    end
  end

  bfly_stage #(.W(IN_W), .S(4), .LAYER(1'b0), .KIND(ADDER)) u_stage1 (
    .in_re(xr_q), .in_im(xi_q), .out_re(s1_re), .out_im(s1_im));

  bfly_stage #(.W(S1_W), .S(4), .LAYER(1'b1), .KIND(ADDER)) u_stage2 (
    .in_re(s1_re), .in_im(s1_im), .out_re(s2_re), .out_im(s2_im));

  da_block #(.KIND(ADDER)) u_da (
    .in_re(s2_re), .in_im(s2_im), .out_re(tw_re), .out_im(tw_im), .sat(sat_v));

  bfly_stage #(.W(TW_W), .S(1), .LAYER(1'b0), .KIND(ADDER)) u_stage3 (
    .in_re(tw_re), .in_im(tw_im), .out_re(s3_re), .out_im(s3_im));

  bfly_stage #(.W(S3_W), .S(1), .LAYER(1'b1), .KIND(ADDER)) u_stage4 (
    .in_re(s3_re), .in_im(s3_im), .out_re(s4_re), .out_im(s4_im));

  digit_reverse #(.W(OUT_W)) u_rev (
    .in_re(s4_re), .in_im(s4_im), .out_re(nat_re), .out_im(nat_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < N_POINTS; i++) begin
        X_re[i] <= '0;
        X_im[i] <= '0;
      end
    end else begin
      out_valid <= v_q;
      if (v_q) begin
        X_re <= nat_re;
        X_im <= nat_im;
      end
    end
  end

  da_serial_mac #(.KIND(ADDER)) u_mac (
    .clk, .rst_n, .start(mac_start), .x(mac_x), .busy(mac_busy), .done(mac_done), .y(mac_y));

  // the 9-bit magnitude of the DA lanes is never exceeded
  a_no_clip: assert property (@(posedge clk) v_q |-> sat_v == '0)
    else $error("fft16_da_top: stage-2 word beyond the LUT range");

endmodule
