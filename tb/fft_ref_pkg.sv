// fft_ref_pkg: reference models for the testbenches of the DA FFT.
// Written independently of the RTL: twiddle coefficients are derived here
// from $cos/$sin (truncated to 8 fractional bits, the resolution the design
// uses), products are formed with the * operator, and the 16-point DFT is
// evaluated directly from its definition in floating point.
package fft_ref_pkg;

  localparam real PI = 3.14159265358979323846;

  // floor(|v| * 256) and the sign of v
  function automatic int coef_mag(input real v);
    real a;
    a = (v < 0.0) ? -v : v;
    return int'($floor(a * 256.0 + 1.0e-9));
  endfunction

  // W16^k = wr + j wi as signed integers in units of 2^-8 (magnitude truncated)
  function automatic void twiddle(input int k, output int wr, output int wi);
    real c, s;
    c  = $cos(2.0 * PI * k / 16.0);
    s  = -$sin(2.0 * PI * k / 16.0);
    wr = (c < 0.0) ? -coef_mag(c) : coef_mag(c);
    wi = (s < 0.0) ? -coef_mag(s) : coef_mag(s);
  endfunction

  // x * w for a signed stage-2 word x whose magnitude is limited to 511
  function automatic int da_mul(input int x, input int w);
    int m;
    m = (x < 0) ? -x : x;
    if (m > 511) m = 511;
    return ((x < 0) ? -m : m) * w;
  endfunction

  // complex twiddle product in units of 2^-8; trivial twiddles are exact
  function automatic void tw_mul(input int a, input int b, input int k,
                                 output int re, output int im);
    int wr, wi;
    case (k % 16)
      0: begin re = a * 256; im = b * 256; end
      4: begin re = b * 256; im = -a * 256; end
      default: begin
        twiddle(k, wr, wi);
        re = da_mul(a, wr) - da_mul(b, wi);
        im = da_mul(a, wi) + da_mul(b, wr);
      end
    endcase
  endfunction

  // (-j)^e applied to (a, b)
  function automatic void rot_mj(input int a, input int b, input int e,
                                 output int re, output int im);
    case (e % 4)
      0: begin re = a;  im = b;  end
      1: begin re = b;  im = -a; end
      2: begin re = -a; im = -b; end
      default: begin re = -b; im = a; end
    endcase
  endfunction

  // Bit-exact model of the radix-4 DA FFT: radix-4 DFT over x(n+4m),
  // twiddle W16^(g*n) with truncated 8-bit coefficients, radix-4 DFT over n.
  // Results in natural order, units of 2^-8. sat: a DA lane saw -512.
  function automatic void fft_model(input int xr[16], input int xi[16],
                                    output int Xr[16], output int Xi[16],
                                    output bit sat);
    int yr[16], yi[16], tr[16], ti[16];
    int r, i;
    sat = 0;
    for (int g = 0; g < 4; g++)
      for (int n = 0; n < 4; n++) begin
        yr[4*g+n] = 0; yi[4*g+n] = 0;
        for (int m = 0; m < 4; m++) begin
          rot_mj(xr[n+4*m], xi[n+4*m], g*m, r, i);
          yr[4*g+n] += r; yi[4*g+n] += i;
        end
        if ((g*n) % 4 != 0 && (yr[4*g+n] == -512 || yi[4*g+n] == -512)) sat = 1;
        tw_mul(yr[4*g+n], yi[4*g+n], g*n, tr[4*g+n], ti[4*g+n]);
      end
    for (int g = 0; g < 4; g++)
      for (int p = 0; p < 4; p++) begin
        Xr[4*p+g] = 0; Xi[4*p+g] = 0;
        for (int n = 0; n < 4; n++) begin
          rot_mj(tr[4*g+n], ti[4*g+n], p*n, r, i);
          Xr[4*p+g] += r; Xi[4*p+g] += i;
        end
      end
  endfunction

  // Stage-2 outputs (input of the twiddle multiplication), lane 4g+n
  function automatic void stage2_model(input int xr[16], input int xi[16],
                                       output int yr[16], output int yi[16]);
    int r, i;
    for (int g = 0; g < 4; g++)
      for (int n = 0; n < 4; n++) begin
        yr[4*g+n] = 0; yi[4*g+n] = 0;
        for (int m = 0; m < 4; m++) begin
          rot_mj(xr[n+4*m], xi[n+4*m], g*m, r, i);
          yr[4*g+n] += r; yi[4*g+n] += i;
        end
      end
  endfunction

  // Exact DFT in floating point (unscaled)
  function automatic void dft(input int xr[16], input int xi[16],
                              output real Xr[16], output real Xi[16]);
    for (int k = 0; k < 16; k++) begin
      Xr[k] = 0.0; Xi[k] = 0.0;
      for (int n = 0; n < 16; n++) begin
        real c, s;
        c = $cos(2.0 * PI * n * k / 16.0);
        s = -$sin(2.0 * PI * n * k / 16.0);
        Xr[k] += xr[n] * c - xi[n] * s;
        Xi[k] += xr[n] * s + xi[n] * c;
      end
    end
  endfunction

endpackage
