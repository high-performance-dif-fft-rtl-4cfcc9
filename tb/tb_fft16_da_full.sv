// tb_fft16_da_full: the FFT with every parameter at its default (ripple
// carry adders) taking single transforms one at a time: an impulse, a
// complex tone in every bin 0..15, and random frames. For each, in_valid is
// pulsed once, out_valid must follow exactly two clocks later, and all 16
// outputs must equal the bit-exact model and lie within the twiddle
// truncation bound of a floating-point DFT. The tone test also checks that
// the energy lands in the expected bin. Finally one sum of products is run on
// the bit-serial DA unit and checked after its 8 clocks.
`timescale 1ns/1ps
module tb_fft16_da_full;
  import fft_da_pkg::*;
  import fft_ref_pkg::*;

  localparam real TOL = 20.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  x_re [N_POINTS];
  logic signed [IN_W-1:0]  x_im [N_POINTS];
  logic                    out_valid;
  logic signed [OUT_W-1:0] X_re [N_POINTS];
  logic signed [OUT_W-1:0] X_im [N_POINTS];

  logic                    mac_start = 1'b0;
  logic signed [7:0]       mac_x [4];
  logic                    mac_busy, mac_done;
  logic signed [19:0]      mac_y;

  fft16_da_top dut (.clk, .rst_n, .in_valid, .x_re, .x_im, .out_valid, .X_re, .X_im,
                    .mac_start, .mac_x, .mac_busy, .mac_done, .mac_y);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    // one sum of products on the bit-serial DA unit
    mac_x = '{8'sd100, -8'sd50, 8'sd127, -8'sd128};
    mac_start = 1'b1;
    @(posedge clk);
    #1 mac_start = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    check(mac_done && int'(mac_y) == 184 * 100 + 77 * 50 + 243 * 127 - 28 * 128,
          $sformatf("DA unit y=%0d", mac_y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(input int xr[16], input int xi[16], input int tone_bin);
    int Xr[16], Xi[16];
    real Er[16], Ei[16];
    bit s;
    int lat;
    for (int i = 0; i < 16; i++) begin
      x_re[i] = IN_W'(xr[i]);
      x_im[i] = IN_W'(xi[i]);
    end
    in_valid = 1'b1;
    @(posedge clk);
    #1 in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 10) begin
      @(posedge clk);
      #1 lat++;
    end
    check(lat == 2, $sformatf("latency %0d, expected 2", lat));
    fft_model(xr, xi, Xr, Xi, s);
    dft(xr, xi, Er, Ei);
    for (int k = 0; k < 16; k++) begin
      real er, ei;
      check(int'(X_re[k]) == Xr[k] && int'(X_im[k]) == Xi[k],
            $sformatf("X(%0d) = %0d,%0d model %0d,%0d", k, X_re[k], X_im[k], Xr[k], Xi[k]));
      er = real'(X_re[k]) / 256.0 - Er[k];
      ei = real'(X_im[k]) / 256.0 - Ei[k];
      check(er < TOL && er > -TOL && ei < TOL && ei > -TOL,
            $sformatf("X(%0d) off the exact DFT by %f,%f", k, er, ei));
      if (tone_bin >= 0) begin
        // a tone of amplitude 100 gives ~1600 in its bin, little elsewhere
        if (k == tone_bin) check(X_re[k] / 256 > 1500, $sformatf("tone bin %0d too small", k));
        else check(X_re[k] / 256 < 60 && X_re[k] / 256 > -60, $sformatf("leak into bin %0d", k));
      end
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    int xr[16], xi[16];
    for (int i = 0; i < 16; i++) begin x_re[i] = '0; x_im[i] = '0; end
    for (int k = 0; k < 4; k++) mac_x[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    for (int n = 0; n < 16; n++) begin xr[n] = (n == 3) ? 77 : 0; xi[n] = (n == 3) ? -20 : 0; end
    run_frame(xr, xi, -1);
    for (int b = 0; b < 16; b++) begin
      for (int n = 0; n < 16; n++) begin
        xr[n] = $rtoi($floor(100.0 * $cos(2.0 * PI * b * n / 16.0) + 0.5));
        xi[n] = $rtoi($floor(100.0 * $sin(2.0 * PI * b * n / 16.0) + 0.5));
      end
      run_frame(xr, xi, b);
    end
    for (int r = 0; r < 40; r++) begin
      for (int n = 0; n < 16; n++) begin
        xr[n] = int'($urandom_range(255)) - 128;
        xi[n] = int'($urandom_range(255)) - 128;
      end
      run_frame(xr, xi, -1);
    end
    // one sum of products on the bit-serial DA unit
    mac_x = '{8'sd100, -8'sd50, 8'sd127, -8'sd128};
    mac_start = 1'b1;
    @(posedge clk);
    #1 mac_start = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    check(mac_done && int'(mac_y) == 184 * 100 + 77 * 50 + 243 * 127 - 28 * 128,
          $sformatf("DA unit y=%0d", mac_y));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
