// tb_fft16_da_top: end-to-end test of the DA FFT in all three adder variants
// (ripple carry, carry lookahead, Sklansky). The same stream of transforms is
// fed to three instances; every result is compared bit for bit with the
// reference model of fft_ref_pkg and, within a bound set by the 8-bit
// twiddle truncation, with a floating-point DFT. The latency (two clocks from
// in_valid to out_valid) is checked for each transform. Stimulus: impulse,
// DC, a complex tone, inputs at full scale (drives DA words to +/-510),
// and random frames, sent back to back and with idle gaps. The model also
// says whether a DA lane would exceed 511; the check against it shows that
// this never happens.
// Mechanisms counted: DA lanes that read LUT-2 (|word| >= 16), DA lanes that
// read only LUT-1 (0 < |word| < 16), negative DA operands, nonzero -j bypass
// lanes, DA words of magnitude 500 or more, back-to-back frames and gaps.
// The bit-serial DA unit beside the FFT runs 30 random sums of products in
// parallel with the FFT traffic; each must take 8 clocks and be exact.
`timescale 1ns/1ps
module tb_fft16_da_top;
  import fft_da_pkg::*;
  import fft_ref_pkg::*;

  localparam int NFRAMES = 300;
  localparam real TOL = 20.0;   // |X_hw - X_exact| bound, see header

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0] x_re [N_POINTS];
  logic signed [IN_W-1:0] x_im [N_POINTS];
  logic out_valid [3];
  logic signed [OUT_W-1:0] X_re [3][N_POINTS];
  logic signed [OUT_W-1:0] X_im [3][N_POINTS];

  fft16_da_top #(.ADDER(ADDER_RCA)) u_rca (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .out_valid(out_valid[0]), .X_re(X_re[0]), .X_im(X_im[0]),
    .mac_start, .mac_x, .mac_busy(mac_busy[0]), .mac_done(mac_done[0]), .mac_y(mac_y[0]));
  fft16_da_top #(.ADDER(ADDER_CLA)) u_cla (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .out_valid(out_valid[1]), .X_re(X_re[1]), .X_im(X_im[1]),
    .mac_start, .mac_x, .mac_busy(mac_busy[1]), .mac_done(mac_done[1]), .mac_y(mac_y[1]));
  fft16_da_top #(.ADDER(ADDER_SKLANSKY)) u_skl (
    .clk, .rst_n, .in_valid, .x_re, .x_im,
    .out_valid(out_valid[2]), .X_re(X_re[2]), .X_im(X_im[2]),
    .mac_start, .mac_x, .mac_busy(mac_busy[2]), .mac_done(mac_done[2]), .mac_y(mac_y[2]));

  logic mac_start = 1'b0;
  logic signed [7:0] mac_x [4];
  logic mac_busy [3], mac_done [3];
  logic signed [19:0] mac_y [3];
  int n_mac = 0;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_lut2 = 0, n_lut1_only = 0, n_neg = 0, n_minj = 0, n_full = 0;
  int n_b2b = 0, n_gap = 0;

  typedef struct {
    int xr[16];
    int xi[16];
    int t_in;
  } frame_t;
  frame_t pending[$];

  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // one frame into the input registers
  task automatic send(input frame_t f);
    int yr[16], yi[16];
    for (int i = 0; i < 16; i++) begin
      x_re[i] = IN_W'(f.xr[i]);
      x_im[i] = IN_W'(f.xi[i]);
    end
    stage2_model(f.xr, f.xi, yr, yi);
    for (int l = 0; l < 16; l++) begin
      int k;
      k = (l / 4) * (l % 4);
      if (k % 4 != 0) begin
        for (int c = 0; c < 2; c++) begin
          int v, m;
          v = (c == 0) ? yr[l] : yi[l];
          m = (v < 0) ? -v : v;
          if (m >= 16) n_lut2++;
          else if (m > 0) n_lut1_only++;
          if (v < 0) n_neg++;
          if (m >= 500) n_full++;
        end
      end else if (k == 4 && (yr[l] != 0 || yi[l] != 0)) n_minj++;
    end
    f.t_in = cycle;
    pending.push_back(f);
    in_valid = 1'b1;
  endtask

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid[0]) begin
      frame_t f;
      int Xr[16], Xi[16];
      real Er[16], Ei[16];
      bit s;
      if (pending.size() == 0) begin
        check(0, "out_valid with no frame pending");
      end else begin
        f = pending.pop_front();
        check(cycle - f.t_in == 2, $sformatf("latency %0d, expected 2", cycle - f.t_in));
        fft_model(f.xr, f.xi, Xr, Xi, s);
        dft(f.xr, f.xi, Er, Ei);
        for (int v = 0; v < 3; v++) begin
          check(out_valid[v] == 1'b1, $sformatf("variant %0d out_valid", v));
          for (int k = 0; k < 16; k++) begin
            real er, ei;
            check(int'(X_re[v][k]) == Xr[k] && int'(X_im[v][k]) == Xi[k],
                  $sformatf("variant %0d X(%0d) = %0d,%0d, model %0d,%0d",
                            v, k, X_re[v][k], X_im[v][k], Xr[k], Xi[k]));
            er = real'(X_re[v][k]) / 256.0 - Er[k];
            ei = real'(X_im[v][k]) / 256.0 - Ei[k];
            check(!s, "model needed a clipped DA word");
            check(er < TOL && er > -TOL && ei < TOL && ei > -TOL,
                    $sformatf("variant %0d X(%0d) off the exact DFT by %f,%f", v, k, er, ei));
          end
        end
      end
    end
  end

  // bit-serial DA unit, run alongside the FFT traffic: y = sum T_k x_k
  // with T = 184, -77, 243, 28 (0.72, -0.30, 0.95, 0.11 in units of 2^-8)
  initial begin
    int v[4], e, n;
    for (int k = 0; k < 4; k++) mac_x[k] = '0;
    wait (rst_n);
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      #1;
      e = 0;
      for (int k = 0; k < 4; k++) begin
        v[k] = int'($urandom_range(255)) - 128;
        mac_x[k] = 8'(v[k]);
      end
      e = 184 * v[0] - 77 * v[1] + 243 * v[2] + 28 * v[3];
      mac_start = 1'b1;
      @(posedge clk);
      #1 mac_start = 1'b0;
      n = 0;
      while (!mac_done[0] && n < 20) begin @(posedge clk); #1 n++; end
      check(n == 8, $sformatf("DA unit took %0d clocks", n));
      for (int a = 0; a < 3; a++)
        check(mac_done[a] && int'(mac_y[a]) == e, $sformatf("variant %0d DA unit y=%0d expected %0d", a, mac_y[a], e));
      n_mac++;
    end
  end

  initial begin
    frame_t f;
    for (int i = 0; i < 16; i++) begin x_re[i] = '0; x_im[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    for (int fr = 0; fr < NFRAMES; fr++) begin
      #1;
      for (int n = 0; n < 16; n++) begin
        case (fr)
          0: begin f.xr[n] = (n == 0) ? 100 : 0; f.xi[n] = 0; end           // impulse
          1: begin f.xr[n] = 127; f.xi[n] = -127; end                        // DC
          2: begin                                                           // tone at bin 3
               f.xr[n] = int'($rtoi(100.0 * $cos(2.0 * PI * 3 * n / 16.0)));
               f.xi[n] = int'($rtoi(100.0 * $sin(2.0 * PI * 3 * n / 16.0)));
             end
          3: begin f.xr[n] = ((n / 4) % 2 == 0) ? -128 : 127; f.xi[n] = -128; end // full scale
          4: begin f.xr[n] = (n % 2 == 0) ? 5 : -3; f.xi[n] = n % 3; end     // small words
          default: begin
               f.xr[n] = int'($urandom_range(255)) - 128;
               f.xi[n] = int'($urandom_range(255)) - 128;
             end
        endcase
      end
      send(f);
      @(posedge clk);
      #1;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        n_gap++;
        repeat ($urandom_range(1, 3)) @(posedge clk);
      end else begin
        n_b2b++;
      end
    end
    #1 in_valid = 1'b0;
    repeat (5) @(posedge clk);
    check(pending.size() == 0, "frames left without a result");
    check(n_lut2 > 0, "no DA word used LUT-2");
    check(n_lut1_only > 0, "no DA word used LUT-1 alone");
    check(n_neg > 0, "no negative DA operand");
    check(n_minj > 0, "no -j bypass lane was exercised");
    check(n_full > 0, "no DA word near the 9-bit magnitude limit");
    check(n_mac == 30, "bit-serial DA unit did not finish its operations");
    check(n_b2b > 0 && n_gap > 0, "frames were not both back to back and gapped");
    $display("mechanisms: lut2=%0d lut1_only=%0d negative=%0d minus_j=%0d near_full_scale=%0d back_to_back=%0d gaps=%0d",
             n_lut2, n_lut1_only, n_neg, n_minj, n_full, n_b2b, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
