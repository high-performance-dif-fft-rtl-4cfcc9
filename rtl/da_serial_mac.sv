// da_serial_mac: basic bit-serial distributed-arithmetic sum of products
//   y = T1*X1 + T2*X2 + T3*X3 + T4*X4
// with four fixed coefficients T and four B-bit two's-complement inputs X.
// The words are shifted out one bit per clock, least significant bit first;
// the four bits of one weight form the address {b1n, b2n, b3n, b4n} of a
// 16-word ROM that holds every partial sum of the coefficients (entry 0101 =
// T2 + T4, and so on). Each clock the accumulator is shifted right by one
// place (the 2^-1 shifter) and the ROM word, aligned to the top, is added;
// on the last bit, the sign bit of the words, the selector turns the adder
// into a subtractor. The accumulator is wide enough that the right shift
// loses nothing, so after B clocks it holds y exactly, in units of the
// coefficient LSB.
// Default coefficients are 0.72, -0.30, 0.95 and 0.11, held with 8 fractional
// bits (184, -77, 243, 28, rounded to nearest). The word width B = 8, the
// coefficient format, the start/done handshake and the reset are choices of
// this design.
// Timing: start (with x valid) loads the shift registers; done is high for
// one clock exactly B clocks later, with y valid until the next start.
// start is ignored while busy.
module da_serial_mac
  import fft_da_pkg::*;
#(
  parameter int unsigned B      = 8,    // input word width
  parameter int unsigned COEF_W = 10,   // signed coefficient width (8 fractional bits)
  parameter logic signed [COEF_W-1:0] T1 = 10'sd184,
  parameter logic signed [COEF_W-1:0] T2 = -10'sd77,
  parameter logic signed [COEF_W-1:0] T3 = 10'sd243,
  parameter logic signed [COEF_W-1:0] T4 = 10'sd28,
  parameter adder_kind_e KIND   = ADDER_RCA,
  localparam int unsigned SUM_W = COEF_W + 2,       // ROM word: sum of four coefficients
  localparam int unsigned ACC_W = SUM_W + B         // accumulator
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [B-1:0]     x [4],
  output logic                    busy,
  output logic                    done,
  output logic signed [ACC_W-1:0] y
);

  typedef enum logic {IDLE, RUN} state_e;

  typedef logic signed [15:0][SUM_W-1:0] rom_t;

  // ROM of coefficient partial sums, address bit 3 = b1n ... bit 0 = b4n
  function automatic rom_t build_rom();
    rom_t r;
    for (int a = 0; a < 16; a++) begin
      r[a] = (a[3] ? SUM_W'(T1) : '0) + (a[2] ? SUM_W'(T2) : '0)
           + (a[1] ? SUM_W'(T3) : '0) + (a[0] ? SUM_W'(T4) : '0);
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  state_e                     state;
  logic [$clog2(B)-1:0]       bitcnt;
  logic [B-1:0]               sh [4];
  logic [3:0]                 addr;
  logic signed [SUM_W-1:0]    rom_word;
  logic signed [ACC_W-1:0]    acc_half, addend;
  logic signed [ACC_W:0]      acc_next;
  logic                       last;

  assign addr     = {sh[0][0], sh[1][0], sh[2][0], sh[3][0]};
  assign rom_word = ROM[addr];
  assign last     = (bitcnt == ($clog2(B))'(B - 1));

  // the 2^-1 shifter on the feedback path and the aligned ROM word
  assign acc_half = y >>> 1;
  assign addend   = ACC_W'(rom_word) <<< (B - 1);

  // adder/subtractor, subtract on the sign bit (selector)
  addsub #(.WIDTH(ACC_W), .KIND(KIND)) u_acc (
    .a(acc_half), .b(addend), .sub(last), .y(acc_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      bitcnt <= '0;
      done   <= 1'b0;
      y      <= '0;
      for (int k = 0; k < 4; k++) sh[k] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          for (int k = 0; k < 4; k++) sh[k] <= x[k];
          y      <= '0;
          bitcnt <= '0;
          state  <= RUN;
        end
        RUN: begin
          for (int k = 0; k < 4; k++) sh[k] <= sh[k] >> 1;
          y      <= acc_next[ACC_W-1:0];
          bitcnt <= bitcnt + 1'b1;
          if (last) begin
            done  <= 1'b1;
            state <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state == RUN);

endmodule
