// da_partition: control of the stage-2 output partition. A signed stage-2
// word is turned into sign and magnitude, and the 9-bit magnitude is cut
// unevenly into the two LUT addresses: the four least significant bits
// (weights 2^3..2^0) address LUT-1 and the five most significant bits
// (weights 2^8..2^4) address LUT-2. Example: 80 = 0_0101_0000 gives LUT-2
// address 00101 and LUT-1 address 0000. The sign goes to the add/subtract
// selector after the LUTs, so the tables only hold non-negative products.
// A magnitude above 2^MAG_W-1 (only -2^MAG_W, from four inputs at full
// negative scale) is saturated and flagged. Purely combinational.
// The 5/4 split is the design's; sign-magnitude conversion and the clip are
// choices of this design (inside the FFT the clip never acts).
module da_partition
  import fft_da_pkg::*;
#(
  parameter int unsigned WIDTH = S2_W,   // signed input word (10)
  parameter int unsigned LO    = LO_W    // LUT-1 address bits (4)
) (
  input  logic signed [WIDTH-1:0]   x,
  output logic                      neg,     // x < 0
  output logic [WIDTH-2-LO:0]       addr_hi, // LUT-2 address (5 bits)
  output logic [LO-1:0]             addr_lo, // LUT-1 address (4 bits)
  output logic                      sat      // magnitude was clipped
);

  logic [WIDTH-1:0] abs_x;
  logic [WIDTH-2:0] mag;

  assign neg   = x[WIDTH-1];
  assign abs_x = neg ? WIDTH'(-x) : WIDTH'(x);
  assign sat   = abs_x[WIDTH-1];
  assign mag   = sat ? '1 : abs_x[WIDTH-2:0];

  assign addr_lo = mag[LO-1:0];
  assign addr_hi = mag[WIDTH-2:LO];

endmodule
