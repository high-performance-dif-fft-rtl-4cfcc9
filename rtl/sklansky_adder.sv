// sklansky_adder: WIDTH-bit Sklansky (divide-and-conquer) parallel prefix
// adder (the adder of the third variant of the DA FFT). Bit generate and
// propagate signals are combined in ceil(log2(WIDTH)) prefix levels. At level
// l every bit whose index has bit l set takes the group (G, P) of the last bit
// of the lower half of its 2^(l+1)-bit block, which gives minimum logic depth
// at the price of fan-out that doubles each level. The carry in is folded
// into the generate of bit 0. Purely combinational. WIDTH must be at least 2.
// The adder family is the design's; folding the carry in this way is a
// choice of this design.
//   a, b : operands   cin : carry in   sum : a + b + cin   cout : carry out
module sklansky_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] gl [LEVELS+1];   // group generate after each level
  logic [WIDTH-1:0] pl [LEVELS+1];   // group propagate after each level

  assign p = a ^ b;

  always_comb begin
    gl[0] = a & b;
    pl[0] = p;
    gl[0][0] = (a[0] & b[0]) | (p[0] & cin);
    for (int l = 0; l < LEVELS; l++) begin
      gl[l+1] = gl[l];
      pl[l+1] = pl[l];
      for (int i = 0; i < WIDTH; i++) begin
        if (((i >> l) & 1) == 1) begin
          int unsigned j;
          j = ((i >> l) << l) - 1;     // last bit of the lower half-block
          gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][j]);
          pl[l+1][i] = pl[l][i] & pl[l][j];
        end
      end
    end
  end

  // carry into bit i is the prefix generate of bits i-1..0 (cin included)
  assign sum  = p ^ {gl[LEVELS][WIDTH-2:0], cin};
  assign cout = gl[LEVELS][WIDTH-1];

endmodule
