// rca_adder: WIDTH-bit ripple carry adder (the adder of the first variant of
// the DA FFT). Full adders are cascaded: bit i adds a[i], b[i] and the carry
// out of bit i-1, so the carry ripples from bit 0 to bit WIDTH-1 and the sum
// settles after WIDTH full-adder delays. Purely combinational. The
// structure, full adders in cascade, is the design's.
//   a, b  : operands          cin  : carry into bit 0
//   sum   : a + b + cin (low WIDTH bits)   cout : carry out of bit WIDTH-1
module rca_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_fa
    // one full adder
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[WIDTH];

endmodule
