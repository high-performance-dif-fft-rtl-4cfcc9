// addsub: signed adder/subtractor built on the selected adder architecture.
// y = a + b when sub = 0, y = a - b when sub = 1, computed as a + ~b + 1 with
// the subtract flag as carry in. The inputs are sign-extended by one bit, so
// the WIDTH+1-bit result never overflows. KIND picks the ripple carry,
// carry lookahead or Sklansky prefix adder, i.e. one of the three variants
// of the FFT; every adder of the datapath goes through this module.
// Purely combinational. The add/subtract control is the "selector" of the
// distributed-arithmetic datapath. The adder's carry out is left unused: with
// the sign extension the WIDTH+1-bit sum already holds the full result.
// The two's-complement subtraction and the sign extension are choices of
// this design; the three adder families are the document's.
module addsub
  import fft_da_pkg::*;
#(
  parameter int unsigned WIDTH = 16,
  parameter adder_kind_e KIND  = ADDER_RCA
) (
  input  logic signed [WIDTH-1:0] a,
  input  logic signed [WIDTH-1:0] b,
  input  logic                    sub,
  output logic signed [WIDTH:0]   y
);

  logic [WIDTH:0] ax, bx, s;
  logic           co;

  assign ax = {a[WIDTH-1], a};
  assign bx = {b[WIDTH-1], b} ^ {(WIDTH+1){sub}};

  if (KIND == ADDER_CLA) begin : g_cla
    cla_adder #(.WIDTH(WIDTH+1)) u_add (.a(ax), .b(bx), .cin(sub), .sum(s), .cout(co));
  end else if (KIND == ADDER_SKLANSKY) begin : g_skl
    sklansky_adder #(.WIDTH(WIDTH+1)) u_add (.a(ax), .b(bx), .cin(sub), .sum(s), .cout(co));
  end else begin : g_rca
    rca_adder #(.WIDTH(WIDTH+1)) u_add (.a(ax), .b(bx), .cin(sub), .sum(s), .cout(co));
  end

  assign y = signed'(s);

endmodule
