// cla_adder: WIDTH-bit carry lookahead adder (the adder of the second
// variant of the DA FFT). Each bit forms generate g = a & b and propagate
// p = a ^ b. The adder is cut into 4-bit groups; inside a group every carry is
// computed in advance, directly from g, p and the group's carry in
//   c[j+1] = g[j] | p[j]g[j-1] | ... | p[j]..p[0]c0,
// so no carry ripples through the bits of a group. Each group also forms its
// group generate and propagate, and the group carries are in turn looked
// ahead from those, group by group. Purely combinational.
//   a, b : operands   cin : carry in   sum : a + b + cin   cout : carry out
// The adder family is the design's; the 4-bit group size and the group-level
// lookahead are choices of this design.
module cla_adder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned GROUP = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NGRP = (WIDTH + GROUP - 1) / GROUP;

  logic [WIDTH-1:0] g, p, c;
  logic [NGRP:0]    gc;          // carry into each group
  logic [NGRP-1:0]  gg, gp;      // group generate / propagate

  assign g = a & b;
  assign p = a ^ b;

  // group generate / propagate
  always_comb begin
    for (int k = 0; k < NGRP; k++) begin
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int j = 0; j < GROUP; j++) begin
        if (k*GROUP + j < WIDTH) begin
          gg[k] = g[k*GROUP + j] | (p[k*GROUP + j] & gg[k]);
          gp[k] = gp[k] & p[k*GROUP + j];
        end
      end
    end
  end

  // group carries: c_{k+1} = gg_k | gp_k gg_{k-1} | ... | gp_k..gp_0 cin
  always_comb begin
    gc[0] = cin;
    for (int k = 0; k < NGRP; k++) begin
      logic term, acc;
      acc  = 1'b0;
      for (int m = 0; m <= k; m++) begin
        term = gg[m];
        for (int q = m + 1; q <= k; q++) term = term & gp[q];
        acc = acc | term;
      end
      term = cin;
      for (int q = 0; q <= k; q++) term = term & gp[q];
      gc[k+1] = acc | term;
    end
  end

  // bit carries inside each group, looked ahead from the group carry in
  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      int unsigned base;
      logic term, acc;
      base = (i / GROUP) * GROUP;
      acc  = 1'b0;
      for (int m = base; m < i; m++) begin
        term = g[m];
        for (int q = m + 1; q < i; q++) term = term & p[q];
        acc = acc | term;
      end
      term = gc[i / GROUP];
      for (int q = base; q < i; q++) term = term & p[q];
      c[i] = acc | term;
    end
  end

  assign sum  = p ^ c;
  assign cout = gc[NGRP];

endmodule
