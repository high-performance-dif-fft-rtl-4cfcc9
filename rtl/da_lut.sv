// da_lut: read-only look-up table of a distributed-arithmetic multiplier.
// Entry a holds a * COEF, the product of the address and a fixed unsigned
// coefficient with FRAC_BITS fractional bits, so a table read replaces a
// multiplication. The same module serves as
//   LUT-1: 4-bit address (bits 2^3..2^0 of the operand), 12-bit words read
//          as Q4.8;
//   LUT-2: 5-bit address (bits 2^8..2^4 of the operand), 13-bit words read
//          as Q9.4, i.e. weight 2^4 on the address, which is the same integer
//          a * COEF with the binary point moved four places.
// The table is computed at elaboration from COEF (no data file). The read is
// combinational (asynchronous ROM); the design's tables are small enough to
// be logic. The address x coefficient rule matches the design's printed
// tables; computing them at elaboration is a choice of this design.
module da_lut #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 12,
  parameter int unsigned COEF_W = 8,
  parameter logic [COEF_W-1:0] COEF = 8'd236
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  typedef logic [DEPTH-1:0][DATA_W-1:0] table_t;

  function automatic table_t build_table();
    table_t t;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      t[a] = DATA_W'(a * COEF);
    end
    return t;
  endfunction

  localparam table_t ROM = build_table();

  assign data = ROM[addr];

  // every entry must fit the word
  initial begin
    assert ((DEPTH - 1) * COEF < (1 << DATA_W))
      else $error("da_lut: DATA_W=%0d too narrow for COEF=%0d", DATA_W, COEF);
  end

endmodule
