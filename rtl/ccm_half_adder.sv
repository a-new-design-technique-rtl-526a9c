// ccm_half_adder: the "H" cell of the column-compression array, a (2,2) counter.
//
// Adds two bits of weight 2^j into a sum bit of weight 2^j and a carry bit of
// weight 2^(j+1). It reduces its column by one bit; the array uses it only
// where a column holds an even number of bits to absorb. Purely combinational.
module ccm_half_adder (
  input  logic x,
  input  logic y,
  output logic s,   // sum, weight 2^j
  output logic c    // carry, weight 2^(j+1)
);

  assign s = x ^ y;
  assign c = x & y;

endmodule
