// ccm_full_adder: the "F" cell of the column-compression array, a (3,2) counter.
//
// Takes three bits of the same binary weight 2^j and returns their count as a
// sum bit of weight 2^j and a carry bit of weight 2^(j+1). In a compression
// stage a full adder reduces its column by two bits and adds one bit to the
// next column. Purely combinational; one full-adder delay.
module ccm_full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,   // sum, weight 2^j
  output logic c    // carry, weight 2^(j+1)
);

  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);

endmodule
