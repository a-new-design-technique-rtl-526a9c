// ccm_pkg: sizes and types shared by the 8x8 column-compression multipliers.
//
// Every multiplier netlist in this library is drawn for n = 8 bit operands and a
// 2n = 16 bit product; the adder-by-adder wiring is specific to that size, so N
// is a package constant rather than a module parameter. All of them use
// K = 4 compression stages, the number the Dadda height series
// 2, 3, 4, 6, 9, ... gives for n = 8 (6 < 8 <= 9). The building blocks
// (partial-product generator, fast adder) take their own sizes as parameters.
package ccm_pkg;

  // operand length n of the multiplicand and the multiplier
  localparam int unsigned N = 8;

  typedef logic [N-1:0]   operand_t;
  typedef logic [2*N-1:0] product_t;

endpackage
