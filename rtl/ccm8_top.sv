// ccm8_top: the five 8x8 column-compression multiplier layouts side by side.
//
// The column-compression technique gives several equally valid 8x8 arrays
// that trade area efficiency against wire length and final-adder length. This
// top instantiates all of them on one operand pair so they can be compared and
// checked against each other:
//   p_area        unsigned, Approach I, highest area efficiency (95.5%)
//   p_short_wire  unsigned, Approach I, no cross-stage wires (87.5%)
//   p_approach2   unsigned, Approach II, 10-bit final adder (95.8%)
//   p_tc1         two's complement, Approach I, 15-bit final adder
//   p_tc2         two's complement, Approach II, 12-bit final adder
// The unsigned outputs read a and b as unsigned numbers, the two's complement
// outputs read the same bits as signed numbers. Sharing the operand inputs is
// this top's choice; each multiplier is a self-contained block.
//
// Timing: purely combinational; every output is valid one array delay after
// the operands change.
module ccm8_top
  import ccm_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p_area,
  output product_t p_short_wire,
  output product_t p_approach2,
  output product_t p_tc1,
  output product_t p_tc2
);

  ccm8_area         u_area       (.a(a), .b(b), .p(p_area));
  ccm8_short_wire   u_short_wire (.a(a), .b(b), .p(p_short_wire));
  ccm8_approach2    u_approach2  (.a(a), .b(b), .p(p_approach2));
  ccm8_tc_approach1 u_tc1        (.a(a), .b(b), .p(p_tc1));
  ccm8_tc_approach2 u_tc2        (.a(a), .b(b), .p(p_tc2));

endmodule
