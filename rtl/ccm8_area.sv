// ccm8_area: 8x8 bit unsigned column-compression multiplier laid out for the
// highest area efficiency ("Approach I", adder distribution {11,11,11,9}).
//
// The 64 partial products are reduced to two rows by 42 full and half adders
// arranged in four stages, then a 14-bit fast adder (columns 1..14) forms
// P14..P1 and its carry-out is P15; P0 = a_0 b_0. Stage 4 is the top stage
// (it sees only partial products), stage 1 feeds the fast adder. Stages 1, 2
// and 3 hold 11 cells and stage 4 holds 9, so the array fits a 4 x 11 grid:
// 42/44 = 95.5% of the grid is used.
//
// The cell list (type, weight and stage of each cell, and which partial
// products enter it directly) is the published 8x8 design. Which carry or
// sum of an upper stage feeds which input of a lower cell in the same column
// is this implementation's choice: the bits of one column are interchangeable,
// and each cell takes the bits of the nearest stage above first. Where a
// column has bits left over they pass down to a lower stage (cross-stage
// wires) and, at the bottom, into the fast adder.
//
// Interface: a, b unsigned 8-bit operands; p = a * b, 16 bits.
// Timing: purely combinational; critical path four adder cells plus the
// fast adder.

module ccm8_area
  import ccm_pkg::*;
(
  input  operand_t a,   // multiplicand, a_i
  input  operand_t b,   // multiplier,   b_j
  output product_t p    // product bits P15..P0
);

  localparam int unsigned FA_LSB = 1;  // lowest column of the fast adder
  localparam int unsigned FA_W   = 14;  // fast adder length in bits

  // partial products, pp[i][j] = a_i b_j
  logic [N-1:0][N-1:0] pp;
  ccm_pp_gen #(.N(N), .TWOS(1'b0)) u_pp (.a(a), .b(b), .pp(pp));

  // sum (s) and carry (c) of each cell, named <stage>_<weight>[a|b|c]
  logic s4_10, c4_10,
        s4_9, c4_9,
        s4_8a, c4_8a,
        s4_8b, c4_8b,
        s4_7a, c4_7a,
        s4_7b, c4_7b,
        s4_6a, c4_6a,
        s4_6b, c4_6b,
        s4_5, c4_5,
        s3_11, c3_11,
        s3_10, c3_10,
        s3_9a, c3_9a,
        s3_9b, c3_9b,
        s3_8a, c3_8a,
        s3_8b, c3_8b,
        s3_7a, c3_7a,
        s3_7b, c3_7b,
        s3_6, c3_6,
        s3_5, c3_5,
        s3_4, c3_4,
        s2_12, c2_12,
        s2_11, c2_11,
        s2_10, c2_10,
        s2_9, c2_9,
        s2_8, c2_8,
        s2_7, c2_7,
        s2_6, c2_6,
        s2_5, c2_5,
        s2_4, c2_4,
        s2_3, c2_3,
        s2_2, c2_2,
        s1_13, c1_13,
        s1_12, c1_12,
        s1_11, c1_11,
        s1_10, c1_10,
        s1_9, c1_9,
        s1_8, c1_8,
        s1_7, c1_7,
        s1_6, c1_6,
        s1_5, c1_5,
        s1_4, c1_4,
        s1_3, c1_3;

  // ---- stage 4 (9 adders) ----
  ccm_full_adder u4_10 (.x(pp[3][7]), .y(pp[7][3]), .z(pp[5][5]), .s(s4_10), .c(c4_10));
  ccm_full_adder u4_9 (.x(pp[2][7]), .y(pp[7][2]), .z(pp[3][6]), .s(s4_9), .c(c4_9));
  ccm_full_adder u4_8a (.x(pp[1][7]), .y(pp[7][1]), .z(pp[2][6]), .s(s4_8a), .c(c4_8a));
  ccm_full_adder u4_8b (.x(pp[6][2]), .y(pp[3][5]), .z(pp[5][3]), .s(s4_8b), .c(c4_8b));
  ccm_full_adder u4_7a (.x(pp[0][7]), .y(pp[7][0]), .z(pp[1][6]), .s(s4_7a), .c(c4_7a));
  ccm_full_adder u4_7b (.x(pp[6][1]), .y(pp[2][5]), .z(pp[5][2]), .s(s4_7b), .c(c4_7b));
  ccm_full_adder u4_6a (.x(pp[0][6]), .y(pp[6][0]), .z(pp[1][5]), .s(s4_6a), .c(c4_6a));
  ccm_full_adder u4_6b (.x(pp[5][1]), .y(pp[2][4]), .z(pp[4][2]), .s(s4_6b), .c(c4_6b));
  ccm_full_adder u4_5 (.x(pp[0][5]), .y(pp[5][0]), .z(pp[1][4]), .s(s4_5), .c(c4_5));
  // ---- stage 3 (11 adders) ----
  ccm_full_adder u3_11 (.x(pp[4][7]), .y(pp[7][4]), .z(c4_10), .s(s3_11), .c(c3_11));
  ccm_full_adder u3_10 (.x(pp[4][6]), .y(c4_9), .z(s4_10), .s(s3_10), .c(c3_10));
  ccm_full_adder u3_9a (.x(pp[6][3]), .y(c4_8b), .z(c4_8a), .s(s3_9a), .c(c3_9a));
  ccm_full_adder u3_9b (.x(pp[4][5]), .y(pp[5][4]), .z(s4_9), .s(s3_9b), .c(c3_9b));
  ccm_full_adder u3_8a (.x(c4_7b), .y(c4_7a), .z(s4_8b), .s(s3_8a), .c(c3_8a));
  ccm_half_adder u3_8b (.x(pp[4][4]), .y(s4_8a), .s(s3_8b), .c(c3_8b));
  ccm_full_adder u3_7a (.x(c4_6b), .y(c4_6a), .z(s4_7b), .s(s3_7a), .c(c3_7a));
  ccm_full_adder u3_7b (.x(pp[3][4]), .y(pp[4][3]), .z(s4_7a), .s(s3_7b), .c(c3_7b));
  ccm_full_adder u3_6 (.x(c4_5), .y(s4_6b), .z(s4_6a), .s(s3_6), .c(c3_6));
  ccm_full_adder u3_5 (.x(pp[4][1]), .y(pp[2][3]), .z(s4_5), .s(s3_5), .c(c3_5));
  ccm_full_adder u3_4 (.x(pp[0][4]), .y(pp[4][0]), .z(pp[2][2]), .s(s3_4), .c(c3_4));
  // ---- stage 2 (11 adders) ----
  ccm_full_adder u2_12 (.x(pp[5][7]), .y(pp[7][5]), .z(c3_11), .s(s2_12), .c(c2_12));
  ccm_full_adder u2_11 (.x(pp[5][6]), .y(c3_10), .z(s3_11), .s(s2_11), .c(c2_11));
  ccm_full_adder u2_10 (.x(c3_9b), .y(c3_9a), .z(s3_10), .s(s2_10), .c(c2_10));
  ccm_full_adder u2_9 (.x(c3_8b), .y(c3_8a), .z(s3_9b), .s(s2_9), .c(c2_9));
  ccm_full_adder u2_8 (.x(c3_7b), .y(c3_7a), .z(s3_8b), .s(s2_8), .c(c2_8));
  ccm_full_adder u2_7 (.x(c3_6), .y(s3_7b), .z(s3_7a), .s(s2_7), .c(c2_7));
  ccm_half_adder u2_6 (.x(c3_5), .y(s3_6), .s(s2_6), .c(c2_6));
  ccm_half_adder u2_5 (.x(c3_4), .y(s3_5), .s(s2_5), .c(c2_5));
  ccm_half_adder u2_4 (.x(pp[1][3]), .y(s3_4), .s(s2_4), .c(c2_4));
  ccm_full_adder u2_3 (.x(pp[0][3]), .y(pp[2][1]), .z(pp[1][2]), .s(s2_3), .c(c2_3));
  ccm_half_adder u2_2 (.x(pp[0][2]), .y(pp[1][1]), .s(s2_2), .c(c2_2));
  // ---- stage 1 (11 adders) ----
  ccm_full_adder u1_13 (.x(pp[6][7]), .y(pp[7][6]), .z(c2_12), .s(s1_13), .c(c1_13));
  ccm_full_adder u1_12 (.x(pp[6][6]), .y(c2_11), .z(s2_12), .s(s1_12), .c(c1_12));
  ccm_full_adder u1_11 (.x(pp[6][5]), .y(c2_10), .z(s2_11), .s(s1_11), .c(c1_11));
  ccm_full_adder u1_10 (.x(pp[6][4]), .y(c2_9), .z(s2_10), .s(s1_10), .c(c1_10));
  ccm_full_adder u1_9 (.x(c2_8), .y(s2_9), .z(s3_9a), .s(s1_9), .c(c1_9));
  ccm_full_adder u1_8 (.x(c2_7), .y(s2_8), .z(s3_8a), .s(s1_8), .c(c1_8));
  ccm_half_adder u1_7 (.x(c2_6), .y(s2_7), .s(s1_7), .c(c1_7));
  ccm_full_adder u1_6 (.x(pp[3][3]), .y(c2_5), .z(s2_6), .s(s1_6), .c(c1_6));
  ccm_full_adder u1_5 (.x(pp[3][2]), .y(c2_4), .z(s2_5), .s(s1_5), .c(c1_5));
  ccm_full_adder u1_4 (.x(pp[3][1]), .y(c2_3), .z(s2_4), .s(s1_4), .c(c1_4));
  ccm_half_adder u1_3 (.x(c2_2), .y(s2_3), .s(s1_3), .c(c1_3));

  // ---- final fast adder, columns 1..14 ----
  logic [FA_W-1:0] fx, fy, fs;
  logic            fco;
  assign fx = {c1_13, s1_13, s1_12, s1_11, s1_10, s1_9, s1_8, s1_7, s1_6, s1_5, s1_4, s1_3, s2_2, pp[0][1]};
  assign fy = {pp[7][7], c1_12, c1_11, c1_10, c1_9, c1_8, c1_7, c1_6, c1_5, c1_4, c1_3, pp[3][0], pp[2][0], pp[1][0]};
  ccm_fast_adder #(.WIDTH(FA_W)) u_fast (.x(fx), .y(fy), .cin(1'b0), .sum(fs), .cout(fco));

  // product bits below the fast adder come straight from the compression part
  assign p[0] = pp[0][0];
  assign p[2*N-2:FA_LSB] = fs;
  assign p[2*N-1] = fco;  // carry out of the fast adder is P15

endmodule
