// ccm_pp_gen: partial-product generator of an N x N bit multiplier.
//
// Forms the N x N matrix of partial products pp[i][j] = a_i b_j, each of weight
// 2^(i+j); column j of the product collects every pp[i][j'] with i + j' = j.
//
// With TWOS = 0 the operands are unsigned and every entry is a plain AND.
//
// With TWOS = 1 the operands are two's complement. The negatively weighted
// rows are turned into positive bits by complementing the non-sign operand:
//   pp[N-1][j] = a_{N-1} & ~b_j   and   pp[i][N-1] = ~a_i & b_{N-1}   (i, j < N-1).
// Using -a_{N-1} b_j = a_{N-1} ~b_j - a_{N-1}, the product becomes
//   sum of all these bits  +  (a_{N-1} + b_{N-1}) 2^(N-1)
//                          +  (a_{N-1} | b_{N-1}) (2^(2N-1) + 2^(2N-2))   (mod 2^2N),
// so the multiplier adds a_{N-1} and b_{N-1} into column N-1 and the OR of the
// sign bits into columns 2N-2 and 2N-1; pp[N-1][N-1] = a_{N-1} b_{N-1} is then
// not needed and is left for the caller to ignore. The complemented entries
// follow the notation of the two's complement designs; the correction terms are
// worked out here from that notation.
//
// Purely combinational, one gate delay.
module ccm_pp_gen #(
  parameter int unsigned N    = 8,     // operand length n
  parameter bit          TWOS = 1'b0   // 1: two's complement operands
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [N-1:0][N-1:0]  pp      // pp[i][j] has weight 2^(i+j)
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (TWOS && (i == N-1) && (j != N-1))
          pp[i][j] = a[i] & ~b[j];
        else if (TWOS && (j == N-1) && (i != N-1))
          pp[i][j] = ~a[i] & b[j];
        else
          pp[i][j] = a[i] & b[j];
      end
    end
  end

endmodule
