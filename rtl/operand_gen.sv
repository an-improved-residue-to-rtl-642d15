// operand_gen: forms the three 2K-bit operands of the converter.
//
// The upper 2K bits of X, floor(X / 2^K), equal the modulo 2^(2K)-1 sum
// |(C - r1) + B + A|. Because 2^(2K) = 1 modulo 2^(2K)-1, multiplying by a
// power of two is a cyclic left rotation and negation is the ones
// complement, so every term is a fixed rearrangement of residue bits and the
// four terms of the original formulation collapse to three:
//
//   op_c = { ~c0, c^_(K-1) .. c^_0, ~c_(K-1) .. ~c_1 }   c^_i = c_i | c_K
//   op_b = { b_(K-1), ~b_(K-2) .. ~b_0, ~b_(K-1), b_(K-1) x (K-1) }
//   op_a = { s_0, s_(K-1) .. s_0, s_(K-1) .. s_1 }
//
// with r1 = c_K..c_0, r2 = b_(K-1)..b_0 and r3 = s_(K-1)..s_0. op_c + op_b is
// congruent to (C - r1) + B, which folds the r1 and r2 terms into two
// numbers; op_a is A = (2^(2K-1) + 2^(K-1)) * r3, i.e. r3 rotated left by K-1
// bits, which in 2K bits is the plain concatenation shown. The OR gates rely
// on r1 <= 2^K: when c_K is set all other bits of r1 are zero.
//
// The op_c and op_b layouts follow the converter's derivation; the explicit
// bit layout of op_a is worked out here from the rotation rule.
//
// Interface: r1 (K+1 bits, 0..2^K), r2 (K bits), r3 (K bits, 0..2^K-2).
// Timing: combinational, K OR gates and one inverter level deep.
module operand_gen
  import r2b_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic [K:0]     r1,
  input  logic [K-1:0]   r2,
  input  logic [K-1:0]   r3,
  output logic [2*K-1:0] op_c,
  output logic [2*K-1:0] op_b,
  output logic [2*K-1:0] op_a
);

  if (K < 2) begin : g_bad_k
    $error("operand_gen: K must be at least 2");
  end

  logic [K-1:0] c_hat;

  always_comb begin
    c_hat = r1[K-1:0] | {K{r1[K]}};
    op_c  = {~r1[0], c_hat, ~r1[K-1:1]};
    op_b  = {r2[K-1], ~r2[K-2:0], ~r2[K-1], {(K - 1){r2[K-1]}}};
    op_a  = {r3[0], r3, r3[K-1:1]};
  end

endmodule
