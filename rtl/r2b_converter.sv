// r2b_converter: residue-to-binary converter for the moduli
// {2^K+1, 2^K, 2^K-1}.
//
// Given residues r1 = X mod (2^K+1), r2 = X mod 2^K and r3 = X mod (2^K-1)
// of a number 0 <= X < M = (2^K+1) 2^K (2^K-1), the converter returns X as a
// 3K-bit binary number. The Chinese remainder theorem reduces, for this
// moduli set, to X = floor(X/2^K) * 2^K + r2: the low K bits are r2 and the
// high 2K bits are a modulo 2^(2K)-1 sum of three numbers that are only
// rearranged and inverted residue bits (operand_gen). These three are added
// by a carry-save row and a carry-propagate adder, both with end-around
// carry (mod_add3), and the all-ones form of zero is cleared (zero_fix).
//
// The whole datapath follows the converter's description. It has no clock:
// the critical path is the operand logic, one full adder, the prefix adder
// and the zero-removal AND tree. Residues outside their ranges
// (r1 > 2^K, r3 = 2^K-1) are not valid inputs.
//
// Ports: r1 [K:0], r2 [K-1:0], r3 [K-1:0] in; x [3K-1:0] out.
module r2b_converter
  import r2b_pkg::*;
#(
  parameter int unsigned K = K_DEFAULT
) (
  input  logic [K:0]     r1,
  input  logic [K-1:0]   r2,
  input  logic [K-1:0]   r3,
  output logic [3*K-1:0] x
);

  logic [2*K-1:0] op_c;
  logic [2*K-1:0] op_b;
  logic [2*K-1:0] op_a;
  logic [2*K-1:0] hi_raw;
  logic [2*K-1:0] hi;

  operand_gen #(.K(K)) u_ops (
    .r1  (r1),
    .r2  (r2),
    .r3  (r3),
    .op_c(op_c),
    .op_b(op_b),
    .op_a(op_a)
  );

  mod_add3 #(.W(2 * K)) u_add (
    .a  (op_c),
    .b  (op_b),
    .c  (op_a),
    .sum(hi_raw)
  );

  zero_fix #(.W(2 * K)) u_zero (
    .a(hi_raw),
    .d(hi)
  );

  assign x = {hi, r2};

endmodule
