// mod_add3: modulo 2^W-1 addition of three W-bit numbers.
//
// A carry-save row of W full adders with end-around carry (csa_eac) turns
// the three numbers into two, and a W-bit carry-propagate adder whose
// carry-out feeds its carry-in (eac_cpa) adds those two. The result is
// congruent to a + b + c modulo 2^W-1; zero may come out as all ones.
// This is the structure of the converter's adder; only the prefix-tree form
// of the carry-propagate adder is this design's choice.
// Timing: combinational, one full adder plus the carry-propagate adder.
module mod_add3
  import r2b_pkg::*;
#(
  parameter int unsigned W = W_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] sum
);

  logic [W-1:0] s_vec;
  logic [W-1:0] c_vec;

  csa_eac #(.W(W)) u_csa (
    .a (a),
    .b (b),
    .c (c),
    .s (s_vec),
    .cy(c_vec)
  );

  eac_cpa #(.W(W)) u_cpa (
    .a  (s_vec),
    .b  (c_vec),
    .sum(sum)
  );

endmodule
