// zero_fix: removes the second representation of zero modulo 2^W-1.
//
// A W-bit modulo 2^W-1 adder can return zero as all zeros or as all ones.
// The AND of all input bits detects the all-ones word, and each output bit
// is d_i = ~(&a) & a_i, so all ones becomes all zeros and every other word
// passes unchanged. This is the converter's own zero-removal step.
// Timing: combinational, one W-input AND tree plus one AND level.
module zero_fix
  import r2b_pkg::*;
#(
  parameter int unsigned W = W_DEFAULT
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] d
);

  logic all_ones;

  assign all_ones = &a;
  assign d        = a & {W{~all_ones}};

endmodule
