// eac_cpa: W-bit carry-propagate adder with end-around carry (mod 2^W-1).
//
// Adding two W-bit numbers modulo 2^W-1 is an ordinary binary addition whose
// carry-out is fed back as its carry-in (2^W = 1 modulo 2^W-1). The adder is
// a fast carry look-ahead adder; here it is a Kogge-Stone parallel-prefix
// tree of ceil(log2 W) levels of (generate, propagate) operators.
//
// A literal wire from carry-out to carry-in would be a combinational loop.
// The loop's settled value is computed instead: the end-around carry equals
// the group generate of all W bits, G[W-1:0], and the carry into bit i is
// G[i-1:0] | (P[i-1:0] & G[W-1:0]). When a + b = 2^W-1 exactly (every bit
// propagates, none generates) no carry circulates and the sum is all ones,
// which is the redundant zero removed afterwards by zero_fix.
//
// The carry feedback and the modulo 2^W-1 function follow the converter's
// description; the choice of a Kogge-Stone prefix tree and the loop-free
// carry computation are this design's own.
// Interface: a, b, sum, all W bits. Timing: combinational,
// ceil(log2 W) + 2 gate levels beyond the bit generate/propagate.
module eac_cpa
  import r2b_pkg::*;
#(
  parameter int unsigned W = W_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  localparam int unsigned LEVELS = $clog2(W);

  // Level l holds the group (generate, propagate) of bits i down to
  // max(0, i - 2^l + 1).
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [W-1:0] g;
    logic [W-1:0] p;
    if (l == 0) begin : g_init
      assign g = a & b;
      assign p = a ^ b;
    end else begin : g_step
      localparam int unsigned D = 1 << (l - 1);
      for (genvar i = 0; i < W; i++) begin : g_bit
        if (i >= D) begin : g_op
          assign g[i] = g_lvl[l-1].g[i] | (g_lvl[l-1].p[i] & g_lvl[l-1].g[i-D]);
          assign p[i] = g_lvl[l-1].p[i] & g_lvl[l-1].p[i-D];
        end else begin : g_pass
          assign g[i] = g_lvl[l-1].g[i];
          assign p[i] = g_lvl[l-1].p[i];
        end
      end
    end
  end

  logic [W-1:0] grp_g;   // G[i:0]
  logic [W-2:0] grp_p;   // P[i:0], top bit not needed
  logic         cin;     // end-around carry
  logic [W-1:0] carry;   // carry into each bit

  assign grp_g = g_lvl[LEVELS].g;
  assign grp_p = g_lvl[LEVELS].p[W-2:0];
  assign cin   = grp_g[W-1];
  assign carry = {grp_g[W-2:0] | (grp_p & {(W - 1){cin}}), cin};
  assign sum   = g_lvl[0].p ^ carry;

endmodule
