// csa_eac: carry-save adder with end-around carry, modulo 2^W-1.
//
// A row of W full adders reduces three W-bit numbers to a sum vector and a
// carry vector. Since 2^W = 1 modulo 2^W-1, the carry leaving the most
// significant full adder has weight one: it is placed in bit 0 of the carry
// vector, so the carry vector is the full-adder carries rotated left by one.
// Then s + cy is congruent to a + b + c modulo 2^W-1.
//
// The row of full adders and the end-around wiring follow the converter's
// description; W = 2K.
// Timing: combinational, one full-adder delay.
module csa_eac
  import r2b_pkg::*;
#(
  parameter int unsigned W = W_DEFAULT
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);

  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(co[i])
    );
  end

  // Carry of bit i goes to bit i+1; the top carry wraps to bit 0.
  assign cy = {co[W-2:0], co[W-1]};

endmodule
