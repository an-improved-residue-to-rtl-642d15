// full_adder: one-bit full adder, the cell of the carry-save row.
//
// s = a xor b xor ci, co = majority(a, b, ci). The carry-save row of the
// converter is built from 2K of these cells, as its structure prescribes;
// the gate-level form here is the textbook one.
// Ports: a, b, ci in; s, co out. Timing: purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  assign s  = a ^ b ^ ci;
  assign co = (a & b) | (a & ci) | (b & ci);

endmodule
