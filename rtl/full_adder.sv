// full_adder: one-bit full adder, the cell of the Braun carry-save array.
//
// Adds three bits of equal weight and returns a sum bit of that weight and a
// carry bit of twice the weight. The original cell is a 28-transistor CMOS
// full adder; only its logic function is kept here (sum = a xor b xor ci,
// co = majority of a, b, ci). Purely combinational, no clock.
//
// Ports: a, b, ci inputs; s sum; co carry out.
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
