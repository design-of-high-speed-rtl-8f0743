// xor2: two-input exclusive-OR gate.
//
// The adder's pre-processing step (P_i = A_i xor B_i) and its sum step
// (S_i = P_i xor C_i-1) are built from this gate. Three transistor-level
// versions of it exist for the Kogge-Stone adder (12, 14 and 22 transistors);
// they differ in delay, area and power only, so all three share this one
// logic-level description. Purely combinational, no clock.
//
// Ports: a, b inputs; y = a xor b.
module xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = a ^ b;

endmodule
