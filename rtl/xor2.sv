// Two-input exclusive-OR gate.
//
// In the original chip this is a static CMOS gate built from two input inverters and a
// complementary switch network; here it is written at gate level, y = a xor b, with no timing.
module xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  assign y = a ^ b;

endmodule
