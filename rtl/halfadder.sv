// Half adder: the sum bit is a xor b (an xor2 gate) and the carry out is a and b.
// Purely combinational. Chained six deep it forms the incrementer of counter6.
module halfadder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic cout
);

  xor2 sum_gate (.a(a), .b(b), .y(s));
  assign cout = a & b;

endmodule
