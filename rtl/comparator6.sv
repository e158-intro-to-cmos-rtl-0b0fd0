// Equality comparator (the comparator6 cell): one XNOR per bit, all results ANDed.
// y is high when a equals b. Purely combinational. W defaults to the chip's 6 bits.
module comparator6 #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         y
);

  logic [W-1:0] same;

  assign same = a ~^ b;
  assign y    = &same;

endmodule
