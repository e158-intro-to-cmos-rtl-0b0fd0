// Level-sensitive latch, the storage element of the two-phase clocking scheme.
//
// q follows d while the clock phase ph is high and holds its value while ph is low. Two of
// these, one on each phase, form the master-slave register flopenr. W sets the width. The latch
// is intended; tools that list inferred latches will list every instance of it.
module latch #(
  parameter int unsigned W = 1
) (
  input  logic         ph,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_latch
    if (ph) q = d;

endmodule
