// Binary up-counter of one time digit (the counter6 cell).
//
// A ripple chain of half adders adds one to the current value: the first stage's second input is
// tied high and each carry out feeds the next stage. The sum goes into a two-phase flopenr, so
// each cycle the count increments when en is high, clears when reset is high (reset wins) and
// otherwise holds. Wrapping at a terminal count is not done here: the clock controller asserts
// reset at the right time. y changes when ph1 rises. W defaults to the chip's 6 bits; the
// counter then wraps naturally from 63 to 0.
// Tools report the feedback through its latch-based registers as a combinational loop; with
// non-overlapping clock phases it never conducts (see flopenr).
module counter6 #(
  parameter int unsigned W = 6
) (
  input  logic         ph1,
  input  logic         ph2,
  input  logic         en,
  input  logic         reset,
  output logic [W-1:0] y
);

  logic [W-1:0] d;
  logic [W:0]   carry;

  assign carry[0] = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_inc
    halfadder ha (.a(y[i]), .b(carry[i]), .s(d[i]), .cout(carry[i+1]));
  end

  flopenr #(.W(W)) state (
    .ph1(ph1), .ph2(ph2), .reset(reset), .en(en), .d(d), .q(y)
  );

endmodule
