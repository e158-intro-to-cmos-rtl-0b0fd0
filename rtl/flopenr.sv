// Two-phase master-slave register with enable and reset (the flopenr cell).
//
// A select stage picks the next value: zero when reset is high, d when en is high, otherwise the
// register's own output. The master latch is transparent during ph2 and the slave latch during
// ph1, so the value present at the end of ph2 appears on q when ph1 rises and holds for the rest
// of the cycle. Reset is therefore synchronous and has priority over enable, as in the original
// cell. The clock phases must not be high at the same time. Lint and synthesis tools report the
// hold path q -> select -> master -> slave -> q (and, in a counter, the path through the
// incrementer) as a combinational loop, because they treat both latches as transparent at once;
// with non-overlapping phases one of the two latches is always closed, so the loop never
// conducts and the warning is expected for this latch-based register.
// W is the width; the chip uses 6 (counters, stored alarm) and 1 (a.m./p.m.).
module flopenr #(
  parameter int unsigned W = 6
) (
  input  logic         ph1,
  input  logic         ph2,
  input  logic         reset,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] next, mid;

  always_comb begin
    if (reset)   next = '0;
    else if (en) next = d;
    else         next = q;
  end

  latch #(.W(W)) master (.ph(ph2), .d(next), .q(mid));
  latch #(.W(W)) slave  (.ph(ph1), .d(mid),  .q(q));

endmodule
