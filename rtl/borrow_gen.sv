// borrow_gen -- borrow generator of one digit position.
//
// Forms the intermediate borrow b(i+1) in {0,1} that position i hands to
// position i+1. In the addition table the adder follows, the borrow is 1
// whenever the pair x(i) + y(i) contains the digit 1 (1+(-1), 1+0, 1+1) and
// 0 otherwise, so it depends on the two s bits alone: b(i+1) = xs | ys.
//
// The published gate equation of the digit cell writes this output as the
// NOR of the same two bits, i.e. the complement of the borrow that the
// addition table and the cell's own borrow input use. Feeding that NOR
// straight into the next position gives wrong sums, so the borrow wire here
// carries the table's value (active high); this is the published NOR
// followed by an inverter.
//
// Interface: x, y operand digits; b_out borrow to the next position
// (high = 1). Purely combinational, one gate level.
module borrow_gen
  import sba_pkg::*;
(
  input  sbd_t x,
  input  sbd_t y,
  output logic b_out
);

  always_comb b_out = x.s | y.s;

endmodule
