// isc_gen -- intermediate sum/carry generator of one digit position.
//
// From the operand digits x(i), y(i) and the borrow b(i) arriving from the
// position below, it chooses the intermediate carry c(i+1) in {-1,0} and the
// intermediate sum s(i) in {0,1} so that
//     x(i) + y(i) = 2*(c(i+1) + b(i+1)) + s(i) - b(i)
// holds with the borrow b(i+1) from borrow_gen. The rule, per the addition
// table the design follows:
//   * even pair sums (-1-1, 1-1, 0+0, 1+1): s = b(i); c = -1 for -1-1 and
//     1-1, c = 0 for 0+0 and 1+1;
//   * odd pair sums (one digit 0, the other +-1): s = not b(i) and
//     c = -1 exactly when b(i) = 0.
// The logic is the published two-level NAND form: t1 flags the pairs that
// always give c = -1, t2/t3 the odd pairs with no borrow in, t4/t5 the even
// pairs with a borrow in.
//
// Interface: x, y operand digits; b_in borrow from below (high = 1);
// c_out carry to the next position (high = digit -1); s_out intermediate
// sum (high = digit 1). Purely combinational.
module isc_gen
  import sba_pkg::*;
(
  input  sbd_t x,
  input  sbd_t y,
  input  logic b_in,
  output logic c_out,
  output logic s_out
);

  logic t1, t2, t3, t4, t5;

  always_comb begin
    // pairs -1-1, 1-1 and -1+1: carry -1 whatever the borrow
    t1 = ~((~(y.s | y.m | x.m)) | (~(y.m | x.s | x.m)));
    // y = 0, x nonzero, no borrow in
    t2 = ~(y.m & ~x.m & ~b_in);
    // x = 0, y nonzero, no borrow in
    t3 = ~(~b_in & x.m & ~y.m);
    // both nonzero, borrow in
    t4 = ~(~x.m & ~y.m & b_in);
    // both zero, borrow in
    t5 = ~(b_in & y.m & x.m);
    c_out = ~(t1 & t2 & t3);
    s_out = ~(t2 & t3 & t4 & t5);
  end

endmodule
