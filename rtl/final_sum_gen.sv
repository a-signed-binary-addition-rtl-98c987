// final_sum_gen -- final sum generator of one digit position.
//
// Adds the intermediate sum s(i) in {0,1} of this position and the
// intermediate carry c(i) in {-1,0} from the position below. Because the two
// can never both be nonzero with the same sign, their sum is again a single
// signed binary digit and no carry leaves this block:
//     s=0,c=0 -> 0   s=1,c=0 -> 1   s=0,c=-1 -> -1   s=1,c=-1 -> 0
// Gate form as published: zm = XNOR(c, s), zs = s & ~c.
//
// The adder also uses it for its top digit, where the borrow b(N) (also in
// {0,1}) takes the place of s.
//
// Interface: s_in high = digit 1; c_in high = digit -1; z result digit.
// Purely combinational.
module final_sum_gen
  import sba_pkg::*;
(
  input  logic s_in,
  input  logic c_in,
  output sbd_t z
);

  always_comb begin
    z.m = ~(c_in ^ s_in);
    z.s = ~(c_in | ~s_in);
  end

endmodule
