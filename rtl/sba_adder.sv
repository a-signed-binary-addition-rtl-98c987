// sba_adder -- carry-free signed binary adder of DIGITS digits.
//
// Adds two numbers written in signed binary digits (-1, 0, 1 per position)
// and returns their sum in the same form, one digit longer. Position i is an
// sba_cell; it passes an intermediate carry c(i+1) in {-1,0} and a borrow
// b(i+1) in {0,1} to position i+1 and nothing further. The borrow depends on
// x(i), y(i) only and the carry on x(i), y(i), b(i), so every output digit
// z(i) is a function of the operand digits in positions i, i-1 and i-2 and
// the delay (borrow gate, sum/carry logic, final sum gate) does not grow
// with DIGITS.
//
// Boundaries (this design's own choice, derived from the digit identity
// x+y = 2(c+b_out) + s - b_in): position 0 sees no carry and no borrow
// (c(0) = 0, b(0) = 0); the top digit is z(DIGITS) = c(DIGITS) + b(DIGITS),
// formed by a final_sum_gen with the borrow in the place of the sum. With
// these, sum(z(i) * 2^i) equals sum((x(i)+y(i)) * 2^i) for every input.
//
// Interface: x, y addend and augend, z sum; digit encoding -1=00, 0=01,
// 1=10 (see sba_pkg); 11 must not be applied. Purely combinational, no
// clock. DIGITS defaults to the 7-digit operands of the worked examples; any
// DIGITS >= 1 works.
module sba_adder
  import sba_pkg::*;
#(
  parameter int unsigned DIGITS = 7
) (
  input  sbd_t [DIGITS-1:0] x,
  input  sbd_t [DIGITS-1:0] y,
  output sbd_t [DIGITS:0]   z
);

  // c[i] / b[i]: intermediate carry and borrow entering position i
  logic [DIGITS:0] c;
  logic [DIGITS:0] b;

  assign c[0] = 1'b0;
  assign b[0] = 1'b0;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    sba_cell u_cell (
      .ci (c[i]),
      .bi (b[i]),
      .y  (y[i]),
      .x  (x[i]),
      .ci1(c[i+1]),
      .bi1(b[i+1]),
      .z  (z[i])
    );
  end

  final_sum_gen u_top_digit (
    .s_in(b[DIGITS]),
    .c_in(c[DIGITS]),
    .z   (z[DIGITS])
  );

endmodule
