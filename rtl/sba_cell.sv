// sba_cell -- one digit position of the signed binary adder.
//
// Joins the three parts of a position: borrow_gen makes the borrow for the
// position above, isc_gen turns the operand pair and the borrow from below
// into an intermediate carry (to the position above) and an intermediate
// sum, and final_sum_gen adds that sum to the intermediate carry arriving
// from below. Its ports are those of the published digit cell:
//   inputs  ci (carry c(i) from below, high = -1), bi (borrow b(i) from
//           below, high = 1), y and x (operand digits)
//   outputs ci1 (carry c(i+1), high = -1), bi1 (borrow b(i+1), high = 1),
//           z (final digit z(i))
// The one departure from the published equations is the polarity of bi1:
// it is active high here, matching bi and the addition table (see
// borrow_gen). bi depends only on the operand digits of position i-1 and ci
// on those of positions i-1 and i-2, so nothing ripples further than that.
// Purely combinational.
module sba_cell
  import sba_pkg::*;
(
  input  logic ci,
  input  logic bi,
  input  sbd_t y,
  input  sbd_t x,
  output logic ci1,
  output logic bi1,
  output sbd_t z
);

  logic s_i;

  borrow_gen u_borrow (
    .x    (x),
    .y    (y),
    .b_out(bi1)
  );

  isc_gen u_isc (
    .x    (x),
    .y    (y),
    .b_in (bi),
    .c_out(ci1),
    .s_out(s_i)
  );

  final_sum_gen u_final (
    .s_in(s_i),
    .c_in(ci),
    .z   (z)
  );

endmodule
