// sba_pkg -- shared types of the signed binary adder.
//
// A signed binary digit (SBD) takes one of the values -1, 0 or 1 and is
// carried on two wires {s, m}: -1 = 00, 0 = 01, 1 = 10. Bit s is set only
// for the digit 1 and bit m only for the digit 0, so a digit is -1 exactly
// when both bits are low. The code 11 is unused; the logic treats it as a
// don't-care and the result for it is undefined. This encoding is the one
// the adder was optimised for.
//
// The intermediate borrow (digit set {0,1}), intermediate sum ({0,1}) and
// intermediate carry ({-1,0}) each have only two values and travel on one
// wire: a high borrow or sum wire means the digit 1, a high carry wire
// means the digit -1.
package sba_pkg;

  typedef struct packed {
    logic s;  // high for the digit 1
    logic m;  // high for the digit 0
  } sbd_t;

  localparam sbd_t SBD_NEG  = '{s: 1'b0, m: 1'b0};
  localparam sbd_t SBD_ZERO = '{s: 1'b0, m: 1'b1};
  localparam sbd_t SBD_POS  = '{s: 1'b1, m: 1'b0};

  // Value of a digit (the unused code 11 reads as 0).
  function automatic int sbd_value(sbd_t d);
    if (d.s && !d.m) return 1;
    if (!d.s && !d.m) return -1;
    return 0;
  endfunction

  // Digit for a value in {-1, 0, 1}.
  function automatic sbd_t sbd_from_int(int v);
    if (v > 0) return SBD_POS;
    if (v < 0) return SBD_NEG;
    return SBD_ZERO;
  endfunction

endpackage
