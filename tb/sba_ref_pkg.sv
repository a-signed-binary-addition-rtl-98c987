// sba_ref_pkg -- reference model shared by the adder testbenches.
//
// Works on plain integers, independently of the RTL: decodes and encodes the
// two-wire digit code (-1 = 00, 0 = 01, 1 = 10) and looks up the addition
// table the adder implements. The table is written out row by row as
// (pair, borrow in) -> (borrow out, carry, sum); a pair and its swap share a
// row.
package sba_ref_pkg;

  function automatic int dval(logic [1:0] d);
    case (d)
      2'b00:   return -1;
      2'b01:   return 0;
      2'b10:   return 1;
      default: return 99;  // unused code
    endcase
  endfunction

  function automatic logic [1:0] denc(int v);
    if (v < 0) return 2'b00;
    if (v > 0) return 2'b10;
    return 2'b01;
  endfunction

  // Addition table: borrow out in {0,1}, carry in {-1,0}, sum in {0,1}.
  function automatic void table_row(input int x, input int y, input int b_in,
                                    output int b_out, output int c, output int s);
    int hi, lo;
    hi = (x > y) ? x : y;
    lo = (x > y) ? y : x;
    if (hi == -1) begin            // -1 + -1
      b_out = 0; c = -1; s = b_in;
    end else if (hi == 0 && lo == -1) begin  // -1 + 0
      b_out = 0; c = (b_in == 0) ? -1 : 0; s = 1 - b_in;
    end else if (hi == 0) begin     // 0 + 0
      b_out = 0; c = 0; s = b_in;
    end else if (lo == -1) begin    // 1 + -1
      b_out = 1; c = -1; s = b_in;
    end else if (lo == 0) begin     // 1 + 0
      b_out = 1; c = (b_in == 0) ? -1 : 0; s = 1 - b_in;
    end else begin                  // 1 + 1
      b_out = 1; c = 0; s = b_in;
    end
  endfunction

endpackage
