// tb_sba_cell -- exhaustive test of one digit position.
//
// Applies every combination of carry in, borrow in and operand pair
// (36 vectors) and compares carry out, borrow out and the final digit with
// the addition table (z = s + c_in). Combinational: checked 1 ns after each
// vector.
module tb_sba_cell;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  logic ci, bi, ci1, bi1;
  sbd_t x, y, z;
  int checks = 0, failures = 0;

  sba_cell dut (.ci(ci), .bi(bi), .y(y), .x(x), .ci1(ci1), .bi1(bi1), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bo, c, s;
    for (int cin = 0; cin <= 1; cin++)
      for (int b = 0; b <= 1; b++)
        for (int xv = -1; xv <= 1; xv++)
          for (int yv = -1; yv <= 1; yv++) begin
            ci = cin[0];
            bi = b[0];
            x = denc(xv);
            y = denc(yv);
            #1;
            table_row(xv, yv, b, bo, c, s);
            checks++;
            if ((ci1 ? -1 : 0) != c || int'(bi1) != bo || z != denc(s - cin)) begin
              failures++;
              $display("FAIL ci=%0d bi=%0d x=%0d y=%0d: ci1=%b bi1=%b z=%b",
                       cin, b, xv, yv, ci1, bi1, z);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
