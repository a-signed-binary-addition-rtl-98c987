// tb_isc_gen -- exhaustive test of the intermediate sum/carry generator.
//
// Applies all nine operand pairs with both borrow-in values (18 vectors).
// For each it compares carry and sum with the addition table and also
// checks the digit identity x + y = 2*(c + b_out) + s - b_in, taking b_out
// from the table. Combinational: checked 1 ns after each vector.
module tb_isc_gen;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  sbd_t x, y;
  logic b_in, c_out, s_out;
  int checks = 0, failures = 0;

  isc_gen dut (.x(x), .y(y), .b_in(b_in), .c_out(c_out), .s_out(s_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bo, c, s, cg, sg;
    for (int xv = -1; xv <= 1; xv++)
      for (int yv = -1; yv <= 1; yv++)
        for (int b = 0; b <= 1; b++) begin
          x = denc(xv);
          y = denc(yv);
          b_in = b[0];
          #1;
          table_row(xv, yv, b, bo, c, s);
          cg = c_out ? -1 : 0;
          sg = s_out ? 1 : 0;
          checks++;
          if (cg != c || sg != s) begin
            failures++;
            $display("FAIL x=%0d y=%0d b=%0d: c=%0d s=%0d expected c=%0d s=%0d",
                     xv, yv, b, cg, sg, c, s);
          end
          checks++;
          if (xv + yv != 2 * (cg + bo) + sg - b) begin
            failures++;
            $display("FAIL identity x=%0d y=%0d b=%0d", xv, yv, b);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
