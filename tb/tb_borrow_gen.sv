// tb_borrow_gen -- exhaustive test of the borrow generator.
//
// Applies all nine operand pairs and compares the borrow with the addition
// table's borrow-out column (1 exactly when the pair holds the digit 1).
// Combinational block: each vector is checked 1 ns after it is applied.
module tb_borrow_gen;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  sbd_t x, y;
  logic b_out;
  int checks = 0, failures = 0;

  borrow_gen dut (.x(x), .y(y), .b_out(b_out));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bo, c, s;
    for (int xv = -1; xv <= 1; xv++) begin
      for (int yv = -1; yv <= 1; yv++) begin
        x = denc(xv);
        y = denc(yv);
        #1;
        table_row(xv, yv, 0, bo, c, s);
        checks++;
        if (int'(b_out) != bo) begin
          failures++;
          $display("FAIL x=%0d y=%0d borrow=%0d expected %0d", xv, yv, b_out, bo);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
