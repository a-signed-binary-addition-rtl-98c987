// tb_final_sum_gen -- exhaustive test of the final sum generator.
//
// Applies the four (sum, carry) pairs, sum in {0,1} and carry in {-1,0},
// and checks that the output digit is their arithmetic sum in the two-wire
// code. Combinational: checked 1 ns after each vector.
module tb_final_sum_gen;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  logic s_in, c_in;
  sbd_t z;
  int checks = 0, failures = 0;

  final_sum_gen dut (.s_in(s_in), .c_in(c_in), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int s = 0; s <= 1; s++)
      for (int c = 0; c <= 1; c++) begin
        s_in = s[0];
        c_in = c[0];
        #1;
        expv = s - c;
        checks++;
        if (z != denc(expv)) begin
          failures++;
          $display("FAIL s=%0d c=-%0d: z=%b expected %b", s, c, z, denc(expv));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
