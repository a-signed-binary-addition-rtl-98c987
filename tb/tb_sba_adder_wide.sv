// tb_sba_adder_wide -- random test of a 64-digit signed binary adder.
//
// Shows that the adder works at any length: 200,000 random operand pairs
// (digits drawn uniformly from -1, 0, 1) are added and the value of the
// 65-digit result is compared with the sum of the operand values, computed
// in 80-bit signed arithmetic. Every result digit is also checked to hold a
// legal code (never 11). Combinational: checked 1 ns after each vector.
module tb_sba_adder_wide;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  localparam int N = 64;

  sbd_t [N-1:0] x, y;
  sbd_t [N:0]   z;
  int checks = 0, failures = 0;

  sba_adder #(.DIGITS(N)) dut (.x(x), .y(y), .z(z));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [79:0] word_value(sbd_t [N:0] w, int len);
    logic signed [79:0] v = '0;
    for (int i = len - 1; i >= 0; i--) v = 2 * v + 80'(signed'(dval(w[i])));
    return v;
  endfunction

  initial begin
    logic signed [79:0] expv, got;
    for (int t = 0; t < 200000; t++) begin
      for (int i = 0; i < N; i++) begin
        x[i] = denc(int'($urandom_range(2)) - 1);
        y[i] = denc(int'($urandom_range(2)) - 1);
      end
      #1;
      expv = word_value({SBD_ZERO, x}, N) + word_value({SBD_ZERO, y}, N);
      got = word_value(z, N + 1);
      checks++;
      if (got != expv) begin
        failures++;
        if (failures <= 10) $display("FAIL got %0d expected %0d", got, expv);
      end
      checks++;
      for (int i = 0; i <= N; i++)
        if (z[i] == 2'b11) begin
          failures++;
          if (failures <= 10) $display("FAIL digit %0d holds the unused code", i);
          break;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
