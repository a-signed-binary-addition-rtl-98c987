// tb_sba_adder -- end-to-end test of the signed binary adder at its default
// size (7 digits, no parameter override).
//
// 1. The worked example: 1 0 -1 -1 1 0 0 plus 0 -1 -1 0 1 0 -1 (most
//    significant digit first), whose value is 44 + (-45) = -1.
// 2. Every one of the 3^14 operand pairs. For each, the 8-digit result is
//    compared digit by digit with a reference built from the addition table
//    (chained position by position), and its value with the integer sum of
//    the operands.
// 3. Locality: random operand pairs that agree in digits i, i-1 and i-2 must
//    give the same z(i), whatever the lower digits are (the no-ripple
//    property: c(i) depends on the borrow out of position i-2).
// It also counts how often each mechanism of the adder occurs (a borrow
// passed up, a -1 carry passed up, an odd pair resolved with and without a
// borrow in, each final digit value, a nonzero top digit) and counts a
// failure for any that never occurs. The adder is combinational; each
// vector is checked 1 ns after it is applied.
module tb_sba_adder;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  localparam int N = 7;

  sbd_t [N-1:0] x, y;
  sbd_t [N:0]   z;
  int checks = 0, failures = 0;

  // mechanism counters
  longint n_borrow = 0, n_carry = 0, n_odd_b0 = 0, n_odd_b1 = 0;
  longint n_zneg = 0, n_zzero = 0, n_zpos = 0, n_top = 0, n_local = 0;

  sba_adder dut (.x(x), .y(y), .z(z));

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reports the first few failures; after 1000 the result is clear and the
  // run ends early.
  function automatic void fail(string msg);
    failures++;
    if (failures <= 10) $display("FAIL %s", msg);
    if (failures == 1000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endfunction

  // value of an operand or result word
  function automatic longint word_value(sbd_t [N:0] w, int len);
    longint v = 0;
    for (int i = len - 1; i >= 0; i--) v = 2 * v + longint'(dval(w[i]));
    return v;
  endfunction

  // digit-by-digit reference result
  function automatic void reference(input int xv[N], input int yv[N], output int zr[N+1]);
    int b, c, bo, cn, s;
    b = 0;
    c = 0;
    for (int i = 0; i < N; i++) begin
      table_row(xv[i], yv[i], b, bo, cn, s);
      zr[i] = s + c;
      b = bo;
      c = cn;
    end
    zr[N] = b + c;
  endfunction

  task automatic apply_and_check(input int xv[N], input int yv[N]);
    int zr[N+1];
    longint sum_ref;
    for (int i = 0; i < N; i++) begin
      x[i] = denc(xv[i]);
      y[i] = denc(yv[i]);
    end
    #1;
    reference(xv, yv, zr);
    sum_ref = word_value({SBD_ZERO, x}, N) + word_value({SBD_ZERO, y}, N);
    checks++;
    for (int i = 0; i <= N; i++)
      if (z[i] != denc(zr[i])) begin
        fail($sformatf("digit %0d: x=%p y=%p got %b expected %b", i, xv, yv, z[i], denc(zr[i])));
        break;
      end
    checks++;
    if (word_value(z, N + 1) != sum_ref)
      fail($sformatf("value: x=%p y=%p got %0d expected %0d", xv, yv, word_value(z, N + 1), sum_ref));
    // mechanisms, observed in the adder itself
    for (int i = 1; i <= N; i++) begin
      if (dut.b[i]) n_borrow++;
      if (dut.c[i]) n_carry++;
    end
    for (int i = 0; i < N; i++)
      if ((xv[i] + yv[i]) % 2 != 0) begin
        if (dut.b[i]) n_odd_b1++;
        else n_odd_b0++;
      end
    for (int i = 0; i <= N; i++)
      case (dval(z[i]))
        -1:      n_zneg++;
        0:       n_zzero++;
        default: n_zpos++;
      endcase
    if (dval(z[N]) != 0) n_top++;
  endtask

  initial begin
    int xv[N], yv[N], x2[N], y2[N];
    int k, pos;
    sbd_t [N:0] z_first;

    // 1. worked example (index 0 = least significant digit)
    xv = '{0, 0, 1, -1, -1, 0, 1};
    yv = '{-1, 0, 1, 0, -1, -1, 0};
    apply_and_check(xv, yv);
    checks++;
    if (word_value(z, N + 1) != -1) fail("worked example does not sum to -1");

    // 2. all operand pairs
    for (int idx = 0; idx < 4782969; idx++) begin  // 3^14
      k = idx;
      for (int i = 0; i < N; i++) begin
        xv[i] = k % 3 - 1;
        k = k / 3;
      end
      for (int i = 0; i < N; i++) begin
        yv[i] = k % 3 - 1;
        k = k / 3;
      end
      apply_and_check(xv, yv);
    end

    // 3. locality of each output digit
    for (int t = 0; t < 20000; t++) begin
      pos = 2 + int'($urandom_range(N - 2));
      for (int i = 0; i < N; i++) begin
        xv[i] = int'($urandom_range(2)) - 1;
        yv[i] = int'($urandom_range(2)) - 1;
        x2[i] = (i >= pos - 2) ? xv[i] : int'($urandom_range(2)) - 1;
        y2[i] = (i >= pos - 2) ? yv[i] : int'($urandom_range(2)) - 1;
      end
      apply_and_check(xv, yv);
      z_first = z;
      apply_and_check(x2, y2);
      checks++;
      n_local++;
      if (z[pos] != z_first[pos])
        fail($sformatf("digit %0d changed when only lower digits changed", pos));
    end

    $display("borrows=%0d carries=%0d odd_no_borrow=%0d odd_borrow=%0d", n_borrow, n_carry,
             n_odd_b0, n_odd_b1);
    $display("z=-1:%0d z=0:%0d z=1:%0d top_nonzero=%0d locality=%0d", n_zneg, n_zzero, n_zpos,
             n_top, n_local);
    checks++;
    if (n_borrow == 0 || n_carry == 0 || n_odd_b0 == 0 || n_odd_b1 == 0 || n_zneg == 0 ||
        n_zzero == 0 || n_zpos == 0 || n_top == 0 || n_local == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
