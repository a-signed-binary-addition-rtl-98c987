// tb_sba_cell_pla -- checks the digit cell against its published
// two-level cover.
//
// The cell was also published as a minimised sum-of-products cover: 15
// cubes over the inputs (ci bi ys ym xs xm), each marking which of the
// outputs (ci1 bi1 zs zm) it turns on. This test evaluates that cover for
// all 36 legal input combinations and compares it with the cell. ci1, zs and
// zm must agree exactly. The published cover gives bi1 active low, the
// complement of the borrow the cell passes on (see borrow_gen), so bi1 must
// be its inverse. Combinational: checked 1 ns after each vector.
module tb_sba_cell_pla;
  import sba_pkg::*;
  import sba_ref_pkg::*;

  // cube: 6 input literals ('0', '1', '-') and 4 output bits
  typedef struct {
    string    in;
    logic [3:0] out;
  } cube_t;

  localparam int NCUBES = 15;
  cube_t cubes[NCUBES] = '{
    '{"--00-0", 4'b1000}, '{"---000", 4'b1000}, '{"01-1-1", 4'b0010},
    '{"11-1-1", 4'b0001}, '{"01-0-0", 4'b0010}, '{"00-1-0", 4'b1010},
    '{"00-0-1", 4'b1010}, '{"11-0-0", 4'b0001}, '{"10-1-0", 4'b1001},
    '{"10-0-1", 4'b1001}, '{"01-1-0", 4'b0001}, '{"01-0-1", 4'b0001},
    '{"00-1-1", 4'b0001}, '{"--0-0-", 4'b0100}, '{"00-0-0", 4'b0001}
  };

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

  function automatic logic [3:0] eval_cover(logic [5:0] v);
    logic [3:0] o = '0;
    bit hit;
    for (int k = 0; k < NCUBES; k++) begin
      hit = 1;
      for (int j = 0; j < 6; j++)
        if (cubes[k].in[j] != "-" && (cubes[k].in[j] == "1") != v[5-j]) hit = 0;
      if (hit) o |= cubes[k].out;
    end
    return o;
  endfunction

  initial begin
    logic [3:0] ref_out;
    for (int c = 0; c <= 1; c++)
      for (int b = 0; b <= 1; b++)
        for (int xv = -1; xv <= 1; xv++)
          for (int yv = -1; yv <= 1; yv++) begin
            ci = c[0];
            bi = b[0];
            x = denc(xv);
            y = denc(yv);
            #1;
            ref_out = eval_cover({ci, bi, y, x});
            checks++;
            if (ci1 != ref_out[3] || z.s != ref_out[1] || z.m != ref_out[0]) begin
              failures++;
              $display("FAIL ci=%0d bi=%0d x=%0d y=%0d: cell %b%b%b cover %b%b%b", c, b, xv, yv,
                       ci1, z.s, z.m, ref_out[3], ref_out[1], ref_out[0]);
            end
            checks++;
            if (bi1 != ~ref_out[2]) begin
              failures++;
              $display("FAIL ci=%0d bi=%0d x=%0d y=%0d: bi1=%b, cover gives %b", c, b, xv, yv,
                       bi1, ref_out[2]);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
