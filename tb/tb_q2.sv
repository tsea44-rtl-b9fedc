// tb_q2: checks the two-lane quantizer against integer division:
// Y = sign(B) * floor((2|B| + D) / (2D)) with D = 4*Q[pos], i.e. B/(4Q)
// rounded to nearest with halves away from zero. Uses the values of the
// lab's test case (-6112 -> -96, -152 -> -3, -1167 -> -24, -122 -> -2,
// -37 -> 0), every table position at the halfway points, and random
// coefficients over the whole 16-bit range.
module tb_q2;
  import jpeg_pkg::*;
  logic signed [15:0] b [2];
  logic [5:0]         pos [2];
  logic signed [15:0] y [2];
  int checks = 0, failures = 0;

  q2 dut (.b, .pos, .y);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_q(int bv, int p);
    int d = 4 * int'(QTAB[p]);
    int m = (bv < 0) ? -bv : bv;
    int q = (2 * m + d) / (2 * d);
    return (bv < 0) ? -q : q;
  endfunction

  task automatic check(int b0, int p0, int b1, int p1);
    b[0] = 16'(b0); pos[0] = 6'(p0);
    b[1] = 16'(b1); pos[1] = 6'(p1);
    #1;
    checks += 2;
    if (int'(y[0]) != ref_q(b0, p0) || int'(y[1]) != ref_q(b1, p1)) begin
      failures++;
      if (failures < 10)
        $display("FAIL b=%0d,%0d pos=%0d,%0d got %0d,%0d exp %0d,%0d", b0, b1, p0, p1,
                 y[0], y[1], ref_q(b0, p0), ref_q(b1, p1));
    end
  endtask

  initial begin
    int exp_case [5] = '{-96, -3, -24, -2, 0};
    check(-6112, 0, -152, 1);
    check(-1167, 8, -122, 24);
    check(-37, 40, -10, 56);
    b[0] = -16'sd6112; pos[0] = 0; b[1] = -16'sd152; pos[1] = 1; #1;
    checks += 2;
    if (y[0] != 16'(exp_case[0]) || y[1] != 16'(exp_case[1])) failures++;
    b[0] = -16'sd1167; pos[0] = 8; b[1] = -16'sd122; pos[1] = 24; #1;
    checks += 2;
    if (y[0] != 16'(exp_case[2]) || y[1] != 16'(exp_case[3])) failures++;
    b[0] = -16'sd37; pos[0] = 40; #1;
    checks++;
    if (y[0] != 16'(exp_case[4])) failures++;
    // halfway points and their neighbours for every position
    for (int p = 0; p < 64; p++) begin
      automatic int d = 4 * int'(QTAB[p]);
      for (int m = 1; m < 6; m++) begin
        check(m * d + d / 2, p, -(m * d + d / 2), 63 - p);
        check(m * d + d / 2 - 1, p, -(m * d + d / 2 - 1), 63 - p);
      end
    end
    for (int t = 0; t < 20000; t++)
      check(int'($urandom_range(65535)) - 32768, int'($urandom_range(63)),
            int'($urandom_range(65535)) - 32768, int'($urandom_range(63)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
