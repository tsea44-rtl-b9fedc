// tb_dct_1d: checks the 1-D DCT against the cosine sum worked out in real
// arithmetic, floor(sqrt(2)*c(k)*sum x[n]cos((2n+1)k*pi/16)). Fixed-point
// constants may move a result across an integer, so random vectors are
// allowed an error of one; y[0] and y[4] and the lab's test-case row
// (pixels 1..8 minus 128 -> -988 -19 0 -2 0 -1 0 -1) must be exact. Also
// checks the one-clock latency and that the output holds while en is low.
module tb_dct_1d;
  logic clk = 0;
  logic en;
  logic signed [11:0] x [8];
  logic signed [15:0] y [8];
  int checks = 0, failures = 0;

  dct_1d dut (.clk, .en, .x, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_dct(int k, int v [8]);
    real s = 0.0, pi = 3.14159265358979;
    for (int n = 0; n < 8; n++) s += real'(v[n]) * $cos(real'((2*n+1)*k) * pi / 16.0);
    s = s * ((k == 0) ? 1.0 : $sqrt(2.0));
    return int'($floor(s + 1e-9));
  endfunction

  task automatic apply(int v [8]);
    for (int i = 0; i < 8; i++) x[i] = 12'(v[i]);
    en = 1;
    @(posedge clk); #1;
    en = 0;
  endtask

  initial begin
    int v [8];
    int r, d;
    en = 0;
    for (int i = 0; i < 8; i++) x[i] = '0;
    @(posedge clk); #1;
    // lab test case, first row
    for (int i = 0; i < 8; i++) v[i] = i + 1 - 128;
    apply(v);
    begin
      int exp_row [8] = '{-988, -19, 0, -2, 0, -1, 0, -1};
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (int'(y[k]) != exp_row[k]) begin
          failures++;
          $display("FAIL test row k=%0d got %0d exp %0d", k, y[k], exp_row[k]);
        end
      end
    end
    // output holds while en is low, new input ignored
    for (int i = 0; i < 8; i++) x[i] = 12'(100 * i);
    @(posedge clk); #1;
    checks++;
    if (int'(y[0]) != -988) begin failures++; $display("FAIL hold"); end
    // random vectors over the full 12-bit range, and extreme vectors
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 8; i++) begin
        if (t < 4)       v[i] = (t[0] ^ (i[0] & t[1])) ? -2048 : 2047;
        else if (t < 1500) v[i] = int'($urandom_range(255)) - 128;
        else             v[i] = int'($urandom_range(4095)) - 2048;
      end
      apply(v);
      for (int k = 0; k < 8; k++) begin
        r = ref_dct(k, v);
        d = int'(y[k]) - r;
        checks++;
        if ((k == 0 || k == 4) ? (d != 0) : (d > 1 || d < -1)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d k=%0d got %0d exp %0d", t, k, y[k], r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
