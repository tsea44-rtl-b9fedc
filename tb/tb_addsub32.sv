// tb_addsub32: random and corner operands for both operations, compared
// with a + b and a - b taken modulo 2^32. Follows the lecture's advice for
// gate-level testbenches: new values are applied some time after the clock
// edge and results are checked at the next edge.
module tb_addsub32;
  logic clk = 0;
  logic [31:0] a, b, s;
  logic sub;
  int checks = 0, failures = 0;

  addsub32 dut (.a, .b, .sub, .s);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] e;
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h80000000, 32'h7fffffff, 32'h12345678};
    for (int t = 0; t < 20036; t++) begin
      @(posedge clk);
      #4;
      if (t < 36) begin a = corner[t % 6]; b = corner[t / 6]; end
      else begin a = $urandom; b = $urandom; end
      sub = $urandom_range(1);
      if (t == 0) begin a = 5; b = 3; sub = 0; end
      e = sub ? a - b : a + b;
      @(posedge clk);
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL %h %s %h = %h exp %h", a, sub ? "-" : "+", b, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
