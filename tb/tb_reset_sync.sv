// tb_reset_sync: applies the asynchronous reset at random points between
// clock edges and checks that the output follows at once, without a clock
// edge, and that it is released on exactly the second rising clock edge
// after the input is released.
module tb_reset_sync;
  logic clk = 0, arst_in, rst_out;
  int checks = 0, failures = 0;

  reset_sync dut (.clk, .arst_in, .rst_out);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    arst_in = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      // release somewhere inside a clock period
      #($urandom_range(8) + 1);
      arst_in = 0;
      @(posedge clk); #1;
      checks++;
      if (!rst_out) begin failures++; $display("FAIL released after one edge"); end
      @(posedge clk); #1;
      checks++;
      if (rst_out) begin failures++; $display("FAIL not released after two edges"); end
      repeat ($urandom_range(4)) @(posedge clk);
      // assert between edges: output follows without a clock
      #($urandom_range(7) + 2);
      arst_in = 1;
      #0.5;
      checks++;
      if (!rst_out) begin failures++; $display("FAIL reset not asynchronous"); end
      repeat ($urandom_range(3) + 1) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
