// tb_wb_ctrl: drives single transfers and back-to-back transfers with
// random gaps and checks that ack comes exactly one clock after stb rises,
// lasts exactly one clock and never appears without stb and cyc.
module tb_wb_ctrl;
  logic clk = 0, rst, stb, cyc, ack;
  int checks = 0, failures = 0;
  int acks = 0;

  wb_ctrl dut (.clk, .rst, .stb, .cyc, .ack);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ack only inside a strobe
  always @(negedge clk) if (!rst) begin
    checks++;
    if (ack && !(stb && cyc)) begin failures++; $display("FAIL ack without stb"); end
  end

  task automatic step();
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1; stb = 0; cyc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    // cyc without stb: no ack
    cyc = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (ack) failures++;
    cyc = 0;
    for (int t = 0; t < 500; t++) begin
      automatic int gap = $urandom_range(3);
      repeat (gap) @(negedge clk);
      @(posedge clk); #1;
      stb = 1; cyc = 1;             // first clock of the strobe
      #1;
      checks++;
      if (ack) begin failures++; $display("FAIL ack too early"); end
      step();                       // one clock later
      checks++;
      if (!ack) begin failures++; $display("FAIL no ack"); end
      else acks++;
      if (gap == 0 && t[0]) begin
        // master keeps strobing (next transfer right away): ack must drop
        step();
        checks++;
        if (ack) begin failures++; $display("FAIL ack held"); end
        step();
        checks++;
        if (!ack) begin failures++; $display("FAIL no second ack"); end
      end
      step();                       // master samples ack and ends the cycle
      stb = 0; cyc = 0;
      #1;
      checks++;
      if (ack) begin failures++; $display("FAIL ack after stb"); end
    end
    checks++;
    if (acks != 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
