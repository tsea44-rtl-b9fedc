// tb_bram_dp: random writes and reads on both ports of the dual-port RAM
// against a model array. Checks the one-clock read latency (data belongs to
// the address of the previous clock) and read-first behaviour when a port
// reads the address written on the same clock.
module tb_bram_dp;
  localparam int DEPTH = 32;
  logic clk = 0;
  logic a_we, b_we;
  logic [4:0] a_addr, b_addr;
  logic [31:0] a_din, b_din, a_dout, b_dout;
  logic [31:0] model [DEPTH];
  logic [31:0] exp_a, exp_b;
  int checks = 0, failures = 0;

  bram_dp #(.DW(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_din = 0; b_din = 0;
    // fill through port A
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_we = 1; a_addr = 5'(i); a_din = $urandom; model[i] = a_din;
    end
    @(negedge clk); a_we = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      a_addr = 5'($urandom); b_addr = 5'($urandom);
      a_we = $urandom_range(3) == 0;
      b_we = ($urandom_range(3) == 0) && (b_addr != a_addr);
      a_din = $urandom; b_din = $urandom;
      exp_a = model[a_addr];   // read-first
      exp_b = model[b_addr];
      @(posedge clk);
      if (a_we) model[a_addr] = a_din;
      if (b_we) model[b_addr] = b_din;
      #1;
      checks += 2;
      if (a_dout !== exp_a || b_dout !== exp_b) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d a=%h/%h b=%h/%h", t, a_dout, exp_a, b_dout, exp_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
