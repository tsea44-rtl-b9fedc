// tb_dct2_ctrl: runs the control unit through three blocks and checks its
// schedule against the expected sequence: the input counter steps 0..15,
// eight row loads on every second clock from the third, eight transpose
// writes of rows 0..7 one clock after each load, column loads 0..7 with
// sel_tm high, 32 output writes at addresses 0..31 in order, and done 51
// clocks after the start. Checks the csr busy/done bits and that a start
// while busy is ignored.
module tb_dct2_ctrl;
  logic clk = 0, rst;
  logic csr_we;
  logic [31:0] csr_din, csr;
  logic [3:0] in_addr;
  logic dct_en, sel_tm, t_wr, out_we, busy, done;
  logic [2:0] wr_row, t_rd, q_col;
  logic [1:0] q_pair;
  logic [4:0] out_addr;
  int checks = 0, failures = 0;

  dct2_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    rst = 1; csr_we = 0; csr_din = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    expect_eq("idle csr", int'(csr), 0);
    for (int blk = 0; blk < 3; blk++) begin
      automatic int rows_loaded = 0, rows_written = 0, cols_loaded = 0, outs = 0, clk_n = 0;
      @(posedge clk); #1;
      csr_we = 1; csr_din = 32'h1;
      @(posedge clk); #1;          // start taken on this edge
      csr_we = 0;
      expect_eq("busy after start", int'(csr[1:0]), 1);
      while (!done && clk_n < 100) begin
        // look at the outputs of this clock
        if (clk_n < 16) expect_eq("in_addr", int'(in_addr), clk_n);
        if (dct_en && !sel_tm) begin
          expect_eq("row load clock", clk_n, 2 + 2 * rows_loaded);
          rows_loaded++;
        end
        if (t_wr) begin
          expect_eq("wr_row", int'(wr_row), rows_written);
          expect_eq("t_wr clock", clk_n, 3 + 2 * rows_written);
          rows_written++;
        end
        if (dct_en && sel_tm) begin
          expect_eq("t_rd", int'(t_rd), cols_loaded);
          expect_eq("col load after rows", int'(rows_written), 8);
          cols_loaded++;
        end
        if (out_we) begin
          expect_eq("out_addr", int'(out_addr), outs);
          expect_eq("q_col", int'(q_col), outs / 4);
          expect_eq("q_pair", int'(q_pair), outs % 4);
          outs++;
        end
        if (blk == 1 && clk_n == 20) csr_we = 1;   // start while busy: ignored
        @(posedge clk); #1;
        csr_we = 0;
        clk_n++;
      end
      expect_eq("clocks to done", clk_n, 51);
      expect_eq("rows loaded", rows_loaded, 8);
      expect_eq("rows written", rows_written, 8);
      expect_eq("columns loaded", cols_loaded, 8);
      expect_eq("output writes", outs, 32);
      expect_eq("csr done", int'(csr[1:0]), 2);
      repeat (3) @(posedge clk);
      #1 expect_eq("stays idle", int'(busy), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
