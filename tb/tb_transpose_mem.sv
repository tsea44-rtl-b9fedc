// tb_transpose_mem: writes eight rows of random 12-bit values, one row per
// clock, then reads every column without waiting for a clock and checks it
// against the rows as written. Also checks that a row is not written while
// t_wr is low.
module tb_transpose_mem;
  logic clk = 0;
  logic t_wr;
  logic [2:0] wr_row, t_rd;
  logic signed [11:0] wr_data [8];
  logic signed [11:0] rd_data [8];
  logic signed [11:0] model [8][8];
  int checks = 0, failures = 0;

  transpose_mem dut (.clk, .t_wr, .wr_row, .wr_data, .t_rd, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int c = 0; c < 8; c++) begin
      t_rd = 3'(c);
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rd_data[r] !== model[r][c]) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0d c=%0d got %0d exp %0d", r, c, rd_data[r], model[r][c]);
        end
      end
    end
  endtask

  initial begin
    t_wr = 0; wr_row = 0; t_rd = 0;
    for (int i = 0; i < 8; i++) wr_data[i] = '0;
    for (int pass = 0; pass < 20; pass++) begin
      @(negedge clk);
      for (int r = 0; r < 8; r++) begin
        t_wr = 1; wr_row = 3'(r);
        for (int c = 0; c < 8; c++) begin
          wr_data[c] = 12'($urandom);
          model[r][c] = wr_data[c];
        end
        @(negedge clk);
      end
      t_wr = 0;
      check_all();
      // t_wr low: no write
      wr_row = 3'($urandom);
      for (int c = 0; c < 8; c++) wr_data[c] = ~model[wr_row][c];
      @(negedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
