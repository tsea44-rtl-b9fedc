// tb_dctq_accel: drives the accelerator over Wishbone as a CPU would: write
// 16 pixel words, write csr = 1, poll csr until done, read 32 result words.
// Results are compared with the real-arithmetic model in dct_ref. The
// fixed-point DCT may put an intermediate value one off from the exact
// floor, which can move a quantized value by one, so random blocks allow an
// error of one on a coefficient (and at most 3 such coefficients per block);
// the lab's test case (pixels 1..64) must match exactly:
// Y[0][0..1] = -96 -3, Y[1][0] = -24, Y[3][0] = -2, all else 0.
// Also checks: two clocks per bus access, 51 clocks from start to done, the
// csr busy/done bits, and that reading a result twice gives the same data.
module tb_dctq_accel;
  import dct_ref::*;
  logic clk = 0, rst;
  wishbone_if wb (.clk, .rst);
  logic busy, done;
  int checks = 0, failures = 0;

  dctq_accel dut (
    .clk, .rst, .wb_adr(wb.adr), .wb_dat_o(wb.dat_o), .wb_dat_i(wb.dat_i),
    .wb_stb(wb.stb), .wb_cyc(wb.cyc), .wb_we(wb.we), .wb_sel(wb.sel), .wb_ack(wb.ack),
    .busy, .done
  );
  wb_master bfm (.wb);

  always #5 clk = ~clk;

  localparam logic [31:0] A_IN = 32'h0000, A_OUT = 32'h0800, A_CSR = 32'h1000;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks from the start edge to done
  int clk_cnt;
  always @(posedge clk) clk_cnt <= clk_cnt + 1;

  task automatic run_block(blk_t pix, output blk_t y, output int clocks);
    logic [31:0] d;
    int t0;
    for (int w = 0; w < 16; w++) begin
      d = {8'(pix[w/2][(w%2)*4]), 8'(pix[w/2][(w%2)*4+1]),
           8'(pix[w/2][(w%2)*4+2]), 8'(pix[w/2][(w%2)*4+3])};
      bfm.m_write(A_IN + 32'(4*w), d);
      checks++;
      if (bfm.last_clocks != 2) failures++;
    end
    bfm.m_write(A_CSR, 32'h1);
    // the write was taken one clock before m_write returned
    t0 = clk_cnt - 1;
    checks++;
    if (!busy) begin failures++; $display("FAIL not busy after start"); end
    bfm.m_read(A_CSR, d);
    checks++;
    if (d[1:0] != 2'b01) begin failures++; $display("FAIL csr while busy %h", d); end
    while (!done) @(negedge clk);
    clocks = clk_cnt - t0;
    bfm.m_read(A_CSR, d);
    checks++;
    if (d[1:0] != 2'b10) begin failures++; $display("FAIL csr when done %h", d); end
    for (int w = 0; w < 32; w++) begin
      bfm.m_read(A_OUT + 32'(4*w), d);
      checks++;
      if (bfm.last_clocks != 2) failures++;
      // word c*4+k: (u=2k, v=c) high half, (u=2k+1, v=c) low half
      y[2*(w%4)][w/4]   = int'($signed(d[31:16]));
      y[2*(w%4)+1][w/4] = int'($signed(d[15:0]));
    end
    bfm.m_read(A_OUT, d);
    checks++;
    if (int'($signed(d[31:16])) != y[0][0]) failures++;
  endtask

  initial begin
    blk_t pix, y, ref_y;
    int clocks, n_off, n_exact = 0, n_total = 0;
    rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          case (t)
            0: pix[r][c] = r * 8 + c + 1;                          // lab test case
            1: pix[r][c] = ((r + c) % 2) ? 255 : 0;                // checkerboard
            2: pix[r][c] = 128;                                    // flat grey
            3: pix[r][c] = 255;
            4: pix[r][c] = 0;
            5: pix[r][c] = (c < 4) ? 255 : 0;                      // vertical edge
            default: pix[r][c] = int'($urandom_range(255));
          endcase
      run_block(pix, y, clocks);
      checks++;
      if (clocks != 51) begin failures++; $display("FAIL block took %0d clocks", clocks); end
      ref_y = quant(coeffs(pix));
      if (t == 0) begin
        for (int u = 0; u < 8; u++)
          for (int v = 0; v < 8; v++) begin
            automatic int e = 0;
            if (u == 0 && v == 0) e = -96;
            if (u == 0 && v == 1) e = -3;
            if (u == 1 && v == 0) e = -24;
            if (u == 3 && v == 0) e = -2;
            checks++;
            if (y[u][v] != e) begin
              failures++;
              $display("FAIL test case Y[%0d][%0d]=%0d exp %0d", u, v, y[u][v], e);
            end
          end
      end
      n_off = 0;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          automatic int d = y[u][v] - ref_y[u][v];
          checks++;
          n_total++;
          if (d == 0) n_exact++;
          else n_off++;
          if (d > 1 || d < -1) begin
            failures++;
            $display("FAIL block %0d Y[%0d][%0d]=%0d exp %0d", t, u, v, y[u][v], ref_y[u][v]);
          end
        end
      checks++;
      if (n_off > 3) begin failures++; $display("FAIL block %0d: %0d coefficients off by one", t, n_off); end
    end
    $display("exact coefficients: %0d of %0d", n_exact, n_total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
