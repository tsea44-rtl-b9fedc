// tb_tsea44_top: end-to-end test of the whole top at its default
// parameters.
//  - Accelerator: a CPU-style program over Wishbone transforms several 8x8
//    blocks (the lab's test case, a checkerboard, random pictures) and
//    compares every quantized coefficient with the real-arithmetic model
//    (exact for the test case, within one otherwise); it also writes start
//    while a block is running, which must be ignored.
//  - Add/sub: random additions and subtractions.
//  - Clock-domain link: reset through both reset synchronizers, the FIFO
//    filled until full and drained until empty, then a stream of words through
//    the FIFO and the handshake, checked in order.
// Each mechanism is counted; one that never happened is a failure.
module tb_tsea44_top;
  import dct_ref::*;
  logic clk = 0, rst;
  wishbone_if wb (.clk, .rst);
  logic dct_busy, dct_done;
  logic [31:0] as_a, as_b, as_s;
  logic as_sub;
  logic cdc_aclk = 0, cdc_bclk = 0, cdc_arst, cdc_arst_a, cdc_arst_b;
  logic fifo_write, fifo_full, fifo_read, fifo_empty;
  logic [31:0] fifo_data_in, fifo_data_out;
  logic hs_send, hs_busy, hs_valid;
  logic [31:0] hs_data_in, hs_data_out;
  int checks = 0, failures = 0;

  tsea44_top dut (
    .clk, .rst, .wb_adr(wb.adr), .wb_dat_o(wb.dat_o), .wb_dat_i(wb.dat_i),
    .wb_stb(wb.stb), .wb_cyc(wb.cyc), .wb_we(wb.we), .wb_sel(wb.sel), .wb_ack(wb.ack),
    .dct_busy, .dct_done, .as_a, .as_b, .as_sub, .as_s,
    .cdc_aclk, .cdc_bclk, .cdc_arst, .cdc_arst_a, .cdc_arst_b,
    .fifo_write, .fifo_data_in, .fifo_full, .fifo_read, .fifo_data_out, .fifo_empty,
    .hs_send, .hs_data_in, .hs_busy, .hs_data_out, .hs_valid
  );
  wb_master bfm (.wb);

  always #5   clk = ~clk;
  always #6   cdc_aclk = ~cdc_aclk;
  always #8.5 cdc_bclk = ~cdc_bclk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_blocks = 0, n_row_loads = 0, n_col_loads = 0, n_quant = 0, n_busy_polls = 0;
  int n_start_ignored = 0, n_add = 0, n_sub = 0, n_full = 0, n_empty = 0;
  int n_fifo_words = 0, n_hs_words = 0, n_reset_release = 0;

  always @(posedge clk) if (!rst) begin
    if (dut.u_dctq.dct_en && !dut.u_dctq.sel_tm) n_row_loads++;
    if (dut.u_dctq.dct_en &&  dut.u_dctq.sel_tm) n_col_loads++;
    if (dut.u_dctq.out_we) n_quant++;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // ---------------- accelerator ----------------
  task automatic dct_block(blk_t pix, bit start_twice, output blk_t y);
    logic [31:0] d;
    for (int w = 0; w < 16; w++)
      bfm.m_write(32'(4*w), {8'(pix[w/2][(w%2)*4]), 8'(pix[w/2][(w%2)*4+1]),
                             8'(pix[w/2][(w%2)*4+2]), 8'(pix[w/2][(w%2)*4+3])});
    bfm.m_write(32'h1000, 32'h1);
    if (start_twice) begin
      bfm.m_write(32'h1000, 32'h1);          // ignored: block is running
      n_start_ignored++;
    end
    do begin
      bfm.m_read(32'h1000, d);
      n_busy_polls += d[0];
    end while (!d[1]);
    for (int w = 0; w < 32; w++) begin
      bfm.m_read(32'h0800 + 32'(4*w), d);
      y[2*(w%4)][w/4]   = int'($signed(d[31:16]));
      y[2*(w%4)+1][w/4] = int'($signed(d[15:0]));
    end
    n_blocks++;
  endtask

  task automatic test_accel();
    blk_t pix, y, r;
    for (int t = 0; t < 6; t++) begin
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          pix[i][j] = (t == 0) ? i*8 + j + 1 : (t == 1) ? (((i + j) % 2) ? 255 : 0)
                                                        : int'($urandom_range(255));
      dct_block(pix, t == 2, y);
      r = quant(coeffs(pix));
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          automatic int d = y[i][j] - r[i][j];
          checks++;
          if ((t == 0) ? (d != 0) : (d > 1 || d < -1)) begin
            failures++;
            $display("FAIL block %0d Y[%0d][%0d]=%0d exp %0d", t, i, j, y[i][j], r[i][j]);
          end
        end
    end
    expect_eq("test case Y00", y[0][0], r[0][0]);
  endtask

  // ---------------- add/sub ----------------
  task automatic test_addsub();
    for (int t = 0; t < 400; t++) begin
      as_a = $urandom; as_b = $urandom; as_sub = $urandom_range(1);
      #2;
      expect_eq("addsub", int'(as_s), int'(as_sub ? as_a - as_b : as_a + as_b));
      if (as_sub) n_sub++; else n_add++;
    end
  endtask

  // ---------------- clock-domain link ----------------
  logic [31:0] fq [$];
  logic [31:0] hq [$];
  int fifo_mode = 0;   // 0 idle, 1 fill, 2 drain, 3 stream

  always @(negedge cdc_aclk) begin
    automatic logic w = (fifo_mode == 1) || (fifo_mode == 3 && $urandom_range(1));
    automatic logic [31:0] d = $urandom;
    if (cdc_arst_a) fifo_write <= 0;
    else begin
      if (fifo_full && fifo_mode == 1) n_full++;
      fifo_write <= w;
      fifo_data_in <= d;
      if (w && !fifo_full) fq.push_back(d);
    end
  end

  always @(negedge cdc_bclk) begin
    automatic logic r = (fifo_mode == 2) || (fifo_mode == 3 && $urandom_range(1));
    if (cdc_arst_b) fifo_read <= 0;
    else begin
      if (fifo_empty && fifo_mode == 2) n_empty++;
      if (r && !fifo_empty) begin
        checks++;
        if (fq.size() == 0 || fifo_data_out !== fq[0]) begin
          failures++;
          $display("FAIL fifo word %h", fifo_data_out);
        end
        if (fq.size() != 0) void'(fq.pop_front());
        n_fifo_words++;
      end
      fifo_read <= r;
    end
  end

  int hs_to_send = 0;
  always @(negedge cdc_aclk) begin
    hs_send <= 0;
    if (!cdc_arst_a && !hs_busy && hs_to_send > 0 && !hs_send) begin
      automatic logic [31:0] d = $urandom;
      hs_send <= 1;
      hs_data_in <= d;
      hq.push_back(d);
      hs_to_send--;
    end
  end

  always @(negedge cdc_bclk) if (!cdc_arst_b && hs_valid) begin
    checks++;
    if (hq.size() == 0 || hs_data_out !== hq[0]) begin
      failures++;
      $display("FAIL handshake word %h", hs_data_out);
    end
    if (hq.size() != 0) void'(hq.pop_front());
    n_hs_words++;
  end

  always @(negedge cdc_arst_a) n_reset_release++;
  always @(negedge cdc_arst_b) n_reset_release++;

  task automatic test_cdc();
    cdc_arst = 0;
    wait (!cdc_arst_a && !cdc_arst_b);
    checks++;
    if (!fifo_empty || fifo_full) failures++;
    fifo_mode = 1;
    repeat (60) @(posedge cdc_aclk);
    expect_eq("fifo words when full", fq.size(), 16);
    fifo_mode = 2;
    repeat (60) @(posedge cdc_bclk);
    expect_eq("fifo empty", int'(fifo_empty), 1);
    fifo_mode = 3;
    hs_to_send = 50;
    repeat (3000) @(posedge cdc_aclk);
    fifo_mode = 2;
    repeat (60) @(posedge cdc_bclk);
    expect_eq("fifo queue drained", fq.size(), 0);
    wait (hs_to_send == 0 && !hs_busy);
    repeat (10) @(posedge cdc_bclk);
    expect_eq("handshake words", n_hs_words, 50);
  endtask

  initial begin
    rst = 1; cdc_arst = 1;
    as_a = 0; as_b = 0; as_sub = 0;
    fifo_write = 0; fifo_read = 0; fifo_data_in = 0; hs_send = 0; hs_data_in = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    fork
      test_accel();
      test_addsub();
      test_cdc();
    join
    expect_eq("row loads", n_row_loads, 8 * n_blocks);
    expect_eq("column loads", n_col_loads, 8 * n_blocks);
    expect_eq("quantized pairs", n_quant, 32 * n_blocks);
    $display("blocks %0d, row loads %0d, column loads %0d, quantized pairs %0d, busy polls %0d, starts ignored %0d",
             n_blocks, n_row_loads, n_col_loads, n_quant, n_busy_polls, n_start_ignored);
    $display("add %0d, sub %0d, fifo full %0d, fifo empty %0d, fifo words %0d, handshake words %0d, reset releases %0d",
             n_add, n_sub, n_full, n_empty, n_fifo_words, n_hs_words, n_reset_release);
    begin
      automatic int m [13] = '{n_blocks, n_row_loads, n_col_loads, n_quant, n_busy_polls, n_start_ignored,
                     n_add, n_sub, n_full, n_empty, n_fifo_words, n_hs_words, n_reset_release};
      for (int i = 0; i < 13; i++) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
