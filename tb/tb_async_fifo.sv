// tb_async_fifo: write clock 10 ns, read clock 13 ns. A scoreboard queue
// checks that every word comes out once and in order. Phases: fill with the
// reader stopped (exactly 16 words must be taken, then full), drain with
// the writer stopped (then empty), then random traffic at both ends.
// Enables are decided on falling edges, where full and empty are stable.
module tb_async_fifo;
  logic wclk = 0, rclk = 0, wrst, rrst;
  logic write, read, full, empty;
  logic [31:0] data_in, data_out;
  logic [31:0] sb [$];
  int checks = 0, failures = 0;
  int phase = 0;      // 0 fill, 1 drain, 2 random
  int written = 0, read_n = 0, full_seen = 0, empty_seen = 0;

  async_fifo #(.DW(32), .AW(4)) dut (.*);

  always #5   wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: the word is taken on the next rising edge if full is low now
  always @(negedge wclk) begin
    if (wrst) write <= 0;
    else begin
      automatic logic w = (phase == 0) || (phase == 2 && $urandom_range(2) != 0);
      automatic logic [31:0] d = $urandom;
      if (full) full_seen++;
      write   <= w;
      data_in <= d;
      if (w && !full) begin
        sb.push_back(d);
        written++;
      end
    end
  end

  // reader: data_out is the word popped on the next rising edge
  always @(negedge rclk) begin
    if (rrst) read <= 0;
    else begin
      automatic logic r = (phase == 1) || (phase == 2 && $urandom_range(2) != 0);
      if (empty) empty_seen++;
      if (r && !empty) begin
        checks++;
        if (sb.size() == 0 || data_out !== sb[0]) begin
          failures++;
          if (failures < 10) $display("FAIL read %h", data_out);
        end
        if (sb.size() != 0) void'(sb.pop_front());
        read_n++;
      end
      read <= r;
    end
  end

  initial begin
    wrst = 1; rrst = 1; write = 0; read = 0; data_in = 0;
    repeat (3) @(posedge wclk);
    repeat (3) @(posedge rclk);
    checks++;
    if (!empty || full) begin failures++; $display("FAIL flags after reset"); end
    @(negedge wclk) wrst = 0;
    @(negedge rclk) rrst = 0;
    // fill
    repeat (40) @(posedge wclk);
    checks++;
    if (written != 16 || !full) begin failures++; $display("FAIL fill took %0d words", written); end
    phase = 1;
    repeat (60) @(posedge rclk);
    checks++;
    if (read_n != 16 || !empty) begin failures++; $display("FAIL drain read %0d", read_n); end
    phase = 2;
    repeat (20000) @(posedge wclk);
    phase = 1;
    repeat (60) @(posedge rclk);
    checks++;
    if (read_n != written || sb.size() != 0) begin
      failures++;
      $display("FAIL written %0d read %0d", written, read_n);
    end
    checks++;
    if (full_seen == 0 || empty_seen == 0) failures++;
    $display("words %0d, full seen %0d, empty seen %0d", written, full_seen, empty_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
