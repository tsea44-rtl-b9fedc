// tb_handshake_sync: source clock 10 ns, destination clock 17 ns. The
// source sends random words whenever busy is low; each must arrive once, in
// order, with a one-clock valid pulse, and data_out must not change between
// transfers. Also checks that busy blocks a second word until the
// acknowledge has come back.
module tb_handshake_sync;
  logic sclk = 0, dclk = 0, srst, drst;
  logic send, busy, valid;
  logic [31:0] data_in, data_out;
  logic [31:0] sb [$];
  logic [31:0] last_out;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;

  handshake_sync #(.DW(32)) dut (.*);

  always #5   sclk = ~sclk;
  always #8.5 dclk = ~dclk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source: decide on falling edges, busy is stable there
  always @(negedge sclk) begin
    send <= 0;
    if (!srst && !busy && sent < 1000 && $urandom_range(1)) begin
      send    <= 1;
      data_in <= $urandom;
    end
  end
  always @(posedge sclk) if (!srst && send && !busy) begin
    sb.push_back(data_in);
    sent++;
  end
  // a word offered while busy must be refused
  always @(posedge sclk) if (!srst && send && busy) begin
    failures++;
    $display("FAIL source sent while busy");
  end

  always @(negedge dclk) if (!drst) begin
    if (valid) begin
      checks++;
      if (sb.size() == 0 || data_out !== sb[0]) begin
        failures++;
        if (failures < 10) $display("FAIL got %h", data_out);
      end
      if (sb.size() != 0) void'(sb.pop_front());
      got++;
      last_out = data_out;
    end else if (got > 0) begin
      checks++;
      if (data_out !== last_out) begin failures++; $display("FAIL data_out changed"); end
    end
  end

  initial begin
    srst = 1; drst = 1; send = 0; data_in = 0;
    repeat (4) @(posedge dclk);
    @(negedge sclk) srst = 0;
    @(negedge dclk) drst = 0;
    wait (sent == 1000);
    repeat (20) @(posedge dclk);
    checks++;
    if (got != 1000) begin failures++; $display("FAIL got %0d of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
