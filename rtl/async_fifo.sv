// async_fifo: FIFO between two clock domains.
//
// A dual-clock memory of 2^AW words sits between a write counter in the
// write clock domain and a read counter in the read clock domain. Each
// counter has one bit more than the address, so full and empty can be told
// apart. The counters cross to the other domain in Gray code (one bit changes
// per step) through two-flop synchronizers: the write side compares its
// pointer with the synchronized read pointer to make full, the read side
// compares its pointer with the synchronized write pointer to make empty.
// Both flags are therefore pessimistic for two or three clocks after the
// other side moves, never wrong. data_out shows the oldest word while empty
// is low (first-word fall-through); read pops it. write is ignored when full
// and read when empty. Each side has its own synchronous reset, which must
// come from a reset synchronizer of that domain. The lecture names the write
// and read counters, full, empty, data_in and data_out; the Gray-code
// crossing is this design's.
module async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 4
) (
  input  logic          wclk,
  input  logic          wrst,
  input  logic          write,
  input  logic [DW-1:0] data_in,
  output logic          full,
  input  logic          rclk,
  input  logic          rrst,
  input  logic          read,
  output logic [DW-1:0] data_out,
  output logic          empty
);
  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rgray_w;   // write domain
  logic [AW:0] rbin, rgray, wgray_r;   // read domain
  logic [AW:0] wbin_n, rbin_n, wgray_n, rgray_n;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write side ----------------
  assign wbin_n  = wbin + (AW+1)'(write && !full);
  assign wgray_n = bin2gray(wbin_n);

  always_ff @(posedge wclk) begin
    if (wrst) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_n;
      wgray <= wgray_n;
    end
  end

  always_ff @(posedge wclk) begin
    if (write && !full) mem[wbin[AW-1:0]] <= data_in;
  end

  sync_2ff #(.W(AW+1)) u_sync_r2w (.clk(wclk), .rst(wrst), .d(rgray), .q(rgray_w));

  // full: write pointer is one lap ahead of the read pointer
  assign full = (wgray == {~rgray_w[AW:AW-1], rgray_w[AW-2:0]});

  // ---------------- read side ----------------
  assign rbin_n  = rbin + (AW+1)'(read && !empty);
  assign rgray_n = bin2gray(rbin_n);

  always_ff @(posedge rclk) begin
    if (rrst) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_n;
      rgray <= rgray_n;
    end
  end

  sync_2ff #(.W(AW+1)) u_sync_w2r (.clk(rclk), .rst(rrst), .d(wgray), .q(wgray_r));

  assign empty    = (rgray == wgray_r);
  assign data_out = mem[rbin[AW-1:0]];
endmodule
