// tsea44_top: the hardware of the lab lecture, three independent designs
// side by side.
//
//  1. dctq_accel - the JPEG DCT and quantization accelerator, a Wishbone
//     slave. Its bus port is brought out unchanged (clk, rst, wb_*); in the
//     lab system it hangs on the Wishbone interconnect of an OR1200 CPU,
//     which is not part of this RTL.
//  2. addsub32 - the 32-bit adder/subtractor used to show gate-level timing.
//  3. A clock-domain-crossing link between clock domains A (cdc_aclk) and B
//     (cdc_bclk): one reset synchronizer per domain, driven from the common
//     asynchronous reset cdc_arst, an asynchronous FIFO from A to B and a
//     four-phase handshake synchronizer from A to B.
// None of the three shares a signal with another; the grouping into one top
// is this design's own.
module tsea44_top (
  // DCT/quantization accelerator, Wishbone slave
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] wb_adr,
  input  logic [31:0] wb_dat_o,
  output logic [31:0] wb_dat_i,
  input  logic        wb_stb,
  input  logic        wb_cyc,
  input  logic        wb_we,
  input  logic [3:0]  wb_sel,
  output logic        wb_ack,
  output logic        dct_busy,
  output logic        dct_done,
  // 32-bit adder/subtractor
  input  logic [31:0] as_a,
  input  logic [31:0] as_b,
  input  logic        as_sub,
  output logic [31:0] as_s,
  // clock-domain crossing
  input  logic        cdc_aclk,
  input  logic        cdc_bclk,
  input  logic        cdc_arst,
  output logic        cdc_arst_a,
  output logic        cdc_arst_b,
  input  logic        fifo_write,
  input  logic [31:0] fifo_data_in,
  output logic        fifo_full,
  input  logic        fifo_read,
  output logic [31:0] fifo_data_out,
  output logic        fifo_empty,
  input  logic        hs_send,
  input  logic [31:0] hs_data_in,
  output logic        hs_busy,
  output logic [31:0] hs_data_out,
  output logic        hs_valid
);
  dctq_accel u_dctq (
    .clk, .rst, .wb_adr, .wb_dat_o, .wb_dat_i, .wb_stb, .wb_cyc, .wb_we,
    .wb_sel, .wb_ack, .busy(dct_busy), .done(dct_done)
  );

  addsub32 u_addsub (.a(as_a), .b(as_b), .sub(as_sub), .s(as_s));

  reset_sync u_rst_a (.clk(cdc_aclk), .arst_in(cdc_arst), .rst_out(cdc_arst_a));
  reset_sync u_rst_b (.clk(cdc_bclk), .arst_in(cdc_arst), .rst_out(cdc_arst_b));

  async_fifo #(.DW(32), .AW(4)) u_fifo (
    .wclk(cdc_aclk), .wrst(cdc_arst_a), .write(fifo_write), .data_in(fifo_data_in), .full(fifo_full),
    .rclk(cdc_bclk), .rrst(cdc_arst_b), .read(fifo_read), .data_out(fifo_data_out), .empty(fifo_empty)
  );

  handshake_sync #(.DW(32)) u_hs (
    .sclk(cdc_aclk), .srst(cdc_arst_a), .send(hs_send), .data_in(hs_data_in), .busy(hs_busy),
    .dclk(cdc_bclk), .drst(cdc_arst_b), .data_out(hs_data_out), .valid(hs_valid)
  );
endmodule
