// bram_dp: dual-port block RAM with synchronous write and synchronous read on
// both ports, the timing of an FPGA block RAM (data appears the clock after
// the address). The accelerator uses one as its input memory (written by the
// bus, read by the sequencer's counter) and one as its output memory (written
// by the quantizer, read by the bus). On a read of an address written on the
// same clock the port returns the old contents (read-first). Width default
// follows the 32-bit bus; the depth is this design's choice.
module bram_dp #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_din,
  output logic [DW-1:0] a_dout,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_din,
  output logic [DW-1:0] b_dout
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_din;
    if (b_we) mem[b_addr] <= b_din;
  end

  always_ff @(posedge clk) begin
    a_dout <= mem[a_addr];
    b_dout <= mem[b_addr];
  end
endmodule
