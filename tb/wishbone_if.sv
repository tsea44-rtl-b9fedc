// wishbone_if: the 32-bit Wishbone signal bundle between one master and one
// slave. dat_o is the master's write data, dat_i the data read back, as the
// signals are named from the CPU's side. The master modport is used by the
// bus-functional model in the testbenches; the slave modport by a slave.
// The rule that ack is only given during a strobe is checked here.
interface wishbone_if (input logic clk, input logic rst);
  logic [31:0] adr;
  logic [31:0] dat_o;
  logic [31:0] dat_i;
  logic        stb;
  logic        cyc;
  logic        we;
  logic [3:0]  sel;
  logic        ack;

  modport master (input clk, rst, dat_i, ack, output adr, dat_o, stb, cyc, we, sel);
  modport slave  (input clk, rst, adr, dat_o, stb, cyc, we, sel, output dat_i, ack);

  // ack may only be high while the master strobes
  a_ack_in_strobe: assert property (@(posedge clk) disable iff (rst) ack |-> (stb && cyc))
    else $error("wishbone: ack without stb/cyc");
endinterface
