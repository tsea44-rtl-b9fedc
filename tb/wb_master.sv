// wb_master: bus-functional Wishbone master for testbenches. m_write and
// m_read drive one single transfer each: address, data and strobe change
// just after a rising clock edge, ack and read data are sampled on falling
// edges, and the cycle ends on the rising edge after ack was seen.
// last_clocks holds the number of clocks the transfer took (2 for a slave
// that acknowledges one clock after the strobe).
module wb_master (wishbone_if.master wb);
  int unsigned last_clocks;

  initial begin
    wb.adr = '0; wb.dat_o = '0; wb.stb = 0; wb.cyc = 0; wb.we = 0; wb.sel = '0;
  end

  task automatic transfer(input logic we, input logic [31:0] adr,
                          input logic [31:0] wdata, output logic [31:0] rdata);
    @(posedge wb.clk); #1;
    wb.adr = adr; wb.dat_o = wdata; wb.we = we; wb.sel = 4'hf;
    wb.stb = 1; wb.cyc = 1;
    last_clocks = 0;
    do begin
      @(negedge wb.clk);
      last_clocks++;
    end while (!wb.ack && last_clocks < 1000);
    rdata = wb.dat_i;
    @(posedge wb.clk); #1;
    wb.stb = 0; wb.cyc = 0; wb.we = 0; wb.sel = '0;
  endtask

  task automatic m_write(input logic [31:0] adr, input logic [31:0] data);
    logic [31:0] unused;
    transfer(1'b1, adr, data, unused);
  endtask

  task automatic m_read(input logic [31:0] adr, output logic [31:0] data);
    transfer(1'b0, adr, '0, data);
  endtask
endmodule
