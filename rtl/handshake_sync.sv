// handshake_sync: passes one data word from a source clock domain to a
// destination clock domain with a four-phase request/acknowledge handshake.
//
// The source takes a word when send is high and busy is low, holds it in a
// register and raises req. req crosses into the destination domain through
// a two-flop synchronizer; when it arrives the destination copies the held
// word (stable for the whole exchange) to data_out, pulses valid for one
// clock and raises ack. ack crosses back; the source then drops req, waits
// for ack to drop, and only then is ready for the next word. Only req and
// ack cross domains, each through a synchronizer; the data bus is sampled
// only while it is stable. Each side has its own synchronous reset. The
// lecture names handshaking as one way to cross clock domains; this
// four-phase protocol is this design's.
module handshake_sync #(
  parameter int unsigned DW = 32
) (
  input  logic          sclk,
  input  logic          srst,
  input  logic          send,
  input  logic [DW-1:0] data_in,
  output logic          busy,
  input  logic          dclk,
  input  logic          drst,
  output logic [DW-1:0] data_out,
  output logic          valid
);
  logic          req, ack;
  logic          req_d, ack_s;
  logic [DW-1:0] hold;

  // ---------------- source side ----------------
  always_ff @(posedge sclk) begin
    if (srst) begin
      req  <= 1'b0;
      hold <= '0;
    end else if (!req && !ack_s) begin
      if (send) begin
        hold <= data_in;
        req  <= 1'b1;
      end
    end else if (req && ack_s) begin
      req <= 1'b0;
    end
  end

  assign busy = req || ack_s;

  sync_2ff u_sync_ack (.clk(sclk), .rst(srst), .d(ack), .q(ack_s));

  // ---------------- destination side ----------------
  sync_2ff u_sync_req (.clk(dclk), .rst(drst), .d(req), .q(req_d));

  always_ff @(posedge dclk) begin
    if (drst) begin
      ack      <= 1'b0;
      valid    <= 1'b0;
      data_out <= '0;
    end else begin
      valid <= 1'b0;
      if (req_d && !ack) begin
        data_out <= hold;
        valid    <= 1'b1;
        ack      <= 1'b1;
      end else if (!req_d && ack) begin
        ack <= 1'b0;
      end
    end
  end
endmodule
