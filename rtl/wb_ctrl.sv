// wb_ctrl: acknowledge generator of the accelerator's Wishbone slave port.
//
// A registered ack rises one clock after stb (with cyc) and stays high for
// exactly one clock, so it falls together with stb at the end of a single
// transfer instead of lingering one clock into the next bus cycle. A
// held-over ack would make the master accept a second, unintended transfer.
// Every access therefore takes two clocks. The one-clock-late, one-clock-long
// ack follows the correct waveform of the lecture; the reset is this
// design's choice (synchronous, active high).
module wb_ctrl (
  input  logic clk,
  input  logic rst,
  input  logic stb,
  input  logic cyc,
  output logic ack
);
  always_ff @(posedge clk) begin
    if (rst) ack <= 1'b0;
    else     ack <= stb && cyc && !ack;
  end

  a_one_clock: assert property (@(posedge clk) disable iff (rst) ack |=> !ack)
    else $error("wb_ctrl: ack longer than one clock");
endmodule
