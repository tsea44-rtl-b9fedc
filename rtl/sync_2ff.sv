// sync_2ff: two-flip-flop synchronizer for a single-bit (or Gray-coded)
// signal entering the clock domain of clk. The first flop may go
// metastable; the second gives it a full clock to settle. Output lags the
// input by two clocks of clk. Reset (synchronous to clk, active high)
// clears both flops.
module sync_2ff #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
