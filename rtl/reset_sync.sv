// reset_sync: brings a reset into one clock domain. The reset is applied
// asynchronously (the flops clear as soon as arst_in rises, even with no
// clock) and released synchronously: rst_out falls STAGES clocks after
// arst_in falls, on an edge of clk, so every flop of the domain leaves reset
// on the same clock. One instance is needed per clock domain. The lecture
// asks that the reset be passed to each clock domain; the
// assert-asynchronously, release-synchronously circuit is this design's.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic arst_in,
  output logic rst_out
);
  logic [STAGES-1:0] chain;

  always_ff @(posedge clk or posedge arst_in) begin
    if (arst_in) chain <= '1;
    else         chain <= {chain[STAGES-2:0], 1'b0};
  end

  assign rst_out = chain[STAGES-1];
endmodule
