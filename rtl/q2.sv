// q2: quantizer for two DCT coefficients per clock.
//
// Each coefficient B (8 times the 2-D DCT value) at position pos = u*8+v is
// divided by Q_SCALE*QTAB[pos] and rounded to nearest, halves away from
// zero: Y = sign(B) * floor((2|B| + D) / (2D)), D = Q_SCALE*Q. The division
// is a multiplication by the reciprocal R = ceil(2^K / (2D)) followed by a
// shift of K; with K = 27 this is exact for every 16-bit B and every table
// entry, so no divider is built. The 64 reciprocals are constants worked out
// at elaboration. Combinational; the pair is packed as {y[0], y[1]} in the
// 32-bit output memory word by the caller. The table and the division by
// 4*Q follow the lab's test case; the reciprocal method is this design's.
module q2
  import jpeg_pkg::*;
#(
  parameter int unsigned Q_SCALE = 4,
  parameter int unsigned K       = 27
) (
  input  logic signed [15:0] b   [2],
  input  logic        [5:0]  pos [2],
  output logic signed [15:0] y   [2]
);
  logic [31:0] recip [64];
  logic [15:0] half  [64];   // D = Q_SCALE*Q

  for (genvar i = 0; i < 64; i++) begin : g_tab
    localparam longint unsigned D2 = 2 * Q_SCALE * QTAB[i];
    localparam longint unsigned R  = ((64'd1 << K) + D2 - 1) / D2;
    assign recip[i] = 32'(R);
    assign half[i]  = 16'(Q_SCALE * QTAB[i]);
  end

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      logic [15:0] mag;
      logic [16:0] num;
      logic [48:0] prod;
      logic [15:0] q;
      mag  = b[i][15] ? 16'(-b[i]) : 16'(b[i]);
      num  = {mag, 1'b0} + 17'(half[pos[i]]);
      prod = 49'(num) * 49'(recip[pos[i]]);
      q    = 16'(prod >> K);
      y[i] = b[i][15] ? -$signed(q) : $signed(q);
    end
  end
endmodule
