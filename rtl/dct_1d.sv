// dct_1d: eight-point one-dimensional DCT in fixed point, after Loeffler,
// Ligtenberg and Moschytz (11 multiplications, 29 additions).
//
// y[k] = floor( sqrt(2) * c(k) * sum_n x[n] * cos((2n+1)*k*pi/16) ),
// c(0) = 1/sqrt(2), c(k) = 1 otherwise, i.e. the orthonormal DCT scaled by
// sqrt(8), so that two passes give 8 times the 2-D DCT. Results are
// truncated toward minus infinity, as in the lab's test case.
//
// Structure: a butterfly stage splits x into sums (even part) and
// differences (odd part). The even part is a four-point DCT with one
// rotation (constants 0.541, 0.765, 1.848); the odd part is the usual
// Loeffler rotation network with nine constant multiplications. Constants
// are rounded to CONST_BITS fractional bits; y[0] and y[4] are exact.
// The arithmetic is combinational and the eight results are registered when
// en is high, so y is valid one clock after x (latency 1, one vector per
// clock). Port widths (8 x 12 in, 8 x 16 out) follow the lecture; the
// fixed-point precision and the register enable are this design's choices.
module dct_1d #(
  parameter int unsigned IN_W       = 12,
  parameter int unsigned OUT_W      = 16,
  parameter int unsigned CONST_BITS = 13
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x [8],
  output logic signed [OUT_W-1:0] y [8]
);
  // constant c scaled by 2^CONST_BITS and rounded
  function automatic int fix(real c);
    return int'(c * real'(1 << CONST_BITS));
  endfunction

  localparam int C_0_298 = fix(0.298631336);
  localparam int C_0_390 = fix(0.390180644);
  localparam int C_0_541 = fix(0.541196100);
  localparam int C_0_765 = fix(0.765366865);
  localparam int C_0_899 = fix(0.899976223);
  localparam int C_1_175 = fix(1.175875602);
  localparam int C_1_501 = fix(1.501321110);
  localparam int C_1_847 = fix(1.847759065);
  localparam int C_1_961 = fix(1.961570560);
  localparam int C_2_053 = fix(2.053119869);
  localparam int C_2_562 = fix(2.562915447);
  localparam int C_3_072 = fix(3.072711026);

  logic signed [OUT_W-1:0] res [8];

  always_comb begin
    int t0, t1, t2, t3, t4, t5, t6, t7;
    int t10, t11, t12, t13;
    int z1, z2, z3, z4, z5;
    int e2, e6, o1, o3, o5, o7;
    // butterfly
    t0 = int'(x[0]) + int'(x[7]);  t7 = int'(x[0]) - int'(x[7]);
    t1 = int'(x[1]) + int'(x[6]);  t6 = int'(x[1]) - int'(x[6]);
    t2 = int'(x[2]) + int'(x[5]);  t5 = int'(x[2]) - int'(x[5]);
    t3 = int'(x[3]) + int'(x[4]);  t4 = int'(x[3]) - int'(x[4]);
    // even part
    t10 = t0 + t3;  t13 = t0 - t3;
    t11 = t1 + t2;  t12 = t1 - t2;
    z1 = (t12 + t13) * C_0_541;
    e2 = z1 + t13 * C_0_765;
    e6 = z1 - t12 * C_1_847;
    // odd part
    z1 = t4 + t7;  z2 = t5 + t6;  z3 = t4 + t6;  z4 = t5 + t7;
    z5 = (z3 + z4) * C_1_175;
    z1 = -z1 * C_0_899;
    z2 = -z2 * C_2_562;
    z3 = -z3 * C_1_961 + z5;
    z4 = -z4 * C_0_390 + z5;
    o7 = t4 * C_0_298 + z1 + z3;
    o5 = t5 * C_2_053 + z2 + z4;
    o3 = t6 * C_3_072 + z2 + z3;
    o1 = t7 * C_1_501 + z1 + z4;
    res[0] = OUT_W'(t10 + t11);
    res[4] = OUT_W'(t10 - t11);
    res[2] = OUT_W'(e2 >>> CONST_BITS);
    res[6] = OUT_W'(e6 >>> CONST_BITS);
    res[1] = OUT_W'(o1 >>> CONST_BITS);
    res[3] = OUT_W'(o3 >>> CONST_BITS);
    res[5] = OUT_W'(o5 >>> CONST_BITS);
    res[7] = OUT_W'(o7 >>> CONST_BITS);
  end

  always_ff @(posedge clk) begin
    if (en) y <= res;
  end
endmodule
