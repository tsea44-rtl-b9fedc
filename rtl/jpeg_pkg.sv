// jpeg_pkg: types and constants shared by the DCT/quantization accelerator.
//
// Pixels are 8-bit unsigned, four to a 32-bit word with the first pixel in
// bits [31:24]. The DCT takes 12-bit signed samples and gives 16-bit signed
// coefficients. The transpose memory keeps 12 bits per value. The
// quantization table is the JPEG luminance table used by the test case of the
// lab; the quantizer divides by 4*Q (the table scaled by the quality factor
// 1/2 and by the extra factor 8 of the two sqrt(8)-scaled DCT passes).
// The address map and the csr bit layout are this design's own choice.
package jpeg_pkg;

  localparam int unsigned PIX_W  = 8;
  localparam int unsigned DCT_IN_W  = 12;
  localparam int unsigned DCT_OUT_W = 16;
  localparam int unsigned TM_W   = 12;   // transpose memory word

  typedef logic signed [DCT_IN_W-1:0]  dct_in_t;
  typedef logic signed [DCT_OUT_W-1:0] dct_out_t;
  typedef dct_in_t  dct_vec_in_t  [8];
  typedef dct_out_t dct_vec_out_t [8];

  // Wishbone address map of the accelerator (byte addresses, low 13 bits).
  // adr[12:11] selects the region.
  typedef enum logic [1:0] {
    REG_IN  = 2'd0,   // 0x0000-0x003F : input block, 16 words, write only
    REG_OUT = 2'd1,   // 0x0800-0x087F : output block, 32 words, read only
    REG_CSR = 2'd2,   // 0x1000        : control/status register
    REG_NONE = 2'd3
  } region_e;

  // csr bits
  localparam int unsigned CSR_START = 0;  // write 1: start; reads 1 while busy
  localparam int unsigned CSR_DONE  = 1;  // set when a block is finished

  // JPEG luminance quantization table, row = vertical frequency u,
  // column = horizontal frequency v, index u*8+v.
  localparam int unsigned QTAB [64] = '{
    16, 11, 10, 16,  24,  40,  51,  61,
    12, 12, 14, 19,  26,  58,  60,  55,
    14, 13, 16, 24,  40,  57,  69,  56,
    14, 17, 22, 29,  51,  87,  80,  62,
    18, 22, 37, 56,  68, 109, 103,  77,
    24, 35, 55, 64,  81, 104, 113,  92,
    49, 64, 78, 87, 103, 121, 120, 101,
    72, 92, 95, 98, 112, 100, 103,  99
  };

endpackage
