// dctq_accel: JPEG forward-DCT and quantization accelerator, a 32-bit
// Wishbone slave.
//
// The CPU writes one 8x8 block of 8-bit pixels (16 words, four pixels per
// word, first pixel in bits [31:24], row by row) into the input block RAM,
// writes 1 to csr bit 0, polls csr until bit 1 (done) is set, and reads 32
// words of quantized coefficients from the output block RAM.
//
// Datapath, as in the lecture's proposed architecture:
//   input BRAM (32 bit) -> word register -> 64-bit row of 8 pixels, minus 128
//   -> mux -> 1-D DCT (8 x 12 bit in, 8 x 16 bit out, registered)
//   -> rows: transpose memory (8 x 12 bit, columns read back through the mux)
//   -> columns: 128 -> 32 bit pair select -> Q2 -> output BRAM (32 bit).
// The first pass transforms rows, the second columns, so the 2-D result is
// 8 times the orthonormal 2-D DCT, which the quantizer divides by 4*Q.
// The output RAM holds the result column by column: word c*4+k holds
// coefficients (u=2k, v=c) in bits [31:16] and (u=2k+1, v=c) in [15:0],
// u being the vertical and v the horizontal frequency.
//
// Address map (byte address bits [12:11]): 0 input RAM (write), 1 output
// RAM (read), 2 csr (read/write). Every access is acknowledged one clock
// after stb, for one clock. Byte selects are ignored: all writes are whole
// words. The block takes 51 clocks from the start write to done. The address
// map, word order and csr layout are this design's choices.
module dctq_accel
  import jpeg_pkg::*;
#(
  parameter int unsigned Q_SCALE = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] wb_adr,
  input  logic [31:0] wb_dat_o,
  output logic [31:0] wb_dat_i,
  input  logic        wb_stb,
  input  logic        wb_cyc,
  input  logic        wb_we,
  input  logic [3:0]  wb_sel,
  output logic        wb_ack,
  output logic        busy,
  output logic        done
);
  region_e region;
  logic    wr_access;

  assign region    = region_e'(wb_adr[12:11]);
  assign wr_access = wb_stb && wb_cyc && wb_we && !wb_ack;

  wb_ctrl u_wb_ctrl (.clk, .rst, .stb(wb_stb), .cyc(wb_cyc), .ack(wb_ack));

  // ---------------- control unit ----------------
  logic [31:0] csr;
  logic [3:0]  in_addr;
  logic        dct_en, sel_tm, t_wr, out_we;
  logic [2:0]  wr_row, t_rd, q_col;
  logic [1:0]  q_pair;
  logic [4:0]  out_addr;

  dct2_ctrl u_ctrl (
    .clk, .rst,
    .csr_we  (wr_access && region == REG_CSR),
    .csr_din (wb_dat_o),
    .csr,
    .in_addr, .dct_en, .sel_tm, .t_wr, .wr_row, .t_rd,
    .q_pair, .q_col, .out_we, .out_addr, .busy, .done
  );

  // ---------------- input memory and row assembly ----------------
  logic [31:0] in_dout, in_nc, word_q;

  bram_dp #(.DW(32), .DEPTH(16)) u_in (
    .clk,
    .a_we   (wr_access && region == REG_IN),
    .a_addr (wb_adr[5:2]),
    .a_din  (wb_dat_o),
    .a_dout (in_nc),
    .b_we   (1'b0),
    .b_addr (in_addr),
    .b_din  ('0),
    .b_dout (in_dout)
  );

  always_ff @(posedge clk) word_q <= in_dout;

  logic [63:0] row_pix;
  dct_in_t     x_row [8];
  dct_in_t     x_tm  [8];
  dct_in_t     x_dct [8];

  assign row_pix = {word_q, in_dout};

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      x_row[i] = DCT_IN_W'(row_pix[63-PIX_W*i -: PIX_W]) - DCT_IN_W'(128);
      x_dct[i] = sel_tm ? x_tm[i] : x_row[i];
    end
  end

  // ---------------- DCT and transpose memory ----------------
  dct_out_t y_dct [8];
  logic signed [TM_W-1:0] tm_wr [8];

  dct_1d #(.IN_W(DCT_IN_W), .OUT_W(DCT_OUT_W)) u_dct (
    .clk, .en(dct_en), .x(x_dct), .y(y_dct)
  );

  always_comb
    for (int i = 0; i < 8; i++) tm_wr[i] = TM_W'(y_dct[i]);

  transpose_mem #(.W(TM_W)) u_tm (
    .clk, .t_wr, .wr_row, .wr_data(tm_wr), .t_rd, .rd_data(x_tm)
  );

  // ---------------- quantization ----------------
  logic signed [15:0] qb [2];
  logic signed [15:0] qy [2];
  logic [5:0]         qpos [2];

  always_comb begin
    qb[0]   = y_dct[{q_pair, 1'b0}];
    qb[1]   = y_dct[{q_pair, 1'b1}];
    qpos[0] = {q_pair, 1'b0, q_col};
    qpos[1] = {q_pair, 1'b1, q_col};
  end

  q2 #(.Q_SCALE(Q_SCALE)) u_q2 (.b(qb), .pos(qpos), .y(qy));

  // ---------------- output memory ----------------
  logic [31:0] out_dout, out_nc;

  bram_dp #(.DW(32), .DEPTH(32)) u_out (
    .clk,
    .a_we   (out_we),
    .a_addr (out_addr),
    .a_din  ({qy[0], qy[1]}),
    .a_dout (out_nc),
    .b_we   (1'b0),
    .b_addr (wb_adr[6:2]),
    .b_din  ('0),
    .b_dout (out_dout)
  );

  // read data: output memory or csr
  always_comb begin
    unique case (region)
      REG_OUT: wb_dat_i = out_dout;
      REG_CSR: wb_dat_i = csr;
      default: wb_dat_i = '0;
    endcase
  end

  // byte selects are not used: all accesses are whole words
  logic unused_ok;
  assign unused_ok = ^{wb_sel, wb_adr[31:13], wb_adr[10:7], wb_adr[1:0], in_nc, out_nc};
endmodule
