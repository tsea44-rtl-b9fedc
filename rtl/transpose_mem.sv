// transpose_mem: 8x8 memory that turns rows into columns between the two
// passes of the 2-D DCT. One whole row of eight 12-bit values is written per
// clock (synchronous write, row index wr_row, enable t_wr); one whole column
// is read without a clock (asynchronous read, column index t_rd), as a
// distributed RAM does. Organisation and timing follow the lecture; the
// port names wr_row/wr_data/rd_data are this design's.
module transpose_mem #(
  parameter int unsigned W = 12
) (
  input  logic                clk,
  input  logic                t_wr,
  input  logic [2:0]          wr_row,
  input  logic signed [W-1:0] wr_data [8],
  input  logic [2:0]          t_rd,
  output logic signed [W-1:0] rd_data [8]
);
  logic signed [W-1:0] mem [8][8];   // mem[row][column]

  always_ff @(posedge clk) begin
    if (t_wr)
      for (int c = 0; c < 8; c++) mem[wr_row][c] <= wr_data[c];
  end

  always_comb begin
    for (int r = 0; r < 8; r++) rd_data[r] = mem[r][t_rd];
  end
endmodule
