// dct2_ctrl: control unit of the DCT/quantization accelerator: the csr
// register and the sequencer with the address counters of both memories.
//
// Writing 1 to csr bit 0 starts a block; bit 0 reads 1 while the unit is
// busy and bit 1 (done) is set when the block is finished and cleared by
// the next start. A block runs in two passes:
//   rows    (18 clocks) - the input-memory counter steps through the 16
//           words; every second clock two consecutive words form one row of
//           eight pixels, which is loaded into the DCT (dct_en, sel_tm = 0).
//           One clock later the DCT result is written as a row of the
//           transpose memory (t_wr, wr_row).
//   columns (33 clocks) - column c of the transpose memory is loaded into
//           the DCT (sel_tm = 1); during the next four clocks q_pair selects
//           coefficient pairs 0..3 for the quantizer and out_we writes them
//           at output word c*4+pair, while the last of those clocks loads
//           column c+1.
// A block therefore takes 51 clocks from the start write to done. The
// lecture names the unit, its csr and the two counters; the pass schedule,
// the csr bits and the output order (column by column) are this design's.
module dct2_ctrl (
  input  logic        clk,
  input  logic        rst,
  // csr access
  input  logic        csr_we,
  input  logic [31:0] csr_din,
  output logic [31:0] csr,
  // input memory counter and row loading
  output logic [3:0]  in_addr,
  output logic        dct_en,
  output logic        sel_tm,
  // transpose memory
  output logic        t_wr,
  output logic [2:0]  wr_row,
  output logic [2:0]  t_rd,
  // quantizer and output memory counter
  output logic [1:0]  q_pair,
  output logic [2:0]  q_col,
  output logic        out_we,
  output logic [4:0]  out_addr,
  output logic        busy,
  output logic        done
);
  import jpeg_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_ROWS, S_CLOAD, S_COLS} state_e;
  state_e state;

  logic [4:0] cnt;     // row-pass clock counter 0..17
  logic [2:0] col;     // column being quantized
  logic [1:0] pair;    // coefficient pair within the column
  logic       start;

  assign start = csr_we && csr_din[CSR_START] && !busy;
  assign busy  = (state != S_IDLE);
  always_comb begin
    csr = '0;
    csr[CSR_START] = busy;
    csr[CSR_DONE]  = done;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      cnt   <= '0;
      col   <= '0;
      pair  <= '0;
      done  <= 1'b0;
      t_wr  <= 1'b0;
      wr_row <= '0;
    end else begin
      t_wr   <= (state == S_ROWS) && dct_en;
      wr_row <= 3'(cnt[3:1] - 4'd1);
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ROWS;
          cnt   <= '0;
          done  <= 1'b0;
        end
        S_ROWS: begin
          cnt <= cnt + 5'd1;
          if (cnt == 5'd17) state <= S_CLOAD;
        end
        S_CLOAD: begin
          state <= S_COLS;
          col   <= '0;
          pair  <= '0;
        end
        S_COLS: begin
          pair <= pair + 2'd1;
          if (pair == 2'd3) begin
            col <= col + 3'd1;
            if (col == 3'd7) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end
      endcase
    end
  end

  always_comb begin
    in_addr  = cnt[3:0];
    dct_en   = 1'b0;
    sel_tm   = 1'b0;
    t_rd     = col;
    q_pair   = pair;
    q_col    = col;
    out_we   = 1'b0;
    out_addr = {col, pair};
    unique case (state)
      S_ROWS:  dct_en = (cnt >= 5'd2) && (cnt <= 5'd16) && !cnt[0];
      S_CLOAD: begin
        dct_en = 1'b1;
        sel_tm = 1'b1;
        t_rd   = 3'd0;
      end
      S_COLS: begin
        out_we = 1'b1;
        if (pair == 2'd3 && col != 3'd7) begin
          dct_en = 1'b1;
          sel_tm = 1'b1;
          t_rd   = col + 3'd1;
        end
      end
      default: ;
    endcase
  end
endmodule
