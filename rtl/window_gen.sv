// window_gen: sliding KxK window over a raster-order stream of pixels.
//
// Pixels arrive one per push, row by row, each carrying C channel values.
// K-1 line buffers (FIFO registers, one image row long each) keep the rows
// above the current one; a KxK register array per channel holds the window
// that ends at the pixel just pushed. On every push the window shifts one
// column left and its right-most column is filled from the line buffers and
// the new pixel.
//
// completes is high, combinationally, while push is high for a pixel whose
// window is an output position of a convolution with stride STRIDE and no
// padding (rows and columns K-1, K-1+STRIDE, ...). After that push, win holds
// that window, indexed [channel][ky*K + kx]. The original design names FIFO
// registers and counters among its building blocks; this line-buffer
// arrangement is this design's own. Row and column counters wrap at
// the end of an H x W frame, so frames follow each other without a gap.
module window_gen #(
  parameter int K      = 3,
  parameter int H      = 32,
  parameter int W      = 32,
  parameter int C      = 3,
  parameter int DW     = 8,
  parameter int STRIDE = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 push,
  input  logic signed [DW-1:0] pix [C],
  output logic                 completes,
  output logic signed [DW-1:0] win [C][K*K]
);
  localparam int RW = (H > 1) ? $clog2(H) : 1;
  localparam int CW = (W > 1) ? $clog2(W) : 1;
  localparam int SPW = $clog2(STRIDE + 1);

  logic signed [DW-1:0] lb [K-1][W][C];
  logic [RW-1:0]  row;
  logic [CW-1:0]  col;
  logic [SPW-1:0] row_ph, col_ph;

  assign completes = push && (row >= RW'(K - 1)) && (col >= CW'(K - 1)) &&
                     (row_ph == '0) && (col_ph == '0);

  // position counters; *_ph count output-grid phase once past the first K-1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; col <= '0; row_ph <= '0; col_ph <= '0;
    end else if (push) begin
      if (col >= CW'(K - 1))
        col_ph <= (col_ph == SPW'(STRIDE - 1)) ? '0 : col_ph + 1'b1;
      if (col == CW'(W - 1)) begin
        col    <= '0;
        col_ph <= '0;
        if (row >= RW'(K - 1))
          row_ph <= (row_ph == SPW'(STRIDE - 1)) ? '0 : row_ph + 1'b1;
        if (row == RW'(H - 1)) begin
          row    <= '0;
          row_ph <= '0;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  // line buffers and window registers
  always_ff @(posedge clk) begin
    if (push) begin
      for (int ch = 0; ch < C; ch++) begin
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K - 1; kx++)
            win[ch][ky*K+kx] <= win[ch][ky*K+kx+1];
        for (int ky = 0; ky < K - 1; ky++)
          win[ch][ky*K+K-1] <= lb[ky][col][ch];
        win[ch][K*K-1] <= pix[ch];
        for (int i = 0; i < K - 2; i++) lb[i][col][ch] <= lb[i+1][col][ch];
        lb[K-2][col][ch] <= pix[ch];
      end
    end
  end
endmodule
