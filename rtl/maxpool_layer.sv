// maxpool_layer: streaming POOL x POOL max pooling with stride POOL.
//
// Pixels arrive in raster order with C channels per beat. A row buffer of
// W/POOL entries per channel keeps the running maximum of each pooling
// window while its rows stream past; the first pixel of a window loads the
// buffer, the others keep the larger value, and the last pixel of the window
// (bottom-right) sends the maximum out. Rows and columns beyond the last
// whole window are dropped, as in a floor-mode pooling layer, so an H x W
// input gives H/POOL x W/POOL outputs.
//
// Timing: one input pixel per cycle; the result is registered (out_valid the
// cycle after the last window pixel) and held until out_ready. The input is
// stalled only while a finished result is waiting to be taken. The original
// design only names the pooling layer; this structure is this design's own.
module maxpool_layer #(
  parameter int POOL = 2,
  parameter int H    = 28,
  parameter int W    = 28,
  parameter int C    = 20,
  parameter int DW   = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data  [C],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data [C]
);
  localparam int WO = W / POOL;
  localparam int HO = H / POOL;
  localparam int RW = (H > 1) ? $clog2(H) : 1;
  localparam int CW = (W > 1) ? $clog2(W) : 1;
  localparam int PW = (POOL > 1) ? $clog2(POOL) : 1;
  localparam int IW = (WO > 1) ? $clog2(WO) : 1;

  logic signed [DW-1:0] rowmax [WO][C];
  logic signed [DW-1:0] newmax [C];
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  logic [PW-1:0] rph, cph;     // position inside the pooling window
  logic [IW-1:0] idx;          // output column
  logic          push, in_win, first, last;

  assign in_ready = !out_valid || out_ready;
  assign push     = in_valid && in_ready;
  assign in_win   = (int'(row) < HO * POOL) && (int'(col) < WO * POOL);
  assign first    = (rph == '0) && (cph == '0);
  assign last     = (rph == PW'(POOL - 1)) && (cph == PW'(POOL - 1));

  always_comb begin
    for (int ch = 0; ch < C; ch++) begin
      if (first || in_data[ch] > rowmax[idx][ch]) newmax[ch] = in_data[ch];
      else                                        newmax[ch] = rowmax[idx][ch];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row <= '0; col <= '0; rph <= '0; cph <= '0; idx <= '0;
    end else if (push) begin
      if (col == CW'(W - 1)) begin
        col <= '0; cph <= '0; idx <= '0;
        rph <= (rph == PW'(POOL - 1)) ? '0 : rph + 1'b1;
        if (row == RW'(H - 1)) begin
          row <= '0; rph <= '0;
        end else begin
          row <= row + 1'b1;
        end
      end else begin
        col <= col + 1'b1;
        if (cph == PW'(POOL - 1)) begin
          cph <= '0;
          if (int'(idx) < WO - 1) idx <= idx + 1'b1;
        end else begin
          cph <= cph + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push && in_win) rowmax[idx] <= newmax;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int ch = 0; ch < C; ch++) out_data[ch] <= '0;
    end else if (push && in_win && last) begin
      out_valid <= 1'b1;
      out_data  <= newmax;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end
endmodule
