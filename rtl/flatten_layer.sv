// flatten_layer: turns a stream of C-channel pixels into a stream of scalars.
//
// Links the convolutional part of the network to a dense layer. Each input
// beat (one pixel, all C channels) leaves as C output beats, channel 0 first,
// so a raster-order feature map comes out in (row, column, channel) order,
// the order in which a channels-last Flatten layer numbers its outputs.
//
// Timing: the pixel is registered on acceptance; its channels then leave one
// per cycle while out_ready is high. The next pixel is accepted in the cycle
// its predecessor's last channel is taken, so a C-channel pixel needs C cycles.
module flatten_layer #(
  parameter int C  = 12,
  parameter int DW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [DW-1:0] in_data [C],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data
);
  localparam int IW = (C > 1) ? $clog2(C) : 1;

  logic signed [DW-1:0] hold [C];
  logic [IW-1:0]        idx;
  logic                 full, take_last;

  assign out_valid = full;
  assign out_data  = hold[idx];
  assign take_last = full && out_ready && (idx == IW'(C - 1));
  assign in_ready  = !full || take_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= 1'b0;
      idx  <= '0;
      for (int ch = 0; ch < C; ch++) hold[ch] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        hold <= in_data;
        full <= 1'b1;
        idx  <= '0;
      end else if (take_last) begin
        full <= 1'b0;
        idx  <= '0;
      end else if (full && out_ready) begin
        idx <= idx + 1'b1;
      end
    end
  end
endmodule
