// batchnorm_layer: batch normalisation folded into a per-channel linear map.
//
// Once trained, mean, variance, scale and shift of a batch-normalisation
// layer are constants, so y = gamma*(x - mu)/sqrt(var + eps) + beta reduces
// to y = A*x + B per channel with A = gamma/sqrt(var + eps) and
// B = beta - A*mu. A is held as a signed fixed-point number with SHIFT
// fractional bits (WW bits in all), B as a signed number in activation units
// (WW bits); the result is rescaled and saturated to DW bits by requant
// with a linear activation. Coefficients are written through c_we/c_addr/
// c_data: address 2*ch holds A of channel ch, 2*ch+1 holds B.
//
// Timing: one C-channel pixel per cycle; the result is registered and held
// until out_ready.
module batchnorm_layer
  import dnn_pkg::*;
#(
  parameter int C     = 3,
  parameter int DW    = 8,
  parameter int WW    = 8,
  parameter int SHIFT = 6,
  parameter int CAW   = $clog2(2 * C)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DW-1:0]  in_data  [C],
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [DW-1:0]  out_data [C],
  input  logic                  c_we,
  input  logic        [CAW-1:0] c_addr,
  input  logic signed [WW-1:0]  c_data
);
  localparam int AW = DW + 2 * WW + 2;

  logic signed [WW-1:0] coef [2*C];
  logic signed [AW-1:0] lin  [C];
  logic signed [DW-1:0] res  [C];

  assign in_ready = !out_valid || out_ready;

  weight_mem #(.DEPTH(2 * C), .WW(WW)) u_coef (
    .clk, .rst_n,
    .we   (c_we),
    .waddr(c_addr),
    .wdata(c_data),
    .rdata(coef)
  );

  for (genvar ch = 0; ch < C; ch++) begin : g_ch
    // B is brought to the scale of the product before the sum
    assign lin[ch] = AW'(in_data[ch] * coef[2*ch]) + (AW'(coef[2*ch+1]) <<< SHIFT);
    requant #(.AW(AW), .OW(DW), .SHIFT(SHIFT), .ACT(ACT_LINEAR)) u_rq (
      .acc(lin[ch]),
      .y  (res[ch])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int ch = 0; ch < C; ch++) out_data[ch] <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      out_data  <= res;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end
endmodule
