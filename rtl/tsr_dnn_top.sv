// tsr_dnn_top: traffic sign recognition network as a pipeline of layers.
//
// The highest level of the layer hierarchy. A 32x32 colour image streams in
// from a camera one pixel per beat; every layer is a pipeline stage that
// starts work as soon as it has enough of its input, so all layers run at
// the same time on different parts of the image. The stages are:
//   rgb_input_adapter  camera word -> 3 activations in R, G, B order
//   async_fifo         clock domain crossing sensor clock -> network clock
//                      (USE_CDC = 1; with USE_CDC = 0 all runs on clk)
//   conv1  3x3, 3 -> 26 channels, ReLU                 32x32 -> 30x30
//   conv2  3x3, 26 -> 20 channels, ReLU                30x30 -> 28x28
//   pool2  2x2 max                                     28x28 -> 14x14
//   conv3  3x3, 20 -> 20 channels, ReLU                14x14 -> 12x12
//   pool3  2x2 max                                     12x12 -> 6x6
//   conv4  3x3, 20 -> 12 channels, ReLU                6x6   -> 4x4
//   pool4  2x2 max                                     4x4   -> 2x2
//   flatten                                            2x2x12 -> 48
//   dense  48 -> 43 class scores, linear activation
// No layer has a bias. Dropout is the identity at inference and has no
// stage. The class with the largest score is the recognised sign.
//
// CONV_MULTS (1, 3 or 9) sets the multipliers per 3x3 kernel and with it the
// cycles per output pixel (9, 3 or 1); DENSE_MULTS (1 or 43) does the same for
// the dense layer. DW and WW are the activation and weight widths.
//
// Weights are loaded before inference through w_we/w_layer/w_addr/w_data
// (clk domain), one per cycle: w_layer 0..3 selects conv1..conv4, 4 the dense
// layer; addresses follow the flat order of each layer's kernel tensor (see
// conv_layer and dense_layer). A batch normalisation stage from the same
// layer library, which this network does not use, is brought out on its own
// ports (bn_*) beside the network.
//
// Interfaces are valid/ready streams: the camera side (cam_*) on cam_clk,
// the class scores (score_*) on clk, one 43-value beat per image. Only the
// low address bits each layer needs are decoded from w_addr.
//
// The network, the layer hierarchy, the multiplier options, the crossing and
// the camera adapter follow the original design. The stream handshake, the
// number format and the weight load port are choices of this design; the
// original builds trained weights into the logic as constants.
module tsr_dnn_top
  import dnn_pkg::*;
#(
  parameter int IMG         = 32,
  parameter int PIX_W       = 8,
  parameter int DW          = 8,
  parameter int WW          = 8,
  parameter int OW          = 16,
  parameter int CONV_MULTS  = 9,
  parameter int DENSE_MULTS = 43,
  parameter bit USE_CDC     = 1'b1,
  parameter int FIFO_AW     = 4,
  parameter int SHIFT_C1    = 7,
  parameter int SHIFT_C2    = 7,
  parameter int SHIFT_C3    = 7,
  parameter int SHIFT_C4    = 7,
  parameter int SHIFT_D     = 7
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cam_clk,
  input  logic                  cam_rst_n,
  // camera stream (cam_clk)
  input  rgb_order_e            cam_order,
  input  logic                  cam_valid,
  output logic                  cam_ready,
  input  logic [3*PIX_W-1:0]    cam_pixel,
  // class scores (clk)
  output logic                  score_valid,
  input  logic                  score_ready,
  output logic signed [OW-1:0]  score [43],
  // weight load (clk)
  input  logic                  w_we,
  input  logic [2:0]            w_layer,
  input  logic [15:0]           w_addr,
  input  logic signed [WW-1:0]  w_data,
  // batch normalisation stage (clk), not part of this network
  input  logic                  bn_in_valid,
  output logic                  bn_in_ready,
  input  logic signed [DW-1:0]  bn_in_data  [3],
  output logic                  bn_out_valid,
  input  logic                  bn_out_ready,
  output logic signed [DW-1:0]  bn_out_data [3],
  input  logic                  bn_c_we,
  input  logic [2:0]            bn_c_addr,
  input  logic signed [WW-1:0]  bn_c_data
);
  // feature map sizes of the network
  localparam int C0 = 3,  C1 = 26, C2 = 20, C3 = 20, C4 = 12, NCLS = 43;
  localparam int H1 = IMG - 2;       // conv1 out
  localparam int H2 = H1 - 2;        // conv2 out
  localparam int P2 = H2 / 2;        // pool2 out
  localparam int H3 = P2 - 2;        // conv3 out
  localparam int P3 = H3 / 2;        // pool3 out
  localparam int H4 = P3 - 2;        // conv4 out
  localparam int P4 = H4 / 2;        // pool4 out
  localparam int NFLAT = P4 * P4 * C4;

  localparam int WA1 = $clog2(9 * C0 * C1);
  localparam int WA2 = $clog2(9 * C1 * C2);
  localparam int WA3 = $clog2(9 * C2 * C3);
  localparam int WA4 = $clog2(9 * C3 * C4);
  localparam int WAD = $clog2(NFLAT * NCLS);

  // ---------------------------------------------------------------- input
  logic                 ad_valid, ad_ready;
  logic signed [DW-1:0] ad_data [C0];
  logic                 s0_valid, s0_ready;
  logic signed [DW-1:0] s0_data [C0];

  rgb_input_adapter #(.C(C0), .PW(PIX_W), .DW(DW)) u_adapter (
    .order    (cam_order),
    .in_valid (cam_valid),
    .in_ready (cam_ready),
    .in_pixel (cam_pixel),
    .out_valid(ad_valid),
    .out_ready(ad_ready),
    .out_data (ad_data)
  );

  if (USE_CDC) begin : g_cdc
    logic [C0*DW-1:0] wpack, rpack;
    for (genvar c = 0; c < C0; c++) begin : g_pack
      assign wpack[c*DW +: DW] = ad_data[c];
      assign s0_data[c]        = rpack[c*DW +: DW];
    end
    async_fifo #(.WIDTH(C0 * DW), .AW(FIFO_AW)) u_cdc (
      .wclk   (cam_clk),
      .wrst_n (cam_rst_n),
      .w_valid(ad_valid),
      .w_ready(ad_ready),
      .w_data (wpack),
      .rclk   (clk),
      .rrst_n (rst_n),
      .r_valid(s0_valid),
      .r_ready(s0_ready),
      .r_data (rpack)
    );
  end else begin : g_nocdc
    assign s0_valid = ad_valid;
    assign ad_ready = s0_ready;
    assign s0_data  = ad_data;
  end

  // --------------------------------------------------------------- layers
  logic                 s1_valid, s1_ready, s2_valid, s2_ready;
  logic                 p2_valid, p2_ready, s3_valid, s3_ready;
  logic                 p3_valid, p3_ready, s4_valid, s4_ready;
  logic                 p4_valid, p4_ready, f_valid,  f_ready;
  logic signed [DW-1:0] s1_data [C1];
  logic signed [DW-1:0] s2_data [C2];
  logic signed [DW-1:0] p2_data [C2];
  logic signed [DW-1:0] s3_data [C3];
  logic signed [DW-1:0] p3_data [C3];
  logic signed [DW-1:0] s4_data [C4];
  logic signed [DW-1:0] p4_data [C4];
  logic signed [DW-1:0] f_data;

  conv_layer #(.K(3), .H(IMG), .W(IMG), .C_IN(C0), .C_OUT(C1), .MULTS(CONV_MULTS),
               .DW(DW), .WW(WW), .SHIFT(SHIFT_C1), .ACT(ACT_RELU)) u_conv1 (
    .clk, .rst_n,
    .in_valid (s0_valid), .in_ready (s0_ready), .in_data (s0_data),
    .out_valid(s1_valid), .out_ready(s1_ready), .out_data(s1_data),
    .w_we(w_we && w_layer == 3'd0), .w_addr(w_addr[WA1-1:0]), .w_data(w_data)
  );

  conv_layer #(.K(3), .H(H1), .W(H1), .C_IN(C1), .C_OUT(C2), .MULTS(CONV_MULTS),
               .DW(DW), .WW(WW), .SHIFT(SHIFT_C2), .ACT(ACT_RELU)) u_conv2 (
    .clk, .rst_n,
    .in_valid (s1_valid), .in_ready (s1_ready), .in_data (s1_data),
    .out_valid(s2_valid), .out_ready(s2_ready), .out_data(s2_data),
    .w_we(w_we && w_layer == 3'd1), .w_addr(w_addr[WA2-1:0]), .w_data(w_data)
  );

  maxpool_layer #(.POOL(2), .H(H2), .W(H2), .C(C2), .DW(DW)) u_pool2 (
    .clk, .rst_n,
    .in_valid (s2_valid), .in_ready (s2_ready), .in_data (s2_data),
    .out_valid(p2_valid), .out_ready(p2_ready), .out_data(p2_data)
  );

  conv_layer #(.K(3), .H(P2), .W(P2), .C_IN(C2), .C_OUT(C3), .MULTS(CONV_MULTS),
               .DW(DW), .WW(WW), .SHIFT(SHIFT_C3), .ACT(ACT_RELU)) u_conv3 (
    .clk, .rst_n,
    .in_valid (p2_valid), .in_ready (p2_ready), .in_data (p2_data),
    .out_valid(s3_valid), .out_ready(s3_ready), .out_data(s3_data),
    .w_we(w_we && w_layer == 3'd2), .w_addr(w_addr[WA3-1:0]), .w_data(w_data)
  );

  maxpool_layer #(.POOL(2), .H(H3), .W(H3), .C(C3), .DW(DW)) u_pool3 (
    .clk, .rst_n,
    .in_valid (s3_valid), .in_ready (s3_ready), .in_data (s3_data),
    .out_valid(p3_valid), .out_ready(p3_ready), .out_data(p3_data)
  );

  conv_layer #(.K(3), .H(P3), .W(P3), .C_IN(C3), .C_OUT(C4), .MULTS(CONV_MULTS),
               .DW(DW), .WW(WW), .SHIFT(SHIFT_C4), .ACT(ACT_RELU)) u_conv4 (
    .clk, .rst_n,
    .in_valid (p3_valid), .in_ready (p3_ready), .in_data (p3_data),
    .out_valid(s4_valid), .out_ready(s4_ready), .out_data(s4_data),
    .w_we(w_we && w_layer == 3'd3), .w_addr(w_addr[WA4-1:0]), .w_data(w_data)
  );

  maxpool_layer #(.POOL(2), .H(H4), .W(H4), .C(C4), .DW(DW)) u_pool4 (
    .clk, .rst_n,
    .in_valid (s4_valid), .in_ready (s4_ready), .in_data (s4_data),
    .out_valid(p4_valid), .out_ready(p4_ready), .out_data(p4_data)
  );

  flatten_layer #(.C(C4), .DW(DW)) u_flatten (
    .clk, .rst_n,
    .in_valid (p4_valid), .in_ready (p4_ready), .in_data (p4_data),
    .out_valid(f_valid),  .out_ready(f_ready),  .out_data(f_data)
  );

  dense_layer #(.N_IN(NFLAT), .N_OUT(NCLS), .MULTS(DENSE_MULTS), .DW(DW), .WW(WW),
                .OW(OW), .SHIFT(SHIFT_D), .ACT(ACT_LINEAR)) u_dense (
    .clk, .rst_n,
    .in_valid (f_valid),     .in_ready (f_ready),     .in_data (f_data),
    .out_valid(score_valid), .out_ready(score_ready), .out_data(score),
    .w_we(w_we && w_layer == 3'd4), .w_addr(w_addr[WAD-1:0]), .w_data(w_data)
  );

  // ------------------------------------------- library stage beside the net
  batchnorm_layer #(.C(3), .DW(DW), .WW(WW), .SHIFT(WW - 2)) u_bn (
    .clk, .rst_n,
    .in_valid (bn_in_valid),  .in_ready (bn_in_ready),  .in_data (bn_in_data),
    .out_valid(bn_out_valid), .out_ready(bn_out_ready), .out_data(bn_out_data),
    .c_we(bn_c_we), .c_addr(bn_c_addr), .c_data(bn_c_data)
  );
endmodule
