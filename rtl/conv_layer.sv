// conv_layer: streaming convolutional layer without bias.
//
// One pipeline stage of the network. Input pixels arrive in raster order,
// one per accepted beat, with all C_IN channels side by side; output pixels
// leave in raster order with all C_OUT channels. The layer holds a
// window_gen (line buffers and window registers), a weight_mem and C_OUT
// conv_channel instances that run in parallel, each with C_IN conv_kernels
// of MULTS multipliers. Stride is STRIDE and there is no padding (a KxK
// mask shrinks an H x W input to (H+2*PAD-K)/STRIDE+1 per side). With PAD > 0
// the layer surrounds each frame with PAD rows and columns of zeros: it
// pushes those zero pixels into the window generator itself, one per clock,
// without taking an input beat.
//
// Timing: a pixel that completes a window starts NSTEPS = K*K/MULTS compute
// cycles (9, 3 or 1 for a 3x3 mask); the layer accepts the next pixel in the
// last of them, so with MULTS = K*K it sustains one pixel per cycle. A pixel
// that completes no window (first K-1 rows and columns) takes one cycle. The
// result is registered: out_valid rises the cycle after the last step and
// holds, with out_data stable, until out_ready. Back-pressure stalls the last
// compute step and with it the input.
//
// The layer functions, the three multiplier options and stride follow the
// original design; the streaming structure is inferred from its reported
// latencies (about K*K/MULTS clocks per input pixel). The zero padding
// scheme is this design's own.
//
// Weights are written through w_we/w_addr/w_data at address
// ((ky*K + kx)*C_IN + ic)*C_OUT + oc, the flat order of a (K, K, C_IN, C_OUT)
// kernel tensor.
module conv_layer
  import dnn_pkg::*;
#(
  parameter int   K      = 3,
  parameter int   H      = 32,
  parameter int   W      = 32,
  parameter int   C_IN   = 3,
  parameter int   C_OUT  = 26,
  parameter int   STRIDE = 1,
  parameter int   PAD    = 0,
  parameter int   MULTS  = 9,
  parameter int   DW     = 8,
  parameter int   WW     = 8,
  parameter int   SHIFT  = 7,
  parameter act_e ACT    = ACT_RELU,
  parameter int   NWGT   = K * K * C_IN * C_OUT,
  parameter int   WAW    = $clog2(NWGT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // input stream
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DW-1:0]  in_data  [C_IN],
  // output stream
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [DW-1:0]  out_data [C_OUT],
  // weight load port
  input  logic                  w_we,
  input  logic        [WAW-1:0] w_addr,
  input  logic signed [WW-1:0]  w_data
);
  localparam int NSTEPS = (K * K) / MULTS;
  localparam int SW     = (NSTEPS > 1) ? $clog2(NSTEPS) : 1;

  logic signed [DW-1:0] win  [C_IN][K*K];
  logic signed [WW-1:0] wgt  [NWGT];
  logic signed [WW-1:0] mask [C_OUT][C_IN][K*K];
  logic signed [DW-1:0] res  [C_OUT];

  localparam int HP = H + 2 * PAD;   // padded frame
  localparam int WP = W + 2 * PAD;
  localparam int PRW = (HP > 1) ? $clog2(HP) : 1;
  localparam int PCW = (WP > 1) ? $clog2(WP) : 1;

  logic          push, completes, win_valid, last_step, finishing, can_push, border;
  logic [SW-1:0] step;
  logic [PRW-1:0] prow;
  logic [PCW-1:0] pcol;
  logic signed [DW-1:0] pix [C_IN];

  assign last_step = (step == SW'(NSTEPS - 1));
  assign finishing = win_valid && last_step && (!out_valid || out_ready);
  assign can_push  = !win_valid || finishing;
  assign border    = (int'(prow) < PAD) || (int'(prow) >= PAD + H) ||
                     (int'(pcol) < PAD) || (int'(pcol) >= PAD + W);
  assign in_ready  = can_push && !border;
  assign push      = can_push && (border || in_valid);

  always_comb begin
    for (int ic = 0; ic < C_IN; ic++) pix[ic] = border ? '0 : in_data[ic];
  end

  // position in the padded frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prow <= '0;
      pcol <= '0;
    end else if (push) begin
      if (pcol == PCW'(WP - 1)) begin
        pcol <= '0;
        prow <= (prow == PRW'(HP - 1)) ? '0 : prow + 1'b1;
      end else begin
        pcol <= pcol + 1'b1;
      end
    end
  end

  window_gen #(.K(K), .H(HP), .W(WP), .C(C_IN), .DW(DW), .STRIDE(STRIDE)) u_win (
    .clk, .rst_n,
    .push     (push),
    .pix      (pix),
    .completes(completes),
    .win      (win)
  );

  weight_mem #(.DEPTH(NWGT), .WW(WW)) u_wmem (
    .clk, .rst_n,
    .we   (w_we),
    .waddr(w_addr),
    .wdata(w_data),
    .rdata(wgt)
  );

  always_comb begin
    for (int oc = 0; oc < C_OUT; oc++)
      for (int ic = 0; ic < C_IN; ic++)
        for (int e = 0; e < K * K; e++)
          mask[oc][ic][e] = wgt[(e * C_IN + ic) * C_OUT + oc];
  end

  for (genvar oc = 0; oc < C_OUT; oc++) begin : g_chan
    conv_channel #(
      .K(K), .C_IN(C_IN), .MULTS(MULTS), .DW(DW), .WW(WW),
      .SHIFT(SHIFT), .ACT(ACT)
    ) u_chan (
      .clk, .rst_n,
      .en  (win_valid && !last_step),
      .step(step),
      .win (win),
      .mask(mask[oc]),
      .res (res[oc])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      step      <= '0;
      out_valid <= 1'b0;
      for (int oc = 0; oc < C_OUT; oc++) out_data[oc] <= '0;
    end else begin
      if (push)           win_valid <= completes;
      else if (finishing) win_valid <= 1'b0;

      if (finishing)                     step <= '0;
      else if (win_valid && !last_step)  step <= step + 1'b1;

      if (finishing) begin
        out_valid <= 1'b1;
        out_data  <= res;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

  // stream rule: an offered beat stays offered and unchanged until taken
  for (genvar oc = 0; oc < C_OUT; oc++) begin : g_hold
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_data[oc]));
  end
endmodule
