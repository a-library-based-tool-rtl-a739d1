// tb_tsr_dnn_top: end-to-end test of the traffic sign recognition network
// at its default configuration (32x32 RGB input, 9 multipliers per kernel,
// one multiplier per dense output, camera on a clock three times slower than
// the network clock through the clock domain crossing).
//
// Random weights are loaded through the weight port and random images are
// streamed in from the camera side; the 43 class scores of each image are
// compared with a plain software model of the same network (convolutions,
// ReLU, rescale and saturation, 2x2 max pooling, flatten, dense). Frame 0
// runs undisturbed and its latency is checked against the 51.267 us the
// original design reports for its 9-multiplier version with a 100 MHz camera and a
// 300 MHz network. Frames 1 to 3 use other component orders, camera gaps,
// and a long hold on the score output so that back-pressure travels up the
// whole pipeline and fills the crossing FIFO. Each mechanism is counted and
// a failure is counted for any that never happened. The batch normalisation
// stage beside the network is checked with an identity setting.
module tb_tsr_dnn_top;
  import dnn_pkg::*;
  localparam int IMG = 32, DW = 8, WW = 8, OW = 16, SH = 7, NCLS = 43;
  localparam int NFRAMES = 4;

  logic clk = 0, rst_n = 0, cam_clk = 0, cam_rst_n = 0;
  rgb_order_e cam_order = ORD_RGB;
  logic cam_valid = 0, cam_ready;
  logic [23:0] cam_pixel = '0;
  logic score_valid, score_ready = 0;
  logic signed [OW-1:0] score [NCLS];
  logic w_we = 0;
  logic [2:0] w_layer = '0;
  logic [15:0] w_addr = '0;
  logic signed [WW-1:0] w_data = '0;
  logic bn_in_valid = 0, bn_in_ready, bn_out_valid, bn_out_ready = 1;
  logic signed [DW-1:0] bn_in_data [3];
  logic signed [DW-1:0] bn_out_data [3];
  logic bn_c_we = 0;
  logic [2:0] bn_c_addr = '0;
  logic signed [WW-1:0] bn_c_data = '0;

  tsr_dnn_top dut (.*);

  always #5  clk = ~clk;       // network clock, 3x the camera clock
  always #15 cam_clk = ~cam_clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ------------------------------------------------------------ model
  int w1 [], w2 [], w3 [], w4 [], wd [];   // flat, in weight-port order
  int img [NFRAMES][IMG*IMG*3];            // R, G, B activations
  int exp_score [NFRAMES][NCLS];
  int n_relu = 0, n_sat = 0;

  function automatic int rq(int acc, bit relu, int ow);
    int q = acc >>> SH;
    if (relu && q < 0) begin q = 0; n_relu++; end
    if (q > (1 << (ow - 1)) - 1) begin q = (1 << (ow - 1)) - 1; n_sat++; end
    if (q < -(1 << (ow - 1))) begin q = -(1 << (ow - 1)); n_sat++; end
    return q;
  endfunction

  // input h x h x ci (flat, channels last) -> (h-2) x (h-2) x co
  function automatic void conv(input int x [], int h, int ci, int co, int wt [], output int y []);
    int ho = h - 2;
    y = new[ho * ho * co];
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < ho; c++)
        for (int o = 0; o < co; o++) begin
          int s;
          s = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++)
              for (int i = 0; i < ci; i++)
                s += x[((r + ky) * h + c + kx) * ci + i] * wt[((ky * 3 + kx) * ci + i) * co + o];
          y[(r * ho + c) * co + o] = rq(s, 1, DW);
        end
  endfunction

  function automatic void pool(input int x [], int h, int ch, output int y []);
    int ho = h / 2;
    y = new[ho * ho * ch];
    for (int r = 0; r < ho; r++)
      for (int c = 0; c < ho; c++)
        for (int k = 0; k < ch; k++) begin
          int m;
          m = x[((2 * r) * h + 2 * c) * ch + k];
          for (int d = 1; d < 4; d++)
            if (x[((2 * r + d / 2) * h + 2 * c + d % 2) * ch + k] > m)
              m = x[((2 * r + d / 2) * h + 2 * c + d % 2) * ch + k];
          y[(r * ho + c) * ch + k] = m;
        end
  endfunction

  task automatic model(int f);
    int a0 [], a1 [], a2 [], p2 [], a3 [], p3 [], a4 [], p4 [];
    a0 = new[IMG * IMG * 3];
    foreach (a0[i]) a0[i] = img[f][i];
    conv(a0, 32, 3, 26, w1, a1);
    conv(a1, 30, 26, 20, w2, a2);
    pool(a2, 28, 20, p2);
    conv(p2, 14, 20, 20, w3, a3);
    pool(a3, 12, 20, p3);
    conv(p3, 6, 20, 12, w4, a4);
    pool(a4, 4, 12, p4);
    for (int o = 0; o < NCLS; o++) begin
      int s;
      s = 0;
      for (int i = 0; i < 48; i++) s += p4[i] * wd[i * NCLS + o];
      exp_score[f][o] = rq(s, 0, OW);
    end
  endtask

  // ------------------------------------------------------------ stimulus
  task automatic load(int layer, int wt []);
    foreach (wt[i]) begin
      @(negedge clk);
      w_we = 1; w_layer = 3'(layer); w_addr = 16'(i); w_data = WW'(wt[i]);
    end
    @(negedge clk);
    w_we = 0;
  endtask

  function automatic void rand_w(ref int wt [], input int n);
    wt = new[n];
    foreach (wt[i]) wt[i] = int'($urandom_range(0, 48)) - 24;
  endfunction

  int cam_gaps = 0, cam_stalls = 0, conv_stalls = 0, score_holds = 0, overlap = 0;
  int t_first [NFRAMES], t_score [NFRAMES];
  int frames_in = 0, frames_out = 0;

  always @(posedge cam_clk) if (cam_valid && !cam_ready) cam_stalls++;
  always @(posedge clk) begin
    if (dut.u_conv1.in_valid && !dut.u_conv1.in_ready && dut.u_conv1.win_valid &&
        dut.u_conv1.out_valid) conv_stalls++;
    if (score_valid && !score_ready) score_holds++;
    // the first layer works on a new frame while the last still holds an old one
    if (frames_in > frames_out + 1) overlap++;
  end

  task automatic camera();
    for (int f = 0; f < NFRAMES; f++) begin
      rgb_order_e ord;
      ord = (f == 0) ? ORD_RGB : (f % 2 == 1) ? ORD_BGR : ORD_GRB;
      for (int p = 0; p < IMG * IMG; p++) begin
        logic [7:0] r, g, b;
        bit offered;
        r = 8'(img[f][p*3] * 2 + (p & 1));
        g = 8'(img[f][p*3+1] * 2);
        b = 8'(img[f][p*3+2] * 2 + 1);
        offered = 0;
        forever begin
          @(negedge cam_clk);
          cam_order = ord;
          // gaps only between pixels: an offered pixel stays until taken
          if (!offered) cam_valid = !(f > 0 && $urandom_range(0, 4) == 0);
          if (!cam_valid) cam_gaps++;
          unique case (ord)
            ORD_RGB: cam_pixel = {r, g, b};
            ORD_BGR: cam_pixel = {b, g, r};
            default: cam_pixel = {g, r, b};
          endcase
          #1;
          offered = cam_valid;
          if (cam_valid && cam_ready) break;
        end
        if (p == 0) begin
          @(posedge clk);  // first network clock after the camera edge
          t_first[f] = cyc;
          frames_in++;
        end
      end
    end
    @(negedge cam_clk);
    cam_valid = 0;
  endtask

  task automatic consumer();
    for (int f = 0; f < NFRAMES; f++) begin
      forever begin
        @(negedge clk);
        // frame 1's scores are held back for a long time
        score_ready = !(f == 1 && cam_stalls < 20 && score_holds < 30000) && !(f > 0 && $urandom_range(0, 3) == 0);
        #1;
        if (score_valid && score_ready) break;
      end
      t_score[f] = cyc;
      frames_out++;
      for (int o = 0; o < NCLS; o++) begin
        checks++;
        if (int'(score[o]) != exp_score[f][o]) begin
          failures++;
          if (failures < 20)
            $display("FAIL frame %0d score[%0d]=%0d exp %0d", f, o, score[o], exp_score[f][o]);
        end
      end
    end
    @(negedge clk);
    score_ready = 0;
  endtask

  task automatic count(string what, int n);
    checks++;
    $display("  %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    real lat_us;
    rand_w(w1, 9 * 3 * 26);
    rand_w(w2, 9 * 26 * 20);
    rand_w(w3, 9 * 20 * 20);
    rand_w(w4, 9 * 20 * 12);
    rand_w(wd, 48 * NCLS);
    for (int f = 0; f < NFRAMES; f++) begin
      for (int i = 0; i < IMG * IMG * 3; i++) img[f][i] = int'($urandom_range(0, 127));
      model(f);
    end
    repeat (3) @(posedge cam_clk);
    rst_n = 1; cam_rst_n = 1;
    load(0, w1); load(1, w2); load(2, w3); load(3, w4); load(4, wd);

    // batch normalisation beside the network: identity A = 1.0 (2^6), B = 0
    for (int ch = 0; ch < 3; ch++) begin
      @(negedge clk); bn_c_we = 1; bn_c_addr = 3'(2 * ch);     bn_c_data = 8'sd64;
      @(negedge clk); bn_c_we = 1; bn_c_addr = 3'(2 * ch + 1); bn_c_data = 8'sd0;
    end
    @(negedge clk); bn_c_we = 0;
    bn_in_data = '{8'sd100, -8'sd7, 8'sd0};
    bn_in_valid = 1;
    @(negedge clk); bn_in_valid = 0;
    for (int ch = 0; ch < 3; ch++) begin
      checks++;
      if (!bn_out_valid || bn_out_data[ch] !== bn_in_data[ch]) begin
        failures++;
        $display("FAIL batch norm identity ch %0d", ch);
      end
    end

    fork camera(); consumer(); join

    lat_us = real'(t_score[0] - t_first[0]) * 1.0e-3 * 10.0;
    $display("frame 0 latency: %0d network cycles = %0.3f us at 100 MHz camera / 300 MHz network",
             t_score[0] - t_first[0], (t_score[0] - t_first[0]) / 300.0);
    checks++;
    if ((t_score[0] - t_first[0]) / 300.0 > 51.267) begin
      failures++;
      $display("FAIL latency above the reported 51.267 us");
    end
    $display("mechanisms:");
    count("ReLU clipped a negative sum (model)", n_relu);
    count("saturation (model)", n_sat);
    count("camera gaps", cam_gaps);
    count("camera stalled by a full crossing FIFO", cam_stalls);
    count("conv1 input stalled by back-pressure", conv_stalls);
    count("score held by the consumer", score_holds);
    count("frames overlapping in the pipeline", overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
