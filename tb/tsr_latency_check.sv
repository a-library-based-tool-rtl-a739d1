// tsr_latency_check: one single-clock tsr_dnn_top (no clock domain
// crossing) with CONV_MULTS multipliers per kernel. After loading random
// weights it streams one 32x32 image at one pixel per clock and measures
// the clocks from the first pixel to the class scores. Reports the cycle
// count and a checksum of the scores on ports.
module tsr_latency_check #(
  parameter int CONV_MULTS = 9
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   cycles,
  output int   score_sum
);
  import dnn_pkg::*;
  localparam int NCLS = 43;

  logic cam_valid = 0, cam_ready, score_valid, score_ready = 0;
  logic [23:0] cam_pixel = '0;
  logic signed [15:0] score [NCLS];
  logic w_we = 0;
  logic [2:0] w_layer = '0;
  logic [15:0] w_addr = '0;
  logic signed [7:0] w_data = '0;
  logic bn_in_ready, bn_out_valid;
  logic signed [7:0] bn_zero [3] = '{default: '0};
  logic signed [7:0] bn_out_data [3];
  int cyc = 0, t0;

  tsr_dnn_top #(.CONV_MULTS(CONV_MULTS), .USE_CDC(1'b0)) dut (
    .clk, .rst_n, .cam_clk(clk), .cam_rst_n(rst_n), .cam_order(ORD_RGB),
    .cam_valid, .cam_ready, .cam_pixel, .score_valid, .score_ready, .score,
    .w_we, .w_layer, .w_addr, .w_data,
    .bn_in_valid(1'b0), .bn_in_ready, .bn_in_data(bn_zero), .bn_out_valid,
    .bn_out_ready(1'b1), .bn_out_data, .bn_c_we(1'b0), .bn_c_addr(3'd0), .bn_c_data(8'sd0));

  always @(posedge clk) cyc++;

  initial begin
    // the same seed-independent weights and image in every instance
    int nw [5];
    nw = '{702, 4680, 3600, 2160, 2064};
    done = 0; cycles = 0; score_sum = 0;
    wait (rst_n);
    for (int l = 0; l < 5; l++)
      for (int i = 0; i < nw[l]; i++) begin
        @(negedge clk);
        w_we = 1; w_layer = 3'(l); w_addr = 16'(i);
        w_data = 8'(((i * 37 + l * 11) % 49) - 24);
      end
    @(negedge clk);
    w_we = 0;
    for (int p = 0; p < 1024; p++) begin
      forever begin
        @(negedge clk);
        cam_valid = 1;
        cam_pixel = 24'((p * 2654435761) >> 5);
        #1;
        if (cam_ready) break;
      end
      if (p == 0) t0 = cyc;
    end
    @(negedge clk);
    cam_valid = 0;
    score_ready = 1;
    while (!score_valid) @(negedge clk);
    #1;
    cycles = cyc - t0;
    for (int o = 0; o < NCLS; o++) score_sum += int'(score[o]) * (o + 1);
    done = 1;
  end
endmodule
