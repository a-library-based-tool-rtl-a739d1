// tb_conv_channel: checks one output channel (4 input channels, 3x3 masks)
// with 3 multipliers per kernel: driven through its three steps it must give
// the ReLU'd, rescaled, saturated sum over all input channels and mask
// positions, computed here with plain integer arithmetic.
module tb_conv_channel;
  import dnn_pkg::*;
  localparam int K = 3, C_IN = 4, DW = 8, WW = 8, SHIFT = 6;

  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] step = '0;
  logic signed [DW-1:0] win  [C_IN][K*K];
  logic signed [WW-1:0] mask [C_IN][K*K];
  logic signed [DW-1:0] res;
  int checks = 0, failures = 0, clipped = 0;

  conv_channel #(.K(K), .C_IN(C_IN), .MULTS(3), .DW(DW), .WW(WW), .SHIFT(SHIFT),
                 .ACT(ACT_RELU)) dut (.clk, .rst_n, .en, .step, .win, .mask, .res);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int sum, q;
      @(negedge clk);
      for (int ic = 0; ic < C_IN; ic++)
        for (int e = 0; e < K * K; e++) begin
          win[ic][e]  = DW'($urandom_range(0, 127));
          mask[ic][e] = WW'($urandom_range(0, 60)) - 8'sd30;
        end
      sum = 0;
      for (int ic = 0; ic < C_IN; ic++)
        for (int e = 0; e < K * K; e++) sum += int'(win[ic][e]) * int'(mask[ic][e]);
      q = sum >>> SHIFT;
      if (q < 0) q = 0;
      if (q > 127) begin q = 127; clipped++; end
      for (int s = 0; s < 3; s++) begin
        @(negedge clk);
        step = 2'(s);
        en   = (s < 2);
        if (s == 2) begin
          #1;
          checks++;
          if (int'(res) != q) begin
            failures++;
            $display("FAIL t=%0d res=%0d exp=%0d", t, res, q);
          end
        end
      end
    end
    if (clipped == 0) begin failures++; $display("FAIL no saturation exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
