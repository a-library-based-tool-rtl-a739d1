// tb_batchnorm_layer: loads per-channel scale A and offset B, sends random
// 3-channel pixels with gaps and back-pressure, and compares each output
// with floor((x*A + B*2^SHIFT) / 2^SHIFT) saturated to 8 bits.
module tb_batchnorm_layer;
  localparam int C = 3, DW = 8, WW = 8, SHIFT = 6, NPIX = 300;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DW-1:0] in_data [C];
  logic signed [DW-1:0] out_data [C];
  logic c_we = 0;
  logic [2:0] c_addr = '0;
  logic signed [WW-1:0] c_data = '0;
  logic signed [WW-1:0] a [C], b [C];
  logic signed [DW-1:0] pix [NPIX][C];
  int checks = 0, failures = 0, sat = 0;

  batchnorm_layer #(.C(C), .DW(DW), .WW(WW), .SHIFT(SHIFT)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .c_we, .c_addr, .c_data);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    a = '{8'sd90, -8'sd50, 8'sd64};     // 1.41, -0.78, 1.0
    b = '{-8'sd20, 8'sd7, 8'sd0};
    for (int ch = 0; ch < C; ch++) begin
      @(negedge clk); c_we = 1; c_addr = 3'(2 * ch);     c_data = a[ch];
      @(negedge clk); c_we = 1; c_addr = 3'(2 * ch + 1); c_data = b[ch];
    end
    @(negedge clk); c_we = 0;
    for (int p = 0; p < NPIX; p++)
      for (int ch = 0; ch < C; ch++) pix[p][ch] = DW'($urandom);
    fork
      begin
        for (int p = 0; p < NPIX; p++)
          forever begin
            @(negedge clk);
            in_valid = ($urandom_range(0, 3) != 0);
            in_data  = pix[p];
            #1;
            if (in_valid && in_ready) break;
          end
        @(negedge clk);
        in_valid = 0;
      end
      for (int p = 0; p < NPIX; p++) begin
        forever begin
          @(negedge clk);
          out_ready = ($urandom_range(0, 2) != 0);
          #1;
          if (out_valid && out_ready) break;
        end
        for (int ch = 0; ch < C; ch++) begin
          int y;
          y = (int'(pix[p][ch]) * int'(a[ch]) + int'(b[ch]) * (1 << SHIFT)) >>> SHIFT;
          if (y > 127) begin y = 127; sat++; end
          if (y < -128) begin y = -128; sat++; end
          checks++;
          if (int'(out_data[ch]) != y) begin
            failures++;
            $display("FAIL pix %0d ch %0d got %0d exp %0d", p, ch, out_data[ch], y);
          end
        end
      end
    join
    checks++;
    if (sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
