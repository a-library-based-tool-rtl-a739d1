// tb_maxpool_layer: streams random 3-channel 6x7 frames (odd width, so the
// last column is dropped) through 2x2 max pooling with random input gaps
// and output back-pressure, and compares every output with the maximum of
// its 2x2 block. Frame 0 runs without gaps and checks one pixel per cycle.
module tb_maxpool_layer;
  localparam int H = 6, W = 7, C = 3, DW = 8, P = 2;
  localparam int HO = H / P, WO = W / P;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DW-1:0] in_data [C];
  logic signed [DW-1:0] out_data [C];
  logic signed [DW-1:0] img [H][W][C];
  int checks = 0, failures = 0, cyc = 0, t_first, t_last, stalls = 0;
  bit rand_mode;

  maxpool_layer #(.POOL(P), .H(H), .W(W), .C(C), .DW(DW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (in_valid && !in_ready) stalls++;
  end

  task automatic drive();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        forever begin
          @(negedge clk);
          in_valid = !(rand_mode && $urandom_range(0, 2) == 0);
          in_data  = img[r][c];
          #1;
          if (in_valid && in_ready) break;
        end
        if (r == 0 && c == 0) t_first = cyc;
      end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic monitor();
    for (int r = 0; r < HO; r++)
      for (int c = 0; c < WO; c++) begin
        forever begin
          @(negedge clk);
          out_ready = rand_mode ? ($urandom_range(0, 2) == 0) : 1'b1;
          #1;
          if (out_valid && out_ready) break;
        end
        t_last = cyc;
        for (int ch = 0; ch < C; ch++) begin
          int m = -1000;
          for (int dy = 0; dy < P; dy++)
            for (int dx = 0; dx < P; dx++)
              if (int'(img[r*P+dy][c*P+dx][ch]) > m) m = int'(img[r*P+dy][c*P+dx][ch]);
          checks++;
          if (int'(out_data[ch]) != m) begin
            failures++;
            $display("FAIL out(%0d,%0d,%0d)=%0d exp %0d", r, c, ch, out_data[ch], m);
          end
        end
      end
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++) begin
      rand_mode = (f > 0);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          for (int ch = 0; ch < C; ch++) img[r][c][ch] = DW'($urandom);
      fork drive(); monitor(); join
      if (f == 0) begin
        // last window ends at pixel (H-1, 2*WO-1); its result is taken one edge later
        checks++;
        if (t_last - t_first != (H - 1) * W + 2 * WO - 1 + 1) begin
          failures++;
          $display("FAIL frame cycles %0d", t_last - t_first);
        end
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL back-pressure never stalled the input"); end
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
