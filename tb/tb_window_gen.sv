// tb_window_gen: streams random 2-channel frames through a 3x3 window
// generator with stride 1 and one with stride 2, with random gaps between
// pixels, and after each push that completes a window compares the window
// registers with the same 3x3 block cut out of a copy of the frame. Also
// checks how many windows each frame yields.
module tb_window_gen;
  localparam int K = 3, H = 7, W = 6, C = 2, DW = 8;

  logic clk = 0, rst_n = 0, push = 0;
  logic signed [DW-1:0] pix [C];
  logic signed [DW-1:0] win1 [C][K*K];
  logic signed [DW-1:0] win2 [C][K*K];
  logic comp1, comp2;
  logic signed [DW-1:0] img [H][W][C];
  int checks = 0, failures = 0;

  window_gen #(.K(K), .H(H), .W(W), .C(C), .DW(DW), .STRIDE(1)) u_s1 (
    .clk, .rst_n, .push, .pix, .completes(comp1), .win(win1));
  window_gen #(.K(K), .H(H), .W(W), .C(C), .DW(DW), .STRIDE(2)) u_s2 (
    .clk, .rst_n, .push, .pix, .completes(comp2), .win(win2));

  always #5 clk = ~clk;

  task automatic cmp(input logic signed [DW-1:0] w [C][K*K], int r, int c, string tag);
    for (int ch = 0; ch < C; ch++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++) begin
          checks++;
          if (w[ch][ky*K+kx] !== img[r-K+1+ky][c-K+1+kx][ch]) begin
            failures++;
            $display("FAIL %s at (%0d,%0d) ch%0d k(%0d,%0d)", tag, r, c, ch, ky, kx);
          end
        end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      int n1, n2;
      n1 = 0; n2 = 0;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          bit c1, c2;
          while ($urandom_range(0, 3) == 0) begin
            @(negedge clk); push = 0;
          end
          @(negedge clk);
          for (int ch = 0; ch < C; ch++) begin
            pix[ch] = DW'($urandom);
            img[r][c][ch] = pix[ch];
          end
          push = 1;
          #1;
          c1 = comp1; c2 = comp2;
          checks += 2;
          if (c1 !== (r >= K - 1 && c >= K - 1)) begin
            failures++; $display("FAIL completes s1 at (%0d,%0d)", r, c);
          end
          if (c2 !== (r >= K - 1 && c >= K - 1 && (r - K + 1) % 2 == 0 && (c - K + 1) % 2 == 0)) begin
            failures++; $display("FAIL completes s2 at (%0d,%0d)", r, c);
          end
          @(negedge clk);
          push = 0;
          if (c1) begin cmp(win1, r, c, "s1"); n1++; end
          if (c2) begin cmp(win2, r, c, "s2"); n2++; end
        end
      checks += 2;
      if (n1 != (H - K + 1) * (W - K + 1)) begin failures++; $display("FAIL n1=%0d", n1); end
      if (n2 != ((H - K) / 2 + 1) * ((W - K) / 2 + 1)) begin failures++; $display("FAIL n2=%0d", n2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
