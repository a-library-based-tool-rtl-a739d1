// tb_conv_kernel: checks the 3x3 kernel operator with 1, 3 and 9 multipliers.
// Summed over its steps each variant must give the dot product of window
// and mask; the 9-multiplier variant does so in one step, and in the
// 3-multiplier variant step s must cover mask row s (one multiplier per
// mask column). A 5x5 kernel with 5 multipliers checks a larger mask.
module tb_conv_kernel;
  localparam int K = 3, DW = 8, WW = 8;

  logic signed [DW-1:0] win  [K*K];
  logic signed [WW-1:0] mask [K*K];
  logic [3:0]           step1;
  logic [1:0]           step3;
  logic [0:0]           step9;
  logic signed [DW+WW:0]   psum1;
  logic signed [DW+WW+2:0] psum3;
  logic signed [DW+WW+4:0] psum9;
  logic signed [DW-1:0] win5  [25];
  logic signed [WW-1:0] mask5 [25];
  logic [2:0]           step5;
  logic signed [DW+WW+3:0] psum5;
  int checks = 0, failures = 0;

  conv_kernel #(.K(5), .MULTS(5), .DW(DW), .WW(WW)) u_k5 (.win(win5), .mask(mask5), .step(step5), .psum(psum5));

  conv_kernel #(.K(K), .MULTS(1), .DW(DW), .WW(WW)) u_k1 (.win, .mask, .step(step1), .psum(psum1));
  conv_kernel #(.K(K), .MULTS(3), .DW(DW), .WW(WW)) u_k3 (.win, .mask, .step(step3), .psum(psum3));
  conv_kernel #(.K(K), .MULTS(9), .DW(DW), .WW(WW)) u_k9 (.win, .mask, .step(step9), .psum(psum9));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 400; t++) begin
      int dot, s1, s3, row;
      for (int e = 0; e < K * K; e++) begin
        win[e]  = (t < 5) ? ((t % 2) ? 8'sd127 : -8'sd128) : DW'($urandom);
        mask[e] = (t < 5) ? ((t < 3) ? -8'sd128 : 8'sd127) : WW'($urandom);
      end
      dot = 0;
      for (int e = 0; e < K * K; e++) dot += int'(win[e]) * int'(mask[e]);
      step9 = 0; #1;
      check("9 mults", int'(psum9), dot);
      s1 = 0;
      for (int s = 0; s < K * K; s++) begin
        step1 = 4'(s); #1;
        s1 += int'(psum1);
      end
      check("1 mult", s1, dot);
      s3 = 0;
      for (int s = 0; s < K; s++) begin
        step3 = 2'(s); #1;
        row = 0;
        for (int kx = 0; kx < K; kx++) row += int'(win[s*K+kx]) * int'(mask[s*K+kx]);
        check("3 mults row", int'(psum3), row);
        s3 += int'(psum3);
      end
      check("3 mults", s3, dot);
      for (int e = 0; e < 25; e++) begin
        win5[e] = DW'($urandom); mask5[e] = WW'($urandom);
      end
      dot = 0;
      for (int e = 0; e < 25; e++) dot += int'(win5[e]) * int'(mask5[e]);
      s3 = 0;
      for (int s = 0; s < 5; s++) begin
        step5 = 3'(s); #1;
        s3 += int'(psum5);
      end
      check("5x5 kernel, 5 mults", s3, dot);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
