// tb_conv_layer: runs the conv_layer harness for the three multiplier
// counts a 3x3 mask allows (1, 3, 9), for a stride-2 layer and for a
// stride-2 layer with one pixel of zero padding, and checks
// that the input was stalled at least once in each of the first three.
module tb_conv_layer;
  logic clk = 0, rst_n = 0;
  logic done [5];
  int   chk [5], fail [5], stl [5];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  conv_layer_check #(.MULTS(1))              u_m1 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .stalls(stl[0]));
  conv_layer_check #(.MULTS(3))              u_m3 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .stalls(stl[1]));
  conv_layer_check #(.MULTS(9))              u_m9 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .stalls(stl[2]));
  conv_layer_check #(.MULTS(9), .STRIDE(2))  u_s2 (.clk, .rst_n, .done(done[3]), .checks(chk[3]), .failures(fail[3]), .stalls(stl[3]));
  conv_layer_check #(.MULTS(3), .STRIDE(2), .PAD(1)) u_p1 (.clk, .rst_n, .done(done[4]), .checks(chk[4]), .failures(fail[4]), .stalls(stl[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int i = 0; i < 5; i++) begin
      checks += chk[i] + 1;
      failures += fail[i];
      if (i < 3 && stl[i] == 0) begin failures++; $display("FAIL harness %0d never stalled", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
