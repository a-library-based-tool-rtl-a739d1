// tb_dense_layer: runs the dense_layer harness with one multiplier per
// output (linear), with a single shared multiplier (linear) and with two
// multipliers and a ReLU output.
module tb_dense_layer;
  import dnn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic done [3];
  int   chk [3], fail [3], stl [3];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  dense_layer_check #(.MULTS(4), .ACT(ACT_LINEAR)) u_m4 (.clk, .rst_n, .done(done[0]), .checks(chk[0]), .failures(fail[0]), .stalls(stl[0]));
  dense_layer_check #(.MULTS(1), .ACT(ACT_LINEAR)) u_m1 (.clk, .rst_n, .done(done[1]), .checks(chk[1]), .failures(fail[1]), .stalls(stl[1]));
  dense_layer_check #(.MULTS(2), .ACT(ACT_RELU))   u_m2 (.clk, .rst_n, .done(done[2]), .checks(chk[2]), .failures(fail[2]), .stalls(stl[2]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    for (int i = 0; i < 3; i++) begin
      checks += chk[i];
      failures += fail[i];
    end
    checks++;
    if (stl[1] == 0) begin failures++; $display("FAIL single multiplier never stalled"); end
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
