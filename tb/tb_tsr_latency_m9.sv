// tb_tsr_latency_m9: latency of the whole single-clock network with 9
// multiplier(s) per 3x3 kernel. One 32x32 image must be classified within
// the latency reported for the original design at 100 MHz (10.805 us, i.e.
// 1081 clocks). The class scores must match a fixed checksum that is the
// same for 1, 3 and 9 multipliers, since the multiplier count changes only
// the schedule and not the arithmetic.
module tb_tsr_latency_m9;
  localparam int MULTS     = 9;
  localparam int LIMIT     = 1081;
  localparam int SCORE_SUM = -606;
  logic clk = 0, rst_n = 0;
  logic done;
  int   cycles, sum;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  tsr_latency_check #(.CONV_MULTS(MULTS)) u_chk (.clk, .rst_n, .done, .cycles, .score_sum(sum));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done);
    $display("multipliers per kernel %0d: %0d clocks = %0.3f us at 100 MHz (reported 10.805 us), score checksum %0d",
             MULTS, cycles, cycles / 100.0, sum);
    checks++;
    if (cycles > LIMIT) begin failures++; $display("FAIL latency above the reported figure"); end
    checks++;
    if (sum != SCORE_SUM) begin failures++; $display("FAIL score checksum %0d, expected %0d", sum, SCORE_SUM); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
