// tb_weight_mem: checks that the weight store resets to zero, that each
// write lands at its address only, and that every word reads back.
module tb_weight_mem;
  localparam int DEPTH = 37, WW = 6;

  logic clk = 0, rst_n = 0, we = 0;
  logic [5:0] waddr = '0;
  logic signed [WW-1:0] wdata = '0;
  logic signed [WW-1:0] rdata [DEPTH];
  logic signed [WW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  weight_mem #(.DEPTH(DEPTH), .WW(WW)) dut (.clk, .rst_n, .we, .waddr, .wdata, .rdata);

  always #5 clk = ~clk;

  task automatic compare_all(string what);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (rdata[i] !== model[i]) begin
        failures++;
        $display("FAIL %s word %0d got=%0d exp=%0d", what, i, rdata[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    compare_all("reset");
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      waddr = 6'($urandom_range(0, DEPTH + 5));  // some out of range
      wdata = WW'($urandom);
      @(posedge clk); #1;
      if (we && waddr < DEPTH) model[waddr] = wdata;
      if (n % 10 == 0) compare_all("write");
    end
    we = 0;
    compare_all("final");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
