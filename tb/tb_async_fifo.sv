// tb_async_fifo: writes a numbered sequence of words from a write clock into
// a read clock three times as fast (the 100 MHz camera / 300 MHz network
// pairing), then with the clocks the other way round, with random valid and
// ready on both sides. Checks that every word arrives once and in order,
// that the FIFO became full and empty at least once, and that a word written
// into an empty FIFO is readable within four read clocks.
module tb_async_fifo;
  localparam int WIDTH = 16, AW = 3, NWORDS = 400;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic w_valid = 0, w_ready, r_valid, r_ready = 0;
  logic [WIDTH-1:0] w_data = '0, r_data;
  int checks = 0, failures = 0, fulls = 0, max_lat = 0;
  int whalf = 15, rhalf = 5;
  int wr_count = 0, rd_count = 0;
  bit phase_done = 0;
  int rcyc = 0, empty_write_at = -1;

  async_fifo #(.WIDTH(WIDTH), .AW(AW)) dut (
    .wclk, .wrst_n, .w_valid, .w_ready, .w_data,
    .rclk, .rrst_n, .r_valid, .r_ready, .r_data);

  always #(whalf) wclk = ~wclk;
  always #(rhalf) rclk = ~rclk;
  always @(posedge rclk) rcyc++;
  always @(posedge wclk) if (w_valid && !w_ready) fulls++;

  task automatic writer(int slow);
    for (int n = 0; n < NWORDS; n++) begin
      bit offered;
      offered = 0;
      forever begin
        @(negedge wclk);
        // an offered word stays offered until taken
        if (!offered) w_valid = ($urandom_range(0, slow) == 0);
        w_data  = WIDTH'(wr_count);
        #1;
        offered = w_valid;
        if (w_valid && w_ready) break;
      end
      wr_count++;
    end
    @(negedge wclk);
    w_valid = 0;
  endtask

  task automatic reader(int slow);
    for (int n = 0; n < NWORDS; n++) begin
      forever begin
        @(negedge rclk);
        r_ready = ($urandom_range(0, slow) == 0);
        #1;
        if (r_valid && r_ready) break;
      end
      checks++;
      if (r_data !== WIDTH'(rd_count)) begin
        failures++;
        $display("FAIL word %0d read as %0d", rd_count, r_data);
      end
      rd_count++;
    end
    @(negedge rclk);
    r_ready = 0;
  endtask

  initial begin
    #100;
    wrst_n = 1; rrst_n = 1;
    // fast reader: the FIFO runs mostly empty
    fork writer(1); reader(0); join
    // latency of a single word into an empty FIFO
    repeat (10) @(posedge wclk);
    @(negedge wclk);
    w_valid = 1; w_data = WIDTH'(wr_count);
    @(posedge wclk);
    empty_write_at = rcyc;
    #1 w_valid = 0;
    wr_count++;
    while (!r_valid) @(posedge rclk);
    checks++;
    if (rcyc - empty_write_at > 4) begin
      failures++;
      $display("FAIL word became readable after %0d read clocks", rcyc - empty_write_at);
    end
    @(negedge rclk); r_ready = 1;
    checks += 2;
    if (r_data !== WIDTH'(rd_count)) begin
      failures++;
      $display("FAIL single word read as %0d", r_data);
    end
    @(negedge rclk); r_ready = 0;
    if (r_valid) begin
      failures++;
      $display("FAIL FIFO not empty after its only word was read");
    end
    rd_count++;
    // slow reader on the slow clock: the FIFO fills up
    whalf = 5; rhalf = 15;
    fork writer(0); reader(3); join
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL the FIFO never became full"); end
    checks++;
    if (r_valid) begin failures++; $display("FAIL FIFO not empty at the end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
