// tb_flatten_layer: sends random 5-channel pixels with random gaps and
// back-pressure and checks that the scalars leave in (pixel, channel) order,
// and that an uninterrupted pixel takes exactly C cycles.
module tb_flatten_layer;
  localparam int C = 5, DW = 8, NPIX = 60;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DW-1:0] in_data [C];
  logic signed [DW-1:0] out_data;
  logic signed [DW-1:0] pix [NPIX][C];
  int checks = 0, failures = 0, cyc = 0, t_first, t_last;
  bit rand_mode;

  flatten_layer #(.C(C), .DW(DW)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      rand_mode = (f == 1);
      for (int p = 0; p < NPIX; p++)
        for (int ch = 0; ch < C; ch++) pix[p][ch] = DW'($urandom);
      fork
        begin
         for (int p = 0; p < NPIX; p++) begin
          forever begin
            @(negedge clk);
            in_valid = !(rand_mode && $urandom_range(0, 3) == 0);
            in_data  = pix[p];
            #1;
            if (in_valid && in_ready) break;
          end
          if (p == 0) t_first = cyc;
         end
         @(negedge clk);
         in_valid = 0;
        end
        for (int n = 0; n < NPIX * C; n++) begin
          forever begin
            @(negedge clk);
            out_ready = !(rand_mode && $urandom_range(0, 2) == 0);
            #1;
            if (out_valid && out_ready) break;
          end
          t_last = cyc;
          checks++;
          if (out_data !== pix[n / C][n % C]) begin
            failures++;
            $display("FAIL beat %0d got %0d exp %0d", n, out_data, pix[n / C][n % C]);
          end
        end
      join
      @(negedge clk);
      in_valid = 0; out_ready = 0;
      if (f == 0) begin
        checks++;
        if (t_last - t_first != NPIX * C) begin
          failures++;
          $display("FAIL %0d cycles for %0d pixels", t_last - t_first, NPIX);
        end
      end
    end
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
