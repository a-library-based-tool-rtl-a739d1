// conv_layer_check: test harness for one conv_layer configuration.
//
// Loads random weights through the weight port, then streams frames of
// random pixels and compares every output pixel with a direct convolution
// computed here (ReLU, arithmetic shift, saturation). Frame 0 runs with the
// input always offered and the output always taken and checks the cycle
// count: a pixel that completes a window costs K*K/MULTS cycles, any other
// pixel one cycle, plus one cycle for the output register. Frame 1 adds
// random input gaps and output back-pressure. With PAD > 0 the reference
// treats pixels outside the frame as zero and the cycle check is skipped. Reports its counts on ports.
module conv_layer_check #(
  parameter int MULTS  = 9,
  parameter int STRIDE = 1,
  parameter int PAD    = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  import dnn_pkg::*;
  localparam int K = 3, H = 7, W = 6, C_IN = 3, C_OUT = 4, DW = 8, WW = 8, SHIFT = 6;
  localparam int HO = (H + 2 * PAD - K) / STRIDE + 1, WO = (W + 2 * PAD - K) / STRIDE + 1;
  localparam int NW = K * K * C_IN * C_OUT;
  localparam int NSTEPS = K * K / MULTS;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DW-1:0] in_data  [C_IN];
  logic signed [DW-1:0] out_data [C_OUT];
  logic w_we = 0;
  logic [$clog2(NW)-1:0] w_addr = '0;
  logic signed [WW-1:0] w_data = '0;

  logic signed [WW-1:0] wt  [K][K][C_IN][C_OUT];
  logic signed [DW-1:0] img [H][W][C_IN];
  int                   ref_out [HO][WO][C_OUT];
  bit                   rand_mode;

  conv_layer #(.K(K), .H(H), .W(W), .C_IN(C_IN), .C_OUT(C_OUT), .STRIDE(STRIDE), .PAD(PAD),
               .MULTS(MULTS), .DW(DW), .WW(WW), .SHIFT(SHIFT), .ACT(ACT_RELU)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .w_we, .w_addr, .w_data);

  always @(posedge clk) if (in_valid && !in_ready) stalls++;

  task automatic make_frame();
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        for (int i = 0; i < C_IN; i++) img[r][c][i] = DW'($urandom_range(0, 127));
    for (int r = 0; r < HO; r++)
      for (int c = 0; c < WO; c++)
        for (int o = 0; o < C_OUT; o++) begin
          int s = 0;
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++)
              for (int i = 0; i < C_IN; i++) begin
                int y, x;
                y = r * STRIDE + ky - PAD;
                x = c * STRIDE + kx - PAD;
                if (y >= 0 && y < H && x >= 0 && x < W)
                  s += int'(img[y][x][i]) * int'(wt[ky][kx][i][o]);
              end
          s = s >>> SHIFT;
          if (s < 0) s = 0;
          if (s > 127) s = 127;
          ref_out[r][c][o] = s;
        end
  endtask

  // Inputs change at the falling edge; a handshake is sampled just after it,
  // so it is known before the rising edge on which it takes effect.
  int cyc = 0, first_push, last_take;
  always @(posedge clk) cyc++;

  task automatic drive();
    bit first = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        forever begin
          @(negedge clk);
          in_valid = !(rand_mode && $urandom_range(0, 2) == 0);
          in_data  = img[r][c];
          #1;
          if (in_valid && in_ready) break;
        end
        if (first) first_push = cyc;
        first = 0;
      end
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic monitor();
    for (int r = 0; r < HO; r++)
      for (int c = 0; c < WO; c++) begin
        forever begin
          @(negedge clk);
          out_ready = rand_mode ? ($urandom_range(0, 1) == 1) : 1'b1;
          #1;
          if (out_valid && out_ready) break;
        end
        last_take = cyc;
        for (int o = 0; o < C_OUT; o++) begin
          checks++;
          if (int'(out_data[o]) != ref_out[r][c][o]) begin
            failures++;
            $display("FAIL MULTS=%0d out(%0d,%0d,%0d)=%0d exp %0d", MULTS, r, c, o,
                     out_data[o], ref_out[r][c][o]);
          end
        end
      end
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    int t_edge, expect_cycles, got;
    done = 0; checks = 0; failures = 0; stalls = 0;
    wait (rst_n);
    @(posedge clk);
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        for (int i = 0; i < C_IN; i++)
          for (int o = 0; o < C_OUT; o++) begin
            wt[ky][kx][i][o] = WW'($urandom_range(0, 80)) - 8'sd40;
            @(negedge clk);
            w_we   = 1;
            w_addr = $bits(w_addr)'(((ky * K + kx) * C_IN + i) * C_OUT + o);
            w_data = wt[ky][kx][i][o];
          end
    @(negedge clk);
    w_we = 0;
    for (int f = 0; f < 3; f++) begin
      rand_mode = (f > 0);
      make_frame();
      fork
        drive();
        monitor();
      join
      got = last_take - first_push;
      if (f == 0 && PAD == 0) begin
        // edges from taking the first pixel to taking the last result: a
        // pixel that completes a window holds the input for NSTEPS edges,
        // any other for one; the result is taken NSTEPS + 1 edges after
        // the last window's pixel
        t_edge = 0; expect_cycles = 0;
        for (int r = 0; r < H; r++)
          for (int c = 0; c < W; c++)
            if (r >= K - 1 && c >= K - 1 && (r - K + 1) % STRIDE == 0 &&
                (c - K + 1) % STRIDE == 0) begin
              expect_cycles = t_edge + NSTEPS + 1;
              t_edge += NSTEPS;
            end else begin
              t_edge += 1;
            end
        checks++;
        if (got != expect_cycles) begin
          failures++;
          $display("FAIL MULTS=%0d frame cycles %0d exp %0d", MULTS, got, expect_cycles);
        end
      end
    end
    done = 1;
  end
endmodule
