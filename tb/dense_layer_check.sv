// dense_layer_check: test harness for one dense_layer configuration.
//
// Loads random weights, then streams vectors of random inputs and compares
// the output vector with a matrix-vector product computed here (rescaled,
// saturated, with the given activation). Vector 0 runs with no gaps and
// checks the cycle count: each input holds the input for N_OUT/MULTS
// cycles and the result is taken one cycle after the last of them. Later
// vectors add random gaps and back-pressure. Reports its counts on ports.
module dense_layer_check
  import dnn_pkg::*;
#(
  parameter int   MULTS = 4,
  parameter act_e ACT   = ACT_LINEAR
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  localparam int N_IN = 7, N_OUT = 4, DW = 8, WW = 8, OW = 10, SHIFT = 4;
  localparam int NW = N_IN * N_OUT;

  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic signed [DW-1:0] in_data;
  logic signed [OW-1:0] out_data [N_OUT];
  logic w_we = 0;
  logic [$clog2(NW)-1:0] w_addr = '0;
  logic signed [WW-1:0] w_data = '0;
  logic signed [WW-1:0] wt [N_IN][N_OUT];
  logic signed [DW-1:0] x  [N_IN];
  int cyc = 0, t_first, t_last;
  bit rand_mode;

  dense_layer #(.N_IN(N_IN), .N_OUT(N_OUT), .MULTS(MULTS), .DW(DW), .WW(WW), .OW(OW),
                .SHIFT(SHIFT), .ACT(ACT)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .w_we, .w_addr, .w_data);

  always @(posedge clk) begin
    cyc++;
    if (in_valid && !in_ready) stalls++;
  end

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0;
    wait (rst_n);
    for (int i = 0; i < N_IN; i++)
      for (int o = 0; o < N_OUT; o++) begin
        wt[i][o] = WW'($urandom);
        @(negedge clk);
        w_we = 1; w_addr = $bits(w_addr)'(i * N_OUT + o); w_data = wt[i][o];
      end
    @(negedge clk);
    w_we = 0;
    for (int v = 0; v < 6; v++) begin
      rand_mode = (v > 0);
      for (int i = 0; i < N_IN; i++) x[i] = DW'($urandom);
      fork
        begin
          for (int i = 0; i < N_IN; i++) begin
            forever begin
              @(negedge clk);
              in_valid = !(rand_mode && $urandom_range(0, 2) == 0);
              in_data  = x[i];
              #1;
              if (in_valid && in_ready) break;
            end
            if (i == 0) t_first = cyc;
          end
          @(negedge clk);
          in_valid = 0;
        end
        begin
          forever begin
            @(negedge clk);
            out_ready = !(rand_mode && $urandom_range(0, 1) == 0);
            #1;
            if (out_valid && out_ready) break;
          end
          t_last = cyc;
          for (int o = 0; o < N_OUT; o++) begin
            int s;
            s = 0;
            for (int i = 0; i < N_IN; i++) s += int'(x[i]) * int'(wt[i][o]);
            s = s >>> SHIFT;
            if (ACT == ACT_RELU && s < 0) s = 0;
            if (s > (1 << (OW - 1)) - 1) s = (1 << (OW - 1)) - 1;
            if (s < -(1 << (OW - 1))) s = -(1 << (OW - 1));
            checks++;
            if (int'(out_data[o]) != s) begin
              failures++;
              $display("FAIL MULTS=%0d v%0d out[%0d]=%0d exp %0d", MULTS, v, o, out_data[o], s);
            end
          end
          @(negedge clk);
          out_ready = 0;
        end
      join
      if (v == 0) begin
        checks++;
        if (t_last - t_first != N_IN * (N_OUT / MULTS) + 1) begin
          failures++;
          $display("FAIL MULTS=%0d vector cycles %0d exp %0d", MULTS, t_last - t_first,
                   N_IN * (N_OUT / MULTS) + 1);
        end
      end
    end
    done = 1;
  end
endmodule
