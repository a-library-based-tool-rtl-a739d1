// tb_requant: checks the activation/rescale/saturate unit against an
// integer model, for a ReLU and a linear instance, on random and corner
// accumulator values.
module tb_requant;
  import dnn_pkg::*;
  localparam int AW = 20, OW = 8, SHIFT = 5;

  logic signed [AW-1:0] acc;
  logic signed [OW-1:0] y_relu, y_lin;
  int checks = 0, failures = 0;

  requant #(.AW(AW), .OW(OW), .SHIFT(SHIFT), .ACT(ACT_RELU))   u_relu (.acc(acc), .y(y_relu));
  requant #(.AW(AW), .OW(OW), .SHIFT(SHIFT), .ACT(ACT_LINEAR)) u_lin  (.acc(acc), .y(y_lin));

  function automatic int model(int a, bit relu);
    int q;
    q = (a >= 0) ? a / (1 << SHIFT) : -((-a + (1 << SHIFT) - 1) / (1 << SHIFT));
    if (relu && q < 0) q = 0;
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  task automatic try(int a);
    acc = AW'(a);
    #1;
    checks += 2;
    if (int'(y_relu) != model(a, 1)) begin
      failures++; $display("FAIL relu acc=%0d y=%0d exp=%0d", a, y_relu, model(a, 1));
    end
    if (int'(y_lin) != model(a, 0)) begin
      failures++; $display("FAIL lin acc=%0d y=%0d exp=%0d", a, y_lin, model(a, 0));
    end
  endtask

  initial begin
    int corner[] = '{0, 1, -1, 31, 32, -32, -33, 4095, 4096, 4127, -4096, -4097, -4128,
                     (1 << (AW - 1)) - 1, -(1 << (AW - 1))};
    foreach (corner[i]) try(corner[i]);
    repeat (2000) try(int'($urandom_range(0, 1 << AW)) - (1 << (AW - 1)));
    repeat (500) try(int'($urandom_range(0, 16000)) - 8000);
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
