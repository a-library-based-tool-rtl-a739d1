// conv_channel: one output channel of a convolutional layer.
//
// The middle level of the layer hierarchy. It holds one conv_kernel per input
// channel, all fed with the same step, adds their partial sums and
// accumulates them over the NSTEPS steps of one window. The caller drives
// step from 0 to NSTEPS-1 and asserts en during each step; at the last step
// res presents the activated, rescaled result (acc + this step's sum) to be
// captured by the caller in the same cycle.
//
// Timing: acc is a register, res is combinational from acc, win, mask, step.
module conv_channel
  import dnn_pkg::*;
#(
  parameter int   K      = 3,
  parameter int   C_IN   = 3,
  parameter int   MULTS  = 9,
  parameter int   DW     = 8,
  parameter int   WW     = 8,
  parameter int   SHIFT  = 7,
  parameter act_e ACT    = ACT_RELU,
  parameter int   NSTEPS = (K * K) / MULTS,
  parameter int   SW     = (NSTEPS > 1) ? $clog2(NSTEPS) : 1,
  parameter int   AW     = acc_width(DW, WW, K * K * C_IN)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic        [SW-1:0] step,
  input  logic signed [DW-1:0] win  [C_IN][K*K],
  input  logic signed [WW-1:0] mask [C_IN][K*K],
  output logic signed [DW-1:0] res
);
  localparam int PW = DW + WW + $clog2(MULTS) + 1;

  logic signed [PW-1:0] psum [C_IN];
  logic signed [AW-1:0] step_sum, total, acc;

  for (genvar ic = 0; ic < C_IN; ic++) begin : g_kernel
    conv_kernel #(.K(K), .MULTS(MULTS), .DW(DW), .WW(WW)) u_kernel (
      .win (win[ic]),
      .mask(mask[ic]),
      .step(step),
      .psum(psum[ic])
    );
  end

  always_comb begin
    step_sum = '0;
    for (int ic = 0; ic < C_IN; ic++) step_sum += AW'(psum[ic]);
    total = (step == '0) ? step_sum : acc + step_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= total;
  end

  requant #(.AW(AW), .OW(DW), .SHIFT(SHIFT), .ACT(ACT)) u_act (
    .acc(total),
    .y  (res)
  );
endmodule
