// conv_kernel: one KxK convolution mask applied to one input channel.
//
// This is the lowest level of the layer hierarchy, the arithmetic operator.
// The number of multipliers MULTS is the parallelism knob of the library:
//   MULTS = 1     one multiplier walks the K*K mask positions in K*K steps,
//   MULTS = K     one multiplier per mask column, K steps (one per mask row),
//   MULTS = K*K   one multiplier per mask position, a single step.
// In step s, multiplier m multiplies mask element s*MULTS+m (row-major order)
// with the matching window element; the MULTS products are added and given
// out as psum. With fewer than K*K multipliers the operands are selected by
// multiplexers driven by step. The caller sums psum over the NSTEPS steps.
//
// Purely combinational. win and mask are indexed [ky*K + kx].
module conv_kernel #(
  parameter int K      = 3,
  parameter int MULTS  = 9,
  parameter int DW     = 8,
  parameter int WW     = 8,
  parameter int NSTEPS = (K * K) / MULTS,
  parameter int SW     = (NSTEPS > 1) ? $clog2(NSTEPS) : 1,
  parameter int PW     = DW + WW + $clog2(MULTS) + 1
) (
  input  logic signed [DW-1:0] win  [K*K],
  input  logic signed [WW-1:0] mask [K*K],
  input  logic        [SW-1:0] step,
  output logic signed [PW-1:0] psum
);
  initial begin
    assert ((K * K) % MULTS == 0)
      else $error("conv_kernel: MULTS must divide K*K");
  end

  logic signed [DW+WW-1:0] prod [MULTS];

  always_comb begin
    psum = '0;
    for (int m = 0; m < MULTS; m++) begin
      int e;
      e = int'(step) * MULTS + m;
      if (e >= K * K) e = m;  // unused step codes
      prod[m] = win[e] * mask[e];
      psum += PW'(prod[m]);
    end
  end
endmodule
