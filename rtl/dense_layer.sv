// dense_layer: fully connected layer without bias.
//
// Inputs arrive as a stream of N_IN scalars (the flattened feature map); the
// N_OUT results leave together as one vector beat once the last input has
// been used. Each output has an accumulator register. MULTS multipliers
// share the work: MULTS = N_OUT gives one multiplier per output and uses
// each input in a single cycle, MULTS = 1 walks the outputs in N_OUT cycles
// per input (any divisor of N_OUT works). In step s multiplier m serves
// output s*MULTS + m. The output activation (linear or ReLU) and rescaling
// are those of requant, saturated to OW bits.
//
// Timing: an input is registered on acceptance and used in the following
// N_OUT/MULTS cycles; the next input is accepted in the last of them. The
// output vector is registered and held until out_ready; while it waits, the
// last input of the next vector is not used.
//
// Weights are written at address i*N_OUT + o, the flat order of an
// (N_IN, N_OUT) kernel matrix.
module dense_layer
  import dnn_pkg::*;
#(
  parameter int   N_IN  = 48,
  parameter int   N_OUT = 43,
  parameter int   MULTS = 43,
  parameter int   DW    = 8,
  parameter int   WW    = 8,
  parameter int   OW    = 16,
  parameter int   SHIFT = 7,
  parameter act_e ACT   = ACT_LINEAR,
  parameter int   NWGT  = N_IN * N_OUT,
  parameter int   WAW   = $clog2(NWGT)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [DW-1:0]  in_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [OW-1:0]  out_data [N_OUT],
  input  logic                  w_we,
  input  logic        [WAW-1:0] w_addr,
  input  logic signed [WW-1:0]  w_data
);
  localparam int NSTEPS = N_OUT / MULTS;
  localparam int SW     = (NSTEPS > 1) ? $clog2(NSTEPS) : 1;
  localparam int IW     = (N_IN > 1) ? $clog2(N_IN) : 1;
  localparam int AW     = acc_width(DW, WW, N_IN);

  logic signed [WW-1:0] wgt    [NWGT];
  logic signed [AW-1:0] acc    [N_OUT];
  logic signed [AW-1:0] newacc [N_OUT];
  logic signed [OW-1:0] res    [N_OUT];
  logic signed [DW-1:0] x;
  logic                 x_valid, last_step, last_in, finishing, update;
  logic [SW-1:0]        step;
  logic [IW-1:0]        i_cnt;

  initial begin
    assert (N_OUT % MULTS == 0) else $error("dense_layer: MULTS must divide N_OUT");
  end

  assign last_step = (step == SW'(NSTEPS - 1));
  assign last_in   = (i_cnt == IW'(N_IN - 1));
  assign finishing = x_valid && last_step && (!last_in || !out_valid || out_ready);
  assign update    = x_valid && (!last_step || finishing);
  assign in_ready  = !x_valid || finishing;

  weight_mem #(.DEPTH(NWGT), .WW(WW)) u_wmem (
    .clk, .rst_n,
    .we   (w_we),
    .waddr(w_addr),
    .wdata(w_data),
    .rdata(wgt)
  );

  // the MULTS multipliers of this step; other outputs keep their value
  always_comb begin
    for (int o = 0; o < N_OUT; o++) newacc[o] = acc[o];
    for (int m = 0; m < MULTS; m++) begin
      int o;
      logic signed [DW+WW-1:0] prod;
      o    = int'(step) * MULTS + m;
      if (o >= N_OUT) o = m;
      prod = x * wgt[int'(i_cnt) * N_OUT + o];
      newacc[o] = ((i_cnt == '0) ? '0 : acc[o]) + AW'(prod);
    end
  end

  for (genvar o = 0; o < N_OUT; o++) begin : g_act
    requant #(.AW(AW), .OW(OW), .SHIFT(SHIFT), .ACT(ACT)) u_act (
      .acc(newacc[o]),
      .y  (res[o])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid   <= 1'b0;
      x         <= '0;
      step      <= '0;
      i_cnt     <= '0;
      out_valid <= 1'b0;
      for (int o = 0; o < N_OUT; o++) begin
        acc[o]      <= '0;
        out_data[o] <= '0;
      end
    end else begin
      if (update) acc <= newacc;

      if (finishing)                   step <= '0;
      else if (x_valid && !last_step)  step <= step + 1'b1;

      if (finishing) i_cnt <= last_in ? '0 : i_cnt + 1'b1;

      if (in_valid && in_ready) begin
        x       <= in_data;
        x_valid <= 1'b1;
      end else if (finishing) begin
        x_valid <= 1'b0;
      end

      if (finishing && last_in) begin
        out_valid <= 1'b1;
        out_data  <= res;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end
endmodule
