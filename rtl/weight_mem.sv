// weight_mem: on-chip weight store of one layer.
//
// Only on-chip memory is used for weights. Weights are written one per cycle
// through a simple write port (we, waddr, wdata) before inference, in the
// flat order of the layer's weight tensor as a training framework stores it.
// Every word is readable at once on rdata, because a fully parallel layer
// needs all its weights in the same cycle; a layer with fewer multipliers
// selects among them with its step counter. Contents reset to zero.
//
// Timing: a write at a clock edge shows on rdata right after that edge.
module weight_mem #(
  parameter int DEPTH = 702,
  parameter int WW    = 8,
  parameter int AWID  = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic        [AWID-1:0] waddr,
  input  logic signed [WW-1:0]   wdata,
  output logic signed [WW-1:0]   rdata [DEPTH]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) rdata[i] <= '0;
    end else if (we && (int'(waddr) < DEPTH)) begin
      rdata[waddr] <= wdata;
    end
  end
endmodule
