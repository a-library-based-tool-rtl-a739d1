// sync_2ff: two-flip-flop synchroniser for a WIDTH-bit bus whose value
// changes by at most one bit at a time (a Gray-coded pointer). The output
// follows the input two destination clock edges later. Resets to zero.
module sync_2ff #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
