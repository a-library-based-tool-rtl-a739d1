// rgb_input_adapter: turns camera pixels into first-layer activations.
//
// A colour camera delivers one pixel per word with its three PW-bit
// components packed in a camera-specific order. order (rgb_order_e) names
// that order, most significant component first; the adapter puts the
// components into the network's channel order (channel 0 = R, 1 = G, 2 = B).
// With C = 1 the word is a single grey value and order is ignored. Each
// component, an unsigned PW-bit value, becomes a non-negative signed DW-bit
// activation by keeping its DW-1 most significant bits; that scaling is a
// choice of this design.
//
// Timing: combinational, the stream handshake passes straight through
// (in_ready = out_ready, out_valid = in_valid).
module rgb_input_adapter
  import dnn_pkg::*;
#(
  parameter int C  = 3,
  parameter int PW = 8,
  parameter int DW = 8
) (
  input  rgb_order_e           order,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [C*PW-1:0]      in_pixel,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [DW-1:0] out_data [C]
);
  logic [PW-1:0] comp [C];   // comp[0] is the most significant component
  logic [PW-1:0] chan [C];   // in network channel order

  initial begin
    assert (C == 1 || C == 3) else $error("rgb_input_adapter: C must be 1 or 3");
    assert (DW - 1 <= PW) else $error("rgb_input_adapter: DW-1 must not exceed PW");
  end

  assign in_ready  = out_ready;
  assign out_valid = in_valid;

  always_comb begin
    for (int i = 0; i < C; i++) comp[i] = in_pixel[(C-1-i)*PW +: PW];
    chan = comp;
    if (C == 3) begin
      // chan[x] = component that carries colour x (0 R, 1 G, 2 B)
      unique case (order)
        ORD_RGB: begin chan[0] = comp[0]; chan[1] = comp[1]; chan[2] = comp[2]; end
        ORD_RBG: begin chan[0] = comp[0]; chan[1] = comp[2]; chan[2] = comp[1]; end
        ORD_GRB: begin chan[0] = comp[1]; chan[1] = comp[0]; chan[2] = comp[2]; end
        ORD_GBR: begin chan[0] = comp[2]; chan[1] = comp[0]; chan[2] = comp[1]; end
        ORD_BRG: begin chan[0] = comp[1]; chan[1] = comp[2]; chan[2] = comp[0]; end
        ORD_BGR: begin chan[0] = comp[2]; chan[1] = comp[1]; chan[2] = comp[0]; end
        default: ;
      endcase
    end
    for (int i = 0; i < C; i++)
      out_data[i] = DW'({1'b0, chan[i][PW-1 -: DW-1]});
  end
endmodule
