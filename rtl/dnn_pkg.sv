// dnn_pkg: types and helpers shared by the layer library.
//
// act_e selects the output activation of a layer (linear or ReLU, the two
// the library offers). rgb_order_e names the order in which a colour camera
// packs its three components into one word, most significant component first.
// acc_width() gives an accumulator width that cannot overflow when n products
// of a dw-bit activation and a ww-bit weight are summed.
package dnn_pkg;

  typedef enum logic [0:0] {
    ACT_LINEAR = 1'b0,
    ACT_RELU   = 1'b1
  } act_e;

  typedef enum logic [2:0] {
    ORD_RGB = 3'd0,
    ORD_RBG = 3'd1,
    ORD_GRB = 3'd2,
    ORD_GBR = 3'd3,
    ORD_BRG = 3'd4,
    ORD_BGR = 3'd5
  } rgb_order_e;

  function automatic int acc_width(int dw, int ww, int n);
    return dw + ww + $clog2(n) + 1;
  endfunction

endpackage
