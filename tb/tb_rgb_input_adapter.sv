// tb_rgb_input_adapter: for every component order, packs random R, G, B
// values the way such a camera would and checks that the adapter returns
// them in R, G, B channel order, each scaled to its 7 most significant bits;
// also checks the grey-scale variant and the pass-through handshake.
module tb_rgb_input_adapter;
  import dnn_pkg::*;
  localparam int PW = 8, DW = 8;

  rgb_order_e order;
  logic in_valid, in_ready, out_valid, out_ready, g_ready, g_valid;
  logic [3*PW-1:0] in_pixel;
  logic [PW-1:0]   grey;
  logic signed [DW-1:0] out_data [3];
  logic signed [DW-1:0] g_data [1];
  int checks = 0, failures = 0;

  rgb_input_adapter #(.C(3), .PW(PW), .DW(DW)) dut (
    .order, .in_valid, .in_ready, .in_pixel, .out_valid, .out_ready, .out_data);
  rgb_input_adapter #(.C(1), .PW(PW), .DW(DW)) dut_grey (
    .order, .in_valid, .in_ready(g_ready), .in_pixel(grey), .out_valid(g_valid),
    .out_ready, .out_data(g_data));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int o = 0; o < 6; o++) begin
      order = rgb_order_e'(o);
      for (int n = 0; n < 50; n++) begin
        logic [PW-1:0] r, g, b;
        r = PW'($urandom); g = PW'($urandom); b = PW'($urandom);
        case (o)
          0: in_pixel = {r, g, b};
          1: in_pixel = {r, b, g};
          2: in_pixel = {g, r, b};
          3: in_pixel = {g, b, r};
          4: in_pixel = {b, r, g};
          default: in_pixel = {b, g, r};
        endcase
        grey = r;
        in_valid = n[0]; out_ready = n[1];
        #1;
        check("R", int'(out_data[0]), int'(r >> 1));
        check("G", int'(out_data[1]), int'(g >> 1));
        check("B", int'(out_data[2]), int'(b >> 1));
        check("grey", int'(g_data[0]), int'(r >> 1));
        check("valid", int'(out_valid), int'(in_valid));
        check("ready", int'(in_ready), int'(out_ready));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
