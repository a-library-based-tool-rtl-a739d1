// async_fifo: clock domain crossing between the sensor and the network.
//
// Lets the image sensor and the network run on unrelated clocks. A dual-clock
// FIFO of 2**AW entries: the write side lives in wclk, the read side in
// rclk. Each side keeps a binary pointer one bit wider than the address and
// passes its Gray-coded copy to the other side through a two-flip-flop
// synchroniser, so only one bit changes per step and a pointer sampled
// mid-change is off by at most one. Full and empty are computed from the
// synchronised pointers and are therefore pessimistic: a written word becomes
// readable three to four read clocks later, which is the extra latency this
// crossing adds. The crossing itself follows the original design; building
// it as a Gray-pointer FIFO is a choice of this design.
//
// Interface: valid/ready on both sides (w_ready = not full, r_valid = not
// empty); read data is taken from the memory combinationally.
module async_fifo #(
  parameter int WIDTH = 24,
  parameter int AW    = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             w_valid,
  output logic             w_ready,
  input  logic [WIDTH-1:0] w_data,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic             r_valid,
  input  logic             r_ready,
  output logic [WIDTH-1:0] r_data
);
  localparam int DEPTH = 1 << AW;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_rs, rgray_ws;   // other side's pointer, synchronised
  logic [AW:0] wbin_next, rbin_next;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // write side
  assign w_ready   = (wgray != {~rgray_ws[AW:AW-1], rgray_ws[AW-2:0]});
  assign wbin_next = wbin + (AW+1)'(w_valid && w_ready);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_next;
      wgray <= bin2gray(wbin_next);
    end
  end

  always_ff @(posedge wclk) begin
    if (w_valid && w_ready) mem[wbin[AW-1:0]] <= w_data;
  end

  // read side
  assign r_valid   = (rgray != wgray_rs);
  assign r_data    = mem[rbin[AW-1:0]];
  assign rbin_next = rbin + (AW+1)'(r_valid && r_ready);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_next;
      rgray <= bin2gray(rbin_next);
    end
  end

  sync_2ff #(.WIDTH(AW + 1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_rs)
  );
  sync_2ff #(.WIDTH(AW + 1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_ws)
  );

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n)
    w_valid && !w_ready |=> w_valid && $stable(w_data));
endmodule
