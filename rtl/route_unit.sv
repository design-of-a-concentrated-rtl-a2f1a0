// route_unit: route computation of a head flit in one quadrant crossbar,
// with the VC rule of the multi-crossbar router.
//
// A packet travels inside one quadrant (NE, NW, SE, SW) from source to
// destination, so every hop moves it towards its destination in +x/-x and
// +y/-y fixed by the quadrant. Given the quadrant of the crossbar the flit is
// in, the router's coordinates and the destination, the unit lists at most
// two candidate VA resources:
//  * at the destination router: the ejection port of the destination core;
//  * otherwise an x move while x hops remain, then y moves (dimension
//    order, x first).
// The VC of a move picks the downstream quadrant crossbar (see ctorus_pkg).
//  * If hops remain in the other dimension, the flit must stay in its
//    quadrant, which fixes the VC: one candidate.
//  * If this is the last hop of the packet (one hop away), the lower VC.
//  * Otherwise either VC may be used: both are offered as candidates.
// This reading of the VC rule ("either VC when more than one hop away, the
// lower VC when exactly one hop away") together with the quadrant constraint
// is this design's interpretation.
//
// Departure from the source: the source lets a packet with hops left in both
// dimensions take either the x or the y move, whichever has a free VC. On a
// torus with wrap-around links that adaptive choice lets x-to-y and y-to-x
// turns close a cycle of full channels, which locks the network under load
// (observed in simulation). This design therefore keeps the adaptive choice
// between the two VCs of a direction but fixes the order of dimensions.
//
// Purely combinational. K is the radix of the torus.
module route_unit
  import ctorus_pkg::*;
#(
  parameter int K = 4
) (
  input  logic [1:0]          quad,
  input  logic [CW-1:0]       cur_x,
  input  logic [CW-1:0]       cur_y,
  input  logic [CW-1:0]       dst_x,
  input  logic [CW-1:0]       dst_y,
  input  logic [1:0]          dst_core,
  output logic [1:0]          cand_v,
  output logic [1:0][3:0]     cand_res
);

  logic [CW-1:0] hx, hy;
  logic [1:0]    xdir, ydir;

  always_comb begin
    hx = ring_hops(cur_x, dst_x, quad[0], K);
    hy = ring_hops(cur_y, dst_y, quad[1], K);
    xdir = quad_xdir(quad);
    ydir = quad_ydir(quad);
    cand_v   = '0;
    cand_res = '0;
    if (hx == '0 && hy == '0) begin
      cand_v[0]   = 1'b1;
      cand_res[0] = 4'(NLINK) + 4'(dst_core);
    end else if (hx != '0 && hy != '0) begin
      // both dimensions left: x first, staying in this quadrant
      cand_v[0]   = 1'b1;
      cand_res[0] = {1'b0, xdir, quad[1]};
    end else if (hx != '0) begin
      cand_v[0]   = 1'b1;
      cand_res[0] = {1'b0, xdir, 1'b0};
      if (hx != CW'(1)) begin
        cand_v[1]   = 1'b1;
        cand_res[1] = {1'b0, xdir, 1'b1};
      end
    end else begin
      cand_v[0]   = 1'b1;
      cand_res[0] = {1'b0, ydir, 1'b0};
      if (hy != CW'(1)) begin
        cand_v[1]   = 1'b1;
        cand_res[1] = {1'b0, ydir, 1'b1};
      end
    end
  end

endmodule
