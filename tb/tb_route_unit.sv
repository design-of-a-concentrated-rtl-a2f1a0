// tb_route_unit: self-checking test of route computation and the VC rule.
//
// For every source router, destination router and destination core of a
// 4 x 4 torus the testbench starts a packet in the quadrant whose signs
// point the minimal way (free dimensions tried both ways) and walks it
// through the network, at each router taking a random candidate the unit
// offers and entering the quadrant crossbar that the chosen link leads to.
// Checks on every step: candidates are never more than two and are valid
// links or the right ejection port; a move keeps the packet in a quadrant
// that still points at the destination; on the last hop only VC0 is
// offered; the packet is ejected to the right core after exactly the
// minimal number of hops on the torus (at most 4).
module tb_route_unit;
  import ctorus_pkg::*;
  localparam int K = 4;

  logic [1:0] quad;
  logic [CW-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [1:0] dst_core;
  logic [1:0] cand_v;
  logic [1:0][3:0] cand_res;

  route_unit #(.K(K)) dut (.*);

  int checks = 0, failures = 0;
  int two_cands = 0, vc1_offered = 0, walks = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR: %s", msg); end
  endtask

  function automatic int ring_d(int a, int b);
    int d;
    d = (b - a + K) % K;
    return (d > K / 2) ? K - d : d;
  endfunction

  initial begin
    for (int sx = 0; sx < K; sx++) for (int sy = 0; sy < K; sy++)
    for (int tx = 0; tx < K; tx++) for (int ty = 0; ty < K; ty++)
    for (int q0 = 0; q0 < 4; q0++) begin
      int dxp, dyp, hops, minh, x, y, tc;
      logic [1:0] q;
      bit ok, done;
      // the starting quadrant must point the minimal way
      dxp = (tx - sx + K) % K;
      dyp = (ty - sy + K) % K;
      ok = 1;
      if (dxp != 0 && ((dxp > K / 2) != q0[0]) && dxp != K / 2) ok = 0;
      if (dyp != 0 && ((dyp > K / 2) != q0[1]) && dyp != K / 2) ok = 0;
      if (!ok) continue;
      walks++;
      minh = ring_d(sx, tx) + ring_d(sy, ty);
      tc = $urandom_range(3);
      q = 2'(q0); x = sx; y = sy; hops = 0; done = 0;
      while (!done && hops <= 2 * K) begin
        int pick, r, dir, vc;
        quad = q; cur_x = CW'(x); cur_y = CW'(y);
        dst_x = CW'(tx); dst_y = CW'(ty); dst_core = 2'(tc);
        #1;
        check(cand_v[0], "no candidate offered");
        if (cand_v == 2'b11) two_cands++;
        pick = (cand_v == 2'b11) ? $urandom_range(1) : 0;
        r = int'(cand_res[pick]);
        if (x == tx && y == ty) begin
          check(cand_v == 2'b01 && r == NLINK + tc, "at the destination: eject to its core only");
          done = 1;
        end else begin
          check(r < NLINK, "a move must use a link");
          dir = r / 2; vc = r % 2;
          if (vc == 1) vc1_offered++;
          // the move goes the quadrant's way
          check(dir == int'(quad_xdir(q)) || dir == int'(quad_ydir(q)), "move outside the quadrant");
          case (dir)
            0: x = (x + 1) % K;
            1: x = (x + K - 1) % K;
            2: y = (y + 1) % K;
            default: y = (y + K - 1) % K;
          endcase
          hops++;
          if (x == tx && y == ty) check(vc == 0, "last hop must use the lower VC");
          q = link_quad(2'(dir), vc[0]);
        end
      end
      check(done && hops == minh, $sformatf("walk %0d,%0d -> %0d,%0d took %0d hops, minimal %0d",
                                            sx, sy, tx, ty, hops, minh));
    end
    check(two_cands > 0 && vc1_offered > 0, "adaptive choices and VC1 exercised");
    $display("walks %0d, two-candidate steps %0d, VC1 moves %0d", walks, two_cands, vc1_offered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
