// tb_input_port: self-checking test of a router input port (input register
// plus RC+VA state), placed in the NE quadrant of router (1, 1) of a 4 x 4
// torus.
//
// Random packets of four flits with random destinations are offered to the
// register; the testbench plays the VC allocator (random grants, random busy
// resources) and the switch allocator (random grants, random full links).
// A reference model of the packet state checks every cycle:
//  * va_req only for a head flit without a resource, and only for a free
//    candidate; its resource is one of the candidates the quadrant allows
//    (the x link of VC yneg while both dimensions remain, VC0 on the last
//    hop, either VC otherwise, the core port at the destination); when two
//    are free the choice follows rnd;
//  * a candidate link is free only when not busy and its channel has room
//    for one packet (continuing on the input's own link class) or two
//    (from a core, a turn or a VC change), and VC0 -> VC1 in the same
//    direction is never offered. The input is switched between the +x VC0
//    link, the +y VC0 link and the cores during the run;
//  * sa_req exactly when a flit waits, its packet holds a resource and that
//    link is not full; flits leave in order, one per grant;
//  * the tail flit hands back the packet's resource;
//  * the register accepts a new flit in the cycle it is emptied.
// Also checks the RC+VA then SA timing: a head flit granted VA in one cycle
// asks for SA in the next.
module tb_input_port;
  import ctorus_pkg::*;
  localparam int K = 4;

  logic clk = 0, rst_n = 0;
  logic [1:0] quad = 2'd0;
  logic [CW-1:0] cur_x = 4'd1, cur_y = 4'd1;
  logic in_valid, in_ready, reg_full;
  flit_t in_flit, cur_flit;
  logic [NRES-1:0] res_busy, res_full, res_room1, res_room2;
  logic from_core = 1'b0;
  logic [2:0] in_link = 3'd0;
  logic rnd, va_req, va_gnt, sa_req, sa_gnt, rel_valid;
  logic [3:0] va_res, sa_res, rel_res;
  logic ev_adapt_rand, ev_adapt_busy;

  input_port #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR t=%0t: %s", $time, msg); end
  endtask

  flit_t txq [$];
  flit_t exp_q [$];      // flits accepted, in order
  bit    m_alloc = 0;
  int    m_res = 0;
  int    pkts = 0, rel_seen = 0, both_free = 0, one_busy = 0, va_then_sa = 0;
  bit    va_last = 0;

  // candidates for a head flit at (1,1) in NE
  task automatic cands(flit_t f, output int n, output int c0, output int c1);
    int hx, hy;
    hx = (int'(hdr_x(f)) - 1 + K) % K;
    hy = (int'(hdr_y(f)) - 1 + K) % K;
    n = 0; c0 = -1; c1 = -1;
    if (hx == 0 && hy == 0) begin n = 1; c0 = NLINK + int'(hdr_core(f)); end
    else if (hx != 0 && hy != 0) begin n = 1; c0 = 0; end
    else if (hx != 0) begin n = (hx == 1) ? 1 : 2; c0 = 0; c1 = 1; end
    else begin n = (hy == 1) ? 1 : 2; c0 = 4; c1 = 5; end
  endtask

  // model of the allocation rule for one candidate resource c
  function automatic bit cand_ok(int c);
    bit enter, up;
    if (c >= NLINK) return !res_busy[c];
    enter = from_core || (c != int'(in_link));
    up    = !from_core && (c / 2 == int'(in_link) / 2) && (in_link[0] == 1'b0) && (c % 2 == 1);
    return !up && !res_busy[c] && (enter ? res_room2[c] : res_room1[c]);
  endfunction

  task automatic new_packet();
    int dx, dy;
    flit_t f;
    // destinations the NE quadrant can reach minimally from (1,1)
    dx = 1 + $urandom_range(2) ; dx = dx % K;
    dy = 1 + $urandom_range(2) ; dy = dy % K;
    for (int i = 0; i < PKT_FLITS; i++) begin
      f.head = i == 0; f.tail = i == PKT_FLITS - 1;
      f.data = {$urandom, $urandom, $urandom, 22'($urandom), 2'($urandom_range(3)), 4'(dy), 4'(dx)};
      txq.push_back(f);
    end
    pkts++;
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (txq.size() == 0) new_packet();
      in_valid = ($urandom_range(99) < 70);
      in_flit  = txq[0];
      res_busy = NRES'($urandom) & NRES'($urandom);
      res_full = NRES'($urandom) & NRES'($urandom) & {{CONC{1'b0}}, {NLINK{1'b1}}};
      res_room1 = NRES'($urandom) | NRES'($urandom) | {{CONC{1'b1}}, {NLINK{1'b0}}};
      res_room2 = res_room1 & (NRES'($urandom) | {{CONC{1'b1}}, {NLINK{1'b0}}});
      if ($urandom_range(999) == 0) begin
        case ($urandom_range(2))
          0: begin from_core = 0; in_link = 3'd0; end   // +x VC0
          1: begin from_core = 0; in_link = 3'd4; end   // +y VC0
          default: from_core = 1;
        endcase
      end
      rnd      = 1'($urandom);
      va_gnt   = $urandom_range(99) < 60;
      sa_gnt   = 0;
      #1;
      check(reg_full == (exp_q.size() == 1), "reg_full shows the register");
      // RC+VA
      if (exp_q.size() > 0 && exp_q[0].head && !m_alloc) begin
        int n, c0, c1;
        bit f0, f1;
        cands(exp_q[0], n, c0, c1);
        f0 = cand_ok(c0);
        f1 = (n == 2) && cand_ok(c1);
        check(va_req == (f0 || f1), "va_req must ask exactly when a candidate is free");
        if (f0 && f1) begin both_free++; check(int'(va_res) == (rnd ? c1 : c0), "random pick"); end
        else if (f0)  check(int'(va_res) == c0, "only free candidate 0");
        else if (f1)  check(int'(va_res) == c1, "only free candidate 1");
        if (n == 2 && (f0 != f1)) begin one_busy++; check(ev_adapt_busy, "adapt_busy event"); end
      end else begin
        check(!va_req, "va_req without a waiting head flit");
      end
      // SA
      check(sa_req == (exp_q.size() > 0 && m_alloc && !res_full[m_res]), "sa_req");
      if (va_last) begin va_then_sa++; check(sa_req || res_full[m_res], "SA follows VA in the next cycle"); end
      va_last = 0;
      if (sa_req) begin
        sa_gnt = $urandom_range(99) < 60;
        check(int'(sa_res) == m_res, "sa_res is the allocated resource");
      end
      #1;
      check(in_ready == (exp_q.size() == 0 || sa_gnt), "in_ready");
      check(rel_valid == (sa_gnt && exp_q[0].tail), "rel_valid on the tail");
      if (rel_valid) begin rel_seen++; check(int'(rel_res) == m_res, "rel_res"); end
      if (sa_gnt) begin
        check(cur_flit == exp_q[0], "flit leaves in order and intact");
        if (exp_q[0].tail) m_alloc = 0;
        void'(exp_q.pop_front());
      end
      if (va_req && va_gnt) begin m_alloc = 1; m_res = int'(va_res); va_last = 1; end
      if (in_ready && in_valid) begin exp_q.push_back(txq.pop_front()); end
      check(exp_q.size() <= 1, "register holds one flit");
    end
  end

  initial begin
    in_valid = 0; in_flit = '0; res_busy = '0; res_full = '0; res_room1 = '1; res_room2 = '1; rnd = 0; va_gnt = 0; sa_gnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (5000) @(posedge clk);
    check(pkts > 200 && rel_seen > 200 && both_free > 0 && one_busy > 0 && va_then_sa > 0,
          "enough packets, releases and adaptive cases");
    $display("packets %0d, released %0d, two free %0d, one busy %0d", pkts, rel_seen, both_free, one_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
