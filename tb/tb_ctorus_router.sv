// tb_ctorus_router: self-checking test of one CTorus router, at (1, 1) of a
// 4 x 4 torus, with the testbench as its eight neighbours' links and its four
// cores.
//
// Upstream models send packets on all eight incoming links, each packet with
// a destination its quadrant can reach, announcing every flit with vc_en two
// cycles before putting it on the link and only while the link is not full.
// The cores inject packets to random routers. Downstream models take the
// outgoing links, count their occupancy and drain it at random, raising full
// at twelve flits (eleven repeater stages and the input register) and the
// room flags while one / two whole packets still fit.
// Checks:
//  * a packet alone in the router leaves four cycles after its head flit
//    enters (RC+VA, SA, ST, LT) and its body follows one flit per cycle;
//  * every vc_en is followed by a flit on that link two cycles later;
//  * every packet leaves once, whole, in order, never mixed with another
//    on one link or core port;
//  * it leaves on a link that moves it one hop closer and into a quadrant
//    that still reaches the destination minimally, in x while x hops
//    remain, VC0 on the last hop, or to the right core at the destination;
//  * a head flit leaves on a link only if the link had room for the whole
//    packet when it was allocated (no packet is ever cut by full);
//  * no link gets more flits than the downstream can hold.
module tb_ctorus_router;
  import ctorus_pkg::*;
  localparam int K = 4;
  localparam int CX = 1, CY = 1;
  localparam int CAP = 12;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] cur_x = CW'(CX), cur_y = CW'(CY);
  logic [NLINK-1:0] lin_valid, lin_vc_en, lin_full, lout_valid, lout_vc_en, lout_full;
  logic [NLINK-1:0][1:0] lin_room, lout_room;
  flit_t [NLINK-1:0] lin_flit, lout_flit;
  logic [CONC-1:0] inj_valid, inj_ready, ej_valid;
  flit_t [CONC-1:0] inj_flit, ej_flit;
  rtr_ev_t ev;

  ctorus_router #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR cycle %0d: %s", cycle, msg); end
  endtask

  int next_id = 0;
  flit_t lq [NLINK][$];       // flits waiting on each incoming link
  bit    lann [NLINK][2];     // announcements on their way
  flit_t cq [CONC][$];
  int    outstanding = 0, done_pkts = 0;
  int    gen_pct = 0;
  int    occ [NLINK];          // downstream occupancy
  int    a_cnt [NLINK];        // flits announced per outgoing link
  bit    ann_o [NLINK][2];     // outgoing announcements on their way
  int    o_owner [NRES];       // packet id in flight per output, -1 none
  int    o_idx [NRES];
  int    ids_seen [int];
  longint unsigned head_in [int];
  int    lat_expect [int];

  function automatic flit_t mk(int id, int idx, int dx, int dy, int dc);
    flit_t f;
    f.head = idx == 0; f.tail = idx == PKT_FLITS - 1;
    f.data = '0;
    f.data[3:0] = 4'(dx); f.data[7:4] = 4'(dy); f.data[9:8] = 2'(dc);
    f.data[95:64] = 32'(id); f.data[103:96] = 8'(idx);
    f.data[127:104] = 24'(id * 7919 + idx);
    return f;
  endfunction

  // hops from (x,y) to (dx,dy) moving the way quadrant q points
  function automatic int qhops(int q, int x, int y, int dx, int dy);
    int hx, hy;
    hx = (q % 2) ? (x - dx + K) % K : (dx - x + K) % K;
    hy = (q / 2) ? (y - dy + K) % K : (dy - y + K) % K;
    return hx + hy;
  endfunction

  task automatic link_packet(int l, int dx, int dy, int dc);
    int id;
    id = next_id++;
    for (int i = 0; i < PKT_FLITS; i++) lq[l].push_back(mk(id, i, dx, dy, dc));
    outstanding++;
  endtask

  // random destination reachable from this router in quadrant q (1..2 hops per dim)
  task automatic rand_dest(int q, output int dx, output int dy);
    int hx, hy;
    hx = $urandom_range(2); hy = $urandom_range(2);
    dx = (q % 2) ? (CX - hx + K) % K : (CX + hx) % K;
    dy = (q / 2) ? (CY - hy + K) % K : (CY + hy) % K;
  endtask

  function automatic int ring_d(int a, int b);
    int d;
    d = (b - a + K) % K;
    return (d > K / 2) ? K - d : d;
  endfunction

  // output checks for one flit on resource r
  task automatic out_flit(int r, flit_t f);
    int id, idx, dx, dy, dc;
    id = int'(f.data[95:64]); idx = int'(f.data[103:96]);
    dx = int'(hdr_x(f)); dy = int'(hdr_y(f)); dc = int'(hdr_core(f));
    check(f == mk(id, idx, dx, dy, dc), "flit corrupted");
    if (f.head) begin
      check(o_owner[r] == -1, "head flit while another packet holds the output");
      check(!ids_seen.exists(id), "packet delivered twice");
      ids_seen[id] = 1;
      o_owner[r] = id; o_idx[r] = 0;
      if (lat_expect.exists(id))
        check(cycle - head_in[id] == longint'(lat_expect[id]), $sformatf("head latency %0d", cycle - head_in[id]));
      if (r >= NLINK) begin
        check(dx == CX && dy == CY && dc == r - NLINK, "ejected to the wrong core or router");
      end else begin
        int d, v, nx, ny, q2, after, minh;
        d = r / 2; v = r % 2;
        nx = CX; ny = CY;
        case (d) 0: nx = (CX + 1) % K; 1: nx = (CX + K - 1) % K; 2: ny = (CY + 1) % K; default: ny = (CY + K - 1) % K; endcase
        q2 = int'(link_quad(2'(d), v[0]));
        minh = ring_d(CX, dx) + ring_d(CY, dy);
        after = qhops(q2, nx, ny, dx, dy);
        check(!(dx == CX && dy == CY), "packet for this router sent on a link");
        check(after == minh - 1, "link does not lead one hop closer in a fitting quadrant");
        if (ring_d(CX, dx) != 0) check(d < 2, "y move while x hops remain");
        if (after == 0) check(v == 0, "last hop must use VC0");
      end
    end else begin
      check(o_owner[r] == id && idx == o_idx[r] + 1, "flits mixed or out of order on an output");
      o_idx[r] = idx;
    end
    if (f.tail) begin o_owner[r] = -1; done_pkts++; outstanding--; end
  endtask

  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      // outputs of the previous cycle's state
      for (int l = 0; l < NLINK; l++) begin
        if (lout_valid[l]) begin
          check(ann_o[l][1], "flit on a link without an announcement two cycles before");
          out_flit(l, lout_flit[l]);
          occ[l]++;
        end else check(!ann_o[l][1], "announced flit did not come");
        if (occ[l] > 0 && $urandom_range(99) < 40) occ[l]--;
        check(occ[l] <= CAP, "downstream overflow");
        ann_o[l][1] = ann_o[l][0];
        ann_o[l][0] = 0;
      end
      for (int c = 0; c < CONC; c++) if (ej_valid[c]) out_flit(NLINK + c, ej_flit[c]);
      // full from the downstream models
      for (int l = 0; l < NLINK; l++) begin
        int inflight;
        inflight = occ[l] + int'(ann_o[l][1]);
        lout_full[l] = inflight >= CAP;
        lout_room[l][0] = inflight + PKT_FLITS <= CAP;
        lout_room[l][1] = inflight + 2 * PKT_FLITS <= CAP;
      end
      // new traffic
      for (int l = 0; l < NLINK; l++)
        if (lq[l].size() == 0 && $urandom_range(99) < gen_pct) begin
          int dx, dy;
          rand_dest(int'(link_quad(2'(l / 2), l[0])), dx, dy);
          link_packet(l, dx, dy, $urandom_range(3));
        end
      for (int c = 0; c < CONC; c++)
        if (cq[c].size() == 0 && $urandom_range(99) < gen_pct) begin
          int id;
          id = next_id++;
          outstanding++;
          for (int i = 0; i < PKT_FLITS; i++)
            cq[c].push_back(mk(id, i, $urandom_range(K - 1), $urandom_range(K - 1), $urandom_range(3)));
        end
      // incoming links: announce, then send two cycles later
      for (int l = 0; l < NLINK; l++) begin
        int unsent;
        lin_valid[l] = lann[l][1];
        lin_flit[l]  = lann[l][1] ? lq[l].pop_front() : '0;
        if (lin_valid[l] && lin_flit[l].head) head_in[int'(lin_flit[l].data[95:64])] = cycle;
        unsent = lq[l].size() - int'(lann[l][0]);
        lin_vc_en[l] = !lin_full[l] && unsent > 0;
        lann[l][1] = lann[l][0];
        lann[l][0] = lin_vc_en[l];
      end
      for (int c = 0; c < CONC; c++) begin
        inj_valid[c] = cq[c].size() > 0;
        inj_flit[c]  = inj_valid[c] ? cq[c][0] : '0;
      end
      #1;
      for (int c = 0; c < CONC; c++) if (inj_valid[c] && inj_ready[c]) void'(cq[c].pop_front());
      for (int l = 0; l < NLINK; l++) begin
        ann_o[l][0] = lout_vc_en[l];
        if (lout_vc_en[l]) check(!lout_full[l], "flit announced on a full link");
        // links are held per packet, so announcements come in whole packets
        if (a_cnt[l] % PKT_FLITS != 0) check(!lout_full[l], "packet cut by a full link");
        if (lout_vc_en[l]) a_cnt[l]++;
      end
    end
  end

  initial begin
    foreach (o_owner[i]) o_owner[i] = -1;
    foreach (occ[i]) occ[i] = 0;
    foreach (a_cnt[i]) a_cnt[i] = 0;
    foreach (lann[i]) begin lann[i][0] = 0; lann[i][1] = 0; ann_o[i][0] = 0; ann_o[i][1] = 0; end
    lin_valid = '0; lin_vc_en = '0; lin_flit = '0; lout_full = '0; lout_room = '1; inj_valid = '0; inj_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: one packet on the +x VC0 link to (2,1): leaves on +x four cycles later
    lat_expect[next_id] = 4;
    link_packet(DIR_XP * 2, 2, 1, 0);
    repeat (20) @(posedge clk);
    lat_expect[next_id] = 4;
    link_packet(DIR_YN * 2 + 1, 1, 1, 2);  // -y VC1 (SW crossbar), ejects to core 2
    repeat (20) @(posedge clk);
    check(done_pkts == 2, "directed packets delivered");
    // random load
    gen_pct = 20;
    repeat (4000) @(posedge clk);
    gen_pct = 0;
    repeat (300) @(posedge clk);
    check(outstanding == 0 && done_pkts > 300, "every packet delivered");
    $display("packets delivered %0d, outstanding %0d", done_pkts, outstanding);
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
