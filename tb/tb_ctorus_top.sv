// tb_ctorus_top: end-to-end test of the concentrated torus network at its
// default size (4 x 4 routers, 64 cores, 11 repeater stages per link).
//
// Every core is driven by a packet source and checked by a packet sink.
// Packets are four 128-bit flits; each flit carries the source core, a
// sequence number and its index, and the rest of its bits are a hash of
// those, so the sink can check every bit it receives. The sink checks that
// each packet arrives at the core named in its head flit, exactly once, with
// its flits in order and uninterrupted, and that every packet sent arrives.
//
// Phases:
//  1. single packets on an empty network, checking the head-flit latency of
//     the 4-stage pipeline: 4 cycles per hop plus 4 (injection register,
//     RC+VA, SA, ST at the destination router);
//  2. uniform random traffic at a moderate rate;
//  3. complement traffic (router (x, y) sends to (K-1-x, K-1-y)) at a high
//     rate, which fills input registers so flits are held in repeater stages
//     and links report full;
//  4. a hotspot, all cores of four routers sending to one router.
// Router event flags are counted and every mechanism must occur at least
// once: channel-buffer hold, full channel, random and forced adaptive
// choices, VC1 use, VA and SA conflicts, injection waits, wrap-around links
// and ejection.
module tb_ctorus_top;
  import ctorus_pkg::*;

  localparam int K  = 4;
  localparam int NR = K * K;
  localparam int NC = NR * CONC;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic  [NC-1:0]  inj_valid;
  flit_t [NC-1:0]  inj_flit;
  logic  [NC-1:0]  inj_ready;
  logic  [NC-1:0]  ej_valid;
  flit_t [NC-1:0]  ej_flit;
  rtr_ev_t [NR-1:0] ev;

  ctorus_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint unsigned cycle = 0;

  // ------------------------------------------------------------ packets
  function automatic logic [63:0] mix(int src, int seq, int idx);
    logic [63:0] h;
    h = 64'h9E3779B97F4A7C15 ^ (64'(src) << 40) ^ (64'(seq) << 8) ^ 64'(idx);
    h = h ^ (h >> 31); h = h * 64'hBF58476D1CE4E5B9;
    h = h ^ (h >> 27); h = h * 64'h94D049BB133111EB;
    return h ^ (h >> 33);
  endfunction

  function automatic flit_t make_flit(int src, int dst, int seq, int idx);
    flit_t f;
    int dr;
    dr = dst / CONC;
    f.head = (idx == 0);
    f.tail = (idx == PKT_FLITS - 1);
    f.data = '0;
    f.data[3:0]    = 4'(dr % K);
    f.data[7:4]    = 4'(dr / K);
    f.data[9:8]    = 2'(dst % CONC);
    f.data[23:16]  = 8'(src);
    f.data[55:24]  = 32'(seq);
    f.data[63:56]  = 8'(idx);
    f.data[127:64] = mix(src, seq, idx);
    return f;
  endfunction

  flit_t           txq [NC][$];   // flits waiting at each source
  int              pend_pkts [NC][$]; // destinations of packets not yet started
  int              seq_next [NC];
  int              sent = 0, received = 0;
  int              expect_dst [longint];   // key {src, seq} -> destination
  longint unsigned sent_cycle [longint];
  real             inj_rate = 0.0;

  // sink state per core
  bit   rx_busy [NC];
  int   rx_src [NC], rx_seq [NC], rx_idx [NC];

  function automatic longint key(int src, int seq);
    return (longint'(src) << 32) | longint'(seq);
  endfunction

  task automatic queue_packet(int src, int dst);
    pend_pkts[src].push_back(dst);
  endtask

  // latency checks of phase 1
  int     lat_expect [longint];
  int     lat_checked = 0;

  // --------------------------------------------------------------- events
  int ev_cnt [10];
  string ev_name [10] = '{"hold", "full", "adapt_rand", "adapt_busy", "vc1",
                          "va_lost", "sa_lost", "inj_wait", "wrap", "eject"};

  // ----------------------------------------------------------- driver/sink
  initial begin
    inj_valid = '0;
    inj_flit  = '0;
    foreach (seq_next[i]) seq_next[i] = 0;
    foreach (rx_busy[i]) rx_busy[i] = 0;
  end

  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      // sinks
      for (int c = 0; c < NC; c++) begin
        if (ej_valid[c]) begin
          flit_t f;
          int src, seq, idx;
          f   = ej_flit[c];
          src = int'(f.data[23:16]);
          seq = int'(f.data[55:24]);
          idx = int'(f.data[63:56]);
          checks++;
          if (!rx_busy[c]) begin
            if (!f.head || !expect_dst.exists(key(src, seq)) || expect_dst[key(src, seq)] != c) begin
              failures++;
              $display("ERROR cycle %0d core %0d: unexpected head (head=%0b src=%0d seq=%0d)",
                       cycle, c, f.head, src, seq);
            end else begin
              if (lat_expect.exists(key(src, seq))) begin
                checks++;
                lat_checked++;
                if (cycle - sent_cycle[key(src, seq)] != longint'(lat_expect[key(src, seq)])) begin
                  failures++;
                  $display("ERROR latency src %0d seq %0d: %0d cycles, expected %0d", src, seq,
                           cycle - sent_cycle[key(src, seq)], lat_expect[key(src, seq)]);
                end
              end
              rx_busy[c] = 1; rx_src[c] = src; rx_seq[c] = seq; rx_idx[c] = 0;
            end
          end else begin
            rx_idx[c]++;
            if (src != rx_src[c] || seq != rx_seq[c] || idx != rx_idx[c]) begin
              failures++;
              $display("ERROR cycle %0d core %0d: flit of src %0d seq %0d idx %0d inside packet %0d/%0d",
                       cycle, c, src, seq, idx, rx_src[c], rx_seq[c]);
            end
          end
          if (f != make_flit(rx_src[c], c, rx_seq[c], rx_idx[c])) begin
            failures++;
            $display("ERROR cycle %0d core %0d: flit contents wrong", cycle, c);
          end
          if (f.tail && rx_busy[c]) begin
            rx_busy[c] = 0;
            expect_dst.delete(key(rx_src[c], rx_seq[c]));
            received++;
          end
        end
      end
      // events
      for (int r = 0; r < NR; r++) begin
        ev_cnt[0] += int'(ev[r].hold);
        ev_cnt[1] += int'(ev[r].full);
        ev_cnt[2] += int'(ev[r].adapt_rand);
        ev_cnt[3] += int'(ev[r].adapt_busy);
        ev_cnt[4] += int'(ev[r].vc1);
        ev_cnt[5] += int'(ev[r].va_lost);
        ev_cnt[6] += int'(ev[r].sa_lost);
        ev_cnt[7] += int'(ev[r].inj_wait);
        ev_cnt[8] += int'(ev[r].wrap);
        ev_cnt[9] += int'(ev[r].eject);
      end
      // sources: start packets, Bernoulli per idle core
      for (int c = 0; c < NC; c++) begin
        if (txq[c].size() == 0 && pend_pkts[c].size() > 0 &&
            ($urandom_range(999) < int'(inj_rate * 1000.0))) begin
          int dst, s;
          dst = pend_pkts[c].pop_front();
          s = seq_next[c]++;
          for (int i = 0; i < PKT_FLITS; i++) txq[c].push_back(make_flit(c, dst, s, i));
          expect_dst[key(c, s)] = dst;
          sent++;
        end
        inj_valid[c] = txq[c].size() > 0;
        inj_flit[c]  = inj_valid[c] ? txq[c][0] : '0;
      end
      #1;
      for (int c = 0; c < NC; c++) begin
        if (inj_valid[c] && inj_ready[c]) begin
          if (txq[c][0].head)
            sent_cycle[key(c, int'(txq[c][0].data[55:24]))] = cycle;
          void'(txq[c].pop_front());
        end
      end
    end
  end

  function automatic int core_of(int x, int y, int c);
    return ((y % K) * K + (x % K)) * CONC + c;
  endfunction

  // hops on a k-ring the minimal way
  function automatic int ring_d(int a, int b);
    int d;
    d = (b - a + K) % K;
    return (d > K / 2) ? K - d : d;
  endfunction

  task automatic wait_drain(int limit);
    int n;
    n = 0;
    while ((expect_dst.size() != 0 || sent_pending()) && n < limit) begin
      @(posedge clk);
      n++;
    end
    checks++;
    if (expect_dst.size() != 0 || sent_pending()) begin
      failures++;
      $display("ERROR: %0d packets not delivered after %0d cycles", expect_dst.size(), limit);
    end
  endtask

  function automatic bit sent_pending();
    for (int c = 0; c < NC; c++)
      if (txq[c].size() != 0 || pend_pkts[c].size() != 0) return 1;
    return 0;
  endfunction

  // latency test: one packet alone
  task automatic one_packet(int src, int dst);
    int sr, dr, h;
    sr = src / CONC; dr = dst / CONC;
    h = ring_d(sr % K, dr % K) + ring_d(sr / K, dr / K);
    lat_expect[key(src, seq_next[src])] = 4 * h + 4;
    inj_rate = 1.0;
    queue_packet(src, dst);
    wait_drain(200);
  endtask

  // -------------------------------------------------------------- stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Phase 1: latency on an empty network
    one_packet(core_of(0, 0, 0), core_of(0, 0, 3));  // same router
    one_packet(core_of(0, 0, 0), core_of(1, 0, 1));  // 1 hop +x
    one_packet(core_of(3, 0, 2), core_of(0, 0, 2));  // 1 hop over the wrap link
    one_packet(core_of(0, 0, 1), core_of(2, 1, 3));  // 3 hops
    one_packet(core_of(1, 1, 0), core_of(3, 3, 0));  // 4 hops (diameter)
    one_packet(core_of(2, 3, 3), core_of(0, 1, 1));  // 4 hops, -x -y quadrant
    checks++;
    if (lat_checked != 6) begin
      failures++;
      $display("ERROR: %0d latency checks made, 6 expected", lat_checked);
    end

    // Phase 2: uniform random
    inj_rate = 0.05;
    for (int c = 0; c < NC; c++)
      for (int i = 0; i < 6; i++) begin
        int d;
        do d = $urandom_range(NC - 1); while (d == c);
        queue_packet(c, d);
      end
    wait_drain(20000);

    // Phase 3: complement at a high rate
    inj_rate = 0.6;
    for (int c = 0; c < NC; c++) begin
      int r, x, y;
      r = c / CONC; x = r % K; y = r / K;
      for (int i = 0; i < 6; i++) queue_packet(c, core_of(K - 1 - x, K - 1 - y, $urandom_range(3)));
    end
    wait_drain(20000);

    // Phase 4: hotspot, routers (0,0),(1,1),(2,2),(3,3) send to router (2,1)
    inj_rate = 0.8;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < CONC; c++)
        for (int i = 0; i < 4; i++) queue_packet(core_of(r, r, c), core_of(2, 1, $urandom_range(3)));
    wait_drain(20000);

    checks++;
    if (received != sent || sent == 0) begin
      failures++;
      $display("ERROR: sent %0d packets, received %0d", sent, received);
    end
    foreach (ev_cnt[i]) begin
      $display("event %-10s : %0d", ev_name[i], ev_cnt[i]);
      checks++;
      if (ev_cnt[i] == 0) begin
        failures++;
        $display("ERROR: mechanism %s never happened", ev_name[i]);
      end
    end
    $display("packets sent %0d received %0d in %0d cycles", sent, received, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
