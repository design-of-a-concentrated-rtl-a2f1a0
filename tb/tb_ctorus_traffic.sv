// tb_ctorus_traffic: open-loop synthetic traffic on the full 64-core network
// (4 x 4 routers, 11 repeater stages per link), nine patterns at three loads.
//
// Each core has an unbounded source queue. Every cycle of a measurement
// window it creates a 4-flit packet with probability load / 4 (Bernoulli),
// so `load` is offered flits per cycle per core. After the window no new
// packets are made and the network drains. For each pattern and load the
// bench prints the accepted throughput (flits delivered during the window per
// cycle per core) and the average packet latency (creation to tail
// delivery, source queueing included).
//
// Patterns, on the 6-bit core number s = {y[1:0], x[1:0], c[1:0]}:
//   uniform      random destination other than the source
//   nonuniform   half of the packets to a core of the same or an adjacent
//                router, the rest uniform
//   bitrev       bit reversal of s
//   butterfly    s with its top and bottom bits exchanged
//   complement   ~s
//   transpose    upper and lower three bits exchanged
//   shuffle      s rotated left by one bit
//   neighbor     router (x+1, y), same core position
//   tornado      router (x+1, y+1), same core position (K/2 - 1 hops on
//                each ring)
// A permutation that maps a core to itself sends nothing from that core.
//
// Checks: every flit arrives at the core named in its head, once, in order,
// unbroken and bit-exact; every packet created is delivered; no packet is
// faster than the zero-load bound 4*hops + 4 + 3 cycles (head latency plus
// the three body flits).
module tb_ctorus_traffic;
  import ctorus_pkg::*;

  localparam int K  = 4;
  localparam int NR = K * K;
  localparam int NC = NR * CONC;
  localparam int WINDOW = 400;

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

  function automatic logic [63:0] mix(int src, int seq, int idx);
    logic [63:0] h;
    h = 64'hD1B54A32D192ED03 ^ (64'(src) << 40) ^ (64'(seq) << 8) ^ 64'(idx);
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

  function automatic longint key(int src, int seq);
    return (longint'(src) << 32) | longint'(seq);
  endfunction

  function automatic int ring_d(int a, int b);
    int d;
    d = (b - a + K) % K;
    return (d > K / 2) ? K - d : d;
  endfunction

  function automatic int hops(int src, int dst);
    int sr, dr;
    sr = src / CONC; dr = dst / CONC;
    return ring_d(sr % K, dr % K) + ring_d(sr / K, dr / K);
  endfunction

  // ------------------------------------------------------------ patterns
  localparam int NPAT = 9;
  string pat_name [NPAT] = '{"uniform", "nonuniform", "bitrev", "butterfly", "complement",
                             "transpose", "shuffle", "neighbor", "tornado"};

  function automatic int core_of(int x, int y, int c);
    return (((y + K) % K) * K + ((x + K) % K)) * CONC + c;
  endfunction

  // destination of a new packet from core s, or -1 for none
  function automatic int pick_dst(int pat, int s);
    logic [5:0] b, d;
    int x, y, c, r;
    b = 6'(s);
    c = s % CONC; x = (s / CONC) % K; y = (s / CONC) / K;
    case (pat)
      0: begin
        do r = $urandom_range(NC - 1); while (r == s);
        return r;
      end
      1: begin
        if ($urandom_range(1) == 0) begin
          r = $urandom_range(4);
          case (r)
            0: return core_of(x, y, (c + 1 + $urandom_range(2)) % CONC);
            1: return core_of(x + 1, y, $urandom_range(3));
            2: return core_of(x - 1, y, $urandom_range(3));
            3: return core_of(x, y + 1, $urandom_range(3));
            default: return core_of(x, y - 1, $urandom_range(3));
          endcase
        end
        do r = $urandom_range(NC - 1); while (r == s);
        return r;
      end
      2: for (int i = 0; i < 6; i++) d[i] = b[5 - i];
      3: d = {b[0], b[4:1], b[5]};
      4: d = ~b;
      5: d = {b[2:0], b[5:3]};
      6: d = {b[4:0], b[5]};
      7: return core_of(x + 1, y, c);
      default: return core_of(x + 1, y + 1, c);
    endcase
    return (int'(d) == s) ? -1 : int'(d);
  endfunction

  // --------------------------------------------------------------- state
  flit_t           txq [NC][$];
  int              seq_next [NC];
  int              expect_dst [longint];
  longint unsigned born [longint];
  bit              gen_on = 0;
  real             load = 0.0;
  int              pattern = 0;
  longint unsigned win_start = 0, win_end = 0;
  longint          win_flits = 0;
  longint          lat_sum = 0;
  int              lat_n = 0, created = 0, delivered = 0;

  bit   rx_busy [NC];
  int   rx_src [NC], rx_seq [NC], rx_idx [NC];

  initial begin
    inj_valid = '0;
    inj_flit  = '0;
    foreach (seq_next[i]) seq_next[i] = 0;
    foreach (rx_busy[i]) rx_busy[i] = 0;
  end

  always @(negedge clk) begin
    cycle++;
    if (rst_n) begin
      for (int c = 0; c < NC; c++) begin
        if (ej_valid[c]) begin
          flit_t f;
          int src, seq, idx;
          f   = ej_flit[c];
          src = int'(f.data[23:16]);
          seq = int'(f.data[55:24]);
          idx = int'(f.data[63:56]);
          checks++;
          if (cycle > win_start && cycle <= win_end) win_flits++;
          if (!rx_busy[c]) begin
            if (!f.head || !expect_dst.exists(key(src, seq)) || expect_dst[key(src, seq)] != c) begin
              failures++;
              $display("ERROR cycle %0d core %0d: unexpected head (head=%0b src=%0d seq=%0d)",
                       cycle, c, f.head, src, seq);
            end else begin
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
            longint unsigned lat;
            rx_busy[c] = 0;
            lat = cycle - born[key(rx_src[c], rx_seq[c])];
            checks++;
            if (lat < longint'(4 * hops(rx_src[c], c) + 4 + PKT_FLITS - 1)) begin
              failures++;
              $display("ERROR: packet %0d/%0d took %0d cycles, below the zero-load bound",
                       rx_src[c], rx_seq[c], lat);
            end
            lat_sum += longint'(lat);
            lat_n++;
            expect_dst.delete(key(rx_src[c], rx_seq[c]));
            born.delete(key(rx_src[c], rx_seq[c]));
            delivered++;
          end
        end
      end
      for (int c = 0; c < NC; c++) begin
        if (gen_on && ($urandom_range(9999) < int'(load / real'(PKT_FLITS) * 10000.0))) begin
          int dst, s;
          dst = pick_dst(pattern, c);
          if (dst >= 0) begin
            s = seq_next[c]++;
            for (int i = 0; i < PKT_FLITS; i++) txq[c].push_back(make_flit(c, dst, s, i));
            expect_dst[key(c, s)] = dst;
            born[key(c, s)] = cycle;
            created++;
          end
        end
        inj_valid[c] = txq[c].size() > 0;
        inj_flit[c]  = inj_valid[c] ? txq[c][0] : '0;
      end
      #1;
      for (int c = 0; c < NC; c++)
        if (inj_valid[c] && inj_ready[c]) void'(txq[c].pop_front());
    end
  end

  function automatic bit queued();
    for (int c = 0; c < NC; c++)
      if (txq[c].size() != 0) return 1;
    return 0;
  endfunction

  task automatic run(int pat, real ld);
    int n;
    pattern = pat; load = ld;
    win_flits = 0; lat_sum = 0; lat_n = 0; created = 0; delivered = 0;
    @(posedge clk);
    win_start = cycle; win_end = cycle + WINDOW;
    gen_on = 1;
    repeat (WINDOW) @(posedge clk);
    gen_on = 0;
    n = 0;
    while ((expect_dst.size() != 0 || queued()) && n < 40000) begin
      @(posedge clk);
      n++;
    end
    checks++;
    if (expect_dst.size() != 0 || delivered != created) begin
      failures++;
      $display("ERROR %s load %0.2f: %0d of %0d packets not delivered", pat_name[pat], ld,
               created - delivered, created);
    end
    $display("%-10s offered %0.2f  accepted %0.3f flits/cycle/core  avg latency %0.1f cycles  (%0d packets)",
             pat_name[pat], ld, real'(win_flits) / real'(WINDOW * NC),
             lat_n ? real'(lat_sum) / real'(lat_n) : 0.0, created);
  endtask

  real loads [3] = '{0.1, 0.3, 0.5};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int p = 0; p < NPAT; p++)
      foreach (loads[l]) run(p, loads[l]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
