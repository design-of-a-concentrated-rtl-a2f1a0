// tb_core_inject: self-checking test of the injection crossbar between the
// four cores of router (1, 2) of a 4 x 4 torus and its four quadrant
// crossbars.
//
// Each core sends random four-flit packets to random routers; the quadrant
// inputs accept at random. Checks: every packet enters the quadrant that
// points the minimal way to its destination (ties of two hops go +x / +y;
// where a dimension needs no move the core's own quadrant bit decides);
// each quadrant receives whole packets, never flits of two packets mixed;
// every flit arrives once and in order; a core is only told ready when its
// flit is taken; ev_wait is raised when cores compete.
module tb_core_inject;
  import ctorus_pkg::*;
  localparam int K = 4;

  logic clk = 0, rst_n = 0;
  logic [CW-1:0] cur_x = 4'd1, cur_y = 4'd2;
  logic [CONC-1:0] c_valid, c_ready, q_valid, q_ready;
  flit_t [CONC-1:0] c_flit, q_flit;
  logic ev_wait;

  core_inject #(.K(K)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("ERROR t=%0t: %s", $time, msg); end
  endtask

  flit_t txq [CONC][$];
  flit_t sent_q [CONC][$];   // flits taken from each core, for matching
  int    q_owner [CONC];     // core whose packet a quadrant is receiving, -1 none
  int    n_pkts = 0, n_rx = 0, waits = 0;

  function automatic int expect_quad(flit_t f, int c);
    int dx, dy, xb, yb;
    dx = (int'(hdr_x(f)) - 1 + K) % K;
    dy = (int'(hdr_y(f)) - 2 + K) % K;
    xb = (dx == 0) ? c % 2 : (dx > K / 2);
    yb = (dy == 0) ? c / 2 : (dy > K / 2);
    return yb * 2 + xb;
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      for (int c = 0; c < CONC; c++) begin
        if (txq[c].size() == 0 && $urandom_range(99) < 50) begin
          flit_t f;
          int pk;
          pk = n_pkts++;
          for (int i = 0; i < PKT_FLITS; i++) begin
            f.head = i == 0; f.tail = i == PKT_FLITS - 1;
            f.data = {32'(pk), 32'(i), 32'(c), 22'($urandom), 2'($urandom), 4'($urandom_range(3)), 4'($urandom_range(3))};
            if (i > 0) f.data[9:0] = txq[c][0].data[9:0];
            txq[c].push_back(f);
          end
        end
        c_valid[c] = txq[c].size() > 0;
        c_flit[c]  = c_valid[c] ? txq[c][0] : '0;
        q_ready[c] = $urandom_range(99) < 70;
      end
      #1;
      if (ev_wait) waits++;
      for (int q = 0; q < CONC; q++) begin
        if (q_valid[q] && q_ready[q]) begin
          int src;
          src = int'(q_flit[q].data[63:32]);
          checks++;
          if (q_flit[q].head) begin
            check(q_owner[q] == -1, "head while another packet is entering the quadrant");
            check(expect_quad(q_flit[q], src) == q, "packet entered the wrong quadrant");
            q_owner[q] = src;
          end else begin
            check(q_owner[q] == src, "flits of two packets mixed in one quadrant");
          end
          check(txq[src].size() > 0 && q_flit[q] == txq[src][0], "flit out of order or corrupted");
          check(c_ready[src], "core not told its flit was taken");
          if (q_flit[q].tail) begin q_owner[q] = -1; n_rx++; end
        end
      end
      for (int c = 0; c < CONC; c++) begin
        if (c_valid[c] && c_ready[c]) void'(txq[c].pop_front());
      end
    end
  end

  initial begin
    foreach (q_owner[i]) q_owner[i] = -1;
    c_valid = '0; c_flit = '0; q_ready = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (4000) @(posedge clk);
    check(n_rx > 500 && waits > 0, "packets delivered and contention seen");
    $display("packets started %0d delivered %0d, wait cycles %0d", n_pkts, n_rx, waits);
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
