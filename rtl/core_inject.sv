// core_inject: injection side of the 4x4 core crossbar of a router.
//
// Each of the four cores of a concentration injects packets; each packet
// must enter the quadrant crossbar (NE, NW, SE, SW) that matches the
// directions it has to travel on the torus. The head flit's destination
// fixes the quadrant: +x or -x by the shorter way round the x ring (a tie of
// K/2 hops goes +x), likewise for y. Where a dimension needs no move the
// core's own quadrant (core c has quadrant c) decides, so a packet to a
// core of the same router stays in its core's crossbar.
// Each quadrant injection input takes one packet at a time: a round-robin
// arbiter picks among the cores whose head flit wants the quadrant, and the
// quadrant stays with that core until its tail flit has passed. Data goes
// through a 4x4 crossbar (xbar).
//
// Interface: c_* is the valid/ready flit handshake of each core; q_* feeds
// the injection input register of each quadrant crossbar. ev_wait is set
// when a core's head flit waits for its quadrant. Grants are combinational,
// the per-quadrant ownership is updated on the rising clock edge and cleared
// by reset (synchronous, active low).
// The quadrant rule for a dimension without moves, and the arbitration,
// are this design's choices.
module core_inject
  import ctorus_pkg::*;
#(
  parameter int K = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CW-1:0]       cur_x,
  input  logic [CW-1:0]       cur_y,
  input  logic [CONC-1:0]     c_valid,
  input  flit_t [CONC-1:0]    c_flit,
  output logic [CONC-1:0]     c_ready,
  output logic [CONC-1:0]     q_valid,
  output flit_t [CONC-1:0]    q_flit,
  input  logic [CONC-1:0]     q_ready,
  output logic                ev_wait
);

  logic [CONC-1:0][1:0]      want_q;
  logic [CONC-1:0]           lock_q;
  logic [CONC-1:0][1:0]      owner_q;
  logic [CONC-1:0][CONC-1:0] rq, gn;
  logic [CONC-1:0]           conn;
  logic [CONC-1:0][1:0]      src;
  logic [CONC-1:0]           xfer;
  logic [CONC-1:0][1:0]      sx, sy;    // {no move, negative} per dimension

  // Quadrant wanted by each core's head flit.
  always_comb begin
    for (int c = 0; c < CONC; c++) begin
      sx[c] = ring_sense(cur_x, hdr_x(c_flit[c]), K);
      sy[c] = ring_sense(cur_y, hdr_y(c_flit[c]), K);
      want_q[c][0] = sx[c][1] ? c[0] : sx[c][0];
      want_q[c][1] = sy[c][1] ? c[1] : sy[c][0];
    end
    for (int q = 0; q < CONC; q++)
      for (int c = 0; c < CONC; c++)
        rq[q][c] = !lock_q[q] && c_valid[c] && c_flit[c].head && (int'(want_q[c]) == q);
  end

  for (genvar q = 0; q < CONC; q++) begin : g_arb
    rr_arbiter #(.N(CONC)) u_arb (.clk, .rst_n, .req(rq[q]), .en(q_ready[q]), .gnt(gn[q]));
  end

  always_comb begin
    for (int q = 0; q < CONC; q++) begin
      conn[q] = lock_q[q];
      src[q]  = owner_q[q];
      for (int c = 0; c < CONC; c++)
        if (gn[q][c]) begin
          conn[q] = 1'b1;
          src[q]  = 2'(c);
        end
      q_valid[q] = conn[q] && c_valid[src[q]];
      xfer[q]    = q_valid[q] && q_ready[q];
    end
    c_ready = '0;
    for (int q = 0; q < CONC; q++)
      if (conn[q]) c_ready[src[q]] = c_ready[src[q]] | q_ready[q];
    ev_wait = 1'b0;
    for (int c = 0; c < CONC; c++)
      if (c_valid[c] && c_flit[c].head && !c_ready[c]) ev_wait = 1'b1;
  end

  xbar #(.N(CONC), .M(CONC), .W($bits(flit_t)), .SW(2)) u_xbar (
    .in(c_flit), .out_en(conn), .sel(src), .out(q_flit)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lock_q  <= '0;
      owner_q <= '0;
    end else begin
      for (int q = 0; q < CONC; q++) begin
        if (xfer[q]) begin
          lock_q[q]  <= !q_flit[q].tail;
          owner_q[q] <= src[q];
        end
      end
    end
  end

  // A core is connected to at most one quadrant.
  logic [CONC-1:0][CONC-1:0] c_conn;
  always_comb begin
    for (int c = 0; c < CONC; c++)
      for (int q = 0; q < CONC; q++) c_conn[c][q] = conn[q] && int'(src[q]) == c;
  end
  for (genvar c = 0; c < CONC; c++) begin : g_chk
    a_one_quad: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(c_conn[c]));
  end

endmodule
