// ctorus_router: router of the concentrated torus with dual channel-buffer
// inputs and the multi-crossbar (mx) switch.
//
// Structure
//  * Eight incoming links, two per direction (+x, -x, +y, -y), each a chain
//    of three-state repeater stages (tsr_link) with its own control block
//    and input register. Link (dir, vc) is numbered dir*2+vc.
//  * Four 3x3 quadrant crossbars, NE, NW, SE, SW. Quadrant q has three
//    inputs: the x-travelling link and the y-travelling link that enter it
//    (see ctorus_pkg::link_quad) and one injection input; and three outputs:
//    its x direction, its y direction and ejection.
//  * A 4x4 crossbar from the four cores to the quadrants' injection inputs
//    (core_inject) and a 4x4 crossbar from the quadrants' ejection outputs to
//    the cores.
//  * Per output direction a DEMUX (dc_demux) that puts the flit from either
//    of the two crossbars that drive the direction onto link VC0 or VC1.
//
// Pipeline (per hop, head flit): RC+VA, SA, ST, LT.
//  cycle 0  RC+VA: the head flit in an input register picks a free output
//           VC (link) or ejection port; va_alloc grants it. A link is only
//           offered when its channel has room for the whole packet, or for
//           two packets when the packet comes from a core, turns from the
//           other dimension or changes VC (see cb_ctrl, input_port).
//  cycle 1  SA: per quadrant crossbar, one input per output (sa_alloc),
//           only towards links that are not full; the granted flit leaves
//           its register into the ST register and the downstream control
//           block is told a flit is coming (vc_en).
//  cycle 2  ST: the flit crosses the quadrant crossbar into the output
//           register.
//  cycle 3  LT: through the DEMUX onto the link; it reaches the next
//           router's input register at the end of the cycle, or stops in a
//           repeater stage if that register is full.
// Body and tail flits skip RC+VA and follow at one flit per cycle. A flit
// reaches a core one cycle after ST (the ejection crossbar counts as its
// LT); cores always accept.
//
// Interface: lin_* incoming links and lin_full/lin_room back upstream;
// lout_* outgoing links with lout_vc_en announcements and lout_full/lout_room
// from downstream; inj_* /
// ej_* the four cores; cur_x/cur_y this router's place; ev event flags.
// Reset is synchronous, active low.
//
// Follows the source: dual links per direction, four quadrant crossbars
// along NE/SW/NW/SE, two 4x4 core crossbars, the 4-stage pipeline and the
// random choice between two free routes. This design's own: the link to
// quadrant mapping for the links other than +x, the packet-held VCs and
// ejection ports, round-robin arbitration, a 16-bit LFSR as random source,
// and the whole-packet / two-packet room rule at allocation. The source
// argues that two VCs and quadrant-bound routes avoid deadlock; with
// wrap-around rings that is not enough (a ring of full channels can wait on
// itself), so this design adds the room rule and routes x before y (see
// route_unit).
module ctorus_router
  import ctorus_pkg::*;
#(
  parameter int K      = 4,
  parameter int STAGES = 11
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CW-1:0]       cur_x,
  input  logic [CW-1:0]       cur_y,
  // incoming links
  input  logic [NLINK-1:0]    lin_valid,
  input  flit_t [NLINK-1:0]   lin_flit,
  input  logic [NLINK-1:0]    lin_vc_en,
  output logic [NLINK-1:0]    lin_full,
  output logic [NLINK-1:0][1:0] lin_room,
  // outgoing links
  output logic [NLINK-1:0]    lout_valid,
  output flit_t [NLINK-1:0]   lout_flit,
  output logic [NLINK-1:0]    lout_vc_en,
  input  logic [NLINK-1:0]    lout_full,
  input  logic [NLINK-1:0][1:0] lout_room,
  // cores
  input  logic [CONC-1:0]     inj_valid,
  input  flit_t [CONC-1:0]    inj_flit,
  output logic [CONC-1:0]     inj_ready,
  output logic [CONC-1:0]     ej_valid,
  output flit_t [CONC-1:0]    ej_flit,
  output rtr_ev_t             ev
);

  // ---------------------------------------------------------------- inputs
  logic [NIN-1:0]        p_in_valid, p_in_ready, p_reg_full;
  flit_t [NIN-1:0]       p_in_flit;
  logic [NLINK-1:0]      l_out_valid;
  flit_t [NLINK-1:0]     l_out_flit;
  logic [NLINK-1:0][STAGES-1:0] l_hold;
  logic [CONC-1:0]       qi_valid, qi_ready;
  flit_t [CONC-1:0]      qi_flit;
  logic                  ev_inj_wait;

  // Link feeding input j (0: x link, 1: y link) of quadrant q.
  function automatic int port_link(int q, int j);
    logic [1:0] qq;
    qq = 2'(q);
    if (j == 0) return int'(quad_xdir(qq)) * 2 + int'(qq[1]);
    return int'(quad_ydir(qq)) * 2 + int'(qq[0]);
  endfunction

  // Input port fed by link l.
  function automatic int link_port(int l);
    logic [1:0] qq;
    qq = link_quad(2'(l / 2), l[0]);
    return int'(qq) * 3 + ((l / 2 >= 2) ? 1 : 0);
  endfunction

  for (genvar l = 0; l < NLINK; l++) begin : g_link
    localparam int P = link_port(l);
    tsr_link #(.STAGES(STAGES)) u_link (
      .clk, .rst_n,
      .in_valid  (lin_valid[l]),
      .in_flit   (lin_flit[l]),
      .vc_en     (lin_vc_en[l]),
      .full      (lin_full[l]),
      .room      (lin_room[l]),
      .out_valid (l_out_valid[l]),
      .out_flit  (l_out_flit[l]),
      .out_ready (p_in_ready[P]),
      .reg_full  (p_reg_full[P]),
      .rel_stage ({STAGES{p_in_ready[P]}}),
      .hold      (l_hold[l])
    );
  end

  always_comb begin
    for (int q = 0; q < CONC; q++) begin
      p_in_valid[q*3+0] = l_out_valid[port_link(q, 0)];
      p_in_flit[q*3+0]  = l_out_flit[port_link(q, 0)];
      p_in_valid[q*3+1] = l_out_valid[port_link(q, 1)];
      p_in_flit[q*3+1]  = l_out_flit[port_link(q, 1)];
      p_in_valid[q*3+2] = qi_valid[q];
      p_in_flit[q*3+2]  = qi_flit[q];
      qi_ready[q]       = p_in_ready[q*3+2];
    end
  end

  core_inject #(.K(K)) u_inj (
    .clk, .rst_n, .cur_x, .cur_y,
    .c_valid (inj_valid), .c_flit (inj_flit), .c_ready (inj_ready),
    .q_valid (qi_valid), .q_flit (qi_flit), .q_ready (qi_ready),
    .ev_wait (ev_inj_wait)
  );

  // ----------------------------------------------------------- input ports
  logic [15:0]           lfsr_q;
  logic [NRES-1:0]       res_busy, res_full, res_room1, res_room2;
  logic [NIN-1:0]        va_req, va_gnt, sa_req, sa_gnt, rel_valid;
  logic [NIN-1:0][3:0]   va_res, sa_res, rel_res;
  flit_t [NIN-1:0]       cur_flit;
  logic [NIN-1:0]        ev_rand, ev_busy;

  assign res_full = {{CONC{1'b0}}, lout_full};
  always_comb begin
    res_room1 = '1;
    res_room2 = '1;
    for (int l = 0; l < NLINK; l++) begin
      res_room1[l] = lout_room[l][0];
      res_room2[l] = lout_room[l][1];
    end
  end

  for (genvar p = 0; p < NIN; p++) begin : g_port
    input_port #(.K(K)) u_port (
      .clk, .rst_n,
      .quad      (2'(p / 3)),
      .from_core (p % 3 == 2),
      .in_link   (3'(port_link(p / 3, p % 3 == 2 ? 0 : p % 3))),
      .cur_x, .cur_y,
      .in_valid  (p_in_valid[p]),
      .in_flit   (p_in_flit[p]),
      .in_ready  (p_in_ready[p]),
      .reg_full  (p_reg_full[p]),
      .res_busy,
      .res_room1,
      .res_room2,
      .rnd       (lfsr_q[p]),
      .va_req    (va_req[p]),
      .va_res    (va_res[p]),
      .va_gnt    (va_gnt[p]),
      .res_full,
      .sa_req    (sa_req[p]),
      .sa_res    (sa_res[p]),
      .sa_gnt    (sa_gnt[p]),
      .cur_flit  (cur_flit[p]),
      .rel_valid (rel_valid[p]),
      .rel_res   (rel_res[p]),
      .ev_adapt_rand (ev_rand[p]),
      .ev_adapt_busy (ev_busy[p])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) lfsr_q <= 16'hACE1;
    else        lfsr_q <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
  end

  // ------------------------------------------------------------------- VA
  va_alloc #(.N(NIN), .M(NRES), .RW(4)) u_va (
    .clk, .rst_n,
    .req (va_req), .req_res (va_res), .gnt (va_gnt),
    .rel (rel_valid), .rel_res (rel_res), .busy (res_busy)
  );

  // ------------------------------------------------------------------- SA
  // Crossbar output of a resource: 0 = x link, 1 = y link, 2 = ejection.
  function automatic logic [1:0] res_out(logic [3:0] r);
    if (r >= 4'(NLINK)) return 2'd2;
    return (r[2:1] == DIR_XP || r[2:1] == DIR_XN) ? 2'd0 : 2'd1;
  endfunction

  logic [CONC-1:0][2:0]      q_sa_req, q_sa_gnt, q_out_gnt;
  logic [CONC-1:0][2:0][1:0] q_req_out, q_out_sel;

  for (genvar q = 0; q < CONC; q++) begin : g_sa
    always_comb begin
      for (int j = 0; j < 3; j++) begin
        q_sa_req[q][j]  = sa_req[q*3+j];
        q_req_out[q][j] = res_out(sa_res[q*3+j]);
        sa_gnt[q*3+j]   = q_sa_gnt[q][j];
      end
    end
    sa_alloc #(.N(3), .M(3), .OW(2), .IW(2)) u_sa (
      .clk, .rst_n,
      .req (q_sa_req[q]), .req_out (q_req_out[q]),
      .gnt (q_sa_gnt[q]), .out_gnt (q_out_gnt[q]), .out_sel (q_out_sel[q])
    );
  end

  // ------------------------------------------------------- ST registers
  typedef struct packed {
    flit_t      flit;
    logic [3:0] res;
  } xfl_t;

  xfl_t  [NIN-1:0]           st_q;
  logic  [CONC-1:0][2:0]     st_oen_q;
  logic  [CONC-1:0][2:0][1:0] st_osel_q;
  xfl_t  [CONC-1:0][2:0]     xo_q;     // crossbar output registers
  logic  [CONC-1:0][2:0]     xo_v_q;
  xfl_t  [CONC-1:0][2:0]     xb_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_oen_q <= '0;
      xo_v_q   <= '0;
    end else begin
      st_oen_q <= q_out_gnt;
      xo_v_q   <= st_oen_q;
    end
  end

  always_ff @(posedge clk) begin
    st_osel_q <= q_out_sel;
    for (int p = 0; p < NIN; p++)
      if (sa_gnt[p]) st_q[p] <= '{flit: cur_flit[p], res: sa_res[p]};
    xo_q <= xb_out;
  end

  for (genvar q = 0; q < CONC; q++) begin : g_xb
    xbar #(.N(3), .M(3), .W($bits(xfl_t)), .SW(2)) u_xbar (
      .in     (st_q[q*3 +: 3]),
      .out_en (st_oen_q[q]),
      .sel    (st_osel_q[q]),
      .out    (xb_out[q])
    );
  end

  // ------------------------------------------------------ LT: DEMUX per dir
  for (genvar d = 0; d < NDIR; d++) begin : g_dir
    localparam bit ISX = (d < 2);
    localparam int O   = ISX ? 0 : 1;
    logic [1:0] ann_v, ann_vc, in_v, in_vc, vce, lv;
    flit_t [1:0] in_f, lf;
    // The two quadrants driving direction d, slot s.
    localparam int Q0 = ISX ? (d == DIR_XN ? 1 : 0) : (d == DIR_YN ? 2 : 0);
    localparam int Q1 = ISX ? Q0 + 2 : Q0 + 1;
    always_comb begin
      for (int s = 0; s < 2; s++) begin
        int q;
        q = (s == 0) ? Q0 : Q1;
        ann_v[s]  = q_out_gnt[q][O];
        ann_vc[s] = sa_res[q*3 + int'(q_out_sel[q][O])][0];
        in_v[s]   = xo_v_q[q][O];
        in_vc[s]  = xo_q[q][O].res[0];
        in_f[s]   = xo_q[q][O].flit;
      end
    end
    dc_demux u_demux (
      .ann_valid (ann_v), .ann_vc (ann_vc),
      .in_valid (in_v), .in_flit (in_f), .in_vc (in_vc),
      .vc_en (vce), .link_valid (lv), .link_flit (lf)
    );
    // The two crossbars of a direction never pick the same link.
    a_no_clash: assert property (@(posedge clk) disable iff (!rst_n)
      !(in_v == 2'b11 && in_vc[0] == in_vc[1]) && !(ann_v == 2'b11 && ann_vc[0] == ann_vc[1]));
    assign lout_vc_en[d*2 +: 2] = vce;
    assign lout_valid[d*2 +: 2] = lv;
    assign lout_flit[d*2 +: 2]  = lf;
  end

  // ------------------------------------------------------- ejection 4x4
  logic [CONC-1:0]      ej_en;
  logic [CONC-1:0][1:0] ej_sel;
  flit_t [CONC-1:0]     ej_in;

  always_comb begin
    ej_en  = '0;
    ej_sel = '0;
    for (int q = 0; q < CONC; q++) ej_in[q] = xo_q[q][2].flit;
    for (int c = 0; c < CONC; c++)
      for (int q = 0; q < CONC; q++)
        if (xo_v_q[q][2] && int'(xo_q[q][2].res) == NLINK + c) begin
          ej_en[c]  = 1'b1;
          ej_sel[c] = 2'(q);
        end
  end

  xbar #(.N(CONC), .M(CONC), .W($bits(flit_t)), .SW(2)) u_ej_xbar (
    .in (ej_in), .out_en (ej_en), .sel (ej_sel), .out (ej_flit)
  );
  assign ej_valid = ej_en;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev = '0;
    for (int l = 0; l < NLINK; l++) begin
      ev.hold = ev.hold | (l_hold[l] != '0);
      ev.full = ev.full | lin_full[l];
    end
    for (int p = 0; p < NIN; p++) begin
      ev.adapt_rand = ev.adapt_rand | (ev_rand[p] && va_gnt[p]);
      ev.adapt_busy = ev.adapt_busy | (ev_busy[p] && va_gnt[p]);
      ev.vc1        = ev.vc1 | (va_gnt[p] && va_res[p] < 4'(NLINK) && va_res[p][0]);
      ev.va_lost    = ev.va_lost | (va_req[p] && !va_gnt[p]);
      ev.sa_lost    = ev.sa_lost | (sa_req[p] && !sa_gnt[p]);
    end
    ev.inj_wait = ev_inj_wait;
    ev.wrap = (lout_valid[DIR_XP*2 +: 2] != '0 && int'(cur_x) == K - 1) ||
              (lout_valid[DIR_XN*2 +: 2] != '0 && cur_x == '0) ||
              (lout_valid[DIR_YP*2 +: 2] != '0 && int'(cur_y) == K - 1) ||
              (lout_valid[DIR_YN*2 +: 2] != '0 && cur_y == '0);
    ev.eject = ej_valid != '0;
  end

endmodule
