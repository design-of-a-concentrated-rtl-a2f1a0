// ctorus_pkg: types, constants and small helper functions shared by the
// concentrated-torus (CTorus) network-on-chip.
//
// The network is a K x K torus of routers; each router concentrates CONC = 4
// cores. Every direction between two neighbouring routers carries two
// channel-buffer links (the "dual channel" organisation), and the router's
// switch is split into four 3x3 quadrant crossbars (NE, NW, SE, SW).
//
// Encodings chosen here (not fixed by the source description):
//  * A quadrant is a 2-bit value {yneg, xneg}: NE=0, NW=1, SE=2, SW=3.
//  * A direction is XP (+x), XN (-x), YP (+y), YN (-y); a link is numbered
//    dir*2+vc, so links 0..7. VA resources 8..11 are the four core ejection
//    ports of a router.
//  * The link of direction d and VC v enters the downstream quadrant
//    crossbar given by link_quad(): +x VC0 -> NE, +x VC1 -> SE, -x VC0 -> NW,
//    -x VC1 -> SW, +y VC0 -> NE, +y VC1 -> NW, -y VC0 -> SE, -y VC1 -> SW.
//    The +x case (I0 -> NE, I'0 -> SE) is the one the description spells out;
//    the rest follow by symmetry.
//  * A flit is 128 data bits plus head/tail marks carried beside them. The
//    head flit carries the destination router (x, y) and core in its low bits.
package ctorus_pkg;

  parameter int FLIT_W = 128;        // flit width in bits
  parameter int PKT_FLITS = 4;       // flits per packet (512-bit packets)
  parameter int CONC = 4;            // cores per router
  parameter int NDIR = 4;
  parameter int NVC = 2;             // two channel-buffer links per direction
  parameter int NLINK = NDIR * NVC;  // 8 outgoing / incoming links per router
  parameter int NRES = NLINK + CONC; // VA resources: 8 links + 4 eject ports
  parameter int NIN = 12;            // router inputs: 4 quadrants x 3
  parameter int MAXK = 16;           // widest torus the coordinate fields allow
  parameter int CW = 4;              // coordinate field width in the head flit

  typedef enum logic [1:0] {DIR_XP = 2'd0, DIR_XN = 2'd1, DIR_YP = 2'd2, DIR_YN = 2'd3} dir_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Destination fields inside the data of a head flit.
  function automatic logic [CW-1:0] hdr_x(flit_t f);
    return f.data[CW-1:0];
  endfunction
  function automatic logic [CW-1:0] hdr_y(flit_t f);
    return f.data[2*CW-1:CW];
  endfunction
  function automatic logic [1:0] hdr_core(flit_t f);
    return f.data[2*CW+1:2*CW];
  endfunction

  // Output directions of a quadrant crossbar.
  function automatic logic [1:0] quad_xdir(logic [1:0] q);
    return q[0] ? DIR_XN : DIR_XP;
  endfunction
  function automatic logic [1:0] quad_ydir(logic [1:0] q);
    return q[1] ? DIR_YN : DIR_YP;
  endfunction

  // Quadrant crossbar that link (dir, vc) enters at the downstream router.
  function automatic logic [1:0] link_quad(logic [1:0] dir, logic vc);
    logic [1:0] q;
    if (dir == DIR_XP || dir == DIR_XN) q = {vc, dir == DIR_XN};
    else                                q = {dir == DIR_YN, vc};
    return q;
  endfunction

  // Hops still to go along one dimension of a k-ary ring, moving in the
  // given sense (neg = towards lower coordinates).
  function automatic logic [CW-1:0] ring_hops(logic [CW-1:0] cur, logic [CW-1:0] dst,
                                              logic neg, int k);
    int d;
    d = neg ? (int'(cur) - int'(dst)) : (int'(dst) - int'(cur));
    if (d < 0) d = d + k;
    return CW'(d);
  endfunction

  // Minimal sense of travel from cur to dst on a k-ary ring: 0 = positive,
  // 1 = negative. free = 1 when no move is needed in this dimension.
  // A tie (k/2 hops either way) goes the positive way.
  function automatic logic [1:0] ring_sense(logic [CW-1:0] cur, logic [CW-1:0] dst, int k);
    int d;
    d = int'(dst) - int'(cur);
    if (d < 0) d = d + k;
    if (d == 0) return 2'b10;          // {free, neg}
    return {1'b0, d > k / 2};
  endfunction

  // Events a router reports each cycle, for observation and test.
  typedef struct packed {
    logic hold;        // a channel-buffer stage holds a flit
    logic full;        // a link signals a full channel upstream
    logic adapt_rand;  // two free routes offered, one picked at random
    logic adapt_busy;  // one route's VC was taken, the other one used
    logic vc1;         // a link of the upper VC was allocated
    logic va_lost;     // a VA request lost arbitration
    logic sa_lost;     // an SA request lost arbitration
    logic inj_wait;    // a core waited for an injection quadrant
    logic wrap;        // a flit left on a wrap-around link
    logic eject;       // a flit was delivered to a core
  } rtr_ev_t;

endpackage
