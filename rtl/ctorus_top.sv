// ctorus_top: concentrated torus (CTorus) network-on-chip.
//
// K x K routers (default 4 x 4) joined by wrap-around rings in x and y; each
// router serves four cores, so the default network connects 64 cores. Every
// pair of neighbouring routers is joined, per direction, by two
// channel-buffer links (VC0 and VC1) of STAGES three-state repeater stages
// each. The two links per direction make the network behave like a doubled
// (dual) network without doubling routers: packets of one direction can use
// either link and so avoid head-of-line blocking behind each other.
// With minimal routing the longest path is K/2 hops in x plus K/2 in y
// (4 hops for 4 x 4).
//
// Router (x, y) is number y*K + x; core c of it is core (y*K + x)*4 + c.
// The link leaving router (x, y) towards +x enters router ((x+1) mod K, y),
// and so on for the other directions; full, room and vc_en travel with each link.
//
// Interface per core: inj_valid/inj_flit/inj_ready (valid/ready, one flit
// per cycle) and ej_valid/ej_flit (cores always accept). A packet is a head
// flit (destination x in data[3:0], y in data[7:4], core in data[9:8]), body
// flits and a tail flit; the default packet is four 128-bit flits. ev gives
// each router's event flags. Reset is synchronous, active low.
module ctorus_top
  import ctorus_pkg::*;
#(
  parameter int K      = 4,
  parameter int STAGES = 11
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [K*K*CONC-1:0]   inj_valid,
  input  flit_t [K*K*CONC-1:0]  inj_flit,
  output logic [K*K*CONC-1:0]   inj_ready,
  output logic [K*K*CONC-1:0]   ej_valid,
  output flit_t [K*K*CONC-1:0]  ej_flit,
  output rtr_ev_t [K*K-1:0]     ev
);

  localparam int NR = K * K;

  logic  [NR-1:0][NLINK-1:0] lout_valid, lout_vc_en, lin_full;
  flit_t [NR-1:0][NLINK-1:0] lout_flit;
  logic  [NR-1:0][NLINK-1:0] lin_valid, lin_vc_en, lout_full;
  logic  [NR-1:0][NLINK-1:0][1:0] lin_room, lout_room;
  flit_t [NR-1:0][NLINK-1:0] lin_flit;

  // Router feeding router (x, y) through a link of direction d.
  function automatic int upstream(int x, int y, int d);
    case (d)
      0:       return y * K + (x + K - 1) % K;  // +x link comes from x-1
      1:       return y * K + (x + 1) % K;      // -x link comes from x+1
      2:       return ((y + K - 1) % K) * K + x;
      default: return ((y + 1) % K) * K + x;
    endcase
  endfunction

  // Router that a link of direction d leaving (x, y) goes to.
  function automatic int downstream(int x, int y, int d);
    case (d)
      0:       return y * K + (x + 1) % K;
      1:       return y * K + (x + K - 1) % K;
      2:       return ((y + 1) % K) * K + x;
      default: return ((y + K - 1) % K) * K + x;
    endcase
  endfunction

  for (genvar y = 0; y < K; y++) begin : g_y
    for (genvar x = 0; x < K; x++) begin : g_x
      localparam int R = y * K + x;
      for (genvar l = 0; l < NLINK; l++) begin : g_l
        localparam int U = upstream(x, y, l / 2);
        localparam int D = downstream(x, y, l / 2);
        assign lin_valid[R][l] = lout_valid[U][l];
        assign lin_flit[R][l]  = lout_flit[U][l];
        assign lin_vc_en[R][l] = lout_vc_en[U][l];
        assign lout_full[R][l] = lin_full[D][l];
        assign lout_room[R][l] = lin_room[D][l];
      end
      ctorus_router #(.K(K), .STAGES(STAGES)) u_rtr (
        .clk, .rst_n,
        .cur_x      (CW'(x)),
        .cur_y      (CW'(y)),
        .lin_valid  (lin_valid[R]),
        .lin_flit   (lin_flit[R]),
        .lin_vc_en  (lin_vc_en[R]),
        .lin_full   (lin_full[R]),
        .lin_room   (lin_room[R]),
        .lout_valid (lout_valid[R]),
        .lout_flit  (lout_flit[R]),
        .lout_vc_en (lout_vc_en[R]),
        .lout_full  (lout_full[R]),
        .lout_room  (lout_room[R]),
        .inj_valid  (inj_valid[R*CONC +: CONC]),
        .inj_flit   (inj_flit[R*CONC +: CONC]),
        .inj_ready  (inj_ready[R*CONC +: CONC]),
        .ej_valid   (ej_valid[R*CONC +: CONC]),
        .ej_flit    (ej_flit[R*CONC +: CONC]),
        .ev         (ev[R])
      );
    end
  end

endmodule
