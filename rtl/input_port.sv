// input_port: the input register of one router input and the per-packet
// state of its route-computation / VC-allocation (RC+VA) stage.
//
// Every channel-buffer link ends in a dedicated one-flit register at the
// downstream router; the four injection inputs have the same register. A
// flit written into the register goes through the router pipeline:
//  1. RC+VA (head flits only): route_unit lists the candidate resources
//     (output links with their VC, or a core ejection port). Of those not
//     already held by another packet, and whose channel has room for the
//     whole packet (two packets when the packet comes from a core, turns
//     from the other dimension or changes VC; from_core / in_link tell which
//     input this is), one is requested from the VC allocator;
//     when both are free the choice is random (rnd), so a packet always takes
//     a route whose VC is available. The grant is stored for the packet.
//  2. SA: every flit of the packet asks the switch allocator for its
//     crossbar output while the allocated link is not full.
//  3. On the SA grant the flit leaves the register (towards ST, then LT);
//     a tail flit also hands its resource back (rel_*).
// The register accepts a new flit in the cycle the old one leaves, so a
// packet streams at one flit per cycle. Reset (synchronous, active low)
// empties the register and clears the allocation.
//
// The RC+VA / SA / ST / LT split is the source's 4-stage pipeline; the
// request/grant handshakes and the room rule are this design's own.
module input_port
  import ctorus_pkg::*;
#(
  parameter int K = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [1:0]      quad,
  input  logic            from_core,  // this input is fed by the cores
  input  logic [2:0]      in_link,    // else: the link feeding it, dir*2+vc
  input  logic [CW-1:0]   cur_x,
  input  logic [CW-1:0]   cur_y,
  // flit into the register
  input  logic            in_valid,
  input  flit_t           in_flit,
  output logic            in_ready,
  output logic            reg_full,
  // RC+VA
  input  logic [NRES-1:0] res_busy,
  input  logic [NRES-1:0] res_room1,  // channel has room for one packet
  input  logic [NRES-1:0] res_room2,  // ... for two packets
  input  logic            rnd,
  output logic            va_req,
  output logic [3:0]      va_res,
  input  logic            va_gnt,
  // SA
  input  logic [NRES-1:0] res_full,
  output logic            sa_req,
  output logic [3:0]      sa_res,
  input  logic            sa_gnt,
  output flit_t           cur_flit,
  // resource hand-back on the tail flit
  output logic            rel_valid,
  output logic [3:0]      rel_res,
  // events
  output logic            ev_adapt_rand,
  output logic            ev_adapt_busy
);

  flit_t      reg_q;
  logic       reg_v;
  logic       alloc_v;
  logic [3:0] alloc_res;

  logic [1:0]      cand_v;
  logic [1:0][3:0] cand_res;
  logic [1:0]      cand_free;

  route_unit #(.K(K)) u_rc (
    .quad, .cur_x, .cur_y,
    .dst_x    (hdr_x(reg_q)),
    .dst_y    (hdr_y(reg_q)),
    .dst_core (hdr_core(reg_q)),
    .cand_v, .cand_res
  );

  assign reg_full = reg_v;
  assign cur_flit = reg_q;

  // RC+VA: choose among candidates whose resource is free.
  // A link counts as free only with room for the whole packet. Continuing
  // on the same link class (same direction and VC as the input link) needs
  // room for one packet; entering a class (from a core, turning from the
  // other dimension, or changing VC) needs room for two, so every ring of
  // channels keeps a packet-sized gap. Going on in the same direction from
  // VC0 to VC1 is not offered, so classes are entered in a fixed order.
  // Ejection ports report room always.
  logic       need;
  logic [1:0] enter, up_vc;

  always_comb begin
    need = reg_v && reg_q.head && !alloc_v;
    for (int i = 0; i < 2; i++) begin
      enter[i] = from_core || (cand_res[i][2:0] != in_link);
      up_vc[i] = !from_core && !cand_res[i][3] && (cand_res[i][2:1] == in_link[2:1]) &&
                 !in_link[0] && cand_res[i][0];
      cand_free[i] = cand_v[i] && !up_vc[i] && !res_busy[cand_res[i]] &&
                     (enter[i] ? res_room2[cand_res[i]] : res_room1[cand_res[i]]);
    end
    va_req = need && (cand_free != 2'b00);
    if (cand_free == 2'b11) va_res = rnd ? cand_res[1] : cand_res[0];
    else if (cand_free[1])  va_res = cand_res[1];
    else                    va_res = cand_res[0];
    ev_adapt_rand = need && (cand_free == 2'b11);
    ev_adapt_busy = need && (cand_v == 2'b11) && (cand_free == 2'b01 || cand_free == 2'b10);
  end

  // SA request
  assign sa_req    = reg_v && alloc_v && !res_full[alloc_res];
  assign sa_res    = alloc_res;
  assign in_ready  = !reg_v || sa_gnt;
  assign rel_valid = sa_gnt && reg_q.tail;
  assign rel_res   = alloc_res;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg_v     <= 1'b0;
      alloc_v   <= 1'b0;
      alloc_res <= '0;
      reg_q     <= '0;
    end else begin
      if (in_ready) begin
        reg_v <= in_valid;
        if (in_valid) reg_q <= in_flit;
      end
      if (va_req && va_gnt) begin
        alloc_v   <= 1'b1;
        alloc_res <= va_res;
      end else if (rel_valid) begin
        alloc_v <= 1'b0;
      end
    end
  end

  a_sa_needs_alloc: assert property (@(posedge clk) disable iff (!rst_n) sa_gnt |-> (sa_req));
  a_body_has_alloc: assert property (@(posedge clk) disable iff (!rst_n)
    (reg_v && !reg_q.head) |-> alloc_v);

endmodule
