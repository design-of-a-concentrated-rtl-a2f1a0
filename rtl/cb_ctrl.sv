// cb_ctrl: control block of one channel-buffer link.
//
// A link is a chain of STAGES three-state repeater stages. Each stage has one
// control line: low, the stage drives its input through like a normal
// repeater; high, it is tri-stated and keeps the flit it holds. One control
// block serves all stages of a link. Stage 0 is the stage next to the
// downstream router's input register; stage STAGES-1 is next to the upstream
// router.
//
// Per stage the block is a two-state machine, PASS and HOLD:
//  * PASS -> HOLD when a flit stops in the stage: the flit arriving on the
//    link cannot reach the input register (register full, or a stage nearer
//    the router already holds a flit), so it stops just above the nearest
//    held stage. Flits therefore pile up stage after stage, one per cycle.
//  * HOLD -> PASS when the router sets the stage's rel_stage bit and the
//    place in front of the stage (the next stage, or the register for
//    stage 0) is free or is being freed this cycle: the flit moves one
//    stage forward. A stage behind it that moves up keeps the stage in HOLD.
//
// The block also tells the upstream router when the channel is full. The
// upstream switching control announces every flit it sends on this link
// with vc_en in its switch-allocation cycle, two cycles before the flit is
// on the link. The block counts announced flits still on their way, held
// flits and the register; when they add up to STAGES + 1 it raises full,
// and the upstream router sends no more flits on this link. The count and
// full are registered state, so full is valid from the start of a cycle.
//
// From the same count the block gives two registered room flags: room[0]
// when a whole packet of PKT flits still fits, room[1] when two do. The
// upstream router allocates the link to a packet only with room[0] (a
// granted packet never stops in the middle of a link it is entering, so a
// blocked packet occupies one channel), and with room[1] when the packet
// enters this direction from a core or from the other dimension. The second
// rule always leaves a packet-sized gap in a ring of links, which keeps the
// wrap-around rings of the torus from filling up and locking.
//
// Timing: hold/shift/capture/pass are combinational from the current state
// and this cycle's inputs; the state changes on the rising clock edge.
// Reset (synchronous, active low) leaves every stage in PASS. The top bit
// of shift is always 0 (no stage lies above the last one); it is kept so
// that shift lines up with the stage vector.
//
// The stage states, the release vector and the full signal follow the
// source description; the announcement counter is this design's way of
// making "full" safe when flits are already in flight. The room flags and
// STAGES = 11 (twelve flits with the register, three packets) are this design's
// additions for deadlock freedom of the torus; the source gives no stage
// count.
module cb_ctrl #(
  parameter int STAGES = 11,
  parameter int PKT    = 4     // flits per packet, for the room flags
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vc_en,      // upstream will send a flit on this link
  input  logic              arrive,     // a flit is on the link this cycle
  input  logic              reg_full,   // the downstream input register holds a flit
  input  logic              reg_take,   // the register accepts a flit this cycle
  input  logic [STAGES-1:0] rel_stage,  // router releases these stages
  output logic [STAGES-1:0] hold,       // stage control lines, 1 = hold
  output logic [STAGES-1:0] shift,      // stage i takes the flit of stage i+1
  output logic [STAGES-1:0] capture,    // stage i stops the arriving flit
  output logic              pass,       // arriving flit goes on into the register
  output logic              full,       // channel full, to the upstream router
  output logic [1:0]        room        // [0]: space for one packet, [1]: for two
);

  localparam int CNTW = $clog2(STAGES + 4);

  typedef enum logic {ST_PASS = 1'b0, ST_HOLD = 1'b1} stage_st_e;

  stage_st_e [STAGES-1:0] st_q;
  logic [CNTW-1:0]        pend_q;   // announced flits not yet on the link
  logic [STAGES-1:0]      mv, hold_after, hold_next;
  logic [CNTW-1:0]        pend_next, occ_next;

  always_comb begin
    for (int i = 0; i < STAGES; i++) hold[i] = (st_q[i] == ST_HOLD);
  end

  // Held flits that move one stage forward this cycle.
  always_comb begin
    for (int i = 0; i < STAGES; i++) begin
      if (i == 0) mv[i] = hold[i] && rel_stage[i] && reg_take;
      else        mv[i] = hold[i] && rel_stage[i] && (!hold[i-1] || mv[i-1]);
    end
    for (int i = 0; i < STAGES; i++) begin
      shift[i]      = (i < STAGES - 1) ? mv[(i+1) % STAGES] : 1'b0;
      hold_after[i] = (hold[i] && !mv[i]) || shift[i];
    end
  end

  // Where the arriving flit stops: straight into the register when nothing is
  // held and the register takes it, else just above the highest held stage.
  // above[i]: no held stage at or above i after this cycle's moves.
  logic [STAGES:0] above;

  always_comb begin
    above[STAGES] = 1'b1;
    for (int i = STAGES - 1; i >= 0; i--) above[i] = above[i+1] && !hold_after[i];
    pass    = arrive && (hold == '0) && reg_take;
    capture = '0;
    for (int i = 0; i < STAGES; i++) begin
      // stop where the stage is free, everything above it is free, and the
      // stage below it holds a flit (or it is stage 0)
      if (arrive && !pass && above[i] && (i == 0 || hold_after[(i+STAGES-1) % STAGES]))
        capture[i] = 1'b1;
    end
    hold_next = hold_after | capture;
  end

  // Occupancy after this cycle: the register, held stages, flits announced
  // but not yet on the link.
  logic reg_next;

  always_comb begin
    reg_next = (reg_full && !reg_take) || pass || mv[0];
    pend_next = pend_q + CNTW'(vc_en) - CNTW'(arrive);
    occ_next  = CNTW'(reg_next) + pend_next + CNTW'($countones(hold_next));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q   <= '{default: ST_PASS};
      pend_q <= '0;
      full   <= 1'b0;
      room   <= 2'b11;
    end else begin
      for (int i = 0; i < STAGES; i++) st_q[i] <= hold_next[i] ? ST_HOLD : ST_PASS;
      pend_q <= pend_next;
      full   <= occ_next >= CNTW'(STAGES + 1);
      room[0] <= 32'(occ_next) + PKT <= STAGES + 1;
      room[1] <= 32'(occ_next) + 2 * PKT <= STAGES + 1;
    end
  end

  // A flit must never arrive with every stage already holding one.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(arrive && !pass && hold_after[STAGES-1]));
  // Only announced flits arrive.
  a_announced: assert property (@(posedge clk) disable iff (!rst_n)
    !(arrive && pend_q == '0));

endmodule
