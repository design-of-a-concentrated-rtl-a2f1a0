// tsr_link: one inter-router link built from three-state repeater stages
// that double as channel buffers, with its control block.
//
// Without congestion the link is an ordinary repeated wire: a flit put on it
// in the link-traversal (LT) cycle reaches the downstream input register at
// the end of that cycle. When the register cannot take it, the flit stops in
// the repeater stage nearest the router (stage 0) and the next flits stop in
// stages 1, 2, ... as they arrive. Each held stage keeps one flit; in the
// circuit the tri-stated repeaters keep the value, here each stage is a
// flit-wide storage element loaded when the control block stops a flit in it.
// When the router sets rel_stage, held flits move one stage forward per
// cycle and the one in stage 0 enters the register. Order is kept: a flit
// never passes a held stage.
//
// Interface: in_* is the flit driven onto the link by the upstream router and
// vc_en its announcement two cycles earlier; full and room (space for one
// or two whole packets) go back upstream. out_*
// feeds the downstream input register with a valid/ready handshake
// (out_ready = the register accepts a flit this cycle; reg_full = it holds
// one). hold shows the stage control lines.
//
// The stage behaviour follows the source description; storage per stage as
// a register and the valid/ready handshake to the input register are this
// design's choices.
module tsr_link
  import ctorus_pkg::*;
#(
  parameter int STAGES = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  flit_t             in_flit,
  input  logic              vc_en,
  output logic              full,
  output logic [1:0]        room,       // space for one / two packets
  output logic              out_valid,
  output flit_t             out_flit,
  input  logic              out_ready,
  input  logic              reg_full,
  input  logic [STAGES-1:0] rel_stage,
  output logic [STAGES-1:0] hold
);

  logic [STAGES-1:0] shift, capture;
  logic              pass;
  flit_t [STAGES-1:0] stage_q;

  cb_ctrl #(.STAGES(STAGES), .PKT(PKT_FLITS)) u_cb (
    .clk, .rst_n,
    .vc_en,
    .arrive   (in_valid),
    .reg_full,
    .reg_take (out_ready),
    .rel_stage,
    .hold, .shift, .capture, .pass, .full, .room
  );

  // Towards the register: the flit held in stage 0 when it is released,
  // otherwise the flit on the wire when no stage holds anything.
  always_comb begin
    if (hold[0]) begin
      out_valid = rel_stage[0];
      out_flit  = stage_q[0];
    end else begin
      out_valid = in_valid && (hold == '0);
      out_flit  = in_flit;
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < STAGES; i++) begin
      if (shift[i])        stage_q[i] <= stage_q[(i+1) % STAGES];
      else if (capture[i]) stage_q[i] <= in_flit;
    end
  end

endmodule
