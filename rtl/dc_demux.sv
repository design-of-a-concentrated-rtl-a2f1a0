// dc_demux: switching control and DEMUX of one output direction.
//
// Two quadrant crossbars drive each output direction (for +x: the NE and the
// SE crossbar). Each direction has two channel-buffer links, one per VC. The
// VC the packet was allocated travels with the flit and sets the DEMUX, so
// a flit from either crossbar can go onto either link; the VC allocator
// never gives one link to two packets, so the two crossbars never pick the
// same link in a cycle (the router asserts this).
// In the switch-allocation cycle the switching control also tells the
// control block of the chosen link that a flit is coming (vc_en).
//
// Interface: ann_* are the SA-cycle announcements of the two crossbars;
// in_* the flits in the link-traversal cycle. Purely combinational.
module dc_demux
  import ctorus_pkg::*;
(
  input  logic [1:0]        ann_valid,
  input  logic [1:0]        ann_vc,
  input  logic [1:0]        in_valid,
  input  flit_t [1:0]       in_flit,
  input  logic [1:0]        in_vc,
  output logic [1:0]        vc_en,
  output logic [1:0]        link_valid,
  output flit_t [1:0]       link_flit
);

  always_comb begin
    vc_en      = '0;
    link_valid = '0;
    link_flit  = '0;
    for (int s = 0; s < 2; s++) begin
      if (ann_valid[s]) vc_en[ann_vc[s]] = 1'b1;
      if (in_valid[s]) begin
        link_valid[in_vc[s]] = 1'b1;
        link_flit[in_vc[s]]  = in_flit[s];
      end
    end
  end

endmodule
