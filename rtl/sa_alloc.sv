// sa_alloc: switch allocator of one quadrant crossbar.
//
// Each input of the crossbar asks for at most one output per cycle (the one
// its packet was allocated). One round-robin arbiter per output picks one
// requesting input, so at most one flit leaves through each crossbar output
// per cycle and no input is granted twice.
//
// Interface: req/req_out from the N inputs; gnt one bit per input; out_gnt
// and out_sel tell, per output, whether it was granted and to which input.
// Combinational grants, pointers updated on the rising clock edge, reset
// synchronous active low. Separable round-robin arbitration is this design's
// choice.
module sa_alloc #(
  parameter int N  = 3,
  parameter int M  = 3,
  parameter int OW = 2,
  parameter int IW = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic [N-1:0][OW-1:0] req_out,
  output logic [N-1:0]         gnt,
  output logic [M-1:0]         out_gnt,
  output logic [M-1:0][IW-1:0] out_sel
);

  logic [M-1:0][N-1:0] rq, gn;

  always_comb begin
    for (int o = 0; o < M; o++)
      for (int i = 0; i < N; i++)
        rq[o][i] = req[i] && (int'(req_out[i]) == o);
  end

  for (genvar o = 0; o < M; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (.clk, .rst_n, .req(rq[o]), .en(1'b1), .gnt(gn[o]));
  end

  always_comb begin
    gnt     = '0;
    out_gnt = '0;
    out_sel = '0;
    for (int o = 0; o < M; o++) begin
      gnt        = gnt | gn[o];
      out_gnt[o] = gn[o] != '0;
      for (int i = 0; i < N; i++) if (gn[o][i]) out_sel[o] = IW'(i);
    end
  end

endmodule
