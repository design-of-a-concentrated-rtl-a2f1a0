// va_alloc: VC allocator of a router.
//
// The resources are the router's output links (each link is one VC of one
// direction) and the ejection ports of its cores. A resource belongs to one
// packet from the VA grant of its head flit until its tail flit wins switch
// allocation; flits of two packets therefore never mix in a channel buffer.
// Each input requests at most one resource per cycle (the input has already
// chosen among its candidates); one round-robin arbiter per resource picks
// the winner among the inputs requesting it while it is free.
//
// Interface: req/req_res from the N inputs, gnt back to them; rel/rel_res
// hand resources back; busy shows the resources held (registered).
// Grants are combinational; busy is updated on the rising clock edge and
// cleared by reset (synchronous, active low). The arbiter type is this
// design's choice.
module va_alloc #(
  parameter int N  = 12,
  parameter int M  = 12,
  parameter int RW = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req,
  input  logic [N-1:0][RW-1:0]  req_res,
  output logic [N-1:0]          gnt,
  input  logic [N-1:0]          rel,
  input  logic [N-1:0][RW-1:0]  rel_res,
  output logic [M-1:0]          busy
);

  logic [M-1:0][N-1:0] rq, gn;
  logic [M-1:0]        set_b, clr_b;

  always_comb begin
    for (int r = 0; r < M; r++)
      for (int i = 0; i < N; i++)
        rq[r][i] = req[i] && (int'(req_res[i]) == r) && !busy[r];
  end

  for (genvar r = 0; r < M; r++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (.clk, .rst_n, .req(rq[r]), .en(1'b1), .gnt(gn[r]));
  end

  always_comb begin
    gnt   = '0;
    set_b = '0;
    clr_b = '0;
    for (int r = 0; r < M; r++) begin
      gnt      = gnt | gn[r];
      set_b[r] = gn[r] != '0;
    end
    for (int i = 0; i < N; i++)
      if (rel[i]) clr_b[rel_res[i]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) busy <= '0;
    else        busy <= (busy | set_b) & ~clr_b;
  end

  a_rel_busy: assert property (@(posedge clk) disable iff (!rst_n) (clr_b & ~busy) == '0);

endmodule
