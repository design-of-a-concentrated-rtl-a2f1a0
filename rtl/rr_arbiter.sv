// rr_arbiter: round-robin arbiter, the building block of the VC and switch
// allocators.
//
// Grants the first requester at or after the priority pointer, cyclically.
// When en is high and a grant is given, the pointer moves to the requester
// after the winner, so the winner has the lowest priority next time.
// gnt is combinational (one-hot or zero); the pointer is updated on the
// rising clock edge and reset (synchronous, active low) to requester 0.
// Round-robin priority is this design's choice; the source only names the
// VA and SA arbiters.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         en,
  output logic [N-1:0] gnt
);

  localparam int PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr_q;
  logic [PW-1:0] win;

  // Requests rotated so that the pointer's requester comes first; the
  // first set bit of the rotated vector is the winner.
  logic [2*N-1:0] req2;
  logic [N-1:0]   rot;

  always_comb begin
    req2 = {req, req} >> ptr_q;
    rot  = req2[N-1:0];
    gnt  = '0;
    win  = ptr_q;
    for (int k = N - 1; k >= 0; k--) begin
      if (rot[k]) begin
        win = PW'((int'(ptr_q) + k) % N);
      end
    end
    if (rot != '0) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) ptr_q <= '0;
    else if (en && (req != '0)) ptr_q <= PW'((int'(win) + 1) % N);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
