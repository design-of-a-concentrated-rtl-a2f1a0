// xbar: N-input, M-output crossbar switch of W-bit words.
//
// Output o carries input sel[o] when out_en[o] is set and zero otherwise.
// The router uses it as the four 3x3 quadrant crossbars (two link inputs
// and one injection input; two link outputs and one ejection output each)
// and as the 4x4 crossbars between the cores and the quadrant crossbars.
// The caller guarantees that no input is wanted by two outputs, as a
// crossbar connects each input to at most one output.
// Purely combinational; a multiplexer per output is this design's choice.
module xbar #(
  parameter int N  = 3,
  parameter int M  = 3,
  parameter int W  = 130,
  parameter int SW = 2
) (
  input  logic [N-1:0][W-1:0]  in,
  input  logic [M-1:0]         out_en,
  input  logic [M-1:0][SW-1:0] sel,
  output logic [M-1:0][W-1:0]  out
);

  always_comb begin
    for (int o = 0; o < M; o++) begin
      out[o] = '0;
      for (int i = 0; i < N; i++)
        if (out_en[o] && int'(sel[o]) == i) out[o] = in[i];
    end
  end

endmodule
