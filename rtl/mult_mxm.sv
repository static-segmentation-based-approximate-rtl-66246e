// mult_mxm: M x M unsigned array multiplier for the selected operand segments.
//
// Forms the M partial products a & {M{b[j]}}, shifts each by j and sums them,
// so p = a * b exactly, on 2M bits. Purely combinational. The segment
// multiplier is what lets an N x N product be formed with only an M x M core
// (4 x 4 for N = 8); its inner structure is this design's choice, as only
// the multiplier's size is specified.
module mult_mxm #(
  parameter int unsigned M = 4
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  always_comb begin
    p = '0;
    for (int unsigned j = 0; j < M; j++) begin
      p = p + ((2*M)'(a & {M{b[j]}}) << j);
    end
  end
endmodule
