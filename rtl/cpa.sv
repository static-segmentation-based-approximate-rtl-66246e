// cpa: W-bit carry-propagate (ripple-carry) adder, the single adder of the
// static segmented MAC.
//
// A chain of W full_adder cells: bit i takes the carry of bit i-1, cin enters
// bit 0 and the carry out of bit W-1 is cout, so {cout, sum} = a + b + cin.
// Purely combinational; the delay grows linearly with W. The width of 8 is the
// MAC's own adder width; the ripple structure is this design's reading of
// "carry propagate adder" built from full-adder cells.
module cpa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];
endmodule
