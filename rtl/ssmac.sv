// ssmac: static segmented approximate multiply-accumulate unit,
// y ~= a * b + c, for unsigned N-bit a, b and NC-bit c.
//
// Each operand is reduced to one M-bit segment (ssm_operand_mux): its low M
// bits when its upper bits are zero (exact), else its top M bits. One M x M
// multiplier (mult_mxm) forms the segment product. The addend is right
// shifted to the product's weight (c_segment) and added in one carry-propagate
// adder (cpa) of WA = max(2M, NC) bits, whose carry out widens the sum Y_mac
// to WA+1 bits. The output multiplexer (ssmac_out_mux) then appends the low
// bits of c that were shifted out, which restores the true weight. Only the
// bits of a and b below a chosen high segment are lost, so the result is
// exact whenever both a and b fit in M bits.
//
// Interface: a, b (N bits), c (NC bits) in; y (WY = WA + 1 + 2(N-M) bits) and
// the select code sel ({a high, b high}) out. Purely combinational: no clock,
// the result is valid one propagation delay after the inputs.
// N = 8, M = 4, the 4-bit segment multiplexers, the 4 x 4 multiplier, the
// 8-bit adder and the multiplexer codes follow the published design. NC = 8
// (the adder is 8 bits wide) and the zero test that picks a segment are this
// design's reading; the published error compensation is not included.
module ssmac
  import ssmac_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 4,
  parameter int unsigned NC = 8,
  localparam int unsigned K  = N - M,
  localparam int unsigned WA = (2 * M > NC) ? 2 * M : NC,
  localparam int unsigned WY = WA + 1 + 2 * K
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic [NC-1:0] c,
  output logic [WY-1:0] y,
  output seg_sel_e      sel
);
  logic [M-1:0]   a_ssm, b_ssm;
  logic           a_hi, b_hi;
  logic [2*M-1:0] prod;
  logic [NC-1:0]  c_ssm;
  logic [WA-1:0]  sum;
  logic           cout;

  ssm_operand_mux #(.N(N), .M(M)) u_seg_a (.x(a), .seg(a_ssm), .hi(a_hi));
  ssm_operand_mux #(.N(N), .M(M)) u_seg_b (.x(b), .seg(b_ssm), .hi(b_hi));

  assign sel = seg_sel_e'({a_hi, b_hi});

  mult_mxm #(.M(M)) u_mult (.a(a_ssm), .b(b_ssm), .p(prod));

  c_segment #(.N(N), .M(M), .NC(NC)) u_cseg (.c(c), .sel(sel), .c_seg(c_ssm));

  cpa #(.W(WA)) u_add (
    .a   (WA'(prod)),
    .b   (WA'(c_ssm)),
    .cin (1'b0),
    .sum (sum),
    .cout(cout)
  );

  ssmac_out_mux #(.N(N), .M(M), .NC(NC), .WMAC(WA + 1)) u_out (
    .y_mac({cout, sum}),
    .c    (c),
    .sel  (sel),
    .y    (y)
  );
endmodule
