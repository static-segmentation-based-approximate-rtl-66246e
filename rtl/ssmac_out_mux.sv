// ssmac_out_mux: output re-alignment of the static segmented MAC.
//
// Y_mac is the sum formed at the weight of the segmented product. It is moved
// back to the true weight by appending, below it, the low bits of C that
// c_segment shifted out of the adder:
//   00 -> Y_mac                     (no shift)
//   01 -> {Y_mac, C[N-M-1:0]}       (shift by N-M)
//   10 -> {Y_mac, C[N-M-1:0]}       (shift by N-M)
//   11 -> {Y_mac, C[2(N-M)-1:0]}    (shift by 2(N-M))
// The result is zero extended to WY = WMAC + 2(N-M) bits. Bits of C above
// NC-1 read as zero. Purely combinational. The four inputs and their select
// codes follow the output multiplexer of the MAC's block diagram.
module ssmac_out_mux
  import ssmac_pkg::*;
#(
  parameter int unsigned N    = 8,
  parameter int unsigned M    = 4,
  parameter int unsigned NC   = 8,
  parameter int unsigned WMAC = 9,
  localparam int unsigned K   = N - M,
  localparam int unsigned WY  = WMAC + 2 * K
) (
  input  logic [WMAC-1:0] y_mac,
  input  logic [NC-1:0]   c,
  input  seg_sel_e        sel,
  output logic [WY-1:0]   y
);
  logic [2*K-1:0] cx;   // C[2K-1:0], zero extended when NC < 2K

  always_comb begin
    cx = (2 * K)'(c);
    unique case (sel)
      SEG_LL:         y = WY'(y_mac);
      SEG_LH, SEG_HL: y = WY'({y_mac, cx[K-1:0]});
      default:        y = {y_mac, cx[2*K-1:0]};
    endcase
  end
endmodule
