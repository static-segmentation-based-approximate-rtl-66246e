// c_segment: addend segmentation of the static segmented MAC.
//
// Every operand that was cut to its high segment leaves the product (N-M)
// bits lighter, so the addend C is brought to the same weight before the
// single adder: for select 00 the whole of C[NC-1:0] is added, for 01 and 10
// C[NC-1:N-M], and for 11 C[NC-1:2(N-M)], each right-aligned and zero
// extended to NC bits (a segment that lies wholly above NC-1 is zero). The
// bits shifted out are not lost: ssmac_out_mux appends them below the sum.
// Purely combinational; sel is {A high, B high} from the operand selectors.
// The three portions of C come from the published description; which select
// code picks which portion follows from the shift each code stands for.
module c_segment
  import ssmac_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned M  = 4,
  parameter int unsigned NC = 8
) (
  input  logic [NC-1:0] c,
  input  seg_sel_e      sel,
  output logic [NC-1:0] c_seg
);
  localparam int unsigned K = N - M;

  always_comb begin
    unique case (sel)
      SEG_LL:         c_seg = c;
      SEG_LH, SEG_HL: c_seg = c >> K;
      default:        c_seg = c >> (2 * K);
    endcase
  end
endmodule
