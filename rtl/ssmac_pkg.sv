// ssmac_pkg: types and helpers shared by the static segmented MAC.
//
// The two operand segment selectors each raise one "high segment" flag. The
// pair {A flag, B flag} forms a two-bit select code that steers both the
// addend segmentation and the output re-alignment. Each flag that is set
// means the product is (N-M) bits lighter than the true one, so the code
// fixes a right shift of 0, (N-M) or 2(N-M) bits. The code order
// {A, B} and its four values follow the 00/01/10/11 labels of the
// multiplexers in the MAC's block diagram; the enum names are this design's.
package ssmac_pkg;

  typedef enum logic [1:0] {
    SEG_LL = 2'b00,  // both operands use their low segment: exact product
    SEG_LH = 2'b01,  // only B uses its high segment
    SEG_HL = 2'b10,  // only A uses its high segment
    SEG_HH = 2'b11   // both operands use their high segment
  } seg_sel_e;

  // Number of segment steps of (N-M) bits the product is shifted by.
  function automatic int unsigned seg_steps(seg_sel_e sel);
    return int'(sel[1]) + int'(sel[0]);
  endfunction

endpackage
