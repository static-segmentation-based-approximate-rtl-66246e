// ssm_operand_mux: static segment selector for one N-bit multiplier operand.
//
// The operand is split into a low segment x[M-1:0] and a high segment
// x[N-1:N-M], with N/2 <= M < N. When the bits above the low segment,
// x[N-1:M], are all zero the low segment holds the whole value and is passed
// on (exact). Otherwise the high segment is passed on and the N-M bits below
// it are dropped (the approximation). hi tells which segment was chosen and
// drives the select of the addend and output multiplexers.
// Purely combinational. The two segments and the 2:1 multiplexer follow the
// MAC's block diagram; the zero test on x[N-1:M] as the select rule is this
// design's choice, as the select source of the operand multiplexer is not
// specified.
module ssm_operand_mux #(
  parameter int unsigned N = 8,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] x,
  output logic [M-1:0] seg,
  output logic         hi
);
  always_comb begin
    hi  = |x[N-1:M];
    seg = hi ? x[N-1:N-M] : x[M-1:0];
  end

  initial begin
    assert (2 * M >= N && M < N)
      else $error("ssm_operand_mux: need N/2 <= M < N (N=%0d M=%0d)", N, M);
  end
endmodule
