// full_adder: one-bit full adder, the cell the carry-propagate adder is built
// from.
//
// sum = a ^ b ^ cin, cout = majority(a, b, cin). Purely combinational.
// The published design builds this cell in pass-transistor logic (10
// transistors per cell) to save area; that is a transistor-level choice with
// no effect on the logic function, so here it is written as plain gates.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  always_comb begin
    p    = a ^ b;
    sum  = p ^ cin;
    cout = (a & b) | (p & cin);
  end
endmodule
