// Approximate half adder.
// The exclusive-OR of an exact half adder is replaced by an OR gate, so the
// sum is y1|y2 while the carry stays y1&y2. The only wrong case is y1=y2=1,
// which gives carry=1, sum=1 (value 3 instead of 2): an error of one.
// Interface: two operand bits in; sum (weight 1) and carry (weight 2) out.
// Timing: purely combinational, one gate level.
// The equations follow the published truth table of the unit.
module approx_half_adder (
  input  logic y1,
  input  logic y2,
  output logic sum,
  output logic carry
);
  assign sum   = y1 | y2;
  assign carry = y1 & y2;
endmodule
