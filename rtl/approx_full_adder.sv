// Approximate full adder.
// One of the two exclusive-OR gates of the sum is replaced by an OR gate:
// W1 = y1|y2, sum = W1^y3, carry = W1&y3. The result is wrong only for
// (y1,y2,y3) = 110 (gives 1 instead of 2) and 111 (gives 2 instead of 3), so
// the error is never larger than one and the unit never over-estimates.
// Input order matters: y1 and y2 are the OR-ed pair, y3 the third input.
// Interface: three operand bits in; sum (weight 1) and carry (weight 2) out.
// Timing: purely combinational, two gate levels.
// The equations follow the published truth table of the unit.
module approx_full_adder (
  input  logic y1,
  input  logic y2,
  input  logic y3,
  output logic sum,
  output logic carry
);
  logic w1;
  assign w1    = y1 | y2;
  assign sum   = w1 ^ y3;
  assign carry = w1 & y3;
endmodule
