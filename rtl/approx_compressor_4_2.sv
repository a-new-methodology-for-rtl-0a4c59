// Approximate 4-2 compressor with no carry-in and no carry-out.
// The four inputs form two pairs, (y1,y2) and (y3,y4). The carry is set when
// either pair is all ones (W1 = y1&y2, W2 = y3&y4, carry = W1|W2). The sum
// ORs the two pair parities and adds the all-ones term W1&W2, so four ones
// give "11" (3) instead of "100" (4). Zero inputs always give zero outputs,
// and the result is never above the true count; it is at most one below it.
// Input order matters because of the pairing.
// Interface: four operand bits in; sum (weight 1) and carry (weight 2) out.
// Timing: purely combinational, about three gate levels.
// The equations and the pairing follow the published design of the unit.
module approx_compressor_4_2 (
  input  logic y1,
  input  logic y2,
  input  logic y3,
  input  logic y4,
  output logic sum,
  output logic carry
);
  logic w1, w2;
  assign w1    = y1 & y2;
  assign w2    = y3 & y4;
  assign sum   = (y1 ^ y2) | (y3 ^ y4) | (w1 & w2);
  assign carry = w1 | w2;
endmodule
