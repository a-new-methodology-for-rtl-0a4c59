// Exact half adder: sum = x1^x2, carry = x1&x2.
// Used in the exact (upper) columns of Multiplier B and wherever an exact
// 2-input counter is needed. Purely combinational.
module exact_half_adder (
  input  logic x1,
  input  logic x2,
  output logic sum,
  output logic carry
);
  assign sum   = x1 ^ x2;
  assign carry = x1 & x2;
endmodule
