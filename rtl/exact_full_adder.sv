// Exact full adder (3:2 counter): sum is the parity of the three inputs and
// carry their majority. Used in the exact columns of Multiplier B, inside the
// exact 4-2 compressor and as the cell of the final ripple carry adder.
// Purely combinational.
module exact_full_adder (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic sum,
  output logic carry
);
  assign sum   = x1 ^ x2 ^ x3;
  assign carry = (x1 & x2) | (x1 & x3) | (x2 & x3);
endmodule
