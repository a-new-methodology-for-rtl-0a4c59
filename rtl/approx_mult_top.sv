// Top level: the two proposed 16-bit approximate multipliers side by side,
// plus the 8-bit versions used to explain the method.
//
// Multiplier A uses approximate half adders, full adders and 4-2 compressors
// in every column of its reduction tree; Multiplier B uses them only in the
// least significant N-1 columns and exact units above, trading part of A's
// area and power saving for a much smaller error. A and B share the 16-bit
// operands so that their results can be compared cycle for cycle; the 8-bit
// pair has operands of its own.
//
// Interface:
//   op_b16, op_c16 : 16-bit unsigned operands of both 16-bit multipliers
//   y16_a, y16_b   : 32-bit products of Multiplier A and Multiplier B
//   op_b8, op_c8   : 8-bit unsigned operands of both 8-bit multipliers
//   y8_a, y8_b     : 16-bit products of the 8-bit Multipliers A and B
// Timing: purely combinational, as in the published design; registers around
// the multipliers, if wanted, belong to the system that uses them.
module approx_mult_top (
  input  logic [15:0] op_b16,
  input  logic [15:0] op_c16,
  output logic [31:0] y16_a,
  output logic [31:0] y16_b,
  input  logic [7:0]  op_b8,
  input  logic [7:0]  op_c8,
  output logic [15:0] y8_a,
  output logic [15:0] y8_b
);
  approx_mult16_a u_mult16_a (.b(op_b16), .c(op_c16), .y(y16_a));
  approx_mult16_b u_mult16_b (.b(op_b16), .c(op_c16), .y(y16_b));
  approx_mult8_a  u_mult8_a  (.b(op_b8),  .c(op_c8),  .y(y8_a));
  approx_mult8_b  u_mult8_b  (.b(op_b8),  .c(op_c8),  .y(y8_b));
endmodule
