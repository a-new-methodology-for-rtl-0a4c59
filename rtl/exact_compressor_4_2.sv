// Exact 4-2 compressor with carry-in and carry-out.
// It adds five bits of equal weight: x1+x2+x3+x4+cin = sum + 2*(carry+cout).
// It is built from two exact full adders: the first adds x1..x3 and produces
// cout, the second adds that partial sum, x4 and cin. cout therefore does not
// depend on cin, so a row of these compressors, each passing cout to the cin
// of its neighbour in the next higher column, has no rippling carry path.
// The two-full-adder structure is this design's choice; only the function
// and the cin/cout chaining are given for the multiplier.
// Interface: x1..x4 and cin in; sum (weight 1), carry and cout (weight 2) out.
// Timing: purely combinational.
module exact_compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;
  exact_full_adder u_fa1 (.x1(x1), .x2(x2), .x3(x3),  .sum(s1),  .carry(cout));
  exact_full_adder u_fa2 (.x1(s1), .x2(x4), .x3(cin), .sum(sum), .carry(carry));
endmodule
