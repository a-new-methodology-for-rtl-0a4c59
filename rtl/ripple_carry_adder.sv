// Exact ripple carry adder, the last stage of the multipliers.
// After the reduction tree every column holds at most two bits; they form
// rows a and b, and this adder resolves them into the product. It is a chain
// of WIDTH exact full adders with a carry-in of zero.
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits) and cout out.
// Timing: purely combinational; the delay grows linearly with WIDTH.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] carry;
  assign carry[0] = 1'b0;
  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    exact_full_adder u_fa (
      .x1(a[k]), .x2(b[k]), .x3(carry[k]), .sum(sum[k]), .carry(carry[k+1])
    );
  end
  assign cout = carry[WIDTH];
endmodule
