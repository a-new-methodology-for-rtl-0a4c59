// Partial product generation and propagate/generate transformation.
// For operands b and c the AND array gives a[i][m] = b[i] & c[m], of weight
// i+m. Each pair of partial products of equal weight that mirror each other,
// a[i][m] and a[m][i] with i > m, is replaced by
//   p[i][m] = a[i][m] | a[m][i]   (propagate)
//   g[i][m] = a[i][m] & a[m][i]   (generate)
// Since x + y = (x|y) + (x&y), the pair keeps its value exactly and both new
// bits keep the weight i+m; the approximation only comes later, when the
// generate bits of a column are merged by OR gates. Entries of p and g with
// i <= m are not used and are driven to zero.
// Interface: N-bit b and c in; N x N arrays a, p, g out, indexed [i][m].
// Timing: purely combinational, two gate levels.
module pp_transform #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         b,
  input  logic [N-1:0]         c,
  output logic [N-1:0][N-1:0]  a,
  output logic [N-1:0][N-1:0]  p,
  output logic [N-1:0][N-1:0]  g
);
  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar m = 0; m < N; m++) begin : g_col
      assign a[i][m] = b[i] & c[m];
      if (i > m) begin : g_pair
        assign p[i][m] = (b[i] & c[m]) | (b[m] & c[i]);
        assign g[i][m] = (b[i] & c[m]) & (b[m] & c[i]);
      end else begin : g_unused
        assign p[i][m] = 1'b0;
        assign g[i][m] = 1'b0;
      end
    end
  end
endmodule
