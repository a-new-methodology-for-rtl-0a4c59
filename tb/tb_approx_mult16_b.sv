// Self-checking testbench for approx_mult16_b, the 16-bit Multiplier B.
// Checks, in order:
//  - 40 reference vectors; the expected products were computed by a
//    separate bit-level model of the column reduction (dot diagram), not by
//    this netlist. 7 x 7 gives 45 (exact 49);
//  - zero operands give zero;
//  - when one operand is a power of two the product is exact, because every
//    column then holds at most one 1 and no unit can err;
//  - the product does not depend on the operand order (the p/g transform,
//    the OR merging and every unit input pair are symmetric in b and c);
//  - the mean relative error over random operands stays below 0.005.
module tb_approx_mult16_b;
  localparam int N = 16;
  localparam int W = 32;
  typedef struct packed {
    logic [N-1:0] b;
    logic [N-1:0] c;
    logic [W-1:0] y;
  } vec_t;
  localparam int NV = 40;
  localparam vec_t VECTORS [NV] = '{
    '{16'h0007, 16'h0007, 32'h0000002d},
    '{16'h0003, 16'h0002, 32'h00000006},
    '{16'hffff, 16'hffff, 32'heae7fefd},
    '{16'hffff, 16'h0001, 32'h0000ffff},
    '{16'h00aa, 16'h0055, 32'h00003fca},
    '{16'h5a5a, 16'ha5a5, 32'h3a7617fa},
    '{16'h7fff, 16'hffff, 32'h7ae7fefd},
    '{16'h26a2, 16'h153e, 32'h0333fffc},
    '{16'h2d1c, 16'h26bb, 32'h06d23a7c},
    '{16'h3b61, 16'ha894, 32'h27197f94},
    '{16'h3bbb, 16'h0316, 32'h00b797e2},
    '{16'h7c26, 16'hd4c2, 32'h672cfbcc},
    '{16'h96d0, 16'h2eae, 32'h1b7fb7e0},
    '{16'h4343, 16'h482c, 32'h12f6577c},
    '{16'h010c, 16'h254b, 32'h0026ff7c},
    '{16'h6b40, 16'h88da, 32'h3954fe80},
    '{16'h5e87, 16'h9c1c, 32'h39a436bc},
    '{16'h90fb, 16'h5190, 32'h2e307fb0},
    '{16'hf3fe, 16'h2020, 32'h1e9e3fc0},
    '{16'hb0c4, 16'hdbf4, 32'h97df89d0},
    '{16'h83f7, 16'hf341, 32'h7d647977},
    '{16'h9e1a, 16'ha7ab, 32'h678bf02e},
    '{16'had1b, 16'hbd62, 32'h7f8e9236},
    '{16'h0dd2, 16'h74e6, 32'h064f1fec},
    '{16'he647, 16'hdef8, 32'hc79040b8},
    '{16'hc7ac, 16'hf3ae, 32'hbd4d51f8},
    '{16'hdfe0, 16'hae3a, 32'h985c0fc0},
    '{16'hcc41, 16'h8f2c, 32'h723b572c},
    '{16'h6472, 16'h65e7, 32'h27f2a07e},
    '{16'h6623, 16'h64e5, 32'h28407c2f},
    '{16'h1a81, 16'h7b45, 32'h0cc25dc5},
    '{16'ha260, 16'h6683, 32'h41055720},
    '{16'h0fef, 16'h30cb, 32'h03096ebd},
    '{16'h113d, 16'hfc13, 32'h10f9012f},
    '{16'h3571, 16'h70cc, 32'h178b97cc},
    '{16'h298c, 16'h1c24, 32'h0490e7b0},
    '{16'h570d, 16'h99c9, 32'h344ae7f5},
    '{16'h0d75, 16'h1a35, 32'h01600105},
    '{16'h000f, 16'h9118, 32'h00088078},
    '{16'h26b9, 16'h895f, 32'h14c6cad7}
  };

  logic [N-1:0] b, c;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  approx_mult16_b dut (.b(b), .c(c), .y(y));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [W-1:0] expected, input string what);
    checks++;
    if (y !== expected) begin
      failures++;
      $display("FAIL %s: b=%h c=%h got %h expected %h", what, b, c, y, expected);
    end
  endtask

  initial begin
    real rel_sum;
    logic [W-1:0] y_fwd;
    for (int k = 0; k < NV; k++) begin
      b = VECTORS[k].b; c = VECTORS[k].c; #1;
      expect_eq(VECTORS[k].y, "reference vector");
    end
    b = '0; c = N'($urandom); #1; expect_eq('0, "zero operand");
    b = N'($urandom); c = '0; #1; expect_eq('0, "zero operand");
    for (int t = 0; t < 300; t++) begin
      b = N'($urandom);
      c = N'(1) << ($urandom % N);
      #1; expect_eq(W'(b) * W'(c), "power-of-two multiplier");
      {b, c} = {c, b};
      #1; expect_eq(W'(b) * W'(c), "power-of-two multiplicand");
    end
    for (int t = 0; t < 300; t++) begin
      b = N'($urandom); c = N'($urandom); #1;
      y_fwd = y;
      {b, c} = {c, b}; #1;
      expect_eq(y_fwd, "operand order");
    end
    rel_sum = 0.0;
    for (int t = 0; t < 2000; t++) begin
      real exact, approx;
      b = N'($urandom) | N'(1); c = N'($urandom) | N'(1); #1;
      exact = real'(W'(b) * W'(c));
      approx = real'(y);
      rel_sum += ((exact > approx) ? exact - approx : approx - exact) / exact;
    end
    checks++;
    if (rel_sum / 2000.0 >= 0.005) begin
      failures++;
      $display("FAIL mean relative error %f", rel_sum / 2000.0);
    end else
      $display("mean relative error %f", rel_sum / 2000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
