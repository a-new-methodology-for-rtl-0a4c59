// Self-checking testbench for approx_mult16_a, the 16-bit Multiplier A.
// Checks, in order:
//  - 40 reference vectors; the expected products were computed by a
//    separate bit-level model of the column reduction (dot diagram), not by
//    this netlist. 7 x 7 gives 45 (exact 49);
//  - zero operands give zero;
//  - when one operand is a power of two the product is exact, because every
//    column then holds at most one 1 and no unit can err;
//  - the product does not depend on the operand order (the p/g transform,
//    the OR merging and every unit input pair are symmetric in b and c);
//  - the mean relative error over random operands stays below 0.14.
module tb_approx_mult16_a;
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
    '{16'hffff, 16'hffff, 32'hc0fffefd},
    '{16'hffff, 16'h0001, 32'h0000ffff},
    '{16'h00aa, 16'h0055, 32'h00003fca},
    '{16'h5a5a, 16'ha5a5, 32'h422417fa},
    '{16'h7fff, 16'hffff, 32'h60fffefd},
    '{16'hd708, 16'h17f5, 32'h13e57fa8},
    '{16'hf1d6, 16'h451a, 32'h4047c33c},
    '{16'h795e, 16'hb271, 32'h5616027e},
    '{16'haa05, 16'h10a3, 32'h0afaceaf},
    '{16'h0f88, 16'hbb2d, 32'h0a4477e8},
    '{16'hb394, 16'h4f42, 32'h3113ef28},
    '{16'ha5aa, 16'h93f4, 32'h5f844808},
    '{16'hfe3b, 16'hae65, 32'hc0fbd2bf},
    '{16'hd269, 16'h7215, 32'h50a1e19d},
    '{16'h48db, 16'hb774, 32'h2e05299c},
    '{16'h62c3, 16'he315, 32'h3f8279ff},
    '{16'hab2c, 16'h58d5, 32'h4242039c},
    '{16'h05c6, 16'hf0ce, 32'h0427f9c4},
    '{16'h7631, 16'h5aff, 32'h251fe68f},
    '{16'h2b05, 16'h9c65, 32'h190dfff5},
    '{16'h1df9, 16'h7e62, 32'h0def5832},
    '{16'h0f17, 16'h37dc, 32'h0345f23c},
    '{16'hc4aa, 16'h4995, 32'h37ffb7ca},
    '{16'h211c, 16'hbd05, 32'h17bfa97c},
    '{16'h3f63, 16'h65dc, 32'h176eb81c},
    '{16'h6415, 16'heab4, 32'h3fefd7f4},
    '{16'hdf15, 16'h7f1b, 32'h58f7e22f},
    '{16'h14a0, 16'h2a96, 32'h035b37c0},
    '{16'h72fd, 16'h66d2, 32'h2535e29a},
    '{16'h8ca8, 16'h4720, 32'h2525ed00},
    '{16'he225, 16'h230d, 32'h1eb001dd},
    '{16'hd1bc, 16'h6e36, 32'h431cfa18},
    '{16'hdd2e, 16'h8cdb, 32'h7026a8b2},
    '{16'h4746, 16'hb4d6, 32'h31000004},
    '{16'h6a50, 16'hfc89, 32'h4b7fd2d0},
    '{16'h5bd8, 16'haec6, 32'h46a38010},
    '{16'he25a, 16'h6164, 32'h3da5bee8},
    '{16'hf52d, 16'h3b12, 32'h3b257ffa}
  };

  logic [N-1:0] b, c;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  approx_mult16_a dut (.b(b), .c(c), .y(y));

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
    if (rel_sum / 2000.0 >= 0.14) begin
      failures++;
      $display("FAIL mean relative error %f", rel_sum / 2000.0);
    end else
      $display("mean relative error %f", rel_sum / 2000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
