// Self-checking testbench for approx_mult8_b, the 8-bit Multiplier B.
// Checks, in order:
//  - 40 reference vectors; the expected products were computed by a
//    separate bit-level model of the column reduction (dot diagram), not by
//    this netlist. 7 x 7 gives 53 (exact 49);
//  - zero operands give zero;
//  - when one operand is a power of two the product is exact, because every
//    column then holds at most one 1 and no unit can err;
//  - the product does not depend on the operand order (the p/g transform,
//    the OR merging and every unit input pair are symmetric in b and c);
//  - the mean relative error over random operands stays below 0.02.
module tb_approx_mult8_b;
  localparam int N = 8;
  localparam int W = 16;
  typedef struct packed {
    logic [N-1:0] b;
    logic [N-1:0] c;
    logic [W-1:0] y;
  } vec_t;
  localparam int NV = 40;
  localparam vec_t VECTORS [NV] = '{
    '{8'h07, 8'h07, 16'h0035},
    '{8'h03, 8'h02, 16'h0006},
    '{8'hff, 8'hff, 16'he905},
    '{8'hff, 8'h01, 16'h00ff},
    '{8'haa, 8'h55, 16'h384a},
    '{8'h5a, 8'ha5, 16'h39fa},
    '{8'h7f, 8'hff, 16'h7905},
    '{8'h10, 8'h90, 16'h0900},
    '{8'h0f, 8'h9e, 16'h093a},
    '{8'h34, 8'h7f, 16'h191c},
    '{8'hae, 8'h88, 16'h5c70},
    '{8'h6d, 8'hc6, 16'h543e},
    '{8'h50, 8'h77, 16'h24f0},
    '{8'h95, 8'hec, 16'h891c},
    '{8'h74, 8'h5c, 16'h2970},
    '{8'h4c, 8'h3f, 16'h127c},
    '{8'hcb, 8'h2e, 16'h2432},
    '{8'hb2, 8'hc7, 16'h89fe},
    '{8'h3e, 8'h14, 16'h0498},
    '{8'h93, 8'h4c, 16'h2b5c},
    '{8'h86, 8'h7e, 16'h41a4},
    '{8'he0, 8'h57, 16'h4c20},
    '{8'hba, 8'h72, 16'h5274},
    '{8'h49, 8'h9b, 16'h2c03},
    '{8'hfa, 8'h12, 16'h1174},
    '{8'h1e, 8'h83, 16'h0f62},
    '{8'h6b, 8'h2a, 16'h110e},
    '{8'hc1, 8'h57, 16'h4157},
    '{8'h26, 8'hee, 16'h2304},
    '{8'h7d, 8'h6b, 16'h33e7},
    '{8'h0a, 8'hf6, 16'h099c},
    '{8'hab, 8'h13, 16'h0ca1},
    '{8'hc3, 8'h8e, 16'h6c22},
    '{8'h92, 8'hca, 16'h7334},
    '{8'he0, 8'hd1, 16'hb6e0},
    '{8'h50, 8'h57, 16'h1af0},
    '{8'hb1, 8'h59, 16'h3d89},
    '{8'h98, 8'h7f, 16'h4b78},
    '{8'h94, 8'hcc, 16'h75f0},
    '{8'h74, 8'h11, 16'h0774}
  };

  logic [N-1:0] b, c;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  approx_mult8_b dut (.b(b), .c(c), .y(y));

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
    if (rel_sum / 2000.0 >= 0.02) begin
      failures++;
      $display("FAIL mean relative error %f", rel_sum / 2000.0);
    end else
      $display("mean relative error %f", rel_sum / 2000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
