// Self-checking testbench for approx_mult8_a, the 8-bit Multiplier A.
// Checks, in order:
//  - 40 reference vectors; the expected products were computed by a
//    separate bit-level model of the column reduction (dot diagram), not by
//    this netlist. 7 x 7 gives 53 (exact 49);
//  - zero operands give zero;
//  - when one operand is a power of two the product is exact, because every
//    column then holds at most one 1 and no unit can err;
//  - the product does not depend on the operand order (the p/g transform,
//    the OR merging and every unit input pair are symmetric in b and c);
//  - the mean relative error over random operands stays below 0.12.
module tb_approx_mult8_a;
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
    '{8'hff, 8'hff, 16'hc005},
    '{8'hff, 8'h01, 16'h00ff},
    '{8'haa, 8'h55, 16'h3dca},
    '{8'h5a, 8'ha5, 16'h41fa},
    '{8'h7f, 8'hff, 16'h6005},
    '{8'h52, 8'hf2, 16'h4fe4},
    '{8'h26, 8'h65, 16'h0dfe},
    '{8'ha6, 8'h0c, 16'h07b8},
    '{8'h12, 8'hd2, 16'h0da4},
    '{8'h89, 8'h18, 16'h0cd8},
    '{8'h5d, 8'h95, 16'h3015},
    '{8'h0e, 8'he8, 16'h09f0},
    '{8'h81, 8'h36, 16'h1b36},
    '{8'h09, 8'h16, 16'h00d6},
    '{8'h6f, 8'h6b, 16'h20dd},
    '{8'h11, 8'h3d, 16'h040d},
    '{8'h17, 8'h8d, 16'h0c27},
    '{8'h6c, 8'h0f, 16'h04bc},
    '{8'hd3, 8'h90, 16'h6db0},
    '{8'h1f, 8'hf2, 16'h159e},
    '{8'h39, 8'ha1, 16'h23b9},
    '{8'ha0, 8'h95, 16'h5ca0},
    '{8'hf2, 8'h0f, 16'h0b9e},
    '{8'h93, 8'h95, 16'h4c0f},
    '{8'h65, 8'h0c, 16'h03bc},
    '{8'hf9, 8'h38, 16'h29f8},
    '{8'h0b, 8'h8e, 16'h0612},
    '{8'hdb, 8'h22, 16'h1bf6},
    '{8'h4a, 8'h6b, 16'h1c6e},
    '{8'h24, 8'h8a, 16'h1368},
    '{8'h1e, 8'h92, 16'h0ffc},
    '{8'h4e, 8'h8f, 16'h291a},
    '{8'hd0, 8'hae, 16'h82e0},
    '{8'h2e, 8'h1a, 16'h04ac},
    '{8'h94, 8'h92, 16'h4b68},
    '{8'ha3, 8'h30, 16'h1e70},
    '{8'h5f, 8'h18, 16'h0878},
    '{8'h8c, 8'hb6, 16'h6078}
  };

  logic [N-1:0] b, c;
  logic [W-1:0] y;
  int checks = 0, failures = 0;

  approx_mult8_a dut (.b(b), .c(c), .y(y));

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
    if (rel_sum / 2000.0 >= 0.12) begin
      failures++;
      $display("FAIL mean relative error %f", rel_sum / 2000.0);
    end else
      $display("mean relative error %f", rel_sum / 2000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
