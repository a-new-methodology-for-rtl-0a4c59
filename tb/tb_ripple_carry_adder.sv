// Self-checking testbench for ripple_carry_adder at its 32-bit default.
// Random and corner operands are added and {cout, sum} is compared with the
// 33-bit arithmetic sum.
module tb_ripple_carry_adder;
  localparam int W = 32;
  logic [W-1:0] a, b, sum;
  logic cout;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W:0] expected;
    a = x; b = y;
    #1;
    expected = {1'b0, x} + {1'b0, y};
    checks++;
    if ({cout, sum} !== expected) begin
      failures++;
      $display("FAIL %h + %h got %h expected %h", x, y, {cout, sum}, expected);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, 32'd1);
    apply('1, '1);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'h5555_5555, 32'hAAAA_AAAA);
    for (int t = 0; t < 1000; t++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
