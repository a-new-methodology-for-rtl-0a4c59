// Self-checking testbench for approx_half_adder.
// Applies all four input combinations and compares carry and sum with the
// approximate half-adder truth table, written out here as a constant, and
// checks that the error against an exact half adder is 0 except for input
// 11, where it is exactly one.
module tb_approx_half_adder;
  logic y1, y2, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} indexed by {y1,y2}
  localparam logic [1:0] EXPECTED [4] = '{2'b00, 2'b01, 2'b01, 2'b11};

  approx_half_adder dut (.y1(y1), .y2(y2), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {y1, y2} = 2'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXPECTED[v]) begin
        failures++;
        $display("FAIL y1y2=%b got %b%b expected %b", 2'(v), carry, sum, EXPECTED[v]);
      end
      checks++;
      if (int'(2 * carry + sum) - int'(y1 + y2) != ((v == 3) ? 1 : 0)) begin
        failures++;
        $display("FAIL error distance for y1y2=%b", 2'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
