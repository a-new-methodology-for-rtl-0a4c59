// Self-checking testbench for approx_full_adder.
// Applies all eight input combinations and compares carry and sum with the
// approximate full-adder truth table, written out here as a constant. It also
// checks that the approximate value is never above the exact count and is
// below it by one only for inputs 110 and 111.
module tb_approx_full_adder;
  logic y1, y2, y3, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} indexed by {y1,y2,y3}
  localparam logic [1:0] EXPECTED [8] =
    '{2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b10, 2'b01, 2'b10};

  approx_full_adder dut (.y1(y1), .y2(y2), .y3(y3), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {y1, y2, y3} = 3'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXPECTED[v]) begin
        failures++;
        $display("FAIL y=%b got %b%b expected %b", 3'(v), carry, sum, EXPECTED[v]);
      end
      checks++;
      if (int'(y1 + y2 + y3) - int'(2 * carry + sum) != ((v >= 6) ? 1 : 0)) begin
        failures++;
        $display("FAIL error distance for y=%b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
