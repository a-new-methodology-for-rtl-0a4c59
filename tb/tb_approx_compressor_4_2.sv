// Self-checking testbench for approx_compressor_4_2.
// Applies all sixteen input combinations and compares carry and sum with the
// approximate 4-2 compressor truth table, written out here as a constant.
// It also checks the error against the exact bit count: zero inputs give
// zero, the error is never more than one and never an over-estimate, and it
// is nonzero exactly for 0101, 0110, 1001, 1010 and 1111.
module tb_approx_compressor_4_2;
  logic y1, y2, y3, y4, sum, carry;
  int checks = 0, failures = 0;
  // expected {carry,sum} indexed by {y1,y2,y3,y4}
  localparam logic [1:0] EXPECTED [16] = '{
    2'b00, 2'b01, 2'b01, 2'b10, 2'b01, 2'b01, 2'b01, 2'b11,
    2'b01, 2'b01, 2'b01, 2'b11, 2'b10, 2'b11, 2'b11, 2'b11};
  localparam logic [15:0] ERROR_CASES = 16'b1000_0110_0110_0000; // bit v set: error 1

  approx_compressor_4_2 dut (.y1(y1), .y2(y2), .y3(y3), .y4(y4), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {y1, y2, y3, y4} = 4'(v);
      #1;
      checks++;
      if ({carry, sum} !== EXPECTED[v]) begin
        failures++;
        $display("FAIL y=%b got %b%b expected %b", 4'(v), carry, sum, EXPECTED[v]);
      end
      checks++;
      if (int'(y1 + y2 + y3 + y4) - int'(2 * carry + sum) != int'(ERROR_CASES[v])) begin
        failures++;
        $display("FAIL error distance for y=%b", 4'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
