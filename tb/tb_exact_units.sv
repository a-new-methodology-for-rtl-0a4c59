// Self-checking testbench for the exact units: exact_half_adder,
// exact_full_adder and exact_compressor_4_2.
// Every input combination is applied and the weighted outputs are compared
// with the arithmetic sum of the inputs. For the compressor it also checks
// that cout does not depend on cin, which is what lets a row of compressors
// chain cout to cin without a rippling carry.
module tb_exact_units;
  logic [4:0] x;
  logic ha_s, ha_c, fa_s, fa_c, cp_s, cp_c, cp_co;
  logic cp_co_other;
  int checks = 0, failures = 0;

  exact_half_adder     u_ha (.x1(x[0]), .x2(x[1]), .sum(ha_s), .carry(ha_c));
  exact_full_adder     u_fa (.x1(x[0]), .x2(x[1]), .x3(x[2]), .sum(fa_s), .carry(fa_c));
  exact_compressor_4_2 u_cp (.x1(x[0]), .x2(x[1]), .x3(x[2]), .x4(x[3]), .cin(x[4]),
                             .sum(cp_s), .carry(cp_c), .cout(cp_co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      checks++;
      if (int'(2 * ha_c + ha_s) != int'(x[0] + x[1])) begin
        failures++; $display("FAIL half adder x=%b", x);
      end
      checks++;
      if (int'(2 * fa_c + fa_s) != int'(x[0] + x[1] + x[2])) begin
        failures++; $display("FAIL full adder x=%b", x);
      end
      checks++;
      if (int'(2 * (cp_c + cp_co) + cp_s) != int'(x[0] + x[1] + x[2] + x[3] + x[4])) begin
        failures++; $display("FAIL compressor x=%b got s=%b c=%b co=%b", x, cp_s, cp_c, cp_co);
      end
      // same data bits, other cin: cout must not change
      cp_co_other = cp_co;
      x[4] = ~x[4];
      #1;
      checks++;
      if (cp_co !== cp_co_other) begin
        failures++; $display("FAIL compressor cout depends on cin, x=%b", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
