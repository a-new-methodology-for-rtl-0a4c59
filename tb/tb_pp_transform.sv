// Self-checking testbench for pp_transform at its default 16-bit size.
// For random and corner operands it rebuilds every partial product from the
// operand bits and checks a, p and g, including that the unused entries
// (i <= m) of p and g are zero and that p + g equals a[i][m] + a[m][i].
module tb_pp_transform;
  localparam int N = 16;
  logic [N-1:0] b, c;
  logic [N-1:0][N-1:0] a, p, g;
  int checks = 0, failures = 0;

  pp_transform dut (.b(b), .c(c), .a(a), .p(p), .g(g));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_once();
    int bad = 0;
    for (int i = 0; i < N; i++) begin
      for (int m = 0; m < N; m++) begin
        logic aim, ami;
        aim = b[i] && c[m];
        ami = b[m] && c[i];
        if (a[i][m] !== aim) bad++;
        if (i > m) begin
          if (p[i][m] !== (aim || ami)) bad++;
          if (g[i][m] !== (aim && ami)) bad++;
          if (int'(p[i][m]) + int'(g[i][m]) != int'(aim) + int'(ami)) bad++;
        end else begin
          if (p[i][m] !== 1'b0 || g[i][m] !== 1'b0) bad++;
        end
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL b=%h c=%h: %0d wrong entries", b, c, bad);
    end
  endtask

  initial begin
    b = '0; c = '0; #1; check_once();
    b = '1; c = '1; #1; check_once();
    b = 16'h00FF; c = 16'hFF00; #1; check_once();
    for (int t = 0; t < 200; t++) begin
      b = N'($urandom);
      c = N'($urandom);
      #1;
      check_once();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
