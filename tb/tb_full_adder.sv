// Self-checking testbench of full_adder: all eight input combinations, sum, propagate and
// generate compared with values computed from the truth table of a one-bit addition.
`timescale 1ns/1ps
module tb_full_adder;
  logic a, b, c, s, p, g;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .p(p), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks++;
      if (s !== total[0] || p !== (total - int'(c) == 1) || g !== (a && b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b: s=%0b p=%0b g=%0b", a, b, c, s, p, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
