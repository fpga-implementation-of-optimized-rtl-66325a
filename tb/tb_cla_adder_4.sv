// Self-checking testbench of cla_adder_4: all 512 combinations of a, b and cin. Sum and carry
// out are compared with integer addition; group propagate with "a + b = 15" and group generate
// with "a + b > 15".
`timescale 1ns/1ps
module tb_cla_adder_4;
  logic [3:0] a, b, s;
  logic       cin, cout, pg, gg;
  int checks = 0, failures = 0;

  cla_adder_4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int sum;
      {cin, a, b} = 9'(v);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 5'(sum) || pg !== (int'(a) + int'(b) == 15)
          || gg !== (int'(a) + int'(b) > 15)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d: s=%0d cout=%0b pg=%0b gg=%0b", a, b, cin, s, cout, pg, gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
