// Self-checking testbench of cla_adder_8: all 131072 combinations of a, b and cin. Sum and carry
// out are compared with integer addition, group propagate with "a + b = 255" and group generate
// with "a + b > 255". It also counts how often the second lookahead level passed a carry across
// both groups (pg with cin) and into the upper group, and fails if either never happened.
`timescale 1ns/1ps
module tb_cla_adder_8;
  logic [7:0] a, b, s;
  logic       cin, cout, pg, gg;
  int checks = 0, failures = 0;
  int n_full_propagate = 0, n_upper_carry = 0;

  cla_adder_8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .pg(pg), .gg(gg));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 17); v++) begin
      int sum;
      {cin, a, b} = 17'(v);
      #1;
      sum = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 9'(sum) || pg !== (int'(a) + int'(b) == 255)
          || gg !== (int'(a) + int'(b) > 255)) begin
        failures++;
        if (failures < 10)
          $display("FAIL %0d+%0d+%0d: s=%0d cout=%0b pg=%0b gg=%0b", a, b, cin, s, cout, pg, gg);
      end
      if (pg && cin) n_full_propagate++;
      if (int'(a[3:0]) + int'(b[3:0]) + int'(cin) > 15) n_upper_carry++;
    end
    checks++;
    if (n_full_propagate == 0 || n_upper_carry == 0) failures++;
    $display("carry across both groups: %0d, carry into upper group: %0d",
             n_full_propagate, n_upper_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
