// Self-checking testbench of ripple_carry_adder: all input combinations at the default width of
// four bits and at eight bits. Sum and carry out are compared with integer addition, the bit
// propagates with a ^ b.
`timescale 1ns/1ps
module tb_ripple_carry_adder;
  logic [3:0] a4, b4, s4, p4;
  logic       cin4, cout4;
  logic [7:0] a8, b8, s8, p8;
  logic       cin8, cout8;
  int checks = 0, failures = 0;

  ripple_carry_adder dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4), .p(p4));
  ripple_carry_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin8), .s(s8), .cout(cout8), .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a8, b8, cin8} = '0;
    for (int v = 0; v < 512; v++) begin
      {cin4, a4, b4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin4)) || p4 !== (a4 ^ b4)) begin
        failures++;
        $display("FAIL w4 %0d+%0d+%0d: s=%0d cout=%0b", a4, b4, cin4, s4, cout4);
      end
    end
    for (int v = 0; v < (1 << 17); v++) begin
      {cin8, a8, b8} = 17'(v);
      #1;
      checks++;
      if ({cout8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin8)) || p8 !== (a8 ^ b8)) begin
        failures++;
        if (failures < 10) $display("FAIL w8 %0d+%0d+%0d: s=%0d cout=%0b", a8, b8, cin8, s8, cout8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
