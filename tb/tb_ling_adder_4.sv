// Self-checking testbench of ling_adder_4: all 512 combinations of a, b and cin. Sum and carry
// out are compared with integer addition, and each pseudo-carry h(i) with c(i) | c(i-1), where
// the carries c(i) into each bit are taken from the integer sum of the low bits.
`timescale 1ns/1ps
module tb_ling_adder_4;
  logic [3:0] a, b, s;
  logic       cin, cout;
  logic [4:1] h;
  int checks = 0, failures = 0;
  int n_h_without_c = 0;   // pseudo-carry set while the real carry is not

  ling_adder_4 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .h(h));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] c;
      logic [4:1] exp_h;
      {cin, a, b} = 9'(v);
      c[0] = cin;
      for (int i = 1; i <= 4; i++) begin
        int lo;
        lo   = int'(a & 4'((1 << i) - 1)) + int'(b & 4'((1 << i) - 1)) + int'(cin);
        c[i] = (lo >> i) & 1;
      end
      for (int i = 1; i <= 4; i++) exp_h[i] = c[i] | c[i-1];
      #1;
      checks++;
      if ({cout, s} !== 5'(int'(a) + int'(b) + int'(cin)) || h !== exp_h) begin
        failures++;
        $display("FAIL %0d+%0d+%0d: s=%0d cout=%0b h=%b (exp %b)", a, b, cin, s, cout, h, exp_h);
      end
      if (h[4] && !c[4]) n_h_without_c++;
    end
    checks++;
    if (n_h_without_c == 0) failures++;
    $display("cases with h4 set and no carry out: %0d", n_h_without_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
