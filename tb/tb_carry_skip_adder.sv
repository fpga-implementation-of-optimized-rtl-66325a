// Self-checking testbench of carry_skip_adder: exhaustively at the default four bits (one
// block), and with 200000 random operand pairs at sixteen bits in four-bit blocks. Sum and carry
// out are compared with integer addition. The skip flag of each block is compared with "all bits
// of the block propagate and a carry enters it", the carry in being taken from the integer sum.
// Skips are counted and the test fails if none happened.
`timescale 1ns/1ps
module tb_carry_skip_adder;
  logic [3:0]  a4, b4, s4;
  logic        cin4, cout4;
  logic [0:0]  skip4;
  logic [15:0] a16, b16, s16;
  logic        cin16, cout16;
  logic [3:0]  skip16;
  int checks = 0, failures = 0, n_skip = 0;

  carry_skip_adder dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4), .skip(skip4));
  carry_skip_adder #(.WIDTH(16), .BLOCK_W(4)) dut16 (
    .a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16), .skip(skip16));

  // Carry into bit position pos of a + b + cin.
  function automatic logic carry_into(input logic [15:0] a, input logic [15:0] b,
                                      input logic cin, input int pos);
    logic [16:0] lo;
    logic [16:0] mask;
    mask = (17'd1 << pos) - 17'd1;
    lo   = (17'(a) & mask) + (17'(b) & mask) + 17'(cin);
    return lo[pos];
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {a16, b16, cin16} = '0;
    for (int v = 0; v < 512; v++) begin
      logic exp_skip;
      {cin4, a4, b4} = 9'(v);
      #1;
      exp_skip = ((a4 ^ b4) == 4'hF) && cin4;
      checks++;
      if ({cout4, s4} !== 5'(int'(a4) + int'(b4) + int'(cin4)) || skip4[0] !== exp_skip) begin
        failures++;
        $display("FAIL w4 %0d+%0d+%0d: s=%0d cout=%0b skip=%0b", a4, b4, cin4, s4, cout4, skip4);
      end
      if (skip4[0]) n_skip++;
    end
    for (int n = 0; n < 200000; n++) begin
      logic [3:0] exp_skip;
      a16 = 16'($urandom);
      // make long propagate runs common so that skips across several blocks occur
      b16 = ($urandom_range(0, 1) == 1) ? (~a16 ^ 16'($urandom & $urandom & $urandom)) : 16'($urandom);
      cin16 = 1'($urandom);
      #1;
      for (int k = 0; k < 4; k++)
        exp_skip[k] = ((a16[4*k +: 4] ^ b16[4*k +: 4]) == 4'hF) && carry_into(a16, b16, cin16, 4*k);
      checks++;
      if ({cout16, s16} !== 17'(int'(a16) + int'(b16) + int'(cin16)) || skip16 !== exp_skip) begin
        failures++;
        if (failures < 10)
          $display("FAIL w16 %0d+%0d+%0d: s=%0d cout=%0b skip=%b", a16, b16, cin16, s16, cout16, skip16);
      end
      n_skip += $countones(skip16);
    end
    checks++;
    if (n_skip == 0) failures++;
    $display("skips taken: %0d", n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
