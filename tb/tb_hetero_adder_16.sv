// End-to-end self-checking testbench of hetero_adder_16 at its default (and only) size.
//
// It applies the operand pairs of the reference simulation of the adder, a set of corner cases
// (zero, all ones, carries that run the full length of the chain) and 1,000,000 random operand
// pairs, half of them biased towards long propagate runs. Sum, carry out and the two internal
// carries c1 (Ling adder into lookahead adder) and c2 (lookahead adder into skip adder) are
// compared with integer addition. It counts how often each carry mechanism of the chain was
// exercised and fails if one never was: a carry out of SA1, a carry out of SA2, a carry
// entering SA2 and passing through all eight of its bits, a carry taking SA3's skip path, a
// Ling pseudo-carry set while the real carry out of SA1 is clear, and a carry out of the adder.
`timescale 1ns/1ps
module tb_hetero_adder_16;
  logic [15:0] a, b, s;
  logic        cin, cout, c1, c2;
  int checks = 0, failures = 0;

  typedef enum int {
    M_C1, M_C2, M_SA2_PASS, M_SA3_SKIP, M_LING_H, M_COUT, M_NUM
  } mech_e;
  int mech_count [M_NUM];
  string mech_name [M_NUM] = '{"carry out of SA1", "carry out of SA2",
                               "carry through all of SA2", "SA3 skip path",
                               "Ling pseudo-carry without carry", "carry out of adder"};

  hetero_adder_16 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .c1(c1), .c2(c2));

  initial begin : watchdog
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb, input logic tc);
    int unsigned sum, lo4, lo12;
    logic e1, e2;
    a = ta; b = tb; cin = tc;
    #1;
    sum  = int'(ta) + int'(tb) + int'(tc);
    lo4  = int'(ta[3:0]) + int'(tb[3:0]) + int'(tc);
    lo12 = int'(ta[11:0]) + int'(tb[11:0]) + int'(tc);
    e1   = lo4[4];
    e2   = lo12[12];
    checks++;
    if ({cout, s} !== 17'(sum) || c1 !== e1 || c2 !== e2) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d+%0d+%0d: s=%0d cout=%0b c1=%0b c2=%0b (exp s=%0d cout=%0b c1=%0b c2=%0b)",
                 ta, tb, tc, s, cout, c1, c2, sum[15:0], sum[16], e1, e2);
    end
    if (e1) mech_count[M_C1]++;
    if (e2) mech_count[M_C2]++;
    if (e1 && ((ta[11:4] ^ tb[11:4]) == 8'hFF)) mech_count[M_SA2_PASS]++;
    if (e2 && ((ta[15:12] ^ tb[15:12]) == 4'hF)) mech_count[M_SA3_SKIP]++;
    // pseudo-carry h4 = c4 | c3 is set while c4 (= c1) is clear exactly when c3 is set
    if (!e1 && ((int'(ta[2:0]) + int'(tb[2:0]) + int'(tc)) > 7)) mech_count[M_LING_H]++;
    if (sum[16]) mech_count[M_COUT]++;
  endtask

  initial begin
    // operand pairs of the reference simulation (carry in 0)
    apply(16'd65535, 16'd65535, 1'b0);
    apply(16'd550,   16'd250,   1'b0);
    apply(16'd128,   16'd960,   1'b0);
    apply(16'd65000, 16'd54000, 1'b0);
    apply(16'd1024,  16'd4096,  1'b0);
    apply(16'd51515, 16'd31313, 1'b0);
    // spot values of the reference simulation, checked literally
    a = 16'd550; b = 16'd250; cin = 1'b0; #1;
    checks++; if (s !== 16'd800 || cout !== 1'b0) failures++;
    a = 16'd65000; b = 16'd54000; #1;
    checks++; if (s !== 16'd53464 || cout !== 1'b1) failures++;
    // corners
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h0000, 16'h0000, 1'b1);
    apply(16'hFFFF, 16'h0000, 1'b1);      // carry ripples the full length
    apply(16'h0FFF, 16'h0000, 1'b1);      // carry stops at SA3
    apply(16'hF0F0, 16'h0F0F, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);
    for (int k = 0; k < 16; k++) begin
      apply(16'((1 << k) - 1), 16'd1, 1'b0);
      apply(16'hFFFF >> k, 16'h0000, 1'b1);
    end
    // random
    for (int n = 0; n < 1000000; n++) begin
      logic [15:0] ra, rb;
      ra = 16'($urandom);
      rb = (n % 2 == 1) ? (~ra ^ 16'($urandom & $urandom & $urandom)) : 16'($urandom);
      apply(ra, rb, 1'($urandom));
    end
    for (int m = 0; m < M_NUM; m++) begin
      $display("%-34s %0d", mech_name[m], mech_count[m]);
      checks++;
      if (mech_count[m] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", mech_name[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
