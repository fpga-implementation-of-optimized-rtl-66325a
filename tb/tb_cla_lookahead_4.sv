// Self-checking testbench of cla_lookahead_4: every combination of the four propagates, four
// generates and the carry in (512 cases). The expected carries are obtained by rippling
// c(i+1) = g(i) | p(i) & c(i) bit by bit; group generate is the ripple carry out with no carry
// in, group propagate the AND of the propagates.
`timescale 1ns/1ps
module tb_cla_lookahead_4;
  logic [3:0] p, g;
  logic       c0;
  logic [4:1] c;
  logic       pg, gg;
  int checks = 0, failures = 0;

  cla_lookahead_4 dut (.p(p), .g(g), .c0(c0), .c(c), .pg(pg), .gg(gg));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [4:0] rc;     // ripple carries with c0
      logic [4:0] rg;     // ripple carries with no carry in
      {c0, p, g} = 9'(v);
      rc[0] = c0;
      rg[0] = 1'b0;
      for (int i = 0; i < 4; i++) begin
        rc[i+1] = g[i] | (p[i] & rc[i]);
        rg[i+1] = g[i] | (p[i] & rg[i]);
      end
      #1;
      checks++;
      if (c !== rc[4:1] || gg !== rg[4] || pg !== (p == 4'hF)) begin
        failures++;
        $display("FAIL p=%b g=%b c0=%b: c=%b (exp %b) pg=%b gg=%b (exp %b)",
                 p, g, c0, c, rc[4:1], pg, gg, rg[4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
