// Four-bit carry lookahead adder: four full adder cells and one lookahead unit.
//
// Each cell returns its propagate and generate to the lookahead unit, which sends back the
// carry for each cell at once, and produces the carry out c4 and the group signals pg and gg.
// Purely combinational; the carry reaches every bit through two gate levels whatever the
// operands. This is the lookahead adder in its four-bit form.
module cla_adder_4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic       pg,   // group propagate
  output logic       gg    // group generate
);
  logic [3:0] p, g;
  logic [4:0] c;   // c[0] = cin, c[i] carry into bit i, c[4] carry out

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]), .p(p[i]), .g(g[i]));
  end

  cla_lookahead_4 u_cla (.p(p), .g(g), .c0(cin), .c(c[4:1]), .pg(pg), .gg(gg));

  assign cout = c[4];
endmodule
