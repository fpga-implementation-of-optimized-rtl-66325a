// Eight-bit carry lookahead adder, sub-adder SA2 of the heterogeneous adder (bits 11:4).
//
// Two four-bit lookahead groups cover bits 3:0 and 7:4 of the operands. A second lookahead level
// joins them: the carry into the upper group is gg0 | pg0 & cin and the carry out is
// gg1 | pg1 & gg0 | pg1 & pg0 & cin, so neither carry ripples through the lower group's bits.
// Purely combinational. The width of eight bits is that of the published design; building it
// from two four-bit groups with a second lookahead level is this design's choice, as the
// published design details the lookahead structure only in its four-bit form.
module cla_adder_8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout,
  output logic       pg,   // propagate of all eight bits
  output logic       gg    // generate of all eight bits
);
  logic [1:0] gp, gg_i;    // group propagate and generate of the two groups
  logic [1:0] gc;          // carry into each group
  logic [1:0] unused_cout; // group carry outs, replaced by the second lookahead level

  assign gc[0] = cin;
  assign gc[1] = gg_i[0] | (gp[0] & cin);

  for (genvar k = 0; k < 2; k++) begin : g_grp
    cla_adder_4 u_grp (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (gc[k]),
      .s   (s[4*k +: 4]),
      .cout(unused_cout[k]),
      .pg  (gp[k]),
      .gg  (gg_i[k])
    );
  end

  always_comb begin
    gg   = gg_i[1] | (gp[1] & gg_i[0]);
    pg   = &gp;
    cout = gg | (pg & cin);
  end
endmodule
