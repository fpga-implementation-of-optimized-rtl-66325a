// Four-bit Ling adder, sub-adder SA1 of the heterogeneous adder (bits 3:0).
//
// A Ling adder is a lookahead adder that computes the pseudo-carry h(i) = c(i) | c(i-1) instead
// of the carry c(i). With generate g = a & b, transmit t = a | b and half sum p = a ^ b, the
// real carry is c(i) = t(i-1) & h(i), and since t absorbs g the pseudo-carries have shorter
// products than the carries (the first term of each is g(i-1) | g(i-2), not g(i-1) | t(i-1)g(i-2)):
//   h1 = g0 | cin
//   h2 = g1 | g0 | t0 cin
//   h3 = g2 | g1 | t1 g0 | t1 t0 cin
//   h4 = g3 | g2 | t2 g1 | t2 t1 g0 | t2 t1 t0 cin
// The sum bits are s(i) = p(i) ^ (t(i-1) & h(i)) with s0 = p0 ^ cin, and the carry out is
// cout = t3 & h4. Purely combinational. The pseudo-carry and the carry and sum equations follow
// the published design; writing the four pseudo-carries in flat sum-of-products form is this design's.
module ling_adder_4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic [4:1] h      // Ling pseudo-carries
);
  logic [3:0] g, t, p;
  logic [3:0] c;            // real carry into each bit

  always_comb begin
    g = a & b;
    t = a | b;
    p = a ^ b;

    h[1] = g[0] | cin;
    h[2] = g[1] | g[0] | (t[0] & cin);
    h[3] = g[2] | g[1] | (t[1] & g[0]) | (t[1] & t[0] & cin);
    h[4] = g[3] | g[2] | (t[2] & g[1]) | (t[2] & t[1] & g[0]) | (t[2] & t[1] & t[0] & cin);

    c[0] = cin;
    for (int i = 1; i < 4; i++) c[i] = t[i-1] & h[i];
    s    = p ^ c;
    cout = t[3] & h[4];
  end
endmodule
