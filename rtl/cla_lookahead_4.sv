// Four-bit carry lookahead unit.
//
// From the propagate and generate signals of four bit positions and the incoming carry c0 it
// forms the carries c1..c3 into bits 1..3 and the carry out c4, each as a flat two-level
// sum of products so that no carry waits on another:
//   c(i+1) = g(i) | p(i)g(i-1) | ... | p(i)...p(0)c0.
// It also exports the group propagate pg (all four bits propagate) and group generate gg (the
// group makes a carry by itself), so that several units can be joined by a second lookahead
// level. Purely combinational. The unit and its ports c1..c4, PG and GG follow the lookahead
// adder's structure; the equations are the standard lookahead ones.
module cla_lookahead_4 (
  input  logic [3:0] p,
  input  logic [3:0] g,
  input  logic       c0,
  output logic [4:1] c,    // c[i] is the carry into bit i, c[4] the carry out
  output logic       pg,   // group propagate
  output logic       gg    // group generate
);
  always_comb begin
    c[1] = g[0] | (p[0] & c0);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c0);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c0);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    pg   = &p;
    c[4] = gg | (pg & c0);
  end
endmodule
