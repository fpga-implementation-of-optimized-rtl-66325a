// Ripple-carry adder of WIDTH bits, the building block of the carry skip adder.
//
// Each bit forms propagate p = a ^ b and generate g = a & b, adds the carry of the bit below,
// s = p ^ c, and passes c' = g | p & c up to the next bit, so the carry ripples from cin to cout
// through all WIDTH bits. The bit propagates are exported for the skip logic. Purely
// combinational. The four-bit ripple block with its propagate outputs follows the carry skip
// structure; the per-bit equations are the standard ones.
module ripple_carry_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic [WIDTH-1:0] p     // bit propagates
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign p[i]   = a[i] ^ b[i];
    assign s[i]   = p[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (p[i] & c[i]);
  end

  assign cout = c[WIDTH];
endmodule
