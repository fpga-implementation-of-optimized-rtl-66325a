// One-bit full adder cell of a carry lookahead adder.
//
// The cell adds a, b and the carry c that the lookahead logic delivers to it. Besides the sum it
// exports the bit's propagate p = a ^ b and generate g = a & b, which the lookahead unit combines
// into the carries of the following bits; the cell itself has no carry output. Purely
// combinational. The cell and its p/g outputs follow the structure of the lookahead adder;
// using the XOR form of propagate (which also serves as the half sum) is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,   // carry into this bit
  output logic s,   // sum bit
  output logic p,   // propagate
  output logic g    // generate
);
  always_comb begin
    p = a ^ b;
    g = a & b;
    s = p ^ c;
  end
endmodule
