// 16-bit heterogeneous adder: three sub-adders of different architectures in one carry chain.
//
// Bits 3:0 are added by a 4-bit Ling adder (SA1), bits 11:4 by an 8-bit carry lookahead adder
// (SA2) and bits 15:12 by a 4-bit carry skip adder (SA3). The carry out of SA1 (c1) is the carry
// in of SA2, the carry out of SA2 (c2) that of SA3, and SA3's carry out is the adder's cout:
//   {cout, s} = a + b + cin   for unsigned 16-bit a and b.
// The split and the order of the sub-adders are those of the published design. Purely combinational: no clock,
// no reset, results settle one propagation delay after the inputs change. The internal carries
// c1 and c2 are also brought out for observation. The sub-adders' own status outputs (Ling
// pseudo-carries, SA2 group propagate/generate, SA3 skip flags) are not needed by the chain and
// are left unread here; they exist for testing the sub-adders on their own.
module hetero_adder_16
  import hetero_adder_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic              cin,
  output logic [DATA_W-1:0] s,
  output logic              cout,
  output logic              c1,    // carry from SA1 into SA2
  output logic              c2     // carry from SA2 into SA3
);
  logic [4:1]                 ling_h;
  logic                       sa2_pg, sa2_gg;
  logic [SA3_W/CSK_BLOCK_W-1:0] sa3_skip;

  ling_adder_4 u_sa1 (
    .a   (a[SA1_LSB +: SA1_W]),
    .b   (b[SA1_LSB +: SA1_W]),
    .cin (cin),
    .s   (s[SA1_LSB +: SA1_W]),
    .cout(c1),
    .h   (ling_h)
  );

  cla_adder_8 u_sa2 (
    .a   (a[SA2_LSB +: SA2_W]),
    .b   (b[SA2_LSB +: SA2_W]),
    .cin (c1),
    .s   (s[SA2_LSB +: SA2_W]),
    .cout(c2),
    .pg  (sa2_pg),
    .gg  (sa2_gg)
  );

  carry_skip_adder #(.WIDTH(SA3_W), .BLOCK_W(CSK_BLOCK_W)) u_sa3 (
    .a   (a[SA3_LSB +: SA3_W]),
    .b   (b[SA3_LSB +: SA3_W]),
    .cin (c2),
    .s   (s[SA3_LSB +: SA3_W]),
    .cout(cout),
    .skip(sa3_skip)
  );
endmodule
