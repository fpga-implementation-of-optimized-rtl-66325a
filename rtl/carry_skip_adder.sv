// Carry skip adder of WIDTH bits, sub-adder SA3 of the heterogeneous adder (bits 15:12).
//
// The operands are cut into WIDTH/BLOCK_W ripple-carry blocks. For each block the AND of its bit
// propagates tells, before any carry arrives, that the block cannot absorb a carry; the carry
// out of such a block is then the block's carry in, taken past the ripple chain by the skip
// logic:  block_cout = rca_cout | (&p & block_cin).  When the group propagate is 0 the ripple
// carry out alone is correct, so the OR never changes the result, only how fast it settles.
// Purely combinational. The ripple blocks with group propagate and skip path follow the
// published heterogeneous adder. Its carry skip stages are drawn with four-bit ripple blocks,
// while its description asks for at least four blocks per adder, which for a four-bit SA3 would
// mean one-bit blocks; this design uses four-bit blocks, so SA3 is a single ripple block with
// skip logic. WIDTH must be a multiple of BLOCK_W.
module carry_skip_adder #(
  parameter int unsigned WIDTH   = 4,
  parameter int unsigned BLOCK_W = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic [WIDTH/BLOCK_W-1:0] skip   // block k passed its carry in by the skip path
);
  localparam int unsigned NBLK = WIDTH / BLOCK_W;

  logic [NBLK:0]        bc;        // carry into each block, bc[NBLK] = carry out
  logic [NBLK-1:0]      rca_cout;
  logic [WIDTH-1:0]     p;

  assign bc[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    ripple_carry_adder #(.WIDTH(BLOCK_W)) u_rca (
      .a   (a[k*BLOCK_W +: BLOCK_W]),
      .b   (b[k*BLOCK_W +: BLOCK_W]),
      .cin (bc[k]),
      .s   (s[k*BLOCK_W +: BLOCK_W]),
      .cout(rca_cout[k]),
      .p   (p[k*BLOCK_W +: BLOCK_W])
    );
    assign skip[k]  = (&p[k*BLOCK_W +: BLOCK_W]) & bc[k];
    assign bc[k+1]  = rca_cout[k] | skip[k];
  end

  assign cout = bc[NBLK];

  initial begin
    assert (WIDTH % BLOCK_W == 0 && WIDTH > 0)
      else $error("carry_skip_adder: WIDTH %0d is not a multiple of BLOCK_W %0d", WIDTH, BLOCK_W);
  end
endmodule
