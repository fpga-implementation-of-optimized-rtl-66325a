// Shared constants of the 16-bit heterogeneous adder.
//
// The adder is a chain of three sub-adders of different architectures. The widths below are
// the split of the proposed design: a 4-bit Ling adder on bits 3:0, an 8-bit carry lookahead
// adder on bits 11:4 and a 4-bit carry skip adder on bits 15:12. The carry skip adder is
// built from ripple-carry blocks of CSK_BLOCK_W bits; one block of 4 bits, as drawn for each
// skip stage of the carry skip structure, is this design's reading of the block size.
package hetero_adder_pkg;
  localparam int unsigned DATA_W      = 16;
  localparam int unsigned SA1_W       = 4;   // Ling adder, bits 3:0
  localparam int unsigned SA2_W       = 8;   // carry lookahead adder, bits 11:4
  localparam int unsigned SA3_W       = 4;   // carry skip adder, bits 15:12
  localparam int unsigned CSK_BLOCK_W = 4;   // width of one ripple block inside SA3

  localparam int unsigned SA1_LSB = 0;
  localparam int unsigned SA2_LSB = SA1_LSB + SA1_W;
  localparam int unsigned SA3_LSB = SA2_LSB + SA2_W;
endpackage
