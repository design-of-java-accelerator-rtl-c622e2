// macb -- Method Area Circular Buffer, the first-level method area.
//
// NUM_BLOCKS memory blocks of BLOCK_BYTES each hold whole class runtime
// images (one image may span several consecutive blocks, wrapping from the
// last block to the first).  The buffer is organised as 16-bit big-endian
// words because the instruction buffer takes 16 bits of bytecode per cycle.
//
// A reader gives a block number and a word offset inside the class image
// (byte offset >> 1); the block holding that word is the image's first
// block plus the top bits of the offset, modulo NUM_BLOCKS.  Block count
// and block size follow the source design (32 blocks of 2 KB).
//
// Timing: synchronous read, data one cycle after rd_en (block RAM).  One
// write port used by the class image loader.
module macb #(
  parameter int unsigned NUM_BLOCKS  = 32,
  parameter int unsigned BLOCK_BYTES = 2048
) (
  input  logic        clk,
  // read port
  input  logic        rd_en,
  input  logic [$clog2(NUM_BLOCKS)-1:0] rd_first_block,  // image's first block
  input  logic [15:0] rd_word,                           // word offset in image
  output logic [15:0] rd_data,
  // write port
  input  logic        wr_en,
  input  logic [$clog2(NUM_BLOCKS)-1:0] wr_block,
  input  logic [$clog2(BLOCK_BYTES/2)-1:0] wr_word,      // word inside the block
  input  logic [15:0] wr_data
);
  localparam int unsigned BW    = $clog2(NUM_BLOCKS);
  localparam int unsigned WW    = $clog2(BLOCK_BYTES/2);
  localparam int unsigned DEPTH = NUM_BLOCKS * BLOCK_BYTES / 2;

  logic [15:0] mem [DEPTH];

  logic [BW-1:0] rd_block;
  assign rd_block = rd_first_block + BW'(rd_word >> WW);

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wr_block, wr_word}] <= wr_data;
    if (rd_en) rd_data <= mem[{rd_block, rd_word[WW-1:0]}];
  end
endmodule
