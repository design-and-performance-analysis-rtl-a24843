// cache_pkg: sizes and types shared by the 4-way set-associative cache,
// its controller and the four-bank main memory.
//
// Address map (word addresses, 10 bits reach main memory):
//   addr[9:4] tag (6 bits) | addr[3:2] set index (2 bits) | addr[1:0] word in block
// A block is four 32-bit words (128 bits). Sixteen lines, four sets of four
// ways, give a 256-byte cache. Main memory is four banks of 256 x 32 bits
// (1 KB each); word k of every block lives in bank k.
// These numbers, and the bit slices, follow the design's published netlist;
// the state encoding is this design's own.
package cache_pkg;

  localparam int unsigned WORD_W   = 32;               // processor data bus
  localparam int unsigned ADDR_W   = 32;               // processor address bus
  localparam int unsigned MEM_AW   = 10;               // address bits used by main memory
  localparam int unsigned OFFSET_W = 2;                // word within a block
  localparam int unsigned WORDS    = 1 << OFFSET_W;    // words per block
  localparam int unsigned BLOCK_W  = WORD_W * WORDS;   // 128-bit block
  localparam int unsigned INDEX_W  = 2;                // 4 sets
  localparam int unsigned SETS     = 1 << INDEX_W;
  localparam int unsigned WAY_W    = 2;                // 4 ways
  localparam int unsigned WAYS     = 1 << WAY_W;
  localparam int unsigned TAG_W    = MEM_AW - INDEX_W - OFFSET_W;   // 6
  localparam int unsigned LINE_W   = INDEX_W + WAY_W;  // line location, 16 lines
  localparam int unsigned BANK_AW  = MEM_AW - OFFSET_W; // 8: 256 words per bank

  // Controller states, one per bubble of the controller's state diagram.
  typedef enum logic [2:0] {
    ST_RESET       = 3'd0,  // held while reset is asserted
    ST_REQUEST     = 3'd1,  // waiting for a request from the processor
    ST_READ_CACHE  = 3'd2,  // tag compare for a read
    ST_READ_MEM    = 3'd3,  // block read issued to main memory
    ST_BRING_DATA  = 3'd4,  // block arrives and is written into the line
    ST_PROVIDE     = 3'd5,  // requested word is on the read data bus
    ST_WRITE_CACHE = 3'd6,  // write hit: word written into the line
    ST_WRITE_MEM   = 3'd7   // word written through/around to main memory
  } state_t;

endpackage
