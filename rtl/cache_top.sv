// cache_top: the whole memory system seen by a non-pipelined processor: a
// 256-byte, 4-way set-associative, write-through / write-around cache with
// tree pseudo-LRU replacement in front of a 4 KB, four-bank main memory.
//
// Processor side: addr (32 bits, bits 9:0 used), wdata, rd, wr, flush in;
// rdata and stall out. The processor raises rd or wr with the address (and
// wdata for a write) and holds them until the first clock edge, at least three
// cycles later, at which stall is low; on a read, rdata holds the word in that
// last cycle. reset is asynchronous and active high; it clears the cache
// (all lines invalid) but not the words held in main memory.
//
// Wiring (as in the design's netlist): addr[3:2] is the set index and addr[9:4]
// the tag into the controller; the controller's loctn selects the data-array
// line and addr[1:0] the word; main memory gets addr[9:0] and wdata, and its
// 128-bit data_out feeds the data array's refill port.
module cache_top
  import cache_pkg::*;
(
  input  logic              clock,
  input  logic              reset,
  input  logic              flush,
  input  logic              rd,
  input  logic              wr,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WORD_W-1:0] wdata,
  output logic [WORD_W-1:0] rdata,
  output logic              stall
);

  logic [LINE_W-1:0]  loctn;
  logic [WAY_W-1:0]   set_offset;
  logic               refill;
  logic               update;
  logic               read_from_mem;
  logic               write_to_mem;
  logic               mem_ready;
  logic [BLOCK_W-1:0] mem_block;
  state_t             state;

  cache_controller u_ctrl (
    .clock         (clock),
    .reset         (reset),
    .flush         (flush),
    .rd            (rd),
    .wr            (wr),
    .index         (addr[OFFSET_W +: INDEX_W]),
    .tag           (addr[OFFSET_W + INDEX_W +: TAG_W]),
    .ready         (mem_ready),
    .loctn         (loctn),
    .set_offset    (set_offset),
    .refill        (refill),
    .update        (update),
    .stall         (stall),
    .read_from_mem (read_from_mem),
    .write_to_mem  (write_to_mem),
    .state         (state)
  );

  cache_data_array u_data (
    .clock         (clock),
    .index         (loctn),
    .offset        (addr[OFFSET_W-1:0]),
    .data_from_mem (mem_block),
    .write_data    (wdata),
    .refill        (refill),
    .update        (update),
    .read_data     (rdata)
  );

  main_memory_system u_mem (
    .clock      (clock),
    .reset      (reset),
    .addr       (addr[MEM_AW-1:0]),
    .data_in    (wdata),
    .rd         (read_from_mem),
    .wr         (write_to_mem),
    .data_out   (mem_block),
    .data_ready (mem_ready)
  );

endmodule
