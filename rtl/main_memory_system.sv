// main_memory_system: 4 KB main memory made of four 1 KB banks.
//
// addr is a 10-bit word address. addr[9:2] selects the row in every bank and
// addr[1:0] selects the bank, so the four words of a block sit side by side.
// A read (rd) reads all four banks at once and returns the whole 128-bit block:
// bank k drives data_out[32k+31:32k]. A write (wr) goes only to the bank that
// addr[1:0] selects (a one-hot write demultiplexer built from the three
// comparisons of addr[1:0] with 0, 1 and 2). data_ready is the OR of the
// banks' data_ready, so it is high in the cycle after any access.
// The bank split, the bit slices and the OR of the ready signals follow the
// design's netlist.
module main_memory_system
  import cache_pkg::*;
(
  input  logic               clock,
  input  logic               reset,
  input  logic [MEM_AW-1:0]  addr,
  input  logic [WORD_W-1:0]  data_in,
  input  logic               rd,
  input  logic               wr,
  output logic [BLOCK_W-1:0] data_out,
  output logic               data_ready
);

  logic [WORDS-1:0] bank_wr;
  logic [WORDS-1:0] bank_ready;

  // write demultiplexer: bank k is written when addr[1:0] == k
  always_comb begin
    bank_wr = '0;
    bank_wr[addr[OFFSET_W-1:0]] = wr;
  end

  for (genvar k = 0; k < WORDS; k++) begin : g_bank
    memory_bank #(.AW(BANK_AW), .DW(WORD_W)) u_bank (
      .clock      (clock),
      .reset      (reset),
      .addr       (addr[MEM_AW-1:OFFSET_W]),
      .data_in    (data_in),
      .rd         (rd),
      .wr         (bank_wr[k]),
      .data_out   (data_out[k*WORD_W +: WORD_W]),
      .data_ready (bank_ready[k])
    );
  end

  assign data_ready = |bank_ready;

endmodule
