// memory_bank: one 1 KB bank of main memory, 256 words of 32 bits.
//
// A read (rd) or write (wr) is taken at a rising clock edge. A read puts the
// addressed word on data_out at that edge; a write stores data_in. Either way
// data_ready is high for the one cycle that follows, so a request issued in
// cycle n is answered in cycle n+1. data_out keeps the last word read.
// reset (asynchronous, active high) clears data_ready and data_out. The
// words themselves are not reset, so the array maps onto a block RAM; their
// contents are undefined until written.
// The port list is the bank's in the design's netlist; the one-cycle response
// is this design's choice, the document gives no bank timing.
module memory_bank
  import cache_pkg::*;
#(
  parameter int unsigned AW = BANK_AW,   // 8 address bits: 256 words
  parameter int unsigned DW = WORD_W     // 32-bit words
) (
  input  logic          clock,
  input  logic          reset,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data_in,
  input  logic          rd,
  input  logic          wr,
  output logic [DW-1:0] data_out,
  output logic          data_ready
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clock) begin
    if (wr) mem[addr] <= data_in;
  end

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      data_out   <= '0;
      data_ready <= 1'b0;
    end else begin
      if (rd) data_out <= mem[addr];
      data_ready <= rd | wr;
    end
  end

endmodule
