// cache_data_array: the data side of the cache, 16 lines of 128 bits (256 bytes).
//
// index selects one of the 16 lines; the controller drives it with
// {set, way}. offset (address bits 1:0) selects the 32-bit word in the line.
//   refill : at the clock edge the whole line is loaded from data_from_mem
//            (the 128-bit block main memory returns), word k from bits 32k+31:32k.
//   update : at the clock edge the selected word is replaced by write_data
//            (write hit). refill wins if both are high.
// read_data is the selected word, read combinationally, so it is valid in the
// same cycle as index and offset.
// Ports and widths follow the design's netlist; the combinational read port
// is this design's choice. The array has no reset: a line is only read after
// the controller has marked it valid, which it does when it refills it.
module cache_data_array
  import cache_pkg::*;
(
  input  logic               clock,
  input  logic [LINE_W-1:0]  index,
  input  logic [OFFSET_W-1:0] offset,
  input  logic [BLOCK_W-1:0] data_from_mem,
  input  logic [WORD_W-1:0]  write_data,
  input  logic               refill,
  input  logic               update,
  output logic [WORD_W-1:0]  read_data
);

  localparam int unsigned LINES = 1 << LINE_W;

  logic [WORDS-1:0][WORD_W-1:0] lines [LINES];

  always_ff @(posedge clock) begin
    if (refill) begin
      lines[index] <= data_from_mem;
    end else if (update) begin
      lines[index][offset] <= write_data;
    end
  end

  assign read_data = lines[index][offset];

endmodule
