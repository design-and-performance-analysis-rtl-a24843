// tag_array: tag and valid bit of each of the 16 cache lines, and the tag
// comparator.
//
// Lookup is combinational: for the set chosen by index the four stored tags
// are compared with tag; hit is high when a valid way matches and hit_way
// names that way (the lowest one, should two ever match, which the
// controller never lets happen). install writes tag into (index, install_way)
// at the clock edge and marks it valid. flush clears every valid bit at the
// clock edge; reset (asynchronous) does the same.
// Each line keeps a tag and a valid bit. There is no dirty bit: the cache is
// write-through on hits and write-around on misses, so a line never holds
// data that main memory lacks. Keeping the tags apart from the data, inside
// the controller, follows the document; the comparator is the plain one.
module tag_array
  import cache_pkg::*;
#(
  parameter int unsigned IW = INDEX_W,  // set index bits
  parameter int unsigned TW = TAG_W     // tag bits
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             flush,
  input  logic [IW-1:0]    index,
  input  logic [TW-1:0]    tag,
  input  logic             install,
  input  logic [WAY_W-1:0] install_way,
  output logic             hit,
  output logic [WAY_W-1:0] hit_way
);

  localparam int unsigned NSETS = 1 << IW;

  logic [TW-1:0]   tags  [NSETS][WAYS];
  logic [WAYS-1:0] valid [NSETS];
  logic [WAYS-1:0] match;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      for (int s = 0; s < NSETS; s++) valid[s] <= '0;
    end else if (flush) begin
      for (int s = 0; s < NSETS; s++) valid[s] <= '0;
    end else if (install) begin
      valid[index][install_way] <= 1'b1;
    end
  end

  always_ff @(posedge clock) begin
    if (install) tags[index][install_way] <= tag;
  end

  always_comb begin
    for (int w = 0; w < WAYS; w++) match[w] = valid[index][w] && (tags[index][w] == tag);
    hit     = |match;
    hit_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) if (match[w]) hit_way = WAY_W'(w);
  end

endmodule
