// plru_tree: tree pseudo-LRU replacement state for a 4-way set-associative
// cache, one three-node binary tree per set.
//
// Node bits of a set, b[2:0]:
//   b[0] root  : 1 = ways 2/3 were used last, 0 = ways 0/1 were used last
//   b[1] left  : 1 = way 1 was used last,     0 = way 0 was used last
//   b[2] right : 1 = way 3 was used last,     0 = way 2 was used last
// The victim is found by walking from the root away from the most recently
// used side: root 1 -> left subtree, pick the way its node did not use last;
// root 0 -> right subtree likewise. victim_way is combinational for the set
// victim_set. When access is high, the tree of access_set is updated at the
// clock edge to point at access_way (root and the one node on its path).
// flush and reset clear all trees; a cleared tree names way 3 as its victim,
// then 1, 2, 0 as lines fill.
// The tree with one bit per internal node that records the side used last,
// and the walk from the root, follow the document; the bit polarity is this
// design's own.
module plru_tree
  import cache_pkg::*;
#(
  parameter int unsigned IW = INDEX_W   // set index bits
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             flush,
  input  logic             access,
  input  logic [IW-1:0]    access_set,
  input  logic [WAY_W-1:0] access_way,
  input  logic [IW-1:0]    victim_set,
  output logic [WAY_W-1:0] victim_way
);

  localparam int unsigned NSETS = 1 << IW;

  logic [2:0] tree [NSETS];
  logic [2:0] vt;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) begin
      for (int s = 0; s < NSETS; s++) tree[s] <= '0;
    end else if (flush) begin
      for (int s = 0; s < NSETS; s++) tree[s] <= '0;
    end else if (access) begin
      tree[access_set][0] <= access_way[1];
      if (access_way[1]) tree[access_set][2] <= access_way[0];
      else               tree[access_set][1] <= access_way[0];
    end
  end

  always_comb begin
    vt = tree[victim_set];
    if (vt[0]) victim_way = {1'b0, ~vt[1]};
    else       victim_way = {1'b1, ~vt[2]};
  end

endmodule
