// cache_controller: controller of the 4-way set-associative cache, holding
// the state machine, the tag array and the tree pseudo-LRU unit.
//
// The processor's address is split outside: index = addr[3:2] chooses the
// set, tag = addr[9:4] is compared with the set's four tags. The controller
// keeps one way register: on a write it takes the hitting way, on a read hit
// the hitting way, on a read miss the PLRU victim. loctn = {index, way} is the
// line (0..15) the data array uses and set_offset the way alone.
// Outputs to the data array: refill (load the line from memory), update
// (write one word on a write hit). Outputs to main memory: read_from_mem,
// write_to_mem; ready comes back from it. stall holds the processor.
// reset is asynchronous and active high; flush (taken between requests)
// invalidates every line in one cycle. See cache_fsm for the cycle timing.
// The partition into state machine, tag array and LRU unit follows the
// document, as do the port names; the way register is this design's own.
module cache_controller
  import cache_pkg::*;
(
  input  logic               clock,
  input  logic               reset,
  input  logic               flush,
  input  logic               rd,
  input  logic               wr,
  input  logic [INDEX_W-1:0] index,
  input  logic [TAG_W-1:0]   tag,
  input  logic               ready,
  output logic [LINE_W-1:0]  loctn,
  output logic [WAY_W-1:0]   set_offset,
  output logic               refill,
  output logic               update,
  output logic               stall,
  output logic               read_from_mem,
  output logic               write_to_mem,
  output state_t             state
);

  logic             hit;
  logic [WAY_W-1:0] hit_way;
  logic [WAY_W-1:0] victim_way;
  logic [WAY_W-1:0] way_q;
  logic             install;
  logic             lru_access;
  logic             take_hit_way;
  logic             take_victim;
  logic             do_flush;
  logic [WAY_W-1:0] lru_way;

  cache_fsm u_fsm (
    .clock         (clock),
    .reset         (reset),
    .rd            (rd),
    .wr            (wr),
    .flush         (flush),
    .hit           (hit),
    .ready         (ready),
    .state         (state),
    .stall         (stall),
    .read_from_mem (read_from_mem),
    .write_to_mem  (write_to_mem),
    .refill        (refill),
    .update        (update),
    .install       (install),
    .lru_access    (lru_access),
    .take_hit_way  (take_hit_way),
    .take_victim   (take_victim),
    .do_flush      (do_flush)
  );

  tag_array #(.IW(INDEX_W), .TW(TAG_W)) u_tags (
    .clock       (clock),
    .reset       (reset),
    .flush       (do_flush),
    .index       (index),
    .tag         (tag),
    .install     (install),
    .install_way (way_q),
    .hit         (hit),
    .hit_way     (hit_way)
  );

  // On a read hit the PLRU is touched in Read Cache, before way_q holds the
  // hitting way, so the way is taken from the comparator there.
  assign lru_way = take_hit_way ? hit_way : way_q;

  plru_tree #(.IW(INDEX_W)) u_plru (
    .clock      (clock),
    .reset      (reset),
    .flush      (do_flush),
    .access     (lru_access),
    .access_set (index),
    .access_way (lru_way),
    .victim_set (index),
    .victim_way (victim_way)
  );

  always_ff @(posedge clock or posedge reset) begin
    if (reset)             way_q <= '0;
    else if (take_hit_way) way_q <= hit_way;
    else if (take_victim)  way_q <= victim_way;
  end

  assign set_offset = way_q;
  assign loctn      = {index, way_q};

endmodule
