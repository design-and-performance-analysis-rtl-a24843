// cache_fsm: the state machine of the cache controller.
//
// States follow the controller's state diagram: Reset -> Request; a read goes
// Read Cache -> (hit) Provide Data, or (miss) Read Main Memory -> Bring Data
// -> Provide Data; a write hit goes Write Cache -> Write to Main Memory; a
// write miss goes straight to Write to Main Memory. Every path returns to
// Request.
//
// Inputs: rd, wr, flush from the processor (sampled in Request only; rd wins
// over wr, flush over both), hit from the tag compare, ready from main memory.
// Outputs (mostly decoded from the state):
//   stall         processor must wait: a write in Request, a miss in Read
//                 Cache, Read Main Memory, Bring Data, Write Cache, and Write
//                 to Main Memory until memory answers
//   read_from_mem one-cycle block read request (Read Main Memory)
//   write_to_mem  word write to memory: in Write Cache (write-through, issued
//                 together with the cache update) and in Write to Main Memory
//                 until ready (write-around on a miss)
//   refill        load the line from memory (Bring Data, when ready)
//   update        write the processor word into the line (Write Cache)
//   install       mark the refilled line's tag valid (with refill)
//   lru_access    touch the tree PLRU (read hit, write hit, refill)
//   take_hit_way / take_victim  which way the controller latches for the line
//   do_flush      flush the tag valid bits and PLRU (Request with flush)
//
// Timing with main memory answering one cycle after a request, counted from
// the cycle the processor raises rd/wr to the last cycle of the operation:
//   read hit 3 cycles, no stall; read miss 5 cycles, 3 stalled;
//   write hit and write miss 3 cycles, 2 stalled.
// The processor keeps rd/wr and the address up until the first clock edge, at
// least three cycles after it raised them, at which stall is low.
// The states and the stall counts follow the document; the document's counts
// also carry a half cycle (5.5 and 3.5) that is not reproduced here. Issuing
// the write-through in Write Cache and asserting stall already in Request for
// a write are this design's choices that yield the 2-cycle write stall.
module cache_fsm
  import cache_pkg::*;
(
  input  logic   clock,
  input  logic   reset,
  input  logic   rd,
  input  logic   wr,
  input  logic   flush,
  input  logic   hit,
  input  logic   ready,
  output state_t state,
  output logic   stall,
  output logic   read_from_mem,
  output logic   write_to_mem,
  output logic   refill,
  output logic   update,
  output logic   install,
  output logic   lru_access,
  output logic   take_hit_way,
  output logic   take_victim,
  output logic   do_flush
);

  state_t next;

  always_ff @(posedge clock or posedge reset) begin
    if (reset) state <= ST_RESET;
    else       state <= next;
  end

  always_comb begin
    next          = state;
    stall         = 1'b0;
    read_from_mem = 1'b0;
    write_to_mem  = 1'b0;
    refill        = 1'b0;
    update        = 1'b0;
    install       = 1'b0;
    lru_access    = 1'b0;
    take_hit_way  = 1'b0;
    take_victim   = 1'b0;
    do_flush      = 1'b0;
    unique case (state)
      ST_RESET: next = ST_REQUEST;
      ST_REQUEST: begin
        if (flush) begin
          do_flush = 1'b1;
        end else if (rd) begin
          next = ST_READ_CACHE;
        end else if (wr) begin
          stall        = 1'b1;
          take_hit_way = 1'b1;
          next         = hit ? ST_WRITE_CACHE : ST_WRITE_MEM;
        end
      end
      ST_READ_CACHE: begin
        if (hit) begin
          take_hit_way = 1'b1;
          lru_access   = 1'b1;
          next         = ST_PROVIDE;
        end else begin
          stall       = 1'b1;
          take_victim = 1'b1;
          next        = ST_READ_MEM;
        end
      end
      ST_READ_MEM: begin
        stall         = 1'b1;
        read_from_mem = 1'b1;
        next          = ST_BRING_DATA;
      end
      ST_BRING_DATA: begin
        stall = 1'b1;
        if (ready) begin
          refill     = 1'b1;
          install    = 1'b1;
          lru_access = 1'b1;
          next       = ST_PROVIDE;
        end
      end
      ST_PROVIDE: next = ST_REQUEST;
      ST_WRITE_CACHE: begin
        stall        = 1'b1;
        update       = 1'b1;
        write_to_mem = 1'b1;
        lru_access   = 1'b1;
        next         = ST_WRITE_MEM;
      end
      ST_WRITE_MEM: begin
        if (ready) begin
          next = ST_REQUEST;
        end else begin
          stall        = 1'b1;
          write_to_mem = 1'b1;
        end
      end
      default: next = ST_RESET;
    endcase
  end

  // A line is never refilled and word-updated in the same cycle, and main
  // memory never sees a read and a write together.
  a_refill_update: assert property (@(posedge clock) disable iff (reset) !(refill && update));
  a_mem_rw:        assert property (@(posedge clock) disable iff (reset) !(read_from_mem && write_to_mem));

endmodule
