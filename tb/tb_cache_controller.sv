// tb_cache_controller: self-checking test of the cache controller (state
// machine, tag array and tree PLRU together) against a memory model that
// answers one cycle after each command.
// A fixed sequence on one set checks hit/miss decisions, the line location
// (loctn = {set, way}) used for refills and hits, the PLRU fill and victim
// order, write-around (a write miss allocates nothing), write-through (every
// write reaches memory), flush, and the cycle and stall counts of each access.
module tb_cache_controller;
  import cache_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic               flush, rd, wr;
  logic [INDEX_W-1:0] index;
  logic [TAG_W-1:0]   tag;
  logic               ready;
  logic [LINE_W-1:0]  loctn;
  logic [WAY_W-1:0]   set_offset;
  logic               refill, update, stall, read_from_mem, write_to_mem;
  state_t             state;

  int checks = 0;
  int failures = 0;

  cache_controller dut (.*);

  always #5 clock = ~clock;

  always_ff @(posedge clock or posedge reset)
    if (reset) ready <= 1'b0;
    else       ready <= read_from_mem | write_to_mem;

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One access. exp_hit says whether it should hit; exp_way is the way it
  // should use (hit way or refill victim; ignored for a write miss).
  task automatic access(input bit is_wr, input int s, input int t, input bit exp_hit, input int exp_way);
    int cycles = 0, stalls = 0, nref = 0, nupd = 0, nwr = 0, nrd = 0;
    bit done;
    logic [LINE_W-1:0] used_line = '0;
    string name = $sformatf("%s set %0d tag %0h", is_wr ? "write" : "read", s, t);
    index = INDEX_W'(s); tag = TAG_W'(t); rd = !is_wr; wr = is_wr;
    do begin
      @(negedge clock);
      cycles++;
      stalls += int'(stall);
      if (refill) begin nref++; used_line = loctn; end
      if (update) begin nupd++; used_line = loctn; end
      if (state == ST_PROVIDE) used_line = loctn;
      nwr += int'(write_to_mem); nrd += int'(read_from_mem);
      done = cycles >= 3 && !stall;
      @(posedge clock);
    end while (!done && cycles < 50);
    #1 rd = 0; wr = 0;
    if (!is_wr) begin
      check(cycles == (exp_hit ? 3 : 5), $sformatf("%s: %0d cycles", name, cycles));
      check(stalls == (exp_hit ? 0 : 3), $sformatf("%s: %0d stalls", name, stalls));
      check(nref == (exp_hit ? 0 : 1) && nrd == (exp_hit ? 0 : 1), $sformatf("%s: refill %0d memread %0d", name, nref, nrd));
      check(used_line == LINE_W'(s * WAYS + exp_way), $sformatf("%s: line %0d expected %0d", name, used_line, s * WAYS + exp_way));
    end else begin
      check(cycles == 3 && stalls == 2, $sformatf("%s: %0d cycles %0d stalls", name, cycles, stalls));
      check(nwr >= 1, $sformatf("%s: written through to memory", name));
      check(nupd == (exp_hit ? 1 : 0), $sformatf("%s: %0d cache updates", name, nupd));
      if (exp_hit) check(used_line == LINE_W'(s * WAYS + exp_way), $sformatf("%s: line %0d expected %0d", name, used_line, s * WAYS + exp_way));
    end
  endtask

  initial begin
    rd = 0; wr = 0; flush = 0; index = '0; tag = '0;
    reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    @(posedge clock); #1;
    // fill set 2: the PLRU victim order from a cleared tree is 3, 1, 2, 0
    access(0, 2, 8'h10, 0, 3);
    access(0, 2, 8'h11, 0, 1);
    access(0, 2, 8'h12, 0, 2);
    access(0, 2, 8'h13, 0, 0);
    // all four now hit in their ways
    access(0, 2, 8'h10, 1, 3);
    access(0, 2, 8'h11, 1, 1);
    access(0, 2, 8'h12, 1, 2);
    access(0, 2, 8'h13, 1, 0);
    // last order of use 3,1,2,0 -> tree points at way 3 as victim
    // touch way 3 by a write hit -> victim becomes way 1
    access(1, 2, 8'h10, 1, 3);
    access(0, 2, 8'h14, 0, 1);    // replaces tag 11 in way 1
    access(0, 2, 8'h11, 0, 2);    // 11 is gone; victim now way 2 (tag 12)
    access(0, 2, 8'h14, 1, 1);
    access(0, 2, 8'h10, 1, 3);
    // write miss: goes around the cache, nothing is allocated
    access(1, 2, 8'h20, 0, 0);
    access(1, 2, 8'h20, 0, 0);
    // other sets are independent
    access(0, 0, 8'h10, 0, 3);
    access(0, 0, 8'h10, 1, 3);
    access(0, 3, 8'h10, 0, 3);
    access(0, 2, 8'h10, 1, 3);
    // flush invalidates everything and resets the trees
    @(negedge clock) flush = 1;
    @(posedge clock);
    #1 flush = 0;
    access(0, 2, 8'h10, 0, 3);
    access(0, 0, 8'h10, 0, 3);
    access(0, 2, 8'h10, 1, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
