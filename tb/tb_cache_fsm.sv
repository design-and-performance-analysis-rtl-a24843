// tb_cache_fsm: self-checking test of the controller state machine.
// Plays the processor and a main memory that answers one cycle after each
// request, and for each kind of access checks the state sequence, the
// number of cycles and stalled cycles, and how often each command pulses:
//   read hit  : Request, Read Cache, Provide                        3 cycles, 0 stalled
//   read miss : Request, Read Cache, Read Mem, Bring Data, Provide  5 cycles, 3 stalled
//   write hit : Request, Write Cache, Write Mem                     3 cycles, 2 stalled
//   write miss: Request, Write Mem, Write Mem                       3 cycles, 2 stalled
// Also checks Reset -> Request and that flush is taken in Request.
module tb_cache_fsm;
  import cache_pkg::*;

  logic   clock = 1'b0;
  logic   reset;
  logic   rd, wr, flush, hit, ready;
  state_t state;
  logic   stall, read_from_mem, write_to_mem, refill, update, install;
  logic   lru_access, take_hit_way, take_victim, do_flush;

  int checks = 0;
  int failures = 0;

  cache_fsm dut (.*);

  always #5 clock = ~clock;

  // memory model: ready one cycle after a read or write command
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

  // one access; the processor holds the request until an edge, at least
  // three cycles in, where stall is low
  task automatic access(input bit is_wr, input bit is_hit, input state_t exp_states[],
                        input int exp_stalls, input int exp_rmem, input int exp_wmem,
                        input int exp_refill, input int exp_update, input int exp_lru,
                        input string name);
    int cycles = 0, stalls = 0, rmem = 0, wmem = 0, nref = 0, nupd = 0, nlru = 0;
    bit done;
    state_t seen[$];
    rd = !is_wr; wr = is_wr; hit = is_hit;
    do begin
      @(negedge clock);
      cycles++;
      seen.push_back(state);
      stalls += int'(stall); rmem += int'(read_from_mem); wmem += int'(write_to_mem);
      nref += int'(refill); nupd += int'(update); nlru += int'(lru_access);
      // the line is valid once refilled
      if (refill) hit = 1'b1;
      done = cycles >= 3 && !stall;
      @(posedge clock);
    end while (!done && cycles < 50);
    #1 rd = 0; wr = 0;
    check(cycles == exp_states.size(), $sformatf("%s: %0d cycles, expected %0d", name, cycles, exp_states.size()));
    for (int i = 0; i < seen.size() && i < exp_states.size(); i++)
      check(seen[i] == exp_states[i], $sformatf("%s: cycle %0d state %s, expected %s", name, i, seen[i].name(), exp_states[i].name()));
    check(stalls == exp_stalls, $sformatf("%s: %0d stalled cycles, expected %0d", name, stalls, exp_stalls));
    check(rmem == exp_rmem,     $sformatf("%s: %0d memory reads, expected %0d", name, rmem, exp_rmem));
    check(wmem == exp_wmem,     $sformatf("%s: %0d memory write cycles, expected %0d", name, wmem, exp_wmem));
    check(nref == exp_refill,   $sformatf("%s: %0d refills, expected %0d", name, nref, exp_refill));
    check(nupd == exp_update,   $sformatf("%s: %0d updates, expected %0d", name, nupd, exp_update));
    check(nlru == exp_lru,      $sformatf("%s: %0d PLRU touches, expected %0d", name, nlru, exp_lru));
  endtask

  initial begin
    rd = 0; wr = 0; flush = 0; hit = 0;
    reset = 0;
    #1 reset = 1;
    #1 check(state == ST_RESET, "reset state");
    @(posedge clock); @(posedge clock); #1 reset = 0;
    check(state == ST_RESET, "stays in Reset while reset is high");
    @(posedge clock); #1;
    check(state == ST_REQUEST, "Reset -> Request");
    repeat (2) @(posedge clock); #1;
    check(state == ST_REQUEST, "idle in Request");
    for (int rep = 0; rep < 3; rep++) begin
      access(0, 0, '{ST_REQUEST, ST_READ_CACHE, ST_READ_MEM, ST_BRING_DATA, ST_PROVIDE}, 3, 1, 0, 1, 0, 1, "read miss");
      access(0, 1, '{ST_REQUEST, ST_READ_CACHE, ST_PROVIDE}, 0, 0, 0, 0, 0, 1, "read hit");
      access(1, 1, '{ST_REQUEST, ST_WRITE_CACHE, ST_WRITE_MEM}, 2, 0, 1, 0, 1, 1, "write hit");
      access(1, 0, '{ST_REQUEST, ST_WRITE_MEM, ST_WRITE_MEM}, 2, 0, 1, 0, 0, 0, "write miss");
    end
    // flush is taken in Request and raises do_flush for one cycle
    @(negedge clock) flush = 1;
    #1 check(do_flush && !stall, "flush in Request");
    @(negedge clock) flush = 0;
    #1 check(!do_flush && state == ST_REQUEST, "flush done");
    // a write stalls the processor from its first cycle
    @(negedge clock) wr = 1; hit = 1;
    #1 check(stall, "write stalls in Request");
    @(negedge clock) wr = 0;
    repeat (3) @(negedge clock);
    check(state == ST_REQUEST, "back in Request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
