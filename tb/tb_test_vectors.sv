// tb_test_vectors: three short sets of processor test vectors, run on the
// whole memory system at its default sizes.
//   set 1: read miss, read hits in the same block, write hits (write-through)
//   set 2: adds write misses (write-around: the word goes to memory only,
//          so the following read of it misses and fetches it)
//   set 3: repeated updates of one address, each read back
// Every vector carries its hand-worked outcome (hit or miss) and data. The
// test checks the load data, the outcome through the cycle and stall counts
// (read hit 3 cycles / 0 stalled, read miss 5 / 3, write 3 / 2) and prints
// each set's total cycle count. Main memory is first cleared by storing zero
// in every word.
module tb_test_vectors;
  import cache_pkg::*;

  logic              clock = 1'b0;
  logic              reset;
  logic              flush, rd, wr;
  logic [ADDR_W-1:0] addr;
  logic [WORD_W-1:0] wdata;
  logic [WORD_W-1:0] rdata;
  logic              stall;

  int checks = 0;
  int failures = 0;

  typedef struct {
    bit                is_wr;
    logic [ADDR_W-1:0] a;
    logic [WORD_W-1:0] d;     // store data, or expected load data
    bit                hit;   // expected outcome
  } vec_t;

  cache_top dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (50000) @(posedge clock);
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

  task automatic access(input vec_t v, output int cycles, output int stalls, output logic [WORD_W-1:0] got);
    bit done;
    cycles = 0; stalls = 0;
    addr = v.a; wdata = v.d; rd = !v.is_wr; wr = v.is_wr;
    do begin
      @(negedge clock);
      cycles++;
      stalls += int'(stall);
      got = rdata;
      done = cycles >= 3 && !stall;
      @(posedge clock);
    end while (!done && cycles < 50);
    #1 rd = 0; wr = 0;
  endtask

  task automatic run_set(input string name, input vec_t vs[]);
    int total = 0;
    foreach (vs[i]) begin
      int cycles, stalls, exp_c, exp_s;
      logic [WORD_W-1:0] got;
      access(vs[i], cycles, stalls, got);
      total += cycles;
      exp_c = vs[i].is_wr ? 3 : (vs[i].hit ? 3 : 5);
      exp_s = vs[i].is_wr ? 2 : (vs[i].hit ? 0 : 3);
      check(cycles == exp_c && stalls == exp_s,
            $sformatf("%s vector %0d (%s %h): %0d cycles %0d stalled, expected %0d/%0d",
                      name, i, vs[i].is_wr ? "write" : "read", vs[i].a, cycles, stalls, exp_c, exp_s));
      if (!vs[i].is_wr)
        check(got == vs[i].d, $sformatf("%s vector %0d: read %h got %h expected %h", name, i, vs[i].a, got, vs[i].d));
    end
    $display("%s: %0d vectors, %0d cycles", name, vs.size(), total);
  endtask

  task automatic check_outcome(input vec_t v, input string what);
    // a write's hit or miss shows in whether the cache line holds the new
    // word afterwards: read it back and count the cycles
    int cycles, stalls;
    logic [WORD_W-1:0] got;
    vec_t r = '{is_wr: 0, a: v.a, d: v.d, hit: v.hit};
    access(r, cycles, stalls, got);
    check(got == v.d, $sformatf("%s: read back %h", what, got));
    check(cycles == (v.hit ? 3 : 5), $sformatf("%s: read back in %0d cycles", what, cycles));
  endtask

  initial begin
    vec_t set1[], set2[], set3[];
    int c, s;
    logic [WORD_W-1:0] g;
    rd = 0; wr = 0; flush = 0; addr = '0; wdata = '0;
    reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    @(posedge clock); #1;
    for (int i = 0; i < (1 << MEM_AW); i++) access('{is_wr: 1, a: i, d: 0, hit: 0}, c, s, g);

    set1 = '{
      '{0, 32'h201, 32'h0000_0000, 0},   // read miss, block 0x200 into set 0
      '{0, 32'h203, 32'h0000_0000, 1},   // read hit, same block
      '{0, 32'h205, 32'h0000_0000, 0},   // read miss, block 0x204 into set 1
      '{1, 32'h207, 32'h1111_1111, 1},   // write hit, written through
      '{0, 32'h207, 32'h1111_1111, 1},   // read hit
      '{1, 32'h201, 32'h2222_2222, 1},   // write hit
      '{0, 32'h201, 32'h2222_2222, 1}    // read hit
    };
    set2 = '{
      '{1, 32'h307, 32'h4444_4444, 0},   // write miss, around the cache
      '{0, 32'h307, 32'h4444_4444, 0},   // read miss fetches the written word
      '{0, 32'h305, 32'h0000_0000, 1},   // read hit
      '{1, 32'h305, 32'h3333_3333, 1},   // write hit
      '{1, 32'h101, 32'h5555_5555, 0},   // write miss
      '{0, 32'h101, 32'h5555_5555, 0},   // read miss
      '{0, 32'h305, 32'h3333_3333, 1}    // read hit
    };
    set3 = '{
      '{1, 32'h040, 32'h6666_6666, 0},   // write miss
      '{0, 32'h040, 32'h6666_6666, 0},   // read miss
      '{1, 32'h040, 32'h7777_7777, 1},   // write hit, same address
      '{0, 32'h040, 32'h7777_7777, 1},   // read hit
      '{1, 32'h040, 32'h8888_8888, 1},   // write hit, same address
      '{0, 32'h040, 32'h8888_8888, 1}    // read hit
    };
    run_set("set 1", set1);
    run_set("set 2", set2);
    run_set("set 3", set3);
    // main memory holds every written word (write-through): flush the cache
    // and read them back through misses
    @(negedge clock) flush = 1;
    @(posedge clock);
    #1 flush = 0;
    check_outcome('{1, 32'h207, 32'h1111_1111, 0}, "0x207 in memory");
    check_outcome('{1, 32'h201, 32'h2222_2222, 0}, "0x201 in memory");
    check_outcome('{1, 32'h305, 32'h3333_3333, 0}, "0x305 in memory");
    check_outcome('{1, 32'h040, 32'h8888_8888, 0}, "0x040 in memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
