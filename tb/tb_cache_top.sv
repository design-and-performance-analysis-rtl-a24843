// tb_cache_top: end-to-end test of the whole memory system at its default
// sizes, playing a non-pipelined processor that issues loads and stores.
//
// A reference model (flat 1024-word memory plus its own copy of the cache's
// tags, valid bits and tree-PLRU state) predicts, for each access, the data a
// load must return and whether the access hits. The test checks the data, the
// cycle and stall counts (read hit 3/0, read miss 5/3, write hit and write
// miss 3/2) and counts how often each mechanism happened: read hit, read
// miss, write hit (write-through), write miss (write-around), replacement of
// a valid line, flush and processor stall. A mechanism that never happened
// counts as a failure. Main memory is not reset, so every word is stored
// once first (1024 write misses).
module tb_cache_top;
  import cache_pkg::*;

  localparam int OPS = 4000;

  logic              clock = 1'b0;
  logic              reset;
  logic              flush, rd, wr;
  logic [ADDR_W-1:0] addr;
  logic [WORD_W-1:0] wdata;
  logic [WORD_W-1:0] rdata;
  logic              stall;

  int checks = 0;
  int failures = 0;

  // reference state
  logic [WORD_W-1:0] ref_mem [1 << MEM_AW];
  logic [TAG_W-1:0]  m_tag   [SETS][WAYS];
  bit                m_val   [SETS][WAYS];
  bit                m_root  [SETS];
  bit                m_leaf  [SETS][2];

  // mechanism counters
  int n_read_hit = 0, n_read_miss = 0, n_write_hit = 0, n_write_miss = 0;
  int n_replace = 0, n_flush = 0, n_stall_cycles = 0;

  cache_top dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void model_reset_cache();
    for (int s = 0; s < SETS; s++) begin
      for (int w = 0; w < WAYS; w++) m_val[s][w] = 0;
      m_root[s] = 0; m_leaf[s][0] = 0; m_leaf[s][1] = 0;
    end
  endfunction

  function automatic void model_touch(int s, int w);
    m_root[s] = (w / 2) != 0;
    m_leaf[s][w / 2] = (w % 2) != 0;
  endfunction

  // the way whose path every tree node points away from
  function automatic int model_victim(int s);
    for (int w = 0; w < WAYS; w++)
      if (int'(m_root[s]) != w / 2 && int'(m_leaf[s][w / 2]) != w % 2) return w;
    return 0;
  endfunction

  function automatic int model_lookup(int s, logic [TAG_W-1:0] t);
    for (int w = 0; w < WAYS; w++) if (m_val[s][w] && m_tag[s][w] == t) return w;
    return -1;
  endfunction

  // processor access: hold the request until an edge, at least three cycles
  // in, at which stall is low; the load data is taken in that last cycle
  task automatic access(input bit is_wr, input logic [MEM_AW-1:0] a, input logic [WORD_W-1:0] d);
    int cycles = 0, stalls = 0;
    bit done;
    int s = int'(a[OFFSET_W +: INDEX_W]);
    logic [TAG_W-1:0] t = a[OFFSET_W + INDEX_W +: TAG_W];
    int way = model_lookup(s, t);
    logic [WORD_W-1:0] got;
    addr = {{(ADDR_W - MEM_AW){1'b0}}, a}; wdata = d; rd = !is_wr; wr = is_wr;
    do begin
      @(negedge clock);
      cycles++;
      stalls += int'(stall);
      got = rdata;
      done = cycles >= 3 && !stall;
      @(posedge clock);
    end while (!done && cycles < 50);
    #1 rd = 0; wr = 0;
    n_stall_cycles += stalls;
    if (!is_wr) begin
      check(got == ref_mem[a], $sformatf("load %h got %h exp %h", a, got, ref_mem[a]));
      if (way >= 0) begin
        n_read_hit++;
        check(cycles == 3 && stalls == 0, $sformatf("read hit %h: %0d cycles %0d stalls", a, cycles, stalls));
        model_touch(s, way);
      end else begin
        int v = model_victim(s);
        n_read_miss++;
        if (m_val[s][v]) n_replace++;
        check(cycles == 5 && stalls == 3, $sformatf("read miss %h: %0d cycles %0d stalls", a, cycles, stalls));
        m_val[s][v] = 1; m_tag[s][v] = t;
        model_touch(s, v);
      end
    end else begin
      ref_mem[a] = d;
      check(cycles == 3 && stalls == 2, $sformatf("write %h: %0d cycles %0d stalls", a, cycles, stalls));
      if (way >= 0) begin
        n_write_hit++;
        model_touch(s, way);
      end else begin
        n_write_miss++;
      end
    end
  endtask

  task automatic do_flush();
    @(negedge clock) flush = 1;
    @(posedge clock);
    #1 flush = 0;
    model_reset_cache();
    n_flush++;
  endtask

  initial begin
    rd = 0; wr = 0; flush = 0; addr = '0; wdata = '0;
    reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    model_reset_cache();
    @(posedge clock); #1;
    // main memory starts undefined: store every word once (write misses)
    for (int i = 0; i < (1 << MEM_AW); i++) access(1, MEM_AW'(i), 32'(i) * 32'h0101_0101);
    for (int i = 0; i < OPS; i++) begin
      // six tags per set give hits and conflict misses alike
      logic [MEM_AW-1:0] a;
      a = {TAG_W'($urandom_range(5, 0) * 7), INDEX_W'($urandom), OFFSET_W'($urandom)};
      if ($urandom_range(99, 0) == 0) do_flush();
      else access($urandom_range(2, 0) == 0, a, $urandom);
    end
    // then every word of memory is read back, through the cache
    for (int a = 0; a < (1 << MEM_AW); a += 3) access(0, MEM_AW'(a), '0);
    $display("read hit %0d, read miss %0d, write hit %0d, write miss %0d, replacements %0d, flushes %0d, stall cycles %0d",
             n_read_hit, n_read_miss, n_write_hit, n_write_miss, n_replace, n_flush, n_stall_cycles);
    check(n_read_hit > 0,     "read hit happened");
    check(n_read_miss > 0,    "read miss happened");
    check(n_write_hit > 0,    "write hit happened");
    check(n_write_miss > 0,   "write miss happened");
    check(n_replace > 0,      "replacement happened");
    check(n_flush > 0,        "flush happened");
    check(n_stall_cycles > 0, "stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
