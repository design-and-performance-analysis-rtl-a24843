// tb_tag_array: self-checking test of the tag store and comparator.
// Installs random tags into random (set, way) slots and checks hit and
// hit_way against a reference copy for random lookups; checks that flush
// and reset invalidate everything.
module tb_tag_array;
  import cache_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic               flush;
  logic [INDEX_W-1:0] index;
  logic [TAG_W-1:0]   tag;
  logic               install;
  logic [WAY_W-1:0]   install_way;
  logic               hit;
  logic [WAY_W-1:0]   hit_way;

  int checks = 0;
  int failures = 0;
  logic [TAG_W-1:0] ref_tag [SETS][WAYS];
  logic             ref_val [SETS][WAYS];
  int hits_seen = 0;

  tag_array dut (.*);

  always #5 clock = ~clock;

  initial begin
    repeat (20000) @(posedge clock);
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

  task automatic lookup(input logic [INDEX_W-1:0] s, input logic [TAG_W-1:0] t);
    bit exp_hit = 0;
    int exp_way = 0;
    index = s; tag = t; #1;
    for (int w = 0; w < WAYS; w++)
      if (ref_val[s][w] && ref_tag[s][w] == t) begin exp_hit = 1; exp_way = w; end
    check(hit == exp_hit, $sformatf("set %0d tag %0h hit %0b exp %0b", s, t, hit, exp_hit));
    if (exp_hit) begin
      hits_seen++;
      check(hit_way == WAY_W'(exp_way), $sformatf("set %0d tag %0h way %0d exp %0d", s, t, hit_way, exp_way));
    end
  endtask

  task automatic clear_ref();
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) ref_val[s][w] = 0;
  endtask

  initial begin
    flush = 0; install = 0; install_way = '0; index = '0; tag = '0;
    reset = 1;
    @(posedge clock); #1 reset = 0;
    clear_ref();
    for (int i = 0; i < 8; i++) lookup(INDEX_W'($urandom), TAG_W'($urandom));
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 200; i++) begin
        logic [TAG_W-1:0] t;
        bit dup;
        @(negedge clock);
        index = INDEX_W'($urandom); install_way = WAY_W'($urandom);
        // keep tags unique within a set, as the controller does
        do begin
          t = TAG_W'($urandom_range(7, 0));
          dup = 0;
          for (int w = 0; w < WAYS; w++)
            if (w != install_way && ref_val[index][w] && ref_tag[index][w] == t) dup = 1;
        end while (dup);
        tag = t; install = 1;
        @(negedge clock) install = 0;
        ref_tag[index][install_way] = t; ref_val[index][install_way] = 1;
        for (int j = 0; j < 4; j++) lookup(INDEX_W'($urandom), TAG_W'($urandom_range(7, 0)));
      end
      if (round == 0) begin
        @(negedge clock) flush = 1;
        @(negedge clock) flush = 0;
      end else begin
        #1 reset = 1; #1 reset = 0;
      end
      clear_ref();
      for (int s = 0; s < SETS; s++) for (int t = 0; t < 8; t++) lookup(INDEX_W'(s), TAG_W'(t));
    end
    check(hits_seen > 100, "enough hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
