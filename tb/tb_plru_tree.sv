// tb_plru_tree: self-checking test of the tree pseudo-LRU unit.
// Checks the fill order from a cleared tree, then compares with a reference
// that keeps, for each set, the last-used side at every tree node and picks
// the victim as the way every node on its path points away from. Also checks
// that the victim is never the way used last, and that flush clears a tree.
module tb_plru_tree;
  import cache_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic               flush;
  logic               access;
  logic [INDEX_W-1:0] access_set;
  logic [WAY_W-1:0]   access_way;
  logic [INDEX_W-1:0] victim_set;
  logic [WAY_W-1:0]   victim_way;

  int checks = 0;
  int failures = 0;
  // ref_root[s]: last used half (0: ways 0/1, 1: ways 2/3)
  // ref_leaf[s][h]: last used way inside half h (0 or 1)
  bit ref_root [SETS];
  bit ref_leaf [SETS][2];
  int last_used [SETS];

  plru_tree dut (.*);

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

  function automatic int ref_victim(int s);
    for (int w = 0; w < WAYS; w++) begin
      int half = w / 2;
      int leaf = w % 2;
      if (ref_root[s] != half && ref_leaf[s][half] != leaf) return w;
    end
    return -1;
  endfunction

  task automatic touch(input int s, input int w);
    @(negedge clock);
    access = 1; access_set = INDEX_W'(s); access_way = WAY_W'(w);
    @(negedge clock) access = 0;
    ref_root[s] = (w / 2) != 0;
    ref_leaf[s][w / 2] = (w % 2) != 0;
    last_used[s] = w;
  endtask

  task automatic check_victim(input int s);
    victim_set = INDEX_W'(s); #1;
    check(int'(victim_way) == ref_victim(s), $sformatf("set %0d victim %0d exp %0d", s, victim_way, ref_victim(s)));
    if (last_used[s] >= 0) check(int'(victim_way) != last_used[s], "victim is not the way used last");
  endtask

  task automatic clear_ref();
    for (int s = 0; s < SETS; s++) begin
      ref_root[s] = 0; ref_leaf[s][0] = 0; ref_leaf[s][1] = 0; last_used[s] = -1;
    end
  endtask

  initial begin
    int order [4];
    flush = 0; access = 0; access_set = '0; access_way = '0; victim_set = '0;
    reset = 1;
    @(posedge clock); #1 reset = 0;
    clear_ref();
    // filling a set by always replacing the victim visits 3, 1, 2, 0 and
    // then starts over with 3
    order = '{3, 1, 2, 0};
    for (int i = 0; i < 8; i++) begin
      victim_set = 2'd1; #1;
      check(int'(victim_way) == order[i % 4], $sformatf("fill order step %0d: %0d exp %0d", i, victim_way, order[i % 4]));
      touch(1, int'(victim_way));
    end
    // a hit on way 0 and way 2 leaves the victim in {1, 3}
    touch(2, 0); touch(2, 2);
    victim_set = 2'd2; #1;
    check(victim_way == 2'd1 || victim_way == 2'd3, "victim avoids the two ways just used");
    // random accesses against the reference
    for (int i = 0; i < 2000; i++) begin
      touch($urandom_range(SETS - 1, 0), $urandom_range(WAYS - 1, 0));
      check_victim($urandom_range(SETS - 1, 0));
    end
    @(negedge clock) flush = 1;
    @(negedge clock) flush = 0;
    clear_ref();
    for (int s = 0; s < SETS; s++) check_victim(s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
