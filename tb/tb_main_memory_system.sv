// tb_main_memory_system: self-checking test of the four-bank main memory.
// Single-word writes land in the bank chosen by addr[1:0]; a block read
// returns the four words of the block with word k on bits 32k+31:32k, one
// cycle after the request together with data_ready. Compared with a flat
// 1024-word reference memory.
module tb_main_memory_system;
  import cache_pkg::*;

  logic               clock = 1'b0;
  logic               reset;
  logic [MEM_AW-1:0]  addr;
  logic [WORD_W-1:0]  data_in;
  logic               rd, wr;
  logic [BLOCK_W-1:0] data_out;
  logic               data_ready;

  int checks = 0;
  int failures = 0;
  logic [WORD_W-1:0] ref_mem [1 << MEM_AW];

  main_memory_system dut (.*);

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

  task automatic read_block(input logic [MEM_AW-1:0] a);
    logic [MEM_AW-1:0] base;
    addr = a; rd = 1;
    @(posedge clock); #1 rd = 0;
    check(data_ready, "data_ready after block read");
    base = {a[MEM_AW-1:OFFSET_W], 2'b00};
    for (int k = 0; k < WORDS; k++)
      check(data_out[k*WORD_W +: WORD_W] == ref_mem[base + k],
            $sformatf("block %0h word %0d got %h exp %h", base, k,
                      data_out[k*WORD_W +: WORD_W], ref_mem[base + k]));
  endtask

  initial begin
    rd = 0; wr = 0; addr = '0; data_in = '0;
    reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    // the banks start undefined: write every word first
    for (int i = 0; i < (1 << MEM_AW); i++) begin
      addr = MEM_AW'(i); data_in = ~32'(i); ref_mem[i] = data_in; wr = 1;
      @(posedge clock); #1 wr = 0;
    end
    // fill one block word by word with distinct values
    for (int k = 0; k < WORDS; k++) begin
      addr = MEM_AW'(10'h200 + k); data_in = 32'h1111_1111 * (k + 1); wr = 1;
      ref_mem[addr] = data_in;
      @(posedge clock); #1 wr = 0;
      check(data_ready, "data_ready after write");
    end
    read_block(10'h201);
    check(data_out == {32'h4444_4444, 32'h3333_3333, 32'h2222_2222, 32'h1111_1111},
          "word k of the block on bits 32k+31:32k");
    // a single write changes only one bank
    addr = 10'h202; data_in = 32'hDEAD_BEEF; wr = 1; ref_mem[addr] = data_in;
    @(posedge clock); #1 wr = 0;
    read_block(10'h200);
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      if ($urandom_range(1, 0) == 1) begin
        addr = MEM_AW'($urandom); data_in = $urandom; wr = 1;
        ref_mem[addr] = data_in;
        @(posedge clock); #1 wr = 0;
      end else begin
        read_block(MEM_AW'($urandom));
      end
    end
    @(posedge clock); #1;
    check(!data_ready, "data_ready low when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
