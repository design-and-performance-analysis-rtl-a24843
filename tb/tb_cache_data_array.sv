// tb_cache_data_array: self-checking test of the 16 x 128-bit data array.
// Refills lines with random blocks, updates single words, and reads every
// word back combinationally, comparing with a reference copy.
module tb_cache_data_array;
  import cache_pkg::*;

  logic                clock = 1'b0;
  logic [LINE_W-1:0]   index;
  logic [OFFSET_W-1:0] offset;
  logic [BLOCK_W-1:0]  data_from_mem;
  logic [WORD_W-1:0]   write_data;
  logic                refill, update;
  logic [WORD_W-1:0]   read_data;

  int checks = 0;
  int failures = 0;
  logic [WORD_W-1:0] ref_words [1 << LINE_W][WORDS];

  cache_data_array dut (.*);

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

  task automatic check_all();
    for (int l = 0; l < (1 << LINE_W); l++)
      for (int w = 0; w < WORDS; w++) begin
        index = LINE_W'(l); offset = OFFSET_W'(w); #1;
        check(read_data == ref_words[l][w],
              $sformatf("line %0d word %0d got %h exp %h", l, w, read_data, ref_words[l][w]));
      end
  endtask

  initial begin
    refill = 0; update = 0; index = '0; offset = '0; data_from_mem = '0; write_data = '0;
    // fill every line
    for (int l = 0; l < (1 << LINE_W); l++) begin
      @(negedge clock);
      index = LINE_W'(l);
      for (int w = 0; w < WORDS; w++) begin
        data_from_mem[w*WORD_W +: WORD_W] = $urandom;
        ref_words[l][w] = data_from_mem[w*WORD_W +: WORD_W];
      end
      refill = 1;
      @(negedge clock) refill = 0;
    end
    check_all();
    for (int i = 0; i < 300; i++) begin
      @(negedge clock);
      index = LINE_W'($urandom); offset = OFFSET_W'($urandom);
      if ($urandom_range(3, 0) == 0) begin
        for (int w = 0; w < WORDS; w++) begin
          data_from_mem[w*WORD_W +: WORD_W] = $urandom;
          ref_words[index][w] = data_from_mem[w*WORD_W +: WORD_W];
        end
        refill = 1;
      end else begin
        write_data = $urandom;
        ref_words[index][offset] = write_data;
        update = 1;
      end
      @(negedge clock) begin refill = 0; update = 0; end
      #1 check(read_data == ref_words[index][offset], "read after write");
    end
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
