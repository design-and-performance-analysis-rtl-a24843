// tb_memory_bank: self-checking test of one main-memory bank.
// Writes random words to random addresses, reads them back and compares with
// a reference array; checks that data_ready follows a read or a write by
// exactly one cycle and that reset clears data_ready and data_out.
module tb_memory_bank;
  localparam int AW = 8;
  localparam int DW = 32;

  logic          clock = 1'b0;
  logic          reset;
  logic [AW-1:0] addr;
  logic [DW-1:0] data_in;
  logic          rd, wr;
  logic [DW-1:0] data_out;
  logic          data_ready;

  int checks = 0;
  int failures = 0;
  logic [DW-1:0] ref_mem [1 << AW];

  memory_bank dut (.*);

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

  initial begin
    rd = 0; wr = 0; addr = '0; data_in = '0;
    reset = 1;
    repeat (2) @(posedge clock);
    #1 reset = 0;
    check(data_out == '0 && !data_ready, "reset clears the outputs");
    // the contents start undefined: write every word first
    for (int i = 0; i < (1 << AW); i++) begin
      addr = AW'(i); data_in = $urandom; ref_mem[i] = data_in; wr = 1;
      @(posedge clock); #1 wr = 0;
      check(data_ready == 1'b1, "data_ready after write");
      @(posedge clock); #1;
      check(data_ready == 1'b0, "data_ready is one cycle");
    end
    // random writes and reads
    for (int i = 0; i < 2000; i++) begin
      addr = AW'($urandom);
      if ($urandom_range(1, 0) == 1) begin
        data_in = $urandom; wr = 1;
        ref_mem[addr] = data_in;
        @(posedge clock); #1 wr = 0;
        check(data_ready, "data_ready after write");
      end else begin
        rd = 1;
        @(posedge clock); #1 rd = 0;
        check(data_ready, "data_ready after read");
        check(data_out == ref_mem[addr], $sformatf("read %0h got %h exp %h", addr, data_out, ref_mem[addr]));
      end
    end
    @(posedge clock); #1;
    check(!data_ready, "data_ready low when idle");
    // reset clears the outputs but keeps the words
    addr = 8'h05; rd = 1;
    @(posedge clock); #1 rd = 0;
    reset = 1; #2 reset = 0;
    check(data_out == '0 && !data_ready, "outputs cleared by reset");
    rd = 1;
    @(posedge clock); #1 rd = 0;
    check(data_out == ref_mem[8'h05], "contents kept over reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
