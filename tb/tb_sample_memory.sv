// tb_sample_memory: self-checking testbench for the EEG record memory.
//
// Runs the memory at its default size (15,000 words of 10 bits). It loads
// every word with a pseudo-random value, reads every word back and compares
// with a reference copy kept here, then checks the finer points of the read
// port: data appears exactly one clock after rd_en, rd_data holds while rd_en
// is low, and a read and a write to the same address in one clock return the
// old word. A final phase mixes random reads and writes.
`timescale 1ns/1ps
module tb_sample_memory;

  localparam int unsigned WIDTH  = 10;
  localparam int unsigned DEPTH  = 15_000;
  localparam int unsigned ADDR_W = 14;
  localparam int unsigned WATCHDOG = 200_000;

  logic              sysclk = 1'b0;
  logic              wr_en = 1'b0, rd_en = 1'b0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0]  wr_data = '0;
  logic [WIDTH-1:0]  rd_data;

  logic [WIDTH-1:0]  model [DEPTH];
  int unsigned checks = 0, failures = 0;

  always #5 sysclk = ~sysclk;

  sample_memory dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic write(input int unsigned a, input logic [WIDTH-1:0] d);
    @(negedge sysclk);
    wr_en = 1'b1; wr_addr = ADDR_W'(a); wr_data = d;
    @(posedge sysclk);
    #1 wr_en = 1'b0;
    model[a] = d;
  endtask

  // Issue a read, then check the word just after the following clock edge.
  task automatic read_check(input int unsigned a);
    logic [WIDTH-1:0] want;
    want = model[a];
    @(negedge sysclk);
    rd_en = 1'b1; rd_addr = ADDR_W'(a);
    @(posedge sysclk);
    #1 rd_en = 1'b0;
    check(rd_data == want, $sformatf("addr %0d read %h expected %h", a, rd_data, want));
  endtask

  initial begin
    logic [WIDTH-1:0] held;
    repeat (2) @(posedge sysclk);
    // load the whole record
    for (int unsigned a = 0; a < DEPTH; a++) write(a, WIDTH'($urandom));
    // read it all back
    for (int unsigned a = 0; a < DEPTH; a++) read_check(a);

    // rd_data holds while rd_en is low, even while the word is rewritten
    read_check(123);
    held = rd_data;
    write(123, ~model[123]);
    repeat (3) @(posedge sysclk);
    check(rd_data == held, "rd_data changed while rd_en low");

    // read-first on a same-address collision
    begin
      logic [WIDTH-1:0] old_word, new_word;
      old_word = model[777];
      new_word = ~old_word;
      @(negedge sysclk);
      wr_en = 1'b1; wr_addr = 14'd777; wr_data = new_word;
      rd_en = 1'b1; rd_addr = 14'd777;
      @(posedge sysclk);
      #1 wr_en = 1'b0; rd_en = 1'b0;
      model[777] = new_word;
      check(rd_data == old_word, "collision did not return the old word");
      read_check(777);
    end

    // last address
    write(DEPTH - 1, 10'h2A5);
    read_check(DEPTH - 1);

    // random mix
    for (int i = 0; i < 5000; i++) begin
      automatic int unsigned a = $urandom_range(DEPTH - 1);
      if ($urandom_range(1)) write(a, WIDTH'($urandom));
      else read_check(a);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge sysclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
