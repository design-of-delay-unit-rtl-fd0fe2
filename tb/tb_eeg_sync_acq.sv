// tb_eeg_sync_acq: self-checking testbench for the acquisition counter.
//
// The testbench drives the EEG clock itself, with half periods that vary at
// random between 3 and 9 system clocks, puts a new random ADC word out on
// every rising EEG clock edge, and answers the memory reads from a model
// whose word at address a is (37*a + 5) mod 1024, returned one clock after
// the read like a block RAM. For every falling EEG clock edge seen while
// running it expects one sample pair two clocks after the edge is detected,
// carrying the ADC word of that EEG period, the recorded word of the same
// index and the index itself, which counts 0..N_SAMPLES-1 and wraps. It also
// checks that nothing comes out before start, that window_done marks the last
// sample of the record, and that a reset in mid-run clears the counter.
`timescale 1ns/1ps
module tb_eeg_sync_acq;

  localparam int unsigned SAMPLE_W  = 10;
  localparam int unsigned N_SAMPLES = 5;
  localparam int unsigned ADDR_W    = 3;
  localparam int unsigned WATCHDOG  = 20_000;

  logic                sysclk = 1'b0;
  logic                rst = 1'b1, start = 1'b0, eegclk = 1'b0;
  logic [SAMPLE_W-1:0] adc_data = '0;
  logic                mem_rd_en;
  logic [ADDR_W-1:0]   mem_rd_addr;
  logic [SAMPLE_W-1:0] mem_rd_data = '0;
  logic                sample_valid, window_done, running;
  logic [SAMPLE_W-1:0] live_sample, ref_sample;
  logic [ADDR_W-1:0]   sample_index;

  int unsigned checks = 0, failures = 0;
  int unsigned cycle = 0;
  int unsigned n_pairs = 0, n_wraps = 0, n_windows = 0, n_resets = 0;

  typedef struct {
    int unsigned         due;
    logic [SAMPLE_W-1:0] live;
    int unsigned         idx;
  } exp_t;
  exp_t q[$];
  int unsigned exp_idx = 0;
  bit          seq_on  = 1'b1;

  always #5 sysclk = ~sysclk;

  eeg_sync_acq #(.SAMPLE_W(SAMPLE_W), .N_SAMPLES(N_SAMPLES), .ADDR_W(ADDR_W)) dut (.*);

  function automatic logic [SAMPLE_W-1:0] rec_word(input int unsigned a);
    return SAMPLE_W'((37 * a + 5) % 1024);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // memory model
  always @(posedge sysclk) if (mem_rd_en) mem_rd_data <= rec_word(32'(mem_rd_addr));

  // EEG clock and ADC: toggled on falling sysclk edges
  initial begin
    forever begin
      repeat ($urandom_range(3, 9)) @(negedge sysclk);
      if (seq_on) begin
        eegclk = ~eegclk;
        if (eegclk) adc_data = SAMPLE_W'($urandom);
        else if (running && !rst) begin : push
          exp_t e;
          e.due  = cycle + 2;
          e.live = adc_data;
          e.idx  = exp_idx;
          q.push_back(e);
          exp_idx = (exp_idx + 1) % N_SAMPLES;
        end : push
      end
    end
  end

  // output checker
  always @(posedge sysclk) begin
    cycle++;
    #1;
    if (!rst) begin
      if (mem_rd_en) check(32'(mem_rd_addr) == (q.size() > 0 ? q[$].idx : 0),
                           $sformatf("read address %0d", mem_rd_addr));
      if (sample_valid) begin
        if (q.size() == 0) check(1'b0, "unexpected sample_valid");
        else begin
          exp_t e;
          e = q.pop_front();
          check(cycle == e.due, $sformatf("pair at %0d, expected at %0d", cycle, e.due));
          check(live_sample == e.live, $sformatf("live %h expected %h", live_sample, e.live));
          check(32'(sample_index) == e.idx, $sformatf("index %0d expected %0d", sample_index, e.idx));
          check(ref_sample == rec_word(e.idx), $sformatf("ref %h expected %h", ref_sample, rec_word(e.idx)));
          check(window_done == (e.idx == N_SAMPLES - 1), "window_done wrong");
          n_pairs++;
          if (e.idx == N_SAMPLES - 1) n_windows++;
          if (e.idx == 0 && n_pairs > 1) n_wraps++;
        end
      end else begin
        check(!window_done, "window_done without sample_valid");
        if (q.size() > 0) check(cycle < q[0].due, "sample pair missing");
      end
    end
  end

  initial begin
    repeat (3) @(negedge sysclk);
    rst = 1'b0;
    // no output before start
    repeat (60) @(negedge sysclk);
    check(!running, "running before start");
    check(n_pairs == 0, "pairs before start");
    start = 1'b1;
    @(negedge sysclk);
    start = 1'b0;
    check(running, "running not set by start");
    wait (n_pairs >= 13);
    // reset in the middle of a window
    @(negedge sysclk);
    rst = 1'b1;
    q.delete();
    exp_idx = 0;
    repeat (3) @(negedge sysclk);
    check(!running && !sample_valid, "reset did not clear the block");
    rst = 1'b0;
    n_resets++;
    repeat (20) @(negedge sysclk);
    check(!running, "running after reset without start");
    start = 1'b1;
    @(negedge sysclk);
    start = 1'b0;
    wait (n_pairs >= 30);
    repeat (30) @(negedge sysclk);
    check(n_wraps >= 3, $sformatf("only %0d index wraps", n_wraps));
    check(n_windows >= 3, $sformatf("only %0d complete windows", n_windows));
    check(n_resets == 1, "reset phase not run");
    $display("pairs=%0d wraps=%0d windows=%0d", n_pairs, n_wraps, n_windows);
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
