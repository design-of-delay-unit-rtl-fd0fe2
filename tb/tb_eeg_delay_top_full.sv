// tb_eeg_delay_top_full: the top level at its default size, end to end.
//
// Defaults: 100 MHz system clock, terminal count 208333, 10-bit samples and a
// 15,000-sample record. The testbench loads the full record, starts
// acquisition and runs through the first few EEG periods (about 1.7 million
// system clocks). It checks that eegclk first rises 208335 clocks after reset
// and then toggles every 208334 clocks (4.16668 ms period, about 240 Hz),
// that sample pairs come one per 416668 clocks, and that each carries the ADC
// word of its period, the recorded word of its index and the index 0, 1, 2...
`timescale 1ns/1ps
module tb_eeg_delay_top_full;

  localparam int unsigned SYS_HZ   = 100_000_000;
  localparam int unsigned EEG_HZ   = 240;
  localparam int unsigned HALF     = SYS_HZ / (2 * EEG_HZ);
  localparam int unsigned PERIOD   = 2 * (HALF + 1);
  localparam int unsigned N        = 15_000;
  localparam int unsigned SAMPLE_W = 10;
  localparam int unsigned ADDR_W   = 14;
  localparam int unsigned N_PAIRS  = 3;
  localparam int unsigned WATCHDOG = 3_000_000;

  logic                sysclk = 1'b0;
  logic                rst = 1'b1, start = 1'b0;
  logic                eegclk;
  logic [SAMPLE_W-1:0] adc_data = '0;
  logic                load_en = 1'b0;
  logic [ADDR_W-1:0]   load_addr = '0;
  logic [SAMPLE_W-1:0] load_data = '0;
  logic                running, sample_valid, window_done;
  logic [SAMPLE_W-1:0] live_sample, ref_sample;
  logic [ADDR_W-1:0]   sample_index;

  logic [SAMPLE_W-1:0] record [N];
  logic [SAMPLE_W-1:0] adc_q [$];

  int unsigned checks = 0, failures = 0;
  int unsigned cycle = 0, last_edge = 0, last_pair = 0;
  int unsigned n_edges = 0, n_pairs = 0, exp_idx = 0;
  logic        eeg_prev = 1'b0;

  always #5 sysclk = ~sysclk;

  eeg_delay_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge eegclk) adc_data <= SAMPLE_W'($urandom);

  always @(posedge sysclk) begin
    cycle++;
    #2;
    if (rst) last_edge = cycle;
    else begin
      if (eegclk != eeg_prev) begin
        if (n_edges == 0) check(eegclk && cycle - last_edge == HALF + 2,
                                $sformatf("first rise after %0d clocks", cycle - last_edge));
        else check(cycle - last_edge == HALF + 1, $sformatf("half period %0d", cycle - last_edge));
        if (!eegclk && running) adc_q.push_back(adc_data);
        last_edge = cycle;
        n_edges++;
      end
      eeg_prev = eegclk;
      if (sample_valid) begin
        logic [SAMPLE_W-1:0] want_live;
        want_live = (adc_q.size() > 0) ? adc_q.pop_front() : ~live_sample;
        check(live_sample == want_live, "live sample");
        check(32'(sample_index) == exp_idx, $sformatf("index %0d", sample_index));
        check(ref_sample == record[exp_idx], "recorded sample");
        check(!window_done, "window_done early");
        if (last_pair != 0) check(cycle - last_pair == PERIOD,
                                  $sformatf("pair spacing %0d", cycle - last_pair));
        last_pair = cycle;
        exp_idx++;
        n_pairs++;
      end
    end
  end

  initial begin
    check(PERIOD == 416_668, "nominal period");
    repeat (2) @(negedge sysclk);
    for (int unsigned a = 0; a < N; a++) begin
      @(negedge sysclk);
      load_en = 1'b1; load_addr = ADDR_W'(a); load_data = SAMPLE_W'($urandom);
      record[a] = load_data;
    end
    @(negedge sysclk);
    load_en = 1'b0;
    rst = 1'b0;
    start = 1'b1;
    @(negedge sysclk);
    start = 1'b0;
    wait (n_pairs >= N_PAIRS);
    @(negedge sysclk);
    check(n_edges >= 2 * N_PAIRS, "too few eegclk edges");
    $display("pairs=%0d eegclk_edges=%0d cycles=%0d", n_pairs, n_edges, cycle);
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
