// tb_eeg_delay_top: end-to-end testbench for the EEG delay unit and its
// acquisition path, at reduced size (terminal count 6, 8-sample record).
//
// It loads a random record through the load port, keeping a copy, starts
// acquisition and plays an ADC that puts a new random word out on every
// rising edge of the chip's own eegclk. It checks:
//   - every eegclk half period is HALF+1 system clocks (divider),
//   - one sample pair per EEG period, exactly 2*(HALF+1) clocks apart (rate),
//   - each pair carries the ADC word of its period, the recorded word of the
//     same index, and an index that counts 0..N-1 and wraps (alignment),
//   - window_done on the last index of each pass through the record,
//   - a record reloaded while acquisition runs is used from then on,
//   - a reset in mid-run stops acquisition until the next start.
// Each of these mechanisms is counted, and one that never happened counts as
// a failure.
`timescale 1ns/1ps
module tb_eeg_delay_top;

  localparam int unsigned HALF     = 6;
  localparam int unsigned N        = 8;
  localparam int unsigned SAMPLE_W = 10;
  localparam int unsigned ADDR_W   = 3;
  localparam int unsigned PERIOD   = 2 * (HALF + 1);
  localparam int unsigned WATCHDOG = 20_000;

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
  logic [SAMPLE_W-1:0] adc_q [$];     // words of periods awaiting output

  int unsigned checks = 0, failures = 0;
  int unsigned cycle = 0;
  int unsigned last_edge = 0, last_pair = 0;
  int unsigned exp_idx = 0;
  int unsigned n_edges = 0, n_pairs = 0, n_windows = 0, n_wraps = 0;
  int unsigned n_reload_hits = 0, n_resets = 0, n_rate = 0;
  bit          reloaded = 1'b0;
  logic        eeg_prev = 1'b0;

  always #5 sysclk = ~sysclk;

  eeg_delay_top #(
    .HALF_COUNT(HALF), .N_SAMPLES(N), .SAMPLE_W(SAMPLE_W), .ADDR_W(ADDR_W)
  ) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic load(input int unsigned a, input logic [SAMPLE_W-1:0] d);
    @(negedge sysclk);
    load_en = 1'b1; load_addr = ADDR_W'(a); load_data = d;
    @(posedge sysclk);
    #1 load_en = 1'b0;
    record[a] = d;
  endtask

  // ADC model: new word on every rising eegclk
  always @(posedge eegclk) adc_data <= SAMPLE_W'($urandom);

  always @(posedge sysclk) begin
    cycle++;
    #2;
    if (rst) begin
      eeg_prev  = 1'b0;
      last_edge = cycle;
    end else begin
      // divider timing
      if (eegclk != eeg_prev) begin
        if (eegclk && n_edges == 0) check(cycle - last_edge == HALF + 2, "first eegclk rise late/early");
        else check(cycle - last_edge == HALF + 1, $sformatf("half period %0d", cycle - last_edge));
        if (!eegclk && running) adc_q.push_back(adc_data);
        last_edge = cycle;
        n_edges++;
      end
      eeg_prev = eegclk;

      if (sample_valid) begin
        logic [SAMPLE_W-1:0] want_live;
        want_live = (adc_q.size() > 0) ? adc_q.pop_front() : ~live_sample;
        check(live_sample == want_live, $sformatf("live %h expected %h", live_sample, want_live));
        check(32'(sample_index) == exp_idx, $sformatf("index %0d expected %0d", sample_index, exp_idx));
        check(ref_sample == record[exp_idx], $sformatf("ref %h expected %h at %0d",
                                                       ref_sample, record[exp_idx], exp_idx));
        check(window_done == (exp_idx == N - 1), "window_done wrong");
        if (n_pairs > 0 && last_pair != 0) begin
          check(cycle - last_pair == PERIOD, $sformatf("pair spacing %0d", cycle - last_pair));
          n_rate++;
        end
        if (reloaded) n_reload_hits++;
        if (window_done) n_windows++;
        if (exp_idx == N - 1) n_wraps++;
        exp_idx = (exp_idx + 1) % N;
        last_pair = cycle;
        n_pairs++;
      end else begin
        check(!window_done, "window_done without sample_valid");
        if (last_pair != 0) check(cycle - last_pair <= PERIOD, "sample pair missing");
      end
    end
  end

  initial begin
    repeat (2) @(negedge sysclk);
    for (int unsigned a = 0; a < N; a++) load(a, SAMPLE_W'($urandom));
    @(negedge sysclk);
    rst = 1'b0;
    repeat (3 * PERIOD) @(negedge sysclk);
    check(n_pairs == 0 && !running, "activity before start");
    start = 1'b1;
    @(negedge sysclk);
    start = 1'b0;
    wait (n_pairs >= 2 * N + 3);
    // reload the whole record while acquisition runs, between two pairs
    @(posedge sample_valid);
    for (int unsigned a = 0; a < N; a++) load(a, SAMPLE_W'($urandom));
    reloaded = 1'b1;
    wait (n_pairs >= 4 * N);
    // reset in mid-run
    @(negedge sysclk);
    rst = 1'b1;
    repeat (2) @(negedge sysclk);
    rst = 1'b0;
    adc_q.delete();
    exp_idx = 0; last_pair = 0; n_edges = 0;
    n_resets++;
    begin
      int unsigned n_before;
      n_before = n_pairs;
      repeat (3 * PERIOD) @(negedge sysclk);
      check(n_pairs == n_before && !running, "activity after reset without start");
    end
    start = 1'b1;
    @(negedge sysclk);
    start = 1'b0;
    wait (n_pairs >= 5 * N + 2);
    @(negedge sysclk);
    check(n_edges > 0,       "mechanism: eegclk never toggled");
    check(n_rate > 0,        "mechanism: rate never checked");
    check(n_windows >= 4,    "mechanism: too few complete windows");
    check(n_wraps >= 4,      "mechanism: too few index wraps");
    check(n_reload_hits > 0, "mechanism: reloaded record never read");
    check(n_resets == 1,     "mechanism: reset not exercised");
    $display("pairs=%0d windows=%0d wraps=%0d reload_hits=%0d resets=%0d rate_checks=%0d",
             n_pairs, n_windows, n_wraps, n_reload_hits, n_resets, n_rate);
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
