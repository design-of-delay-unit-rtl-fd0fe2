// eeg_delay_pkg: constants shared by the EEG delay unit, the acquisition
// counter and the sample memory.
//
// The delay unit turns the 100 MHz FPGA system clock into a 240 Hz EEG clock.
// Its terminal count follows from the two frequencies: the full period is
// SYS_CLK_HZ / EEG_CLK_HZ = 416666 system clocks, and a 50 % duty cycle gives a
// half period of 208333, which fits the 20-bit counter. The EEG record held on
// chip is 60 s of 10-bit samples at one sample per EEG clock, about 15,000
// samples. All of these numbers are the design's nominal values; the modules
// take them as parameter defaults and can be built with other values.
package eeg_delay_pkg;

  // FPGA system clock (Zynq-7000 programmable-logic clock) in Hz.
  localparam int unsigned SYS_CLK_HZ = 100_000_000;
  // EEG acquisition rate in Hz.
  localparam int unsigned EEG_CLK_HZ = 240;

  // Width of the delay counter.
  localparam int unsigned DEF_CNT_W = 20;

  // Terminal count of the delay counter for a 50 % duty-cycle output:
  // SYS_CLK_HZ / (2 * EEG_CLK_HZ), truncated (100e6 / 480 = 208333).
  function automatic int unsigned half_period_count(input int unsigned sys_hz,
                                                    input int unsigned eeg_hz);
    return sys_hz / (2 * eeg_hz);
  endfunction

  localparam int unsigned DEF_HALF_COUNT = half_period_count(SYS_CLK_HZ, EEG_CLK_HZ);

  // Alternative setting that gives an exactly 4 ms EEG clock period.
  localparam int unsigned DEF_HALF_COUNT_4MS = 200_000;

  // Resolution of one ADC sample of the EEG signal.
  localparam int unsigned DEF_SAMPLE_W = 10;
  // Samples in one stored EEG record (60 s at one sample per 4 ms).
  localparam int unsigned DEF_N_SAMPLES = 15_000;

endpackage
