// eeg_delay_top: EEG delay unit with its acquisition path.
//
// The FPGA runs at 100 MHz while EEG samples arrive at 240 Hz. The delay unit
// divides the system clock down to the EEG clock; that clock leaves the chip
// on eegclk to pace the EEG front end and, inside, paces the acquisition
// counter. On each EEG period the acquisition counter takes the live 10-bit
// ADC sample and reads the recorded sample of the same index from the on-chip
// sample memory, and presents the two together (sample_valid), so live and
// recorded EEG data stay in step for the comparison that follows.
//
// Blocks and wiring:
//   delay_unit    sysclk -> eegclk (half period HALF_COUNT+1 clocks)
//   eeg_sync_acq  eegclk, adc_data -> memory read, aligned sample pair
//   sample_memory loaded through load_*; read by eeg_sync_acq
//
// Interface: every signal is synchronous to sysclk; rst is synchronous and
// active high. The record is written through load_en/load_addr/load_data
// (one word per clock; in a full system this port is driven from the
// processor side). start begins acquisition. The ADC word adc_data is
// expected to change only near rising edges of eegclk.
//
// The split into these three blocks and the load port are this design's
// choices; the divider structure and the default numbers (100 MHz, 240 Hz,
// 20-bit counter, terminal count 208333, 10-bit samples, 15,000-sample record)
// are the nominal ones of the design.
module eeg_delay_top #(
  parameter int unsigned CNT_W      = eeg_delay_pkg::DEF_CNT_W,
  parameter int unsigned HALF_COUNT = eeg_delay_pkg::DEF_HALF_COUNT,
  parameter int unsigned SAMPLE_W   = eeg_delay_pkg::DEF_SAMPLE_W,
  parameter int unsigned N_SAMPLES  = eeg_delay_pkg::DEF_N_SAMPLES,
  parameter int unsigned ADDR_W     = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1
) (
  input  logic                sysclk,
  input  logic                rst,
  // EEG clock to the front end
  output logic                eegclk,
  // live EEG samples from the ADC
  input  logic [SAMPLE_W-1:0] adc_data,
  // record load port
  input  logic                load_en,
  input  logic [ADDR_W-1:0]   load_addr,
  input  logic [SAMPLE_W-1:0] load_data,
  // control and results
  input  logic                start,
  output logic                running,
  output logic                sample_valid,
  output logic [SAMPLE_W-1:0] live_sample,
  output logic [SAMPLE_W-1:0] ref_sample,
  output logic [ADDR_W-1:0]   sample_index,
  output logic                window_done
);

  logic                mem_rd_en;
  logic [ADDR_W-1:0]   mem_rd_addr;
  logic [SAMPLE_W-1:0] mem_rd_data;

  delay_unit #(
    .CNT_W     (CNT_W),
    .HALF_COUNT(HALF_COUNT)
  ) u_delay (
    .sysclk(sysclk),
    .rst   (rst),
    .eegclk(eegclk)
  );

  eeg_sync_acq #(
    .SAMPLE_W (SAMPLE_W),
    .N_SAMPLES(N_SAMPLES),
    .ADDR_W   (ADDR_W)
  ) u_acq (
    .sysclk      (sysclk),
    .rst         (rst),
    .start       (start),
    .eegclk      (eegclk),
    .adc_data    (adc_data),
    .mem_rd_en   (mem_rd_en),
    .mem_rd_addr (mem_rd_addr),
    .mem_rd_data (mem_rd_data),
    .sample_valid(sample_valid),
    .live_sample (live_sample),
    .ref_sample  (ref_sample),
    .sample_index(sample_index),
    .window_done (window_done),
    .running     (running)
  );

  sample_memory #(
    .WIDTH (SAMPLE_W),
    .DEPTH (N_SAMPLES),
    .ADDR_W(ADDR_W)
  ) u_mem (
    .sysclk (sysclk),
    .wr_en  (load_en),
    .wr_addr(load_addr),
    .wr_data(load_data),
    .rd_en  (mem_rd_en),
    .rd_addr(mem_rd_addr),
    .rd_data(mem_rd_data)
  );

endmodule
