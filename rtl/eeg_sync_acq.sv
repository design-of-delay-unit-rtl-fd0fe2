// eeg_sync_acq: acquisition counter that lines up live EEG samples with the
// stored EEG record.
//
// The delay unit's EEG clock marks the instants at which a new EEG sample is
// due. This block watches that clock in the system-clock domain (it is
// generated from sysclk, so no synchroniser is needed) and, once per EEG clock
// period, takes the 10-bit sample from the ADC and reads the recorded sample
// with the same index from the sample memory. The index is the sample counter
// count2; it steps through the record and returns to 0 after the last sample,
// so the record is compared again, window after window.
//
// Operation starts with a one-clock (or longer) pulse on start; running then
// stays high until reset. The ADC is taken to present a new word on each
// rising edge of the EEG clock, so the word is sampled on the falling edge,
// half an EEG period later, when it is stable.
//
// Timing, counted in sysclk cycles from the clock edge at which eegclk is seen
// low after being high (the falling-edge detect):
//   cycle 0: adc_data is registered, a memory read of count2 is issued, count2
//            advances;
//   cycle 1: the memory returns the recorded word;
//   cycle 2: live_sample, ref_sample, sample_index are updated and sample_valid
//            is high for one clock; window_done is high with it for the last
//            sample of the record.
// So one sample pair is produced per EEG clock period.
//
// Capturing on the falling edge, the start/running handshake and the output
// timing are this design's choices; the original design gives only the
// sample counter (count2), the 10-bit sample, the 15,000-sample record and
// a START of acquisition.
module eeg_sync_acq #(
  parameter int unsigned SAMPLE_W  = eeg_delay_pkg::DEF_SAMPLE_W,
  parameter int unsigned N_SAMPLES = eeg_delay_pkg::DEF_N_SAMPLES,
  parameter int unsigned ADDR_W    = (N_SAMPLES > 1) ? $clog2(N_SAMPLES) : 1
) (
  input  logic                sysclk,
  input  logic                rst,
  input  logic                start,
  input  logic                eegclk,
  input  logic [SAMPLE_W-1:0] adc_data,
  // sample memory read port
  output logic                mem_rd_en,
  output logic [ADDR_W-1:0]   mem_rd_addr,
  input  logic [SAMPLE_W-1:0] mem_rd_data,
  // aligned sample pair
  output logic                sample_valid,
  output logic [SAMPLE_W-1:0] live_sample,
  output logic [SAMPLE_W-1:0] ref_sample,
  output logic [ADDR_W-1:0]   sample_index,
  output logic                window_done,
  output logic                running
);

  localparam logic [ADDR_W-1:0] LAST = ADDR_W'(N_SAMPLES - 1);

  logic                eegclk_q;   // eegclk one clock ago
  logic                capture;    // falling edge of eegclk while running
  logic [ADDR_W-1:0]   count2;     // index of the next sample
  logic [SAMPLE_W-1:0] adc_q;      // captured live sample
  logic [ADDR_W-1:0]   idx_q;      // index of the captured sample
  logic                pend;       // memory read in flight

  always_comb begin
    capture     = running && eegclk_q && !eegclk;
    mem_rd_en   = capture;
    mem_rd_addr = count2;
  end

  always_ff @(posedge sysclk) begin
    if (rst) begin
      eegclk_q     <= 1'b0;
      running      <= 1'b0;
      count2       <= '0;
      adc_q        <= '0;
      idx_q        <= '0;
      pend         <= 1'b0;
      sample_valid <= 1'b0;
      live_sample  <= '0;
      ref_sample   <= '0;
      sample_index <= '0;
      window_done  <= 1'b0;
    end else begin
      eegclk_q <= eegclk;
      if (start) running <= 1'b1;

      pend <= capture;
      if (capture) begin
        adc_q  <= adc_data;
        idx_q  <= count2;
        count2 <= (count2 == LAST) ? '0 : count2 + ADDR_W'(1);
      end

      sample_valid <= pend;
      window_done  <= pend && (idx_q == LAST);
      if (pend) begin
        live_sample  <= adc_q;
        ref_sample   <= mem_rd_data;
        sample_index <= idx_q;
      end
    end
  end

  a_index_range: assert property (@(posedge sysclk) disable iff (rst) count2 <= LAST);

endmodule
