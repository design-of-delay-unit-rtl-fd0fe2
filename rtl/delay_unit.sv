// delay_unit: counter-based clock divider that derives the EEG clock from the
// FPGA system clock.
//
// How it works: a CNT_W-bit counter counts system clocks. When it equals
// HALF_COUNT it is cleared and an internal toggle flip-flop (p) inverts;
// otherwise the counter increments. The output eegclk is a registered copy of
// p, so it is a clean flip-flop output with no logic in front of the pad.
// The datapath is the one of the original delay-unit schematic: incrementer, equality
// comparator, a multiplexer choosing between zero and count+1, the counter
// register, the toggle register with its inverter, and the output register.
//
// Timing: every half period of eegclk lasts HALF_COUNT+1 system clocks, so the
// period is 2*(HALF_COUNT+1) clocks. With the default HALF_COUNT = 208333 and
// a 100 MHz clock that is 416668 clocks = 4.16668 ms (about 240 Hz);
// HALF_COUNT = 200000 gives 4.00002 ms. eegclk first rises HALF_COUNT+2
// clocks after reset is released (one extra clock for the output register).
//
// Interface: sysclk in, eegclk out, plus a synchronous active-high reset rst
// that clears the counter, the toggle and the output. The reset, and the
// choice to compare against the terminal count itself (as in the process flow:
// "if counter = C then counter = 0, toggle, else counter + 1"), are this
// design's choices where the original design leaves the detail open; the
// datapath, the 20-bit width and the terminal counts follow the original.
module delay_unit
#(
  parameter int unsigned CNT_W      = eeg_delay_pkg::DEF_CNT_W,
  parameter int unsigned HALF_COUNT = eeg_delay_pkg::DEF_HALF_COUNT
) (
  input  logic sysclk,
  input  logic rst,
  output logic eegclk
);

  localparam logic [CNT_W-1:0] TERMINAL = CNT_W'(HALF_COUNT);

  logic [CNT_W-1:0] c;       // delay counter
  logic [CNT_W-1:0] c_next;  // multiplexer output
  logic             hit;     // comparator output
  logic             p;       // toggle flip-flop

  always_comb begin
    hit    = (c == TERMINAL);
    c_next = hit ? '0 : c + CNT_W'(1);
  end

  always_ff @(posedge sysclk) begin
    if (rst) begin
      c      <= '0;
      p      <= 1'b0;
      eegclk <= 1'b0;
    end else begin
      c      <= c_next;
      if (hit) p <= ~p;
      eegclk <= p;
    end
  end

  // The terminal count must be representable in the counter.
  initial begin
    assert (64'(HALF_COUNT) < (64'd1 << CNT_W))
      else $fatal(1, "delay_unit: HALF_COUNT %0d does not fit in %0d bits", HALF_COUNT, CNT_W);
  end

  // The counter never passes the terminal count.
  a_count_range: assert property (@(posedge sysclk) disable iff (rst) c <= TERMINAL);

endmodule
