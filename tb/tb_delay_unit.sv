// tb_delay_unit: self-checking testbench for the EEG clock divider.
//
// Three dividers run side by side from one 100 MHz clock: one with its default
// parameters (terminal count for 240 Hz), one with the 4 ms setting (terminal
// count 200000) and a small one (terminal count 3) that is also reset in the
// middle of its run. For each, the expected timing is worked out here from the
// clock frequencies, independently of the design: the first rising edge of
// eegclk comes HALF+2 clocks after reset is released, and every later edge of
// either polarity comes HALF+1 clocks after the previous one. The testbench
// also checks the absolute periods in nanoseconds against 4.16668 ms and
// 4.00002 ms.
`timescale 1ns/1ps
module tb_delay_unit;

  localparam int unsigned SYS_HZ  = 100_000_000;
  localparam int unsigned EEG_HZ  = 240;
  localparam int unsigned HALF_A  = SYS_HZ / (2 * EEG_HZ);   // 208333
  localparam int unsigned HALF_B  = 200_000;
  localparam int unsigned HALF_C  = 3;
  localparam int unsigned N_EDGES = 6;                        // edges checked on A and B
  localparam int unsigned WATCHDOG = 2_000_000;

  logic sysclk = 1'b0;
  logic rst    = 1'b1;
  logic rst_c  = 1'b1;
  logic eeg_a, eeg_b, eeg_c;

  int unsigned checks = 0, failures = 0;
  longint unsigned cycle = 0;

  always #5 sysclk = ~sysclk;   // 100 MHz

  delay_unit dut_a (.sysclk(sysclk), .rst(rst), .eegclk(eeg_a));
  delay_unit #(.CNT_W(20), .HALF_COUNT(HALF_B)) dut_b (.sysclk(sysclk), .rst(rst), .eegclk(eeg_b));
  delay_unit #(.CNT_W(3), .HALF_COUNT(HALF_C)) dut_c (.sysclk(sysclk), .rst(rst_c), .eegclk(eeg_c));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Edge bookkeeping per divider.
  typedef struct {
    logic            prev;
    longint unsigned last;   // cycle of the last edge, or of reset release
    int unsigned     n;      // edges seen since reset release
    longint unsigned t_rise; // time (ns) of the last rising edge
  } mon_t;

  mon_t ma, mb, mc;

  task automatic observe(inout mon_t m, input logic eeg, input int unsigned half,
                         input string name);
    if (eeg != m.prev) begin
      longint unsigned gap = cycle - m.last;
      longint unsigned want = (m.n == 0) ? longint'(half) + 2 : longint'(half) + 1;
      check(gap == want, $sformatf("%s edge %0d after %0d clocks, expected %0d",
                                   name, m.n, gap, want));
      if (m.n == 0) check(eeg == 1'b1, $sformatf("%s first edge not rising", name));
      if (eeg) begin
        if (m.t_rise != 0) begin
          longint unsigned per = longint'($time) - m.t_rise;
          longint unsigned want_ns = 2 * (longint'(half) + 1) * 10;
          check(per == want_ns, $sformatf("%s period %0d ns, expected %0d", name, per, want_ns));
        end
        m.t_rise = longint'($time);
      end
      m.last = cycle;
      m.n++;
    end
    m.prev = eeg;
  endtask

  always @(posedge sysclk) begin
    cycle++;
    #1;
    if (!rst) begin
      observe(ma, eeg_a, HALF_A, "A(default)");
      observe(mb, eeg_b, HALF_B, "B(4ms)");
    end
    if (rst_c) begin
      check(eeg_c == 1'b0, "C: eegclk not low in reset");
      mc.prev = 1'b0; mc.last = cycle; mc.n = 0; mc.t_rise = 0;
    end else begin
      observe(mc, eeg_c, HALF_C, "C(small)");
    end
  end

  initial begin
    ma = '{1'b0, 0, 0, 0};
    mb = '{1'b0, 0, 0, 0};
    mc = '{1'b0, 0, 0, 0};
    repeat (3) @(posedge sysclk);
    #2;
    rst = 1'b0; rst_c = 1'b0;
    ma.last = cycle; mb.last = cycle; mc.last = cycle;
    // reset divider C in the middle of its run, then let it restart
    repeat (37) @(posedge sysclk);
    #2 rst_c = 1'b1;
    repeat (4) @(posedge sysclk);
    #2 rst_c = 1'b0;
    mc.last = cycle;
    wait (ma.n >= N_EDGES && mb.n >= N_EDGES);
    @(posedge sysclk);
    #2;
    // the nominal periods in nanoseconds
    check(2 * (HALF_A + 1) * 10 == 4_166_680, "A period is not 4.16668 ms");
    check(2 * (HALF_B + 1) * 10 == 4_000_020, "B period is not 4.00002 ms");
    check(mc.n >= 20, $sformatf("C: only %0d edges", mc.n));
    check(ma.n >= N_EDGES, "A: too few edges");
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
