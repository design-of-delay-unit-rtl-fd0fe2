// sample_memory: on-chip store for the pre-recorded EEG record.
//
// The record of seizure-related EEG data is held in FPGA block memory so the
// accelerator can read one recorded sample for every live sample that arrives.
// It is a simple dual-port RAM of DEPTH words of WIDTH bits: a write port,
// used by the system side to load the record, and a read port, used by the
// acquisition logic. Both ports are synchronous to sysclk.
//
// Timing: a write with wr_en high lands at the clock edge. A read with rd_en
// high returns the word on rd_data one clock later; rd_data holds its value
// while rd_en is low. A read and a write to the same address in the same clock
// return the old word (read-first), as block RAM does in that mode.
//
// The size (15,000 samples of 10 bits, 60 s of EEG at 4 ms per sample) is the
// record length the design is meant for. In the processor-based system the
// record sits in the on-chip memory reached over AXI; here a plain write port
// stands for that path, which is this design's own simplification. The memory
// has no reset and no initial contents: the record must be written before it
// is read.
module sample_memory #(
  parameter int unsigned WIDTH  = eeg_delay_pkg::DEF_SAMPLE_W,
  parameter int unsigned DEPTH  = eeg_delay_pkg::DEF_N_SAMPLES,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              sysclk,
  // write (load) port
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  // read port
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge sysclk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge sysclk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

  // Addresses beyond the record are a caller error.
  a_wr_addr: assert property (@(posedge sysclk) wr_en |-> 32'(wr_addr) < DEPTH);
  a_rd_addr: assert property (@(posedge sysclk) rd_en |-> 32'(rd_addr) < DEPTH);

endmodule
