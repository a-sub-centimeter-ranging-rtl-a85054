// tdc_column: one time-memory column of the ILO-TDC. On each rising edge of its STOP input it
// captures the time as a 14-bit code {coarse Gray count, fine phase code}.
//
// Coarse part: two 10-bit registers clocked by STOP capture the two global Gray counts, cnt0
// (updated on the f_REF rising edge) and cnt1 (the same count half a period later). The fine
// code's MSB picks one of them: fine[3] = 0 selects cnt0, fine[3] = 1 selects cnt1. With the ILO
// phases aligned so that cnt0 changes at fine position 12 and cnt1 at fine position 4, each
// register is sampled at least four fine steps (208 ps) away from its own transition, which is
// what keeps the coarse and fine parts from disagreeing at a coarse boundary (no missing codes).
//
// Fine part: ftdc_edge_detector samples the 16 ILO phases on the same STOP edge.
//
// Second level: on the rising edge of data_latch the assembled code is copied into the L2
// register, so the next conversion can run while the previous code is read out. The code is
// kept in Gray form; conversion to binary happens once, in the readout path. The sensor's
// schematic shows this stage as a 14-bit latch; it is a flop here, which holds the same value at
// readout without a transparent phase.
`timescale 1ps/1fs
module tdc_column
  import lidar_pkg::*;
(
  input  logic                stop,        // time event (rising edge)
  input  logic [CTDC_W-1:0]   cnt0,        // CNT0, Gray
  input  logic [CTDC_W-1:0]   cnt1,        // CNT1, Gray, half-period later
  input  logic [N_PHASE-1:0]  filo,        // 16 ILO phases
  input  logic                data_latch,  // L2 load (rising edge)
  output logic [TDC_W-1:0]    tdc_raw,     // code at STOP: {coarse Gray, fine} (L1 view)
  output logic [TDC_W-1:0]    tdc_out,     // L2 register
  output logic                edge_ok      // fine edge found at the last STOP
);

  logic [CTDC_W-1:0] c0_q, c1_q;
  logic [FTDC_W-1:0] fine;
  logic [CTDC_W-1:0] coarse;

  always_ff @(posedge stop) begin
    c0_q <= cnt0;
    c1_q <= cnt1;
  end

  ftdc_edge_detector #(.NPH(N_PHASE)) u_ped (
    .stop    (stop),
    .filo    (filo),
    .fine    (fine),
    .edge_ok (edge_ok),
    .sa_q    ()
  );

  assign coarse  = fine[FTDC_W-1] ? c1_q : c0_q;
  assign tdc_raw = {coarse, fine};

  always_ff @(posedge data_latch) tdc_out <= tdc_raw;

endmodule
