// tdc_core: the 32-column ILO-TDC array. Column 0 time-stamps START, columns 1..31 time-stamp
// the STOP events of the 31 pixel columns; every column produces a 14-bit code, 52 ps per LSB
// and 1024 x 833 ps = 853 ns of range.
//
// One global Gray counter, clocked by f_REF, supplies the two coarse counts (cnt0, cnt1) to all
// columns. The fine phases do not travel across the array: eight local injection-locked
// oscillators each drive four neighbouring columns, so column c takes filo[c/4]. The oscillators
// themselves are analog and sit outside this module; their 16 phases enter on filo. The buffer
// trees that carry the counts and f_REF across the array are plain nets here.
//
// After a conversion, a rising edge on data_latch copies every column's code into its L2
// register; rd_sel then selects one column's L2 word onto rd_word through the 32-to-1 column
// multiplexer. rd_word is combinational from rd_sel and stays in Gray/fine form.
`timescale 1ps/1fs
module tdc_core
  import lidar_pkg::*;
(
  input  logic                              f_ref,       // 1.2 GHz reference
  input  logic                              rst_n,
  input  logic [N_ILO-1:0][N_PHASE-1:0]     filo,        // phases of the eight ILOs
  input  logic                              start,       // column 0 event
  input  logic [N_PIX_COL-1:0]              stop,        // columns 1..31 events
  input  logic                              data_latch,  // L2 load
  input  logic [COL_IDX_W-1:0]              rd_sel,      // readout column
  output logic [TDC_W-1:0]                  rd_word,     // selected L2 word {Gray, fine}
  output logic [N_COL-1:0]                  edge_ok,     // per column: fine edge found
  output logic [CTDC_W-1:0]                 cnt0,        // global counts (observability)
  output logic [CTDC_W-1:0]                 cnt1
);

  logic [N_COL-1:0]            ev;
  logic [N_COL-1:0][TDC_W-1:0] l2;

  assign ev = {stop, start};

  ctdc_gray_counter #(.W(CTDC_W)) u_cnt (
    .clk   (f_ref),
    .rst_n (rst_n),
    .cnt0  (cnt0),
    .cnt1  (cnt1)
  );

  for (genvar c = 0; c < int'(N_COL); c++) begin : g_col
    tdc_column u_col (
      .stop       (ev[c]),
      .cnt0       (cnt0),
      .cnt1       (cnt1),
      .filo       (filo[c / COLS_PER_ILO]),
      .data_latch (data_latch),
      .tdc_raw    (),
      .tdc_out    (l2[c]),
      .edge_ok    (edge_ok[c])
    );
  end

  column_mux #(.N(N_COL), .W(TDC_W)) u_mux (
    .din  (l2),
    .sel  (rd_sel),
    .dout (rd_word)
  );

endmodule
