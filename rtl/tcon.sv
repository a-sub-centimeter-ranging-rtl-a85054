// tcon: timing controller of the LIDAR receiver. Sequences one ranging frame per 375 kHz period
// and the column readout, both on the 18.75 MHz system clock (one frame = 50 cycles).
//
// Frame, cycle fc = 0..FRAME_CYC-1 (all outputs are registered and go high in the cycle shown):
//   fc = 0                                bl_rst: clears the bit-line buffers' event flags
//   fc = START_CYC .. START_CYC+START_W-1  start: fires the laser and time-stamps column 0
//   fc = LATCH_CYC                        data_latch: copies all column codes into L2
//   the NCOL cycles after data_latch      rd_valid, rd_sel = 0..NCOL-1: one column per cycle
// The conversion window from START to data_latch covers the 16 cycles (853 ns) of the coarse
// counter's range. The readout of a frame overlaps the conversion of the next, which the
// second-level registers allow: 32 readout cycles fit in the 50-cycle frame. The 375 kHz rate,
// the 18.75 MHz readout clock and the pipelining follow the sensor; the cycle positions are this
// design's choice. rst_n is asynchronous, active low.
`timescale 1ps/1fs
module tcon #(
  parameter int unsigned FRAME_CYC = lidar_pkg::FRAME_CYC,
  parameter int unsigned START_CYC = 1,
  parameter int unsigned START_W   = 2,
  parameter int unsigned CONV_CYC  = 16,
  parameter int unsigned NCOL      = lidar_pkg::N_COL
) (
  input  logic                      clk,         // 18.75 MHz
  input  logic                      rst_n,
  output logic                      bl_rst,
  output logic                      start,
  output logic                      data_latch,
  output logic                      rd_valid,
  output logic [$clog2(NCOL)-1:0]   rd_sel,
  output logic                      frame_start  // one cycle at fc = 0
);

  localparam int unsigned LATCH_CYC = START_CYC + CONV_CYC + 1;
  localparam int unsigned FC_W      = $clog2(FRAME_CYC);

  logic [FC_W-1:0]         fc, fc_n;
  logic [$clog2(NCOL):0]   rd_left;   // readout words still to go

  assign fc_n = (fc == FC_W'(FRAME_CYC - 1)) ? '0 : fc + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fc          <= FC_W'(FRAME_CYC - 1);
      bl_rst      <= 1'b0;
      start       <= 1'b0;
      data_latch  <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      fc          <= fc_n;
      frame_start <= (fc_n == '0);
      bl_rst      <= (fc_n == '0);
      start       <= (fc_n >= FC_W'(START_CYC)) && (fc_n < FC_W'(START_CYC + START_W));
      data_latch  <= (fc_n == FC_W'(LATCH_CYC));
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_left  <= '0;
      rd_valid <= 1'b0;
      rd_sel   <= '0;
    end else if (data_latch) begin
      rd_left  <= ($clog2(NCOL)+1)'(NCOL - 1);
      rd_valid <= 1'b1;
      rd_sel   <= '0;
    end else if (rd_left != '0) begin
      rd_left  <= rd_left - 1'b1;
      rd_sel   <= rd_sel + 1'b1;
    end else begin
      rd_valid <= 1'b0;
    end

  // The readout of one frame must end before the next data_latch overwrites L2.
  initial begin
    assert (NCOL + 1 <= FRAME_CYC) else $error("tcon: readout does not fit in a frame");
    assert (LATCH_CYC < FRAME_CYC)  else $error("tcon: conversion window does not fit in a frame");
  end

endmodule
