// bl_buffer: bit-line buffer between a pixel column's shared bit line and its TDC STOP input.
// The receiver's pulse on the bit line can be short or slow after the inverter chain; this
// buffer turns its rising edge into a clean pulse of fixed width (5 ns) whatever the input
// width, so the TDC column always sees a well-formed STOP edge.
//
// Pulse regenerator (as in the sensor): a flop clocked by the bit line and loaded with one sets
// vo; vo, delayed by the 5 ns delay cell, resets the flop. So vo rises one clock-to-q after the
// bit-line edge and falls 5 ns later; the reset then stays asserted for another 5 ns, during
// which further bit-line edges are ignored. The frame reset rst also clears the pulse flop.
//
// Overflow detection: a second flop, clocked by the same bit-line edge and cleared by rst,
// records that an event has reached this column since the last rst (hit). The sensor shows this
// flop and an OVERFLOW control gating the regenerated pulse without describing their function;
// here, when ovf_mode is high the pulse flop is only loaded with one while hit is still low, so
// only the first event of a frame produces a STOP and later photons cannot overwrite the
// recorded time. With ovf_mode low every event passes. This gating at the flop's input is this
// design's reading.
`timescale 1ps/1fs
module bl_buffer #(
  parameter int unsigned PULSE_PS = 5000
) (
  input  logic bl,        // shared bit line (rising edge = photon event)
  input  logic rst,       // frame reset of the overflow flop, active high
  input  logic ovf_mode,  // 1: pass only the first event after rst
  output logic vo,        // regenerated STOP pulse
  output logic hit        // an event arrived since rst
);

  logic vo_del;
  logic clr;

  assign clr = vo_del | rst;

  always_ff @(posedge bl or posedge rst)
    if (rst) hit <= 1'b0;
    else     hit <= 1'b1;

  always_ff @(posedge bl or posedge clr)
    if (clr) vo <= 1'b0;
    else        vo <= ~(ovf_mode & hit);

  bl_delay_cell #(.DELAY_PS(PULSE_PS)) u_dly (
    .a (vo),
    .y (vo_del)
  );

endmodule
