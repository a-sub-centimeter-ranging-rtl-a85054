// scan_chain: serial configuration port. An external computer shifts the configuration word in
// and then commits it, which sets the chip's registers (ILO current trims, PDEM amplitude and
// the test-mode selects, laid out in lidar_pkg::cfg_t).
//
// Protocol, on the rising edge of scan_clk: with scan_en high, the shift register moves one bit
// toward its MSB and takes scan_in at bit 0, so the word is sent MSB first; scan_out is the
// shift register's MSB, so a chain of chips can be daisy-chained. A cycle with scan_upd high
// (and scan_en low) copies the shift register into the configuration register, which drives
// cfg; cfg never shows half-shifted values. rst_n (asynchronous, active low) loads CFG_DEFAULT
// into both registers. The sensor names the scan chain; this protocol is this design's choice.
`timescale 1ps/1fs
module scan_chain
  import lidar_pkg::*;
(
  input  logic  scan_clk,
  input  logic  rst_n,
  input  logic  scan_en,
  input  logic  scan_in,
  input  logic  scan_upd,
  output logic  scan_out,
  output cfg_t  cfg
);

  logic [CFG_W-1:0] sr;

  always_ff @(posedge scan_clk or negedge rst_n)
    if (!rst_n) begin
      sr  <= CFG_DEFAULT;
      cfg <= CFG_DEFAULT;
    end else if (scan_en) begin
      sr  <= {sr[CFG_W-2:0], scan_in};
    end else if (scan_upd) begin
      cfg <= cfg_t'(sr);
    end

  assign scan_out = sr[CFG_W-1];

endmodule
