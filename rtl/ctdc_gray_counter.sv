// ctdc_gray_counter: global coarse counter of the TDC, counting in Gray code at f_REF (1.2 GHz).
//
// The counter is built as in the sensor: a binary counter in the first register level (L1),
// whose next state toggles bit i when all lower bits are one (a carry chain), then the Gray
// code GC[i] = b[i+1] ^ b[i], GC[MSB] = b[MSB] formed between L1 and the second register level
// (L2). L2 removes glitches from the XOR outputs, so every Gray bit leaves a flop and exactly one
// bit changes per f_REF cycle. This makes the count safe to sample by an asynchronous STOP.
//
// Double counting: cnt0 is the L2 output, updated on the rising edge of clk. cnt1 is cnt0
// re-registered on the falling edge, so it carries the same sequence shifted by half a period
// (180 degrees). A column picks cnt0 or cnt1 by the fine-code MSB, always sampling the one that
// is not changing. Generating cnt1 by a half-cycle register, rather than a second counter, is
// this design's choice.
//
// Timing: cnt0 advances one Gray step per clk rising edge, two cycles after the binary count
// (L1 then L2); cnt1 follows cnt0 half a cycle later. rst_n is asynchronous, active low, and
// clears all registers.
`timescale 1ps/1fs
module ctdc_gray_counter #(
  parameter int unsigned W = lidar_pkg::CTDC_W
) (
  input  logic         clk,    // f_REF
  input  logic         rst_n,
  output logic [W-1:0] cnt0,   // Gray count, rising-edge phase (CNT0)
  output logic [W-1:0] cnt1    // Gray count, falling-edge phase (CNT1)
);

  logic [W-1:0] b;      // L1: binary count
  logic [W-1:0] b_nxt;
  logic [W-1:0] gc;     // Gray code between L1 and L2

  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int i = 0; i < int'(W); i++) begin
      b_nxt[i] = b[i] ^ carry;
      carry    = carry & b[i];
    end
  end

  always_comb begin
    gc[W-1] = b[W-1];
    for (int i = 0; i < int'(W) - 1; i++) gc[i] = b[i+1] ^ b[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      b    <= '0;
      cnt0 <= '0;
    end else begin
      b    <= b_nxt;
      cnt0 <= gc;
    end

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) cnt1 <= '0;
    else        cnt1 <= cnt0;

endmodule
