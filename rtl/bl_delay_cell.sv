// bl_delay_cell: behavioural model of the 5 ns delay cell in the bit-line buffer's reset loop.
// It is an analog delay line in silicon; here every change of the input reaches the output
// DELAY_PS picoseconds later (transport delay). The output starts low. Not synthesizable.
`timescale 1ps/1fs
module bl_delay_cell #(
  parameter int unsigned DELAY_PS = 5000
) (
  input  logic a,
  output logic y
);

  logic d;

  initial d = 1'b0;

  always @(a) d <= #(DELAY_PS) a;

  assign y = d;

endmodule
