// column_mux: 32-to-1 column multiplexer that puts one TDC column's 14-bit L2 word on the
// readout bus. The readout reads the columns one after another, one word per readout clock.
//
// Combinational: dout = din[sel]. A select beyond the last column returns zero. Widths default
// to the sensor's 32 columns of 14 bits.
`timescale 1ps/1fs
module column_mux #(
  parameter int unsigned N = lidar_pkg::N_COL,
  parameter int unsigned W = lidar_pkg::TDC_W
) (
  input  logic [N-1:0][W-1:0]   din,
  input  logic [$clog2(N)-1:0]  sel,
  output logic [W-1:0]          dout
);

  always_comb begin
    dout = '0;
    for (int i = 0; i < int'(N); i++)
      if (sel == i[$clog2(N)-1:0]) dout = din[i];
  end

endmodule
