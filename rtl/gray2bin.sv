// gray2bin: Gray-to-binary decoder of the coarse TDC count, used once in the readout path.
//
// B[MSB] = G[MSB], B[i] = B[i+1] ^ G[i]: each binary bit is the XOR of all Gray bits at and above
// it. Purely combinational; W defaults to the 10-bit coarse count.
`timescale 1ps/1fs
module gray2bin #(
  parameter int unsigned W = lidar_pkg::CTDC_W
) (
  input  logic [W-1:0] g,
  output logic [W-1:0] b
);

  always_comb begin
    b[W-1] = g[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
  end

endmodule
