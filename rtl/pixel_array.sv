// pixel_array: behavioural model of the 31 x 2 pixel channel array. Not synthesizable (it holds
// analog receiver models).
//
// Each of the 31 columns has two pixel channels. Row 1 takes its photocurrent from the pins
// (off-chip APDs are bonded to columns 3, 7, ..., 31; the other inputs stay at zero), row 2 from
// a photodiode emulator fired by the test circuit; between pulses the emulator drives the
// programmed dark current, so a dark current above threshold holds the bit line high. Both
// receivers of a column drive the same open-drain bit line, so the bit line is the OR of their
// outputs. Column c (1..31) drives bit line index c-1.
`timescale 1ps/1fs
module pixel_array
  import lidar_pkg::*;
(
  input  logic [N_PIX_COL-1:0][IPH_W-1:0] row1_iph,   // APD photocurrents, nA
  input  logic [N_PIX_COL-1:0]            pdem_trig,  // test-circuit triggers of the row-2 PDEMs
  input  logic [IPH_W-1:0]                pdem_amp,   // PDEM pulse amplitude, nA
  input  logic [IPH_W-1:0]                pdem_dark,  // PDEM dark current, nA
  output logic [N_PIX_COL-1:0]            bl          // bit lines
);

  for (genvar c = 0; c < int'(N_PIX_COL); c++) begin : g_col
    logic [IPH_W-1:0] iph2;
    logic             d1, d2;

    rx_model u_rx1 (.iph(row1_iph[c]), .bl_drive(d1));

    pdem_model u_pdem (.trig(pdem_trig[c]), .amp_na(pdem_amp), .dark_na(pdem_dark), .iph(iph2));
    rx_model   u_rx2  (.iph(iph2), .bl_drive(d2));

    assign bl[c] = d1 | d2;
  end

endmodule
