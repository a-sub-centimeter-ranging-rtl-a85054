// rx_model: behavioural model of one pixel channel's front-end receiver. Not synthesizable.
//
// The silicon receiver is a single-ended inverter transimpedance amplifier and limiting
// amplifier with offset-cancelling common-mode feedback, ending in a PMOS open-drain stage that
// pulls the column's shared bit line when a photocurrent pulse is detected. Only its logic
// behaviour is modelled: bl_drive is high, DELAY_PS after the input, while the photocurrent iph
// (in nA) is at or above THRESH_NA. Pulses below the threshold, which in silicon give a partial
// swing that the bit-line buffer rejects, give no output. The 15 uA threshold is the receiver's
// simulated detection threshold; the delay is this model's choice.
`timescale 1ps/1fs
module rx_model #(
  parameter int unsigned THRESH_NA = 15000,
  parameter int unsigned DELAY_PS  = 300
) (
  input  logic [lidar_pkg::IPH_W-1:0] iph,
  output logic                        bl_drive
);

  logic det;

  assign det = (iph >= lidar_pkg::IPH_W'(THRESH_NA));
  assign #(DELAY_PS) bl_drive = det;

endmodule
