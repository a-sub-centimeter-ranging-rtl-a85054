// pdem_model: behavioural model of a photodiode emulator (PDEM) feeding a row-2 receiver.
// Not synthesizable.
//
// On each rising edge of trig the emulator drives a current pulse of amp_na nanoamps for
// PULSE_PS (5 ns), emulating the transient of a photodiode; otherwise it drives dark_na. Both
// amplitudes are programmable, which lets the receiver's sensitivity be measured.
`timescale 1ps/1fs
module pdem_model #(
  parameter int unsigned PULSE_PS = 5000
) (
  input  logic                        trig,
  input  logic [lidar_pkg::IPH_W-1:0] amp_na,
  input  logic [lidar_pkg::IPH_W-1:0] dark_na,
  output logic [lidar_pkg::IPH_W-1:0] iph
);

  logic pulse;

  initial pulse = 1'b0;

  always @(posedge trig) begin
    pulse = 1'b1;
    #(PULSE_PS);
    pulse = 1'b0;
  end

  assign iph = pulse ? amp_na : dark_na;

endmodule
