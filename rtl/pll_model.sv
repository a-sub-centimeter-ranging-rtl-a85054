// pll_model: behavioural model of the on-chip 1.2 GHz PLL. Not synthesizable.
//
// The PLL multiplies its reference by MULT (18.75 MHz x 64 = 1.2 GHz) to give f_REF, which clocks
// the global Gray counter and is injected into the eight ILOs. Its loop also sets the bias
// current of its own ring oscillator, I_ref[0], whose replicas I_ref[8:1] bias the ILOs: since
// the rings are identical, this bias makes them all run near f_REF over process, voltage and
// temperature.
//
// Model: after LOCK_CYC reference cycles with en high, lock rises; from then on every reference
// rising edge is followed, OFFSET_FS later, by MULT periods of f_ref of T_FS femtoseconds
// (T_FS = Tref / MULT), so f_ref is phase-locked to the reference with a static offset. Before
// lock f_ref is held low.
//
// Bias calibration: iref[i] is the bias current I_ref[i] in thousandths of its nominal value
// (lidar_pkg::IREF_NOM = 1000). A ring's frequency is modelled as proportional to its bias, and
// PVT_PM is the chip's process/voltage/temperature error: at nominal bias every ring runs
// PVT_PM/1000 fast (negative: slow). While the loop acquires, all nine currents sit at nominal;
// at lock the loop has moved I_ref[0] to whatever brings its own ring to f_REF, that is
// IREF_NOM * 1000 / (1000 + PVT_PM), and the replicas I_ref[8:1] copy it. With en low all
// currents are zero. The reference frequency, the static offset, the linear current-to-frequency
// law and the lock time are this model's choices.
`timescale 1fs/1fs
module pll_model #(
  parameter int unsigned MULT      = 64,
  parameter int unsigned LOCK_CYC  = 4,
  parameter int unsigned T_FS      = 833333,   // 1.2 GHz
  parameter int unsigned OFFSET_FS = 130000,
  parameter int          PVT_PM    = 0          // ring speed error at nominal bias, 1/1000
) (
  input  logic       ref_clk,
  input  logic       en,
  output logic       f_ref,
  output logic       lock,
  output logic [8:0][lidar_pkg::IREF_W-1:0] iref   // bias currents I_ref[8:0]
);

  localparam int IREF_CAL = (int'(lidar_pkg::IREF_NOM) * 1000 + (1000 + PVT_PM) / 2) / (1000 + PVT_PM);

  int unsigned ncyc;

  initial begin
    f_ref = 1'b0;
    lock  = 1'b0;
    ncyc  = 0;
  end

  assign iref = !en  ? '0
              : lock ? {9{lidar_pkg::IREF_W'(IREF_CAL)}}
              :        {9{lidar_pkg::IREF_W'(lidar_pkg::IREF_NOM)}};

  always @(posedge ref_clk) begin
    if (!en) begin
      ncyc = 0;
      lock = 1'b0;
    end else if (ncyc < LOCK_CYC) begin
      ncyc++;
    end else begin
      lock = 1'b1;
      #(OFFSET_FS);
      for (int unsigned k = 0; k < MULT; k++) begin
        f_ref = 1'b1;
        #(T_FS / 2);
        f_ref = 1'b0;
        if (k < MULT - 1) #(T_FS - T_FS / 2);
      end
    end
  end

endmodule
