// ilo_model: behavioural model of one injection-locked ring oscillator (ILO). Not synthesizable.
//
// The silicon part is an eight-stage differential ring of current-starved delay cells whose
// sixteen taps give sixteen phases of a 1.2 GHz clock, 52 ps apart. f_REF is injected, through a
// pseudo-differential buffer and AC coupling, into two complementary taps, which locks the
// ring's frequency and phase to f_REF; the bias current I_ref comes from the PLL and a 5-bit
// current trim corrects residual mismatch.
//
// Lock: the ring's free-running frequency is proportional to its bias iref (thousandths of
// nominal, from the PLL) and, at nominal bias, PVT_PM/1000 off 1.2 GHz, the same error as the
// PLL's own ring. The ring locks when its free-running frequency is within LOCK_RANGE_PM/1000 of
// the injected one. The PLL's bias calibration is what keeps it there over PVT. Outside the lock
// range the ring runs free at its own period, unrelated to f_REF, and locked is low; with iref = 0
// it stops with all phases low. The linear bias law and the +-2 % lock range are model choices.
//
// Model when locked: on each rising edge of f_inj it steps
// through the sixteen positions p of one period T = T_FS femtoseconds (the injected period),
// T/16 apart, starting at position REF_PHASE; each f_inj edge re-aligns the phases, which is the
// model's form of injection locking. At position p, filo[j] is high when (p - j) mod 16 < 8, so
// filo[0] rises at p = 0, filo[k] rises k/16 of a period later and filo[k+8] = ~filo[k]. The
// whole sequence is shifted late by MISMATCH_FS - (tune - 16) * TUNE_STEP_FS, clamped to
// [0, T/16): MISMATCH_FS stands for the oscillator's static phase error and the trim removes it.
// REF_PHASE = 12 places the f_REF rising edge (where the coarse count cnt0 changes) four fine
// steps before filo[0] rises, and the falling edge (cnt1) four steps after, which is the
// alignment the TDC's double-counter scheme relies on.
`timescale 1fs/1fs
module ilo_model #(
  parameter int unsigned NPH          = lidar_pkg::N_PHASE,
  parameter int unsigned REF_PHASE    = 12,
  parameter int unsigned T_FS         = 833333,   // 1.2 GHz
  parameter int          MISMATCH_FS  = 0,
  parameter int          TUNE_STEP_FS = 1000,
  parameter int          PVT_PM       = 0,        // ring speed error at nominal bias, 1/1000
  parameter int          LOCK_RANGE_PM = 20       // lock range, 1/1000 of f_REF
) (
  input  logic                               f_inj,    // injected f_REF
  input  logic [lidar_pkg::IREF_W-1:0]       iref,     // bias current I_ref, 1/1000 of nominal
  input  logic [lidar_pkg::TUNE_W-1:0]       tune,     // fine current trim, 16 = mid-scale
  output logic [NPH-1:0]                     filo,
  output logic                               locked
);

  localparam int STEP_FS = int'(T_FS / NPH);

  function automatic logic [NPH-1:0] pattern(int unsigned p);
    logic [NPH-1:0] v;
    for (int unsigned j = 0; j < NPH; j++) v[j] = (((p + NPH - j) % NPH) < NPH / 2);
    return v;
  endfunction

  // free-running frequency error, 1/1000: (iref / IREF_NOM) * (1 + PVT_PM/1000) - 1
  int   dev_pm;
  logic in_range, free_run;
  logic [NPH-1:0] filo_lk, filo_fr;
  assign dev_pm   = (int'(iref) * (1000 + PVT_PM)) / int'(lidar_pkg::IREF_NOM) - 1000;
  assign in_range = (iref != '0) && (dev_pm <= LOCK_RANGE_PM) && (dev_pm >= -LOCK_RANGE_PM);
  assign free_run = (iref != '0) && !in_range;
  assign filo     = in_range ? filo_lk : filo_fr;

  initial begin
    filo_lk = '0;
    filo_fr = '0;
    locked  = 1'b0;
  end

  // injection-locked phases
  always @(posedge f_inj) begin
    int skew;
    if (!in_range) begin
      filo_lk = '0;
      locked  = 1'b0;
    end else begin
      locked = 1'b1;
      skew = MISMATCH_FS - (int'(tune) - 16) * TUNE_STEP_FS;
      if (skew < 0) skew = 0;
      if (skew > STEP_FS - 1) skew = STEP_FS - 1;
      if (skew > 0) #(skew);
      for (int unsigned i = 0; i < NPH; i++) begin
        filo_lk = pattern((REF_PHASE + i) % NPH);
        if (i < NPH - 1) #(STEP_FS);
      end
    end
  end

  // free-running phases: period T_FS * 1000 / (1000 + dev_pm), no relation to f_inj
  always begin
    if (free_run) begin
      for (int unsigned i = 0; i < NPH; i++) begin
        filo_fr = pattern(i);
        #((longint'(T_FS) * 64'sd1000) / ((64'sd1000 + longint'(dev_pm)) * longint'(NPH)));
      end
    end else begin
      filo_fr = '0;
      @(free_run);
    end
  end

endmodule
