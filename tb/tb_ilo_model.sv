// tb_ilo_model: injects an 832 ps reference and checks the ILO model's phases once locked:
// filo[k] rises k * 52 ps after filo[0], filo[k+8] is the complement of filo[k], the period is
// the injected one, filo[0] rises four phase steps (208 ps) after the reference edge, and the
// trim input shifts the phases late by one TUNE_STEP per code below 16 when a mismatch is set.
// With no bias the phases stop. A second ring at a fast PVT corner (PVT_PM = 80, 8 % fast at
// nominal bias) checks the lock range: at nominal bias it is out of range, runs free with a
// period of 832 * 1000 / 1080 = 770.4 ps and reports no lock; at the calibrated bias 926 it locks
// and its phases again follow the injected period.
`timescale 1ps/1fs
module tb_ilo_model;
  logic f = 1'b0, bias = 1'b0;
  logic [11:0] iref_c = 12'd1000;
  logic [15:0] filo_c;
  logic locked_c;
  logic [4:0] tune = 5'd16;
  logic [15:0] filo;
  logic locked;
  int checks = 0, failures = 0;
  realtime t_ref, t_rise[16];

  ilo_model #(.NPH(16), .REF_PHASE(12), .T_FS(832000), .MISMATCH_FS(0), .TUNE_STEP_FS(1000))
    dut (.f_inj(f), .iref(bias ? 12'd1000 : 12'd0), .tune(tune), .filo(filo), .locked(locked));

  ilo_model #(.T_FS(832000), .PVT_PM(80))
    dut_c (.f_inj(f), .iref(iref_c), .tune(5'd16), .filo(filo_c), .locked(locked_c));

  always #416 f = ~f;
  always @(posedge f) t_ref = $realtime;
  for (genvar k = 0; k < 16; k++) begin : g_mon
    always @(posedge filo[k]) t_rise[k] = $realtime;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime r0;
    repeat (3) @(posedge f);
    chk(filo == 16'h0 && !locked, "no oscillation without bias");
    bias = 1'b1;
    repeat (5) @(posedge f);
    chk(locked, "locked with bias");
    r0 = $realtime;
    @(posedge filo[0]);
    chk(($realtime - r0) > 207.9 && ($realtime - r0) < 208.1, $sformatf("filo[0] 208 ps after ref, got %0f", $realtime - r0));
    @(posedge filo[7]); #1;
    for (int k = 1; k < 8; k++)
      chk((t_rise[k] - t_rise[0]) > 52.0 * k - 0.1 && (t_rise[k] - t_rise[0]) < 52.0 * k + 0.1,
          $sformatf("phase %0d spacing", k));
    for (int s = 0; s < 20; s++) begin
      #37;
      for (int k = 0; k < 8; k++) chk(filo[k+8] == ~filo[k], "complementary pair");
    end
    begin
      realtime a;
      @(posedge filo[0]); a = $realtime;
      @(posedge filo[0]);
      chk(($realtime - a) > 831.9 && ($realtime - a) < 832.1, "period follows injection");
    end
    // trim: with mismatch 0, tune 16 - 10 = 6 codes low shifts phases 10 ps late
    tune = 5'd6;
    @(posedge f); r0 = $realtime;
    @(posedge filo[0]);
    chk(($realtime - r0) > 217.9 && ($realtime - r0) < 218.1, $sformatf("trim shifts phase, got %0f", $realtime - r0));
    bias = 1'b0;
    repeat (2) @(posedge f);
    #500;
    chk(filo == 16'h0 && !locked, "stops when bias removed");
    // PVT corner: uncalibrated bias is out of the lock range
    begin
      realtime a, b;
      chk(!locked_c, "fast corner at nominal bias does not lock");
      @(posedge filo_c[0]); a = $realtime;
      repeat (10) @(posedge filo_c[0]); b = $realtime;
      chk((b - a) / 10 > 769.9 && (b - a) / 10 < 771.0, $sformatf("free-running period, got %0f", (b - a) / 10));
      iref_c = 12'd926;
      repeat (3) @(posedge f);
      chk(locked_c, "calibrated bias locks");
      @(posedge filo_c[0]); a = $realtime;
      @(posedge filo_c[0]);
      chk(($realtime - a) > 831.9 && ($realtime - a) < 832.1, "locked period follows injection");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
