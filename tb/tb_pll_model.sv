// tb_pll_model: feeds a 53.248 ns reference (64 x 832 ps) and checks that the PLL model stays
// unlocked for its first reference cycles, then locks and produces f_ref with an 832 ps period
// (64 rising edges per reference period), its rising edges 130 ps after each reference edge.
// The model runs at a fast PVT corner (PVT_PM = 80, rings 8 % fast at nominal bias): the bias
// currents must be zero when disabled, nominal (1000) while acquiring, and at lock all nine must
// equal round(1000 * 1000 / 1080) = 926, the bias that brings a ring back to f_REF.
`timescale 1ps/1fs
module tb_pll_model;
  logic ref_clk = 1'b0, en = 1'b0;
  logic f_ref, lock;
  logic [8:0][11:0] iref;
  int checks = 0, failures = 0;
  int nedge = 0;

  pll_model #(.MULT(64), .LOCK_CYC(4), .T_FS(832000), .OFFSET_FS(130000), .PVT_PM(80))
    dut (.ref_clk(ref_clk), .en(en), .f_ref(f_ref), .lock(lock), .iref(iref));

  always #26624 ref_clk = ~ref_clk;
  always @(posedge f_ref) nedge++;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(20_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime tr, a;
    repeat (2) @(posedge ref_clk);
    chk(!lock && iref == '0, "off when disabled");
    en = 1'b1;
    repeat (3) @(posedge ref_clk);
    #1 chk(!lock, "not locked during acquisition");
    chk(iref == {9{12'd1000}}, "nominal bias while acquiring");
    repeat (4) @(posedge ref_clk);
    #1 chk(lock, "locked");
    chk(iref == {9{12'd926}}, $sformatf("calibrated bias, got %0d", iref[0]));
    @(posedge ref_clk); tr = $realtime;
    nedge = 0;
    @(posedge f_ref); a = $realtime;
    chk((a - tr) > 129.9 && (a - tr) < 130.1, "static offset");
    @(posedge f_ref);
    chk(($realtime - a) > 831.9 && ($realtime - a) < 832.1, "f_ref period 832 ps");
    @(posedge ref_clk); #200;
    chk(nedge == 65, $sformatf("64 cycles per reference, got %0d", nedge - 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
