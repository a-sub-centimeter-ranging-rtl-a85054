// tb_tdc_column: checks one TDC column against the double-counter timing. For an event at fine
// position p (0..15) of oscillator period n, the global counts are what the counter shows at
// that moment: cnt0 = gray(n) for p < 12 and gray(n+1) from p = 12 (it changes at position 12),
// cnt1 = gray(n-1) for p < 4 and gray(n) from p = 4. The ILO phases are the ideal vector of
// position p. Whatever p, the column must record {gray(n), p}, and after data_latch the L2
// register must hold it; a second event before the next data_latch must not disturb L2.
`timescale 1ps/1fs
module tb_tdc_column;
  logic stop = 1'b0, data_latch = 1'b0;
  logic [9:0] cnt0, cnt1;
  logic [15:0] filo;
  logic [13:0] tdc_raw, tdc_out;
  logic edge_ok;
  int checks = 0, failures = 0;
  int sel0 = 0, sel1 = 0;

  tdc_column dut (.stop(stop), .cnt0(cnt0), .cnt1(cnt1), .filo(filo), .data_latch(data_latch),
                  .tdc_raw(tdc_raw), .tdc_out(tdc_out), .edge_ok(edge_ok));

  function automatic logic [9:0] gray(int n);
    logic [9:0] b = 10'(n);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [15:0] pattern(int p);
    logic [15:0] v;
    for (int j = 0; j < 16; j++) v[j] = (((p - j + 16) % 16) < 8);
    return v;
  endfunction

  initial begin : watchdog
    #(50_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 600; it++) begin
      int n, p;
      logic [13:0] exp;
      n = $urandom_range(0, 2047);
      p = (it < 16) ? it : $urandom_range(0, 15);
      cnt0 = (p < 12) ? gray(n) : gray(n + 1);
      cnt1 = (p < 4)  ? gray(n - 1) : gray(n);
      filo = pattern(p);
      exp  = {gray(n), 4'(p)};
      if (p < 8) sel0++; else sel1++;
      #20 stop = 1'b1;
      #20 stop = 1'b0;
      #5;
      checks++;
      if (tdc_raw !== exp || !edge_ok) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d p=%0d raw=%h exp=%h", n, p, tdc_raw, exp);
      end
      #10 data_latch = 1'b1;
      #10 data_latch = 1'b0;
      checks++;
      if (tdc_out !== exp) begin failures++; if (failures < 10) $display("FAIL L2 %h exp %h", tdc_out, exp); end
      // another event without data_latch: L2 keeps the value
      cnt0 = ~cnt0; cnt1 = ~cnt1; filo = pattern((p + 5) % 16);
      #10 stop = 1'b1;
      #10 stop = 1'b0;
      #5;
      checks++;
      if (tdc_out !== exp) begin failures++; if (failures < 10) $display("FAIL L2 disturbed"); end
    end
    checks++;
    if (sel0 == 0 || sel1 == 0) begin failures++; $display("FAIL both coarse registers not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
