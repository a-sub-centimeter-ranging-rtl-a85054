// tb_tdc_workloads: runs the characterisation workloads of the sensor on the 32-column TDC core with
// eight ILO models. It uses an 832 ps f_REF, so the 52 ps fine step lies on the 1 ps grid; every
// interval below is therefore measured in 52 ps codes instead of 52.08 ps.
//
// Part 1, single-shot precision and channel uniformity. One STOP edge drives all 31 STOP columns,
// as an external test input fanned out over a clock tree would. START is at a random phase of
// f_REF. Each of the three time inputs (151 ns, 502 ns, 703 ns) is fired NSHOT times. For every
// shot and column the code difference must equal the ideal two-sided quantisation
// floor((u+T)/LSB) - floor(u/LSB), where u is START's offset from the f_REF edge. Phases closer
// than 2 ps to a code boundary are not used, since there the model's result is a tie. Per time
// input it also checks:
//   - the spread over shots is at most one code;
//   - the rms deviation per column is at most LSB/2 (the quantisation limit);
//   - the mean over shots is within LSB/2 of T;
//   - the rms spread of the 31 column means is below 0.15 LSB.
//
// Part 2, linearity ramp. The time input steps by 71 ps from 0 to 830 ns. The sensor's ramp steps
// by 71.1 ps, the difference of two frame periods 10 Hz apart; this testbench rounds it to the
// 1 ps grid. The 31 columns take successive ramp points in one conversion. A sample whose STOP edge
// is clear of a code boundary is checked exactly as above; one within 2 ps of a boundary may
// resolve either way and must be within one code of the ideal. The largest error against T/LSB
// (the integral nonlinearity of this ideal model) is reported and must be below 1 LSB. The
// exactly checked codes of the ramp must not decrease as T grows.
//
// Timing: one conversion is START, the STOPs, DATA_LATCH, then a 32-word readout through the
// column multiplexer at 100 ps per word. The watchdog ends the run after 1 ms of simulated time.
`timescale 1ps/1fs
module tb_tdc_workloads;
  import lidar_pkg::*;
  localparam int T = 832, LSB = 52, NSHOT = 24, RAMP_STEP = 71, RAMP_END = 830_000, MARGIN = 2;
  logic f_ref = 1'b0, rst_n = 1'b0;
  logic [N_ILO-1:0][N_PHASE-1:0] filo;
  logic start = 1'b0, data_latch = 1'b0;
  logic [N_PIX_COL-1:0] stop = '0;
  logic [COL_IDX_W-1:0] rd_sel = '0;
  logic [TDC_W-1:0] rd_word;
  logic [N_COL-1:0] edge_ok;
  logic [CTDC_W-1:0] cnt0, cnt1;
  logic [N_ILO-1:0] locked;
  int checks = 0, failures = 0;

  tdc_core dut (.f_ref(f_ref), .rst_n(rst_n), .filo(filo), .start(start), .stop(stop),
                .data_latch(data_latch), .rd_sel(rd_sel), .rd_word(rd_word), .edge_ok(edge_ok),
                .cnt0(cnt0), .cnt1(cnt1));

  for (genvar i = 0; i < N_ILO; i++) begin : g_ilo
    ilo_model #(.T_FS(T * 1000)) u_ilo (.f_inj(f_ref), .iref(12'd1000), .tune(5'd16),
                                       .filo(filo[i]), .locked(locked[i]));
  end

  always #(T / 2) f_ref = ~f_ref;

  function automatic logic [CTDC_W-1:0] g2b(logic [CTDC_W-1:0] g);
    logic [CTDC_W-1:0] b;
    b[CTDC_W-1] = g[CTDC_W-1];
    for (int i = CTDC_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  function automatic bit clear_of_boundary(int t);
    return (t % LSB >= MARGIN) && (t % LSB <= LSB - MARGIN);
  endfunction

  // A START offset u (ps after an f_REF rising edge) whose START and STOP edges are both clear of
  // a code boundary for every interval in dl[0..n-1].
  function automatic int pick_offset(int dl[N_PIX_COL], int n);
    int u;
    bit ok;
    do begin
      u  = $urandom_range(0, T - 1);
      ok = clear_of_boundary(u);
      for (int c = 0; c < n; c++) ok &= clear_of_boundary(u + dl[c]);
    end while (!ok);
    return u;
  endfunction

  // One conversion: START at offset u after an f_REF edge, STOP column c after dl[c] ps, then
  // latch and read all columns; diff[c] = (code[c+1] - code[0]) mod 2^14.
  task automatic convert(input int u, input int dl[N_PIX_COL], output int diff[N_PIX_COL]);
    int maxd = 0;
    logic [TDC_W-1:0] code[N_COL];
    for (int c = 0; c < N_PIX_COL; c++) if (dl[c] > maxd) maxd = dl[c];
    @(posedge f_ref);
    #(u);
    start = 1'b1;
    for (int c = 0; c < N_PIX_COL; c++) begin
      automatic int cc = c;
      fork
        begin
          #(dl[cc]);
          stop[cc] = 1'b1;
          #2000 stop[cc] = 1'b0;
        end
      join_none
    end
    #(maxd + 3000);
    start = 1'b0;
    #1000 data_latch = 1'b1;
    #1000 data_latch = 1'b0;
    for (int c = 0; c < N_COL; c++) begin
      rd_sel = COL_IDX_W'(c);
      #100;
      code[c] = {g2b(rd_word[TDC_W-1:FTDC_W]), rd_word[FTDC_W-1:0]};
    end
    for (int c = 0; c < N_PIX_COL; c++) diff[c] = int'(TDC_W'(code[c+1] - code[0]));
    checks++;
    if (edge_ok != '1) begin
      failures++;
      $display("FAIL fine edge missing in a column: %b", edge_ok);
    end
  endtask

  function automatic int ideal(int u, int t);
    return (u + t) / LSB - u / LSB;
  endfunction

  initial begin : watchdog
    #(64'd1_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tin[3] = '{151_000, 502_000, 703_000};
    #(10 * T) rst_n = 1'b1;
    repeat (8) @(posedge f_ref);

    // ---------------- part 1: single-shot precision and channel uniformity ----------------
    foreach (tin[k]) begin
      real sum[N_PIX_COL], sum2[N_PIX_COL], cmean[N_PIX_COL];
      int  mn[N_PIX_COL], mx[N_PIX_COL];
      real worst_rms, colmean_sum, colmean_sum2, uni_rms, gmean;
      int dl[N_PIX_COL], diff[N_PIX_COL], u;
      worst_rms = 0.0; colmean_sum = 0.0; colmean_sum2 = 0.0;
      for (int c = 0; c < N_PIX_COL; c++) begin
        dl[c] = tin[k]; sum[c] = 0.0; sum2[c] = 0.0; mn[c] = 1 << 20; mx[c] = -1;
      end
      for (int s = 0; s < NSHOT; s++) begin
        u = pick_offset(dl, 1);
        convert(u, dl, diff);
        for (int c = 0; c < N_PIX_COL; c++) begin
          checks++;
          if (diff[c] != ideal(u, tin[k])) begin
            failures++;
            if (failures < 10) $display("FAIL T=%0d ps col %0d u=%0d got %0d exp %0d",
                                        tin[k], c + 1, u, diff[c], ideal(u, tin[k]));
          end
          sum[c]  += real'(diff[c] * LSB);
          sum2[c] += real'(diff[c] * LSB) ** 2;
          if (diff[c] < mn[c]) mn[c] = diff[c];
          if (diff[c] > mx[c]) mx[c] = diff[c];
        end
      end
      for (int c = 0; c < N_PIX_COL; c++) begin
        real m, rms;
        m   = sum[c] / NSHOT;
        rms = sum2[c] / NSHOT - m * m;
        rms = (rms > 0.0) ? $sqrt(rms) : 0.0;
        if (rms > worst_rms) worst_rms = rms;
        cmean[c]     = m;
        colmean_sum += m;
        checks++;
        if (mx[c] - mn[c] > 1) begin failures++; $display("FAIL T=%0d col %0d spread %0d codes", tin[k], c + 1, mx[c] - mn[c]); end
        checks++;
        if (rms > LSB / 2.0) begin failures++; $display("FAIL T=%0d col %0d rms %0.2f ps", tin[k], c + 1, rms); end
        checks++;
        if ((m - tin[k]) > LSB / 2.0 || (tin[k] - m) > LSB / 2.0) begin
          failures++; $display("FAIL T=%0d col %0d mean %0.1f ps", tin[k], c + 1, m);
        end
      end
      gmean = colmean_sum / N_PIX_COL;
      for (int c = 0; c < N_PIX_COL; c++) colmean_sum2 += (cmean[c] - gmean) ** 2;
      uni_rms = $sqrt(colmean_sum2 / N_PIX_COL);
      checks++;
      if (uni_rms > 0.15 * LSB) begin failures++; $display("FAIL T=%0d uniformity rms %0.2f ps", tin[k], uni_rms); end
      $display("time input %0d ps: %0d shots, worst single-shot rms %0.2f ps, mean %0.1f ps, uniformity rms %0.2f ps",
               tin[k], NSHOT, worst_rms, gmean, uni_rms);
    end

    // ---------------- part 2: linearity ramp ----------------
    begin
      int n = 0, nexact = 0, npts = RAMP_END / RAMP_STEP + 1, prev = -1, nconv = 0;
      real max_err = 0.0;
      while (n < npts) begin
        int dl[N_PIX_COL], diff[N_PIX_COL], u, nn;
        nn = (npts - n < N_PIX_COL) ? npts - n : N_PIX_COL;
        for (int c = 0; c < N_PIX_COL; c++) dl[c] = (n + ((c < nn) ? c : 0)) * RAMP_STEP;
        u = pick_offset(dl, 0);
        convert(u, dl, diff);
        nconv++;
        for (int c = 0; c < nn; c++) begin
          real err;
          checks++;
          if (clear_of_boundary(u + dl[c])) begin
            nexact++;
            if (diff[c] != ideal(u, dl[c])) begin
              failures++;
              if (failures < 10) $display("FAIL ramp t=%0d ps u=%0d got %0d exp %0d", dl[c], u, diff[c], ideal(u, dl[c]));
            end
          end else if (diff[c] < ideal(u, dl[c]) - 1 || diff[c] > ideal(u, dl[c]) + 1) begin
            failures++;
            if (failures < 10) $display("FAIL ramp t=%0d ps u=%0d got %0d exp %0d+-1", dl[c], u, diff[c], ideal(u, dl[c]));
          end
          err = real'(diff[c]) - real'(dl[c]) / LSB;
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          if (clear_of_boundary(u + dl[c])) begin
            checks++;
            if (diff[c] < prev) begin failures++; $display("FAIL ramp not monotonic at t=%0d ps", dl[c]); end
            prev = diff[c];
          end
        end
        n += nn;
      end
      checks++;
      if (max_err >= 1.0) begin failures++; $display("FAIL ramp error %0.3f LSB", max_err); end
      $display("ramp: %0d points of %0d ps up to %0d ps in %0d conversions (%0d checked exactly), largest error %0.3f LSB, last code %0d",
               npts, RAMP_STEP, RAMP_END, nconv, nexact, max_err, prev);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
