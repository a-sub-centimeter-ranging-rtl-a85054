// tb_lidar_soc: end-to-end test of the LIDAR receiver at its full size and default parameters
// (31 pixel columns, 32 TDC columns, 14-bit codes, 1.2 GHz from an 18.75 MHz reference).
//
// Every other 375 kHz frame it injects events, then collects that frame's 32 readout words and
// checks each event column's time of flight, (code[c] - code[0]) mod 2^14, against the delay
// it applied, in 52.083 ps steps. Events are placed half a step off the phase grid so the
// expected code is exact. Frames cover, in order:
//   APD     row-1 photocurrent pulses on the eight APD columns (3, 7, ..., 31)
//   PDEM    row-2 photodiode-emulator pulses
//   SUBTH   a pulse below the receiver threshold must leave no event (col_hit low)
//   MULTI   two photons in one column: the later one is recorded
//   OVF     the same with first-event-only mode: the first one is recorded
//   EXTSTOP external START at a random phase and one external STOP into all 31 columns:
//           every column must give the same code (the channel-uniformity set-up)
// It also counts coarse-counter wraps between START and STOP, selections of each of the two
// coarse registers (fine MSB 0 and 1), and readout words delivered while the next frame's
// START is already converting (pipelined readout). Before any frame it checks the PVT
// calibration: the top's default corner makes the ILO rings 5 % fast at nominal bias, so they
// must be unlocked while the PLL acquires and locked once it has scaled their bias down. Each
// mechanism must occur at least once. It also checks the frame rate: the laser trigger must repeat
// every 50 cycles of 18.75 MHz (375 kHz) and each frame's readout must deliver 32 words.
`timescale 1ps/1fs
module tb_lidar_soc;
  import lidar_pkg::*;

  localparam real TSYS = 53333.333;          // 18.75 MHz
  localparam real LSB  = 833.333 / 16.0;     // 52.083 ps
  localparam real PLL_OFS = 130.0;           // PLL static offset of f_REF after sys_clk
  localparam real RX_DLY  = 300.0;           // receiver model delay

  logic sys_clk = 1'b0, rst_n = 1'b0, pll_en = 1'b0;
  logic scan_clk = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_upd = 1'b0;
  logic scan_out;
  logic [N_PIX_COL-1:0][IPH_W-1:0] row1_iph = '0;
  logic [N_PIX_COL-1:0] pdem_trig = '0;
  logic ext_start_in = 1'b0, ext_stop_in = 1'b0;
  logic laser_trig;
  logic [TDC_W-1:0] dout;
  logic [COL_IDX_W-1:0] dout_col;
  logic dout_valid;
  logic [N_PIX_COL-1:0] col_hit;
  logic pll_lock;
  logic [N_ILO-1:0] ilo_locked;

  lidar_soc dut (.*);

  always #(TSYS / 2.0) sys_clk = ~sys_clk;
  always #50000 scan_clk = ~scan_clk;

  int checks = 0, failures = 0;
  int n_apd = 0, n_pdem = 0, n_subth = 0, n_multi = 0, n_ovf = 0, n_extstop = 0;
  int n_wrap = 0, n_sel0 = 0, n_sel1 = 0, n_pipe = 0, n_cal = 0;

  // ---------------- frame rate: 375 kHz laser trigger, 32 words per frame ----------------
  realtime t_laser = 0.0;
  int n_period = 0, bad_period = 0, n_words = 0, n_frames_rd = 0, bad_words = 0;
  always @(posedge laser_trig) begin
    if (t_laser > 0.0) begin
      n_period++;
      if ($realtime - t_laser < 50.0 * TSYS - 1.0 || $realtime - t_laser > 50.0 * TSYS + 1.0) bad_period++;
    end
    t_laser = $realtime;
  end
  always @(posedge sys_clk) if (rst_n && dout_valid) begin
    n_words++;
    if (dout_col == COL_IDX_W'(N_COL - 1)) begin
      n_frames_rd++;
      if (n_words != int'(N_COL)) begin bad_words++; $display("frame readout at %0t: %0d words", $time, n_words); end
      n_words = 0;
    end
  end

  // ---------------- readout collector ----------------
  logic [TDC_W-1:0] words [N_COL];
  event frame_done;
  always @(posedge sys_clk) if (dout_valid) begin
    words[dout_col] = dout;
    if (laser_trig) n_pipe++;
    if (dout_col == COL_IDX_W'(N_COL - 1)) ->frame_done;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s (t=%0t)", what, $realtime); end
  endtask

  // ---------------- scan chain ----------------
  task automatic scan_write(input cfg_t c);
    logic [CFG_W-1:0] w;
    w = c;
    for (int i = CFG_W - 1; i >= 0; i--) begin
      @(negedge scan_clk); scan_en = 1'b1; scan_in = w[i];
    end
    @(negedge scan_clk); scan_en = 1'b0; scan_upd = 1'b1;
    @(negedge scan_clk); scan_upd = 1'b0;
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic photon(input int col, input real at, input int amp_na);
    fork
      begin
        #(at - $realtime);
        row1_iph[col] = IPH_W'(amp_na);
        #2000 row1_iph[col] = '0;
      end
    join_none
  endtask

  task automatic pdem_fire(input int col, input real at);
    fork
      begin
        #(at - $realtime);
        pdem_trig[col] = 1'b1;
        #1000 pdem_trig[col] = 1'b0;
      end
    join_none
  endtask

  function automatic logic [TDC_W-1:0] tof(int col);  // col 1..31
    return words[col] - words[0];
  endfunction

  task automatic count_codes(input int col);
    if (words[col] < words[0]) n_wrap++;
    if (words[col][FTDC_W-1]) n_sel1++; else n_sel0++;
  endtask

  initial begin : watchdog
    #(64'd200_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_t cfg;
    real  ts;
    int   n[N_PIX_COL];
    cfg = CFG_DEFAULT;
    #1000 pll_en = 1'b1;
    // PVT calibration: at the top's default corner the rings are 5 % fast at nominal bias, out
    // of the ILOs' lock range, until the PLL has locked and scaled the bias to 1000/1.05
    #(2 * TSYS);
    chk(!pll_lock && ilo_locked == '0, "ILOs unlocked at nominal bias before calibration");
    #(8 * TSYS);
    chk(pll_lock, "PLL locked");
    chk(ilo_locked == '1, "all ILOs locked");
    chk(dut.iref[1] == 12'd952, $sformatf("calibrated ILO bias 952, got %0d", dut.iref[1]));
    if (ilo_locked == '1) n_cal++;
    @(negedge sys_clk) rst_n = 1'b1;
    scan_write(cfg);

    for (int fr = 0; fr < 6; fr++) begin
      // skip one frame, so each test frame's readout has ended before its START
      @(posedge laser_trig);
      @(posedge laser_trig);
      ts = $realtime;
      if (fr == 5) begin
        // EXTSTOP: random START phase
        int m, k;
        real ta;
        m  = $urandom_range(40, 120);
        k  = $urandom_range(100, 15000);
        ta = ts + PLL_OFS + (m + 0.5) * LSB;
        fork
          begin #(ta - $realtime); ext_start_in = 1'b1; #3000 ext_start_in = 1'b0; end
          begin #(ta + k * LSB - $realtime); ext_stop_in = 1'b1; #3000 ext_stop_in = 1'b0; end
        join_none
        for (int c = 0; c < N_PIX_COL; c++) n[c] = k;
      end else begin
        for (int c = 0; c < N_PIX_COL; c++) n[c] = $urandom_range(200, 16000);
        case (fr)
          0: for (int a = 0; a < 8; a++) photon(4 * a + 2, ts + n[4 * a + 2] * LSB - RX_DLY, 30000);
          1: for (int c = 0; c < N_PIX_COL; c += 3) pdem_fire(c, ts + n[c] * LSB - RX_DLY);
          2: begin
               photon(10, ts + n[10] * LSB - RX_DLY, 14000);           // below threshold
               photon(2, ts + n[2] * LSB - RX_DLY, 16000);             // just above
             end
          3, 4: begin
               n[6] = $urandom_range(200, 7000);
               n[7] = n[6] + $urandom_range(400, 8000);                 // second photon, same column
               photon(6, ts + n[6] * LSB - RX_DLY, 30000);
               photon(6, ts + n[7] * LSB - RX_DLY, 30000);
             end
          default: ;
        endcase
      end
      // check the event flags late in the conversion window
      repeat (16) @(posedge sys_clk);
      if (fr == 2) begin
        chk(!col_hit[10], "sub-threshold pulse left no event");
        chk(col_hit[2], "pulse above threshold registered");
        if (!col_hit[10] && col_hit[2]) n_subth++;
      end
      if (fr == 0) for (int c = 0; c < N_PIX_COL; c++) chk(col_hit[c] == (c % 4 == 2), "APD columns only");
      @frame_done;
      case (fr)
        0: for (int a = 0; a < 8; a++) begin
             int c;
             c = 4 * a + 2;
             chk(tof(c + 1) == TDC_W'(n[c]), $sformatf("APD col %0d got %0d exp %0d", c + 1, tof(c + 1), n[c]));
             count_codes(c + 1); n_apd++;
           end
        1: for (int c = 0; c < N_PIX_COL; c += 3) begin
             chk(tof(c + 1) == TDC_W'(n[c]), $sformatf("PDEM col %0d got %0d exp %0d", c + 1, tof(c + 1), n[c]));
             count_codes(c + 1); n_pdem++;
           end
        2: chk(tof(3) == TDC_W'(n[2]), "above-threshold event time");
        3: begin
             chk(tof(7) == TDC_W'(n[7]), $sformatf("later photon recorded, got %0d exp %0d", tof(7), n[7]));
             n_multi++;
           end
        4: begin
             chk(tof(7) == TDC_W'(n[6]), $sformatf("first photon kept, got %0d exp %0d", tof(7), n[6]));
             n_ovf++;
           end
        5: begin
             for (int c = 1; c < N_COL; c++) begin
               chk(tof(c) == TDC_W'(n[0]), $sformatf("ext STOP col %0d got %0d exp %0d", c, tof(c), n[0]));
               count_codes(c);
             end
             n_extstop++;
           end
        default: ;
      endcase
      // configuration for the next test frame
      if (fr == 3) begin cfg.ovf_mode = 1'b1; scan_write(cfg); end
      if (fr == 4) begin cfg.ovf_mode = 1'b0; cfg.ext_start = 1'b1; cfg.ext_stop = 1'b1; scan_write(cfg); end
    end

    $display("mechanisms: apd=%0d pdem=%0d subthreshold=%0d multi=%0d first_only=%0d ext_stop=%0d",
             n_apd, n_pdem, n_subth, n_multi, n_ovf, n_extstop);
    $display("mechanisms: coarse_wrap=%0d cnt0_sel=%0d cnt1_sel=%0d pipelined_readout=%0d pvt_calibration=%0d",
             n_wrap, n_sel0, n_sel1, n_pipe, n_cal);
    chk(n_cal > 0, "PVT calibration brought the ILOs into lock");
    chk(n_period > 0 && bad_period == 0, $sformatf("laser trigger every 50 cycles (375 kHz): %0d of %0d periods wrong", bad_period, n_period));
    chk(n_frames_rd > 0 && bad_words == 0, $sformatf("32 words per frame readout: %0d of %0d frames wrong", bad_words, n_frames_rd));
    chk(n_apd > 0, "APD path exercised");
    chk(n_pdem > 0, "PDEM path exercised");
    chk(n_subth > 0, "sub-threshold rejection exercised");
    chk(n_multi > 0, "multiple events exercised");
    chk(n_ovf > 0, "first-event-only mode exercised");
    chk(n_extstop > 0, "external START/STOP mode exercised");
    chk(n_wrap > 0, "coarse counter wrap exercised");
    chk(n_sel0 > 0 && n_sel1 > 0, "both coarse registers selected");
    chk(n_pipe > 0, "readout overlapped the next conversion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
