// lidar_soc: top level of the pulsed-LIDAR receiver built around an injection-locked-oscillator
// TDC (ILO-TDC). It measures, for each of 31 pixel columns, the time from the laser shot (START)
// to the returning photon (STOP) with 52 ps resolution over 853 ns, i.e. 0.78 cm steps over
// 124 m of range, at one conversion per 375 kHz frame.
//
// Signal flow:
//   sys_clk (18.75 MHz) -> PLL (x64) -> f_REF 1.2 GHz -> global Gray counter (cnt0/cnt1)
//                                                   \-> injected into eight ILOs (16 phases each)
//   APD / PDEM current -> receivers (31 x 2) -> shared bit lines -> BL buffers -> STOP[1..31]
//   TCON START (or the external test START) -> column 0
//   each column: STOP samples cnt0, cnt1 and its ILO's phases -> 14-bit code -> L2 on data_latch
//   TCON readout: column mux -> Gray-to-binary -> dout, one column per sys_clk cycle
// The time of flight of column c is (code[c] - code[0]) mod 2^14 LSBs; subtracting the START code
// removes the random offset of START against f_REF (the sliding-scale effect) and is left to the
// receiver of dout.
//
// Test modes (scan chain, lidar_pkg::cfg_t): ext_start takes START from the pin ext_start_in;
// ext_stop drives all 31 STOP columns from the pin ext_stop_in (the channel-uniformity set-up);
// ovf_mode lets each BL buffer pass only its first event per frame.
//
// PVT calibration: the PLL sets the bias of its own ring so that it runs at f_REF and copies that
// bias to the eight ILO rings, which suffer the same PVT error (parameter PVT_PM, a simulation
// knob standing for the chip's corner); this keeps every ILO inside its lock range. Its default,
// rings 5 % fast, is outside the ILOs' +-2 % lock range, so the calibration is needed at the
// default settings.
//
// Analog parts (PLL, ILOs, receivers, photodiode emulators, the BL buffers' delay cell) are
// behavioural models, so this top is for simulation; tdc_core, tcon, scan_chain and gray2bin
// are synthesizable. Outputs: dout is registered on sys_clk, valid when dout_valid is high, with
// dout_col naming its column; a frame's words appear two cycles after its data_latch.
`timescale 1ps/1fs
module lidar_soc
  import lidar_pkg::*;
#(
  parameter int PVT_PM = 50  // simulated PVT corner: ring speed error at nominal bias, 1/1000
) (
  input  logic                            sys_clk,       // 18.75 MHz, PLL reference and readout clock
  input  logic                            rst_n,
  input  logic                            pll_en,
  // scan chain
  input  logic                            scan_clk,
  input  logic                            scan_en,
  input  logic                            scan_in,
  input  logic                            scan_upd,
  output logic                            scan_out,
  // optical / test inputs
  input  logic [N_PIX_COL-1:0][IPH_W-1:0] row1_iph,      // APD photocurrents, nA
  input  logic [N_PIX_COL-1:0]            pdem_trig,     // row-2 photodiode-emulator triggers
  input  logic                            ext_start_in,
  input  logic                            ext_stop_in,
  // outputs
  output logic                            laser_trig,    // fires the laser (= TCON START)
  output logic [TDC_W-1:0]                dout,          // {binary coarse, fine}
  output logic [COL_IDX_W-1:0]            dout_col,
  output logic                            dout_valid,
  output logic [N_PIX_COL-1:0]            col_hit,       // BL buffer saw an event this frame
  output logic                            pll_lock,
  output logic [N_ILO-1:0]                ilo_locked
);

  cfg_t                            cfg;
  logic                            f_ref;
  logic [8:0][IREF_W-1:0]          iref;
  logic [N_ILO-1:0][N_PHASE-1:0]   filo;
  logic [N_PIX_COL-1:0]            bl, stop_pix, stop;
  logic                            bl_rst, tcon_start, start, data_latch, rd_valid, frame_start;
  logic [COL_IDX_W-1:0]            rd_sel;
  logic [TDC_W-1:0]                rd_word;
  logic [CTDC_W-1:0]               coarse_bin;

  // ---------------- clocking ----------------
  pll_model #(.PVT_PM(PVT_PM)) u_pll (
    .ref_clk (sys_clk),
    .en      (pll_en),
    .f_ref   (f_ref),
    .lock    (pll_lock),
    .iref    (iref)
  );

  for (genvar i = 0; i < int'(N_ILO); i++) begin : g_ilo
    ilo_model #(.PVT_PM(PVT_PM)) u_ilo (
      .f_inj   (f_ref),
      .iref    (iref[i+1]),
      .tune    (cfg.ilo_tune[i]),
      .filo    (filo[i]),
      .locked  (ilo_locked[i])
    );
  end

  // ---------------- configuration ----------------
  scan_chain u_scan (
    .scan_clk (scan_clk),
    .rst_n    (rst_n),
    .scan_en  (scan_en),
    .scan_in  (scan_in),
    .scan_upd (scan_upd),
    .scan_out (scan_out),
    .cfg      (cfg)
  );

  // ---------------- pixel channels ----------------
  pixel_array u_pix (
    .row1_iph  (row1_iph),
    .pdem_trig (pdem_trig),
    .pdem_amp  (cfg.pdem_amp_na),
    .pdem_dark (cfg.pdem_dark_na),
    .bl        (bl)
  );

  for (genvar c = 0; c < int'(N_PIX_COL); c++) begin : g_blb
    bl_buffer u_blb (
      .bl       (bl[c]),
      .rst      (bl_rst),
      .ovf_mode (cfg.ovf_mode),
      .vo       (stop_pix[c]),
      .hit      (col_hit[c])
    );
  end

  assign stop       = cfg.ext_stop  ? {N_PIX_COL{ext_stop_in}} : stop_pix;
  assign start      = cfg.ext_start ? ext_start_in : tcon_start;
  assign laser_trig = tcon_start;

  // ---------------- TDC ----------------
  tdc_core u_tdc (
    .f_ref      (f_ref),
    .rst_n      (rst_n),
    .filo       (filo),
    .start      (start),
    .stop       (stop),
    .data_latch (data_latch),
    .rd_sel     (rd_sel),
    .rd_word    (rd_word),
    .edge_ok    (),
    .cnt0       (),
    .cnt1       ()
  );

  // ---------------- digital core ----------------
  tcon u_tcon (
    .clk         (sys_clk),
    .rst_n       (rst_n),
    .bl_rst      (bl_rst),
    .start       (tcon_start),
    .data_latch  (data_latch),
    .rd_valid    (rd_valid),
    .rd_sel      (rd_sel),
    .frame_start (frame_start)
  );

  gray2bin #(.W(CTDC_W)) u_g2b (
    .g (rd_word[TDC_W-1:FTDC_W]),
    .b (coarse_bin)
  );

  always_ff @(posedge sys_clk or negedge rst_n)
    if (!rst_n) begin
      dout       <= '0;
      dout_col   <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout       <= {coarse_bin, rd_word[FTDC_W-1:0]};
      dout_col   <= rd_sel;
      dout_valid <= rd_valid;
    end

endmodule
