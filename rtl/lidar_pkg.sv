// lidar_pkg: widths, counts and the configuration word shared by the ILO-TDC LIDAR receiver.
//
// The numbers follow the sensor as built: a 14-bit time code made of a 10-bit Gray-code coarse
// count (833 ps per step at 1.2 GHz) and a 4-bit fine code from 16 oscillator phases (52 ps per
// step), 32 TDC columns (column 0 records START, columns 1..31 record STOP events from the 31
// pixel columns), eight injection-locked oscillators each serving four columns, and a 375 kHz
// frame made of 50 cycles of the 18.75 MHz readout clock. The layout of the configuration word
// held by the scan chain is this design's own choice.
`timescale 1ps/1fs
package lidar_pkg;

  localparam int unsigned CTDC_W        = 10;              // coarse counter bits
  localparam int unsigned FTDC_W        = 4;               // fine code bits
  localparam int unsigned TDC_W         = CTDC_W + FTDC_W; // 14-bit time code
  localparam int unsigned N_PHASE       = 1 << FTDC_W;     // 16 ILO phases
  localparam int unsigned N_COL         = 32;              // TDC columns
  localparam int unsigned N_PIX_COL     = N_COL - 1;       // 31 pixel columns
  localparam int unsigned N_ILO         = 8;               // local oscillators
  localparam int unsigned COLS_PER_ILO  = N_COL / N_ILO;   // 4 columns per ILO
  localparam int unsigned TUNE_W        = 5;               // ILO fine current tuning bits
  localparam int unsigned IPH_W         = 16;              // photocurrent code, nA
  localparam int unsigned IREF_W        = 12;              // ring bias current, 1/1000 of nominal
  localparam int unsigned IREF_NOM      = 1000;            // nominal ring bias
  localparam int unsigned FRAME_CYC     = 50;              // 18.75 MHz / 375 kHz
  localparam int unsigned COL_IDX_W     = $clog2(N_COL);

  typedef logic [CTDC_W-1:0]  ctdc_t;
  typedef logic [FTDC_W-1:0]  ftdc_t;
  typedef logic [TDC_W-1:0]   tdc_t;
  typedef logic [N_PHASE-1:0] phase_t;
  typedef logic [IPH_W-1:0]   iph_t;

  // Chip configuration set through the scan chain (scan order: MSB first).
  typedef struct packed {
    logic [N_ILO-1:0][TUNE_W-1:0] ilo_tune;    // 5-bit fine current trim per ILO
    iph_t                         pdem_amp_na; // PDEM pulse amplitude, nA
    iph_t                         pdem_dark_na;// PDEM emulated dark current, nA
    logic                         ext_start;   // 1: START taken from the external test pin
    logic                         ext_stop;    // 1: all STOP columns driven by the external test pin
    logic                         ovf_mode;    // 1: BL buffers pass only the first event of a frame
  } cfg_t;

  localparam int unsigned CFG_W = $bits(cfg_t);

  // Reset value: mid-scale trims, receivers as STOP source, TCON-generated START.
  localparam cfg_t CFG_DEFAULT = '{ilo_tune: {N_ILO{5'd16}}, pdem_amp_na: 16'd43000, pdem_dark_na: 16'd0,
                                   ext_start: 1'b0, ext_stop: 1'b0, ovf_mode: 1'b0};

endpackage
