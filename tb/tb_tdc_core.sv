// tb_tdc_core: runs the 32-column TDC core with eight ILO models locked to an 832 ps f_REF
// (52 ps fine step). Each trial fires START at a random time and each STOP column at its own
// random delay (up to 840 ns, i.e. almost the whole range), always half a step off the phase
// grid, then latches and reads out every column through the column multiplexer. The expected
// result of column c is its delay in steps, (code[c] - code[0]) mod 2^14 after Gray-to-binary
// conversion of the coarse part. It counts trials where the coarse counter wrapped between START
// and STOP and where each of the two coarse registers was selected, and fails if any never
// happened.
`timescale 1ps/1fs
module tb_tdc_core;
  import lidar_pkg::*;
  localparam real T = 832.0, LSB = 52.0;
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
  int n_wrap = 0, n_sel0 = 0, n_sel1 = 0;
  realtime t_edge;

  tdc_core dut (.f_ref(f_ref), .rst_n(rst_n), .filo(filo), .start(start), .stop(stop),
                .data_latch(data_latch), .rd_sel(rd_sel), .rd_word(rd_word), .edge_ok(edge_ok),
                .cnt0(cnt0), .cnt1(cnt1));

  for (genvar i = 0; i < N_ILO; i++) begin : g_ilo
    ilo_model #(.T_FS(832000)) u_ilo (.f_inj(f_ref), .iref(12'd1000), .tune(5'd16), .filo(filo[i]), .locked(locked[i]));
  end

  always #(T / 2) f_ref = ~f_ref;
  always @(posedge f_ref) t_edge = $realtime;

  function automatic logic [CTDC_W-1:0] g2b(logic [CTDC_W-1:0] g);
    logic [CTDC_W-1:0] b;
    b[CTDC_W-1] = g[CTDC_W-1];
    for (int i = CTDC_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  initial begin : watchdog
    #(64'd200_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ntrial = 12;
    #(10 * T) rst_n = 1'b1;
    repeat (8) @(posedge f_ref);
    for (int tr = 0; tr < ntrial; tr++) begin
      int dly[N_PIX_COL];
      int off, maxd;
      logic [TDC_W-1:0] code[N_COL];
      // START: a random fine position, half a step off the grid
      @(posedge f_ref);
      off = $urandom_range(0, 15);
      #(off * LSB + LSB / 2);
      start = 1'b1;
      maxd = 0;
      for (int c = 0; c < N_PIX_COL; c++) begin
        dly[c] = (c < 16 && tr == 0) ? c : $urandom_range(1, 16150);  // steps, up to 840 ns
        if (dly[c] > maxd) maxd = dly[c];
      end
      fork
        for (int c = 0; c < N_PIX_COL; c++) begin
          automatic int cc = c;
          fork
            begin
              #(dly[cc] * LSB);
              stop[cc] = 1'b1;
              #2000 stop[cc] = 1'b0;
            end
          join_none
        end
      join
      #(maxd * LSB + 3000);
      start = 1'b0;
      #1000 data_latch = 1'b1;
      #1000 data_latch = 1'b0;
      for (int c = 0; c < N_COL; c++) begin
        rd_sel = COL_IDX_W'(c);
        #100;
        code[c] = {g2b(rd_word[TDC_W-1:FTDC_W]), rd_word[FTDC_W-1:0]};
        if (rd_word[FTDC_W-1]) n_sel1++; else n_sel0++;
      end
      for (int c = 1; c < N_COL; c++) begin
        logic [TDC_W-1:0] diff;
        diff = code[c] - code[0];
        checks++;
        if (diff !== TDC_W'(dly[c-1])) begin
          failures++;
          if (failures < 10) $display("FAIL trial %0d col %0d got %0d exp %0d", tr, c, diff, dly[c-1]);
        end
        if (code[c] < code[0]) n_wrap++;
      end
      checks++;
      if (edge_ok != '1) begin failures++; $display("FAIL edge not found in some column"); end
    end
    $display("coverage: coarse wraps %0d, cnt0 selected %0d, cnt1 selected %0d", n_wrap, n_sel0, n_sel1);
    checks++; if (n_wrap == 0) begin failures++; $display("FAIL no counter wrap seen"); end
    checks++; if (n_sel0 == 0 || n_sel1 == 0) begin failures++; $display("FAIL a coarse register never selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
