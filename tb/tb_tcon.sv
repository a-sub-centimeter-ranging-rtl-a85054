// tb_tcon: runs the timing controller for several frames and checks, cycle by cycle, against
// its frame schedule: a 50-cycle frame (375 kHz at 18.75 MHz), bl_rst at frame cycle 0, start
// high for cycles 1..2, data_latch at cycle 18, then 32 readout cycles with rd_sel counting
// 0..31 and rd_valid high, which carry over into the next frame.
`timescale 1ps/1fs
module tb_tcon;
  logic clk = 1'b0, rst_n = 1'b0;
  logic bl_rst, start, data_latch, rd_valid, frame_start;
  logic [4:0] rd_sel;
  int checks = 0, failures = 0;

  tcon dut (.clk(clk), .rst_n(rst_n), .bl_rst(bl_rst), .start(start), .data_latch(data_latch),
            .rd_valid(rd_valid), .rd_sel(rd_sel), .frame_start(frame_start));

  always #26624 clk = ~clk;

  task automatic chk(input bit cond, input string what, input int cyc);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what); end
  endtask

  initial begin : watchdog
    #(64'd2_000_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int latch_seen = 0;
    int last_frame = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50 * 6; t++) begin
      int fc, rd_pos;
      @(posedge clk); #1;
      fc = t % 50;           // first edge after reset enters frame cycle 0
      chk(bl_rst == (fc == 0), "bl_rst", t);
      chk(frame_start == (fc == 0), "frame_start", t);
      chk(start == (fc == 1 || fc == 2), "start", t);
      chk(data_latch == (fc == 18), "data_latch", t);
      // readout: the NCOL cycles after each data_latch
      rd_pos = (fc - 19 + 50) % 50;
      if (t >= 19) begin
        chk(rd_valid == (rd_pos < 32), "rd_valid", t);
        if (rd_pos < 32) chk(rd_sel == 5'(rd_pos), "rd_sel", t);
      end else begin
        chk(!rd_valid, "rd_valid before first latch", t);
      end
      if (frame_start) begin
        if (last_frame >= 0) chk(t - last_frame == 50, "frame period", t);
        last_frame = t;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
