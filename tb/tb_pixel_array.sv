// tb_pixel_array: checks the pixel channel array models. A row-1 photocurrent above the 15 uA
// threshold must raise its column's bit line 300 ps later and only that column's; a current
// just below threshold (14.5 uA) must not. A PDEM trigger must produce a 5 ns bit-line pulse on
// its column when the programmed amplitude is above threshold, and none when it is below. Both
// rows of a column share the bit line (OR). A programmed dark current of 2 uA must leave the
// bit lines low; one of 20 uA, above threshold, must hold every bit line high.
`timescale 1ps/1fs
module tb_pixel_array;
  import lidar_pkg::*;
  logic [N_PIX_COL-1:0][IPH_W-1:0] row1_iph = '0;
  logic [N_PIX_COL-1:0] pdem_trig = '0;
  logic [IPH_W-1:0] pdem_amp = 16'd43000, pdem_dark = 16'd0;
  logic [N_PIX_COL-1:0] bl;
  int checks = 0, failures = 0;
  realtime t_r, t_f;

  pixel_array dut (.row1_iph(row1_iph), .pdem_trig(pdem_trig), .pdem_amp(pdem_amp), .pdem_dark(pdem_dark), .bl(bl));

  always @(posedge bl[6]) t_r = $realtime;
  always @(negedge bl[6]) t_f = $realtime;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    #10000;
    chk(bl == '0, "idle bit lines low");
    for (int c = 0; c < N_PIX_COL; c += 5) begin
      row1_iph[c] = 16'd20000;
      #299 chk(bl == '0, "receiver delay");
      #2 chk(bl == (31'b1 << c), $sformatf("row-1 column %0d", c));
      row1_iph[c] = 16'd0;
      #1000;
      row1_iph[c] = 16'd14500;
      #1000 chk(bl == '0, "below threshold filtered");
      row1_iph[c] = 16'd15000;
      #1000 chk(bl[c], "at threshold detected");
      row1_iph[c] = 16'd0;
      #1000;
    end
    // PDEM on column index 6
    t0 = $realtime;
    pdem_trig[6] = 1'b1; #100 pdem_trig[6] = 1'b0;
    #20000;
    chk((t_r - t0) > 299.0 && (t_r - t0) < 301.0, "PDEM pulse start");
    chk((t_f - t_r) > 4999.0 && (t_f - t_r) < 5001.0, "PDEM 5 ns pulse");
    pdem_amp = 16'd10000;
    t0 = $realtime;
    pdem_trig[6] = 1'b1; #100 pdem_trig[6] = 1'b0;
    #2000 chk(!bl[6], "weak PDEM pulse filtered");
    #20000;
    // shared bit line: row 1 and row 2 of the same column
    pdem_amp = 16'd43000;
    row1_iph[6] = 16'd30000;
    #1000 chk(bl[6], "row 1 drives");
    pdem_trig[6] = 1'b1; #100 pdem_trig[6] = 1'b0;
    #1000 row1_iph[6] = 16'd0;
    #1000 chk(bl[6], "row 2 keeps the shared line high");
    #10000 chk(!bl[6], "line released");
    // programmable dark current
    pdem_dark = 16'd2000;
    #1000 chk(bl == '0, "small dark current stays below threshold");
    pdem_dark = 16'd20000;
    #1000 chk(bl == '1, "dark current above threshold holds the bit lines");
    pdem_dark = 16'd0;
    #1000 chk(bl == '0, "bit lines released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
