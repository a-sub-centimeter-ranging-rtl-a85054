// tb_bl_buffer: drives bit-line pulses of very different widths (0.1, 2 and 8 ns) and checks
// that each produces one output pulse that starts at the bit-line edge and lasts 5 ns whatever
// the input width. A second edge while the output is high must not stretch the pulse. It then
// checks the event flag (hit) and the first-event-only mode: with ovf_mode high only the first
// event after rst produces a pulse; with ovf_mode low every event does.
`timescale 1ps/1fs
module tb_bl_buffer;
  logic bl = 1'b0, rst = 1'b0, ovf_mode = 1'b0;
  logic vo, hit;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;
  int n_rise = 0;

  bl_buffer #(.PULSE_PS(5000)) dut (.bl(bl), .rst(rst), .ovf_mode(ovf_mode), .vo(vo), .hit(hit));

  always @(posedge vo) begin t_rise = $realtime; n_rise++; end
  always @(negedge vo) t_fall = $realtime;

  task automatic blpulse(input int width_ps);
    bl = 1'b1;
    #(width_ps);
    bl = 1'b0;
  endtask

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", what, $realtime); end
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0;
    int w[3] = '{100, 2000, 8000};
    #100 rst = 1'b1;
    #20000 rst = 1'b0;
    #20000;
    for (int i = 0; i < 3; i++) begin
      int n0;
      n0 = n_rise;
      t0 = $realtime;
      blpulse(w[i]);
      #(20000 - w[i]);
      chk(n_rise == n0 + 1, $sformatf("one pulse for width %0d", w[i]));
      chk(t_rise - t0 < 1.0, "pulse starts at the bit-line edge");
      chk((t_fall - t_rise) > 4999.0 && (t_fall - t_rise) < 5001.0,
          $sformatf("5 ns width for input %0d ps, got %0f", w[i], t_fall - t_rise));
    end
    // second edge during the pulse
    t0 = $realtime;
    blpulse(500); #1500; blpulse(500);
    #20000;
    chk((t_fall - t_rise) > 4999.0 && (t_fall - t_rise) < 5001.0, "pulse not stretched by a second edge");
    chk(hit, "hit set after events");
    // first-event-only mode
    rst = 1'b1; #1000 rst = 1'b0; #1000;
    chk(!hit, "hit cleared by rst");
    ovf_mode = 1'b1;
    begin
      int n0;
      n0 = n_rise;
      blpulse(1000); #20000;
      chk(n_rise == n0 + 1, "first event passes in ovf_mode");
      blpulse(1000); #20000;
      chk(n_rise == n0 + 1, "second event blocked in ovf_mode");
      rst = 1'b1; #1000 rst = 1'b0; #1000;
      blpulse(1000); #20000;
      chk(n_rise == n0 + 2, "event passes again after rst");
      ovf_mode = 1'b0;
      blpulse(1000); #20000;
      chk(n_rise == n0 + 3, "later event passes with ovf_mode low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
