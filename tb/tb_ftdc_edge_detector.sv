// tb_ftdc_edge_detector: drives the 16 phases as they look at each of the 16 fine positions p
// (filo[j] high when (p - j) mod 16 < 8), samples them with a STOP edge and checks fine == p and
// edge_ok. It then inserts single-bit and two-bit bubbles into the sampled half (bits 0..7) away
// from the true edge and checks that the code does not move.
`timescale 1ps/1fs
module tb_ftdc_edge_detector;
  logic stop = 1'b0;
  logic [15:0] filo;
  logic [3:0] fine;
  logic edge_ok;
  logic [15:0] sa_q;
  int checks = 0, failures = 0;

  ftdc_edge_detector #(.NPH(16)) dut (.stop(stop), .filo(filo), .fine(fine), .edge_ok(edge_ok), .sa_q(sa_q));

  function automatic logic [15:0] pattern(int p);
    logic [15:0] v;
    for (int j = 0; j < 16; j++) v[j] = (((p - j + 16) % 16) < 8);
    return v;
  endfunction

  task automatic sample(input logic [15:0] v);
    filo = v;
    #10 stop = 1'b1;
    #10 stop = 1'b0;
    #5;
  endtask

  initial begin : watchdog
    #(10_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int p = 0; p < 16; p++) begin
        sample(pattern(p));
        checks++;
        if (fine !== 4'(p) || !edge_ok) begin
          failures++; $display("FAIL clean p=%0d fine=%0d ok=%0b", p, fine, edge_ok);
        end
        checks++;
        if (sa_q[15:8] !== ~sa_q[7:0]) begin failures++; $display("FAIL sa pair"); end
      end
    // bubbles: flip bit k (and k+1) of the sampled half where it is at least 3 away from both edges
    for (int p = 0; p < 16; p++)
      for (int k = 0; k < 8; k++)
        for (int w = 1; w <= 2; w++) begin
          logic [15:0] v;
          bit far;
          far = 1'b1;
          for (int b = k; b < k + w; b++) begin
            int d1, d2;
            d1 = (b - p + 32) % 16; d1 = (d1 > 8) ? 16 - d1 : d1;       // distance to index p
            d2 = (b - (p + 1) + 32) % 16; d2 = (d2 > 8) ? 16 - d2 : d2; // distance to p+1
            if (d1 < 3 || d2 < 3) far = 1'b0;
            d1 = (b - (p + 8) + 32) % 16; d1 = (d1 > 8) ? 16 - d1 : d1; // the other edge
            d2 = (b - (p + 9) + 32) % 16; d2 = (d2 > 8) ? 16 - d2 : d2;
            if (d1 < 3 || d2 < 3) far = 1'b0;
          end
          if (!far || k + w > 8) continue;
          v = pattern(p);
          for (int b = k; b < k + w; b++) v[b] = ~v[b];
          sample(v);
          checks++;
          if (fine !== 4'(p) || !edge_ok) begin
            failures++; $display("FAIL bubble p=%0d k=%0d w=%0d fine=%0d ok=%0b", p, k, w, fine, edge_ok);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
