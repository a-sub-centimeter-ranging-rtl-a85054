// tb_scan_chain: checks reset defaults, then shifts random configuration words in MSB first,
// checks that cfg does not change while shifting, commits with scan_upd and compares cfg with
// the word sent. While the next word shifts in, scan_out must return the previous word, MSB
// first, so chips can be daisy-chained.
`timescale 1ps/1fs
module tb_scan_chain;
  import lidar_pkg::*;
  logic scan_clk = 1'b0, rst_n = 1'b0, scan_en = 1'b0, scan_in = 1'b0, scan_upd = 1'b0;
  logic scan_out;
  cfg_t cfg;
  int checks = 0, failures = 0;

  scan_chain dut (.scan_clk(scan_clk), .rst_n(rst_n), .scan_en(scan_en), .scan_in(scan_in),
                  .scan_upd(scan_upd), .scan_out(scan_out), .cfg(cfg));

  always #5000 scan_clk = ~scan_clk;

  initial begin : watchdog
    #(100_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG_W-1:0] prev, word;
    #12000 rst_n = 1'b1;
    checks++;
    if (cfg !== CFG_DEFAULT) begin failures++; $display("FAIL reset value"); end
    prev = CFG_DEFAULT;
    for (int rep = 0; rep < 6; rep++) begin
      for (int i = 0; i < CFG_W; i++) word[i] = 1'($urandom);
      for (int i = CFG_W - 1; i >= 0; i--) begin
        @(negedge scan_clk);
        checks++;
        if (scan_out !== prev[i]) begin failures++; if (failures < 10) $display("FAIL scan_out bit %0d", i); end
        scan_en = 1'b1; scan_in = word[i];
        @(posedge scan_clk); #1;
        checks++;
        if (cfg !== cfg_t'(prev)) begin failures++; if (failures < 10) $display("FAIL cfg moved while shifting"); end
      end
      @(negedge scan_clk);
      scan_en = 1'b0; scan_upd = 1'b1;
      @(negedge scan_clk);
      scan_upd = 1'b0;
      checks++;
      if (cfg !== cfg_t'(word)) begin failures++; $display("FAIL commit rep %0d", rep); end
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
