// tb_ctdc_gray_counter: checks the global coarse counter. After reset, cnt0 must step through
// the 10-bit Gray sequence gray(n) = n ^ (n >> 1), one step per rising clock edge, with exactly
// one bit changing per step and a clean wrap from 1023 to 0; cnt1 must take cnt0's value at the
// following falling edge (half a period later). Expected values come from the formula, not from
// the counter.
`timescale 1ps/1fs
module tb_ctdc_gray_counter;
  localparam int W = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] cnt0, cnt1;
  int checks = 0, failures = 0;

  ctdc_gray_counter #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .cnt0(cnt0), .cnt1(cnt1));

  always #416 clk = ~clk;

  function automatic logic [W-1:0] gray(int n);
    logic [W-1:0] b = W'(n);
    return b ^ (b >> 1);
  endfunction

  initial begin : watchdog
    #(5_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] prev;
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // first rising edge loads b=1, cnt0 = gray(0); track n from there
    @(posedge clk); #1;
    checks++; if (cnt0 !== gray(0)) begin failures++; $display("FAIL first cnt0=%h", cnt0); end
    prev = cnt0;
    n0 = 0;
    for (int n = 1; n <= 2100; n++) begin
      @(posedge clk); #1;
      checks++;
      if (cnt0 !== gray(n)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cnt0=%h exp=%h", n, cnt0, gray(n));
      end
      checks++;
      if ($countones(cnt0 ^ prev) != 1) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d %0d bits changed", n, $countones(cnt0 ^ prev));
      end
      // cnt1 still holds the previous value until the falling edge
      checks++; if (cnt1 !== prev) begin failures++; if (failures < 10) $display("FAIL cnt1 early n=%0d", n); end
      @(negedge clk); #1;
      checks++; if (cnt1 !== cnt0) begin failures++; if (failures < 10) $display("FAIL cnt1 n=%0d", n); end
      prev = cnt0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
