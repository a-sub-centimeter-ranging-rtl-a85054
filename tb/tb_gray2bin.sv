// tb_gray2bin: exhaustive check of the 10-bit Gray-to-binary decoder: for every n, the Gray
// code n ^ (n >> 1) must decode to n.
`timescale 1ps/1fs
module tb_gray2bin;
  logic [9:0] g, b;
  int checks = 0, failures = 0;

  gray2bin #(.W(10)) dut (.g(g), .b(b));

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1024; n++) begin
      g = 10'(n) ^ (10'(n) >> 1);
      #1;
      checks++;
      if (b !== 10'(n)) begin failures++; if (failures < 10) $display("FAIL n=%0d b=%0d", n, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
