// tb_column_mux: fills the 32 inputs with random 14-bit words and checks that every select
// value returns its own column's word.
`timescale 1ps/1fs
module tb_column_mux;
  logic [31:0][13:0] din;
  logic [4:0] sel;
  logic [13:0] dout;
  int checks = 0, failures = 0;

  column_mux #(.N(32), .W(14)) dut (.din(din), .sel(sel), .dout(dout));

  initial begin : watchdog
    #(1_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int i = 0; i < 32; i++) din[i] = 14'($urandom);
      for (int s = 0; s < 32; s++) begin
        sel = 5'(s);
        #1;
        checks++;
        if (dout !== din[s]) begin failures++; $display("FAIL sel=%0d dout=%h exp=%h", s, dout, din[s]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
