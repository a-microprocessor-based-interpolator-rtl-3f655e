// tb_io_decoder: exhaustive test of the 3-to-8 I/O decoder.
`timescale 1ns/1ps
module tb_io_decoder;
  import interp_pkg::*;
  io_code_e code;
  logic [7:0] d;
  int checks = 0, failures = 0;
  io_decoder dut (.*);
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int c = 0; c < 8; c++) begin
      code = io_code_e'(c);
      #1;
      checks++;
      if (d != (8'd1 << c)) begin failures++; $display("FAIL code %0d -> %b", c, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
