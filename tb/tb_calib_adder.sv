// tb_calib_adder: exhaustive check of the carry-in-only adder for W = 7 and
// W = 4 against a + cin, truncated to W bits.
module tb_calib_adder;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [6:0] a7, s7; logic c7;
  logic [3:0] a4, s4; logic c4;

  calib_adder #(.W(7)) dut7 (.a(a7), .cin(c7), .sum(s7));
  calib_adder #(.W(4)) dut4 (.a(a4), .cin(c4), .sum(s4));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {c7, a7} = 8'(v); #1; checks++;
      if (s7 !== 7'(a7 + c7)) begin failures++; $display("FAIL W=7 %b+%b=%b", a7, c7, s7); end
    end
    for (int v = 0; v < 32; v++) begin
      {c4, a4} = 5'(v); #1; checks++;
      if (s4 !== 4'(a4 + c4)) begin failures++; $display("FAIL W=4 %b+%b=%b", a4, c4, s4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
