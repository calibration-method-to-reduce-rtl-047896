// tb_enable_gen: exhaustive check of the leading-one enable array for
// N = 8 and N = 16 against the index of the highest set bit.
module tb_enable_gen;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  s8;  logic [7:0]  en8;
  logic [15:0] s16; logic [15:0] en16;

  enable_gen #(.N(8))  dut8  (.s(s8),  .en(en8));
  enable_gen #(.N(16)) dut16 (.s(s16), .en(en16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      s8 = 8'(x); #1;
      checks++;
      if (en8 !== 8'(1 << ref_msb(x, 8))) begin
        failures++;
        $display("FAIL N=8 s=%b en=%b", s8, en8);
      end
    end
    for (int x = 0; x < 65536; x++) begin
      s16 = 16'(x); #1;
      checks++;
      if (en16 !== 16'(1 << ref_msb(x, 16))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 s=%h en=%b", s16, en16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
