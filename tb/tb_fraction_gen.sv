// tb_fraction_gen: exhaustive check of the fraction AND-OR array for N = 8
// and N = 16. The one-hot enables are computed here from the input, and the
// fraction is compared with the input's bits below its leading one, left
// aligned.
module tb_fraction_gen;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  s8,  en8;  logic [6:0]  f8;
  logic [15:0] s16, en16; logic [14:0] f16;

  fraction_gen #(.N(8))  dut8  (.s(s8),  .en(en8),  .frac(f8));
  fraction_gen #(.N(16)) dut16 (.s(s16), .en(en16), .frac(f16));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      s8 = 8'(x); en8 = 8'(1 << ref_msb(x, 8)); #1; checks++;
      if (f8 !== 7'(ref_frac(x, 8))) begin
        failures++; $display("FAIL N=8 s=%b F=%b", s8, f8);
      end
    end
    for (int x = 0; x < 65536; x++) begin
      s16 = 16'(x); en16 = 16'(1 << ref_msb(x, 16)); #1; checks++;
      if (f16 !== 15'(ref_frac(x, 16))) begin
        failures++; if (failures < 10) $display("FAIL N=16 s=%h F=%b", s16, f16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
