// tb_log_converter: exhaustive check of the uncalibrated Mitchell converter
// for N = 8 and N = 16, plus the worked case 21 = 10101 -> 100.0101.
module tb_log_converter;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  s8;  logic [2:0] i8;  logic [6:0]  f8;
  logic [15:0] s16; logic [3:0] i16; logic [14:0] f16;

  log_converter #(.N(8))  dut8  (.s(s8),  .int_part(i8),  .frac(f8));
  log_converter #(.N(16)) dut16 (.s(s16), .int_part(i16), .frac(f16));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s8 = 8'd21; #1; checks++;
    if ({i8, f8} !== {3'b100, 7'b0101000}) begin
      failures++; $display("FAIL 21 -> %b.%b", i8, f8);
    end
    for (int x = 0; x < 256; x++) begin
      s8 = 8'(x); #1; checks++;
      if (i8 !== 3'(ref_msb(x, 8)) || f8 !== 7'(ref_frac(x, 8))) begin
        failures++; $display("FAIL N=8 s=%b -> %b.%b", s8, i8, f8);
      end
    end
    for (int x = 0; x < 65536; x++) begin
      s16 = 16'(x); #1; checks++;
      if (i16 !== 4'(ref_msb(x, 16)) || f16 !== 15'(ref_frac(x, 16))) begin
        failures++; if (failures < 10) $display("FAIL N=16 s=%h -> %b.%b", s16, i16, f16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
