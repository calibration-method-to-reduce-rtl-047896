// tb_calibration: every integer/fraction pair for N = 8 and random pairs for
// N = 16. The output must be the input plus (0.0001)_2 inside the region
// 0.000101 .. 0.111000 (six leading bits) and unchanged outside it.
module tb_calibration;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [2:0] ii8, io8;  logic [6:0]  fi8, fo8;  logic c8;
  logic [3:0] ii16, io16; logic [14:0] fi16, fo16; logic c16;
  int n_cal = 0, n_pass = 0;

  calibration #(.N(8))  dut8  (.int_in(ii8),  .frac_in(fi8),  .int_out(io8),  .frac_out(fo8),  .c_en(c8));
  calibration #(.N(16)) dut16 (.int_in(ii16), .frac_in(fi16), .int_out(io16), .frac_out(fo16), .c_en(c16));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      {ii8, fi8} = 10'(v); #1; checks++;
      if (c8 !== ref_cal_en(fi8, 8) || io8 !== ii8 || fo8 !== 7'(ref_cal_frac(fi8, 8))) begin
        failures++; $display("FAIL N=8 %b.%b -> %b.%b c=%b", ii8, fi8, io8, fo8, c8);
      end
      if (c8) n_cal++; else n_pass++;
    end
    // The worked cases: 0.1101000 is raised to 0.1110000, 0.1110000 to
    // 0.1111000, and 0.1111111 is left alone.
    ii8 = 3'b111; fi8 = 7'b1101000; #1; checks++;
    if (fo8 !== 7'b1110000) begin failures++; $display("FAIL case 0.1101"); end
    ii8 = 3'b011; fi8 = 7'b1110000; #1; checks++;
    if (fo8 !== 7'b1111000) begin failures++; $display("FAIL case 0.111"); end
    ii8 = 3'b111; fi8 = 7'b1111111; #1; checks++;
    if (fo8 !== 7'b1111111) begin failures++; $display("FAIL case 0.1111111"); end
    for (int k = 0; k < 5000; k++) begin
      ii16 = 4'($urandom); fi16 = 15'($urandom); #1; checks++;
      if (c16 !== ref_cal_en(fi16, 16) || io16 !== ii16 || fo16 !== 15'(ref_cal_frac(fi16, 16))) begin
        failures++; if (failures < 10) $display("FAIL N=16 %b.%b -> %b.%b", ii16, fi16, io16, fo16);
      end
    end
    checks++;
    if (n_cal == 0 || n_pass == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
