// tb_error_analysis: conversion error of the calibrated converter.
// A 16-bit instance (dc mode) converts every input from 2^15 to 2^16-1, so
// the fraction X_F takes all 2^15 values of [0,1) with equal weight. The mean
// absolute error |log2(1+X_F) - X_F'| is compared with the mean error of
// plain Mitchell conversion (about 0.0573 for a continuous fraction) and with
// 0.0155 expected for the fixed (0.0001)_2 calibration. The same run is
// repeated for the 8-bit converter, whose 7-bit fraction gives a coarser
// estimate.
module tb_error_analysis;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [15:0] s16; logic [3:0] i16; logic [14:0] f16; logic c16;
  logic [7:0]  s8;  logic [2:0] i8;  logic [6:0]  f8;  logic c8;
  logic [3:0]  phase = 4'b1111;

  logic_part #(.N(16), .STAGES(8)) dut16 (
    .s(s16), .phase(phase), .dc_mode(1'b1), .int_out(i16), .frac_out(f16), .c_en(c16));
  logic_part #(.N(8), .STAGES(8)) dut8 (
    .s(s8), .phase(phase), .dc_mode(1'b1), .int_out(i8), .frac_out(f8), .c_en(c8));

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real log2r(input real v);
    return $ln(v) / $ln(2.0);
  endfunction

  initial begin
    real xf, err, sum_cal, sum_mit, max_pos, max_neg, mean_cal, mean_mit;
    sum_cal = 0.0; sum_mit = 0.0; max_pos = 0.0; max_neg = 0.0;
    for (int x = 32768; x < 65536; x++) begin
      s16 = 16'(x); #1;
      xf = real'(x - 32768) / 32768.0;
      err = log2r(1.0 + xf) - real'(f16) / 32768.0;
      if (i16 != 4'd15) failures++;
      sum_cal += (err < 0.0) ? -err : err;
      sum_mit += log2r(1.0 + xf) - xf;
      if (err > max_pos) max_pos = err;
      if (err < max_neg) max_neg = err;
    end
    mean_cal = sum_cal / 32768.0;
    mean_mit = sum_mit / 32768.0;
    $display("16-bit: mean |error| calibrated %f, Mitchell %f, reduction %f %%, max +%f / %f",
             mean_cal, mean_mit, 100.0 * (mean_mit - mean_cal) / mean_mit, max_pos, max_neg);
    checks++;
    if (mean_cal < 0.0150 || mean_cal > 0.0160) begin failures++; $display("FAIL calibrated mean"); end
    checks++;
    if (mean_mit < 0.0568 || mean_mit > 0.0578) begin failures++; $display("FAIL Mitchell mean"); end
    checks++;
    if (max_pos > 0.035 || max_neg < -0.035) begin failures++; $display("FAIL error bound"); end

    sum_cal = 0.0;
    for (int x = 128; x < 256; x++) begin
      s8 = 8'(x); #1;
      xf = real'(x - 128) / 128.0;
      err = log2r(1.0 + xf) - real'(f8) / 128.0;
      sum_cal += (err < 0.0) ? -err : err;
    end
    mean_cal = sum_cal / 128.0;
    $display("8-bit: mean |error| calibrated %f", mean_cal);
    checks++;
    if (mean_cal < 0.0140 || mean_cal > 0.0170) begin failures++; $display("FAIL 8-bit mean"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
