// tb_wide_converter: the calibrated converter built for 32- and 64-bit
// inputs (dc mode), driven with random values of random magnitude and with
// every single-bit and all-ones input, against the arithmetic reference.
module tb_wide_converter;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [3:0]  phase = 4'b1111;
  logic [31:0] s32; logic [4:0] i32; logic [30:0] f32; logic c32;
  logic [63:0] s64; logic [5:0] i64; logic [62:0] f64; logic c64;
  int n_cal = 0;

  logic_part #(.N(32), .STAGES(12)) dut32 (
    .s(s32), .phase(phase), .dc_mode(1'b1), .int_out(i32), .frac_out(f32), .c_en(c32));
  logic_part #(.N(64), .STAGES(12)) dut64 (
    .s(s64), .phase(phase), .dc_mode(1'b1), .int_out(i64), .frac_out(f64), .c_en(c64));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint unsigned x);
    longint unsigned f;
    s32 = x[31:0]; s64 = x; #1;
    f = ref_frac(64'(x[31:0]), 32);
    checks++;
    if (i32 !== 5'(ref_msb(64'(x[31:0]), 32)) || f32 !== 31'(ref_cal_frac(f, 32)) || c32 !== ref_cal_en(f, 32)) begin
      failures++; if (failures < 10) $display("FAIL N=32 s=%h -> %0d.%h", s32, i32, f32);
    end
    f = ref_frac(x, 64);
    checks++;
    if (i64 !== 6'(ref_msb(x, 64)) || f64 !== 63'(ref_cal_frac(f, 64)) || c64 !== ref_cal_en(f, 64)) begin
      failures++; if (failures < 10) $display("FAIL N=64 s=%h -> %0d.%h", s64, i64, f64);
    end
    if (c64) n_cal++;
  endtask

  initial begin
    run(0);
    run(64'hFFFF_FFFF_FFFF_FFFF);
    for (int p = 0; p < 64; p++) run(64'd1 << p);
    for (int k = 0; k < 4000; k++) begin
      longint unsigned x;
      x = {$urandom, $urandom};
      x = x >> ($urandom % 64);
      run(x);
    end
    checks++;
    if (n_cal == 0) begin failures++; $display("FAIL no calibrated input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
