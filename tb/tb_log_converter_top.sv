// tb_log_converter_top: end-to-end run of the whole converter at its default
// size (8-bit input), through the power part.
//  1. Control voltage 1.1 V: dc power, combinational converter; all 256
//     inputs are checked against the arithmetic reference.
//  2. Control voltage 1.5 V (about 498 MHz clocked power) and then 1.8 V
//     (about 0.981 GHz): the four inputs 11111111, 11101000, 00001111,
//     00000000 are applied for 10 ns each (100 MHz) and must give
//     111.1111111, 111.1110000, 011.1111000, 000.0000000, checked 6 ns after
//     each change; the first result must not be there 0.5 ns after the
//     first change, since the adiabatic chain has not yet filled.
//  3. Back to 1.1 V: dc power again.
// Counted mechanisms: calibration applied, fraction below the lower bound,
// fraction above the upper bound, zero input, dc operation, clocked
// operation, pipeline fill delay seen, mode switches and clocked-power
// phase edges. Each must occur.
module tb_log_converter_top;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0]  s;
  logic [11:0] vctrl_mv;
  logic [2:0]  int_out;
  logic [6:0]  frac_out;
  logic        c_en;
  logic [3:0]  phase;
  logic        dc_mode;

  int n_cal, n_below, n_above, n_zero;
  int n_dc, n_ecrl, n_fill, n_switch, n_phase0;

  log_converter_top dut (
    .s(s), .vctrl_mv(vctrl_mv), .int_out(int_out), .frac_out(frac_out),
    .c_en(c_en), .phase(phase), .dc_mode(dc_mode)
  );

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(dc_mode) if ($time > 0) n_switch++;
  always @(posedge phase[0]) n_phase0++;

  task automatic check(input logic [7:0] x, input string tag);
    logic [6:0] f;
    logic [5:0] lead;
    f = 7'(ref_frac(x, 8));
    lead = f[6:1];
    checks++;
    if (int_out !== 3'(ref_msb(x, 8)) || frac_out !== 7'(ref_cal_frac(64'(f), 8))
        || c_en !== ref_cal_en(64'(f), 8)) begin
      failures++;
      $display("FAIL %s s=%b -> %b.%b c_en=%b", tag, x, int_out, frac_out, c_en);
    end
    if (c_en) n_cal++;
    if (lead < 5) n_below++;
    if (lead > 56) n_above++;
    if (x == 0) n_zero++;
    if (dc_mode) n_dc++; else n_ecrl++;
  endtask

  task automatic paper_sequence(input int mv);
    logic [7:0]  ins  [4] = '{8'b11111111, 8'b11101000, 8'b00001111, 8'b00000000};
    logic [9:0]  outs [4] = '{10'b111_1111111, 10'b111_1110000, 10'b011_1111000, 10'b000_0000000};
    vctrl_mv = 12'(mv);
    s = 8'b01010101;            // a value none of the four inputs gives
    #30;
    for (int i = 0; i < 4; i++) begin
      s = ins[i];
      if (i == 0) begin
        #0.5;
        checks++;
        if ({int_out, frac_out} === outs[0]) begin
          failures++; $display("FAIL %0d mV: result before the chain filled", mv);
        end else n_fill++;
        #5.5;
      end else #6;
      checks++;
      if ({int_out, frac_out} !== outs[i]) begin
        failures++; $display("FAIL %0d mV: in %b -> %b.%b", mv, ins[i], int_out, frac_out);
      end
      check(ins[i], "ecrl");
      #4;
    end
  endtask

  initial begin
    {n_cal, n_below, n_above, n_zero} = '0;
    {n_dc, n_ecrl, n_fill, n_switch, n_phase0} = '0;
    vctrl_mv = 12'd1100;
    s = '0;
    #5;
    for (int x = 0; x < 256; x++) begin
      s = 8'(x); #1;
      check(s, "dc");
    end
    paper_sequence(1500);
    paper_sequence(1800);
    vctrl_mv = 12'd1100;
    #5;
    s = 8'b00101101; #1;
    check(s, "dc again");

    $display("mechanisms: cal=%0d below=%0d above=%0d zero=%0d dc=%0d ecrl=%0d fill=%0d switch=%0d phase0 rises=%0d",
             n_cal, n_below, n_above, n_zero, n_dc, n_ecrl, n_fill, n_switch, n_phase0);
    checks++;
    if (n_cal == 0 || n_below == 0 || n_above == 0 || n_zero == 0 || n_dc == 0
        || n_ecrl == 0 || n_fill < 2 || n_switch < 2 || n_phase0 < 10) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
