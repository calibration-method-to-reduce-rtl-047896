// log_converter_top: calibrated N-bit logarithmic converter with its power part.
//
// The logic part converts an N-bit binary number into the base-2 logarithm
// code I.F by Mitchell's approximation (I = leading-one position, F = the bits
// below it) and then adds the fixed code (0.0001)_2 when F lies between
// (0.000101)_2 and (0.111)_2, which cuts the mean absolute conversion error
// from about 0.057 to about 0.0155. The power part, a behavioural model of the
// four-phase ring-oscillator source, decides how the logic runs: with the
// control voltage at or below 1.2 V it supplies dc power and the converter is
// combinational; above it the converter runs as adiabatic logic on four
// clocked-power phases and the result appears after the chain of logic levels.
//
// Interface: s[N-1:0] binary input, vctrl_mv control voltage in millivolts;
// int_out, frac_out (the logarithm code), c_en (calibration applied),
// phase[3:0] and dc_mode (state of the power part).
module log_converter_top #(
  parameter int unsigned N      = 8,
  parameter int unsigned STAGES = 8
) (
  input  logic [N-1:0]         s,
  input  logic [11:0]          vctrl_mv,
  output logic [$clog2(N)-1:0] int_out,
  output logic [N-2:0]         frac_out,
  output logic                 c_en,
  output logic [3:0]           phase,
  output logic                 dc_mode
);
  timeunit 1ns; timeprecision 1ps;

  clock_generator u_power (.vctrl_mv(vctrl_mv), .phase(phase), .dc_mode(dc_mode));

  logic_part #(.N(N), .STAGES(STAGES)) u_logic (
    .s       (s),
    .phase   (phase),
    .dc_mode (dc_mode),
    .int_out (int_out),
    .frac_out(frac_out),
    .c_en    (c_en)
  );
endmodule
