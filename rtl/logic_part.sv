// logic_part: the calibrated logarithmic converter (logic part).
//
// The N-bit binary input goes through the parallel Mitchell converter
// (enable array, integer encoder, fraction array) and then the calibration
// block, which adds (0.0001)_2 when the fraction lies between (0.000101)_2 and
// (0.111)_2. The output code is I_{n}..I_0 . F_{N-2}..F_0.
//
// Two power modes: with dc power (dc_mode high) the logic is plain
// combinational logic and the output follows the input. Under four-phase
// clocked power the result passes through ecrl_chain and appears STAGES
// quarter periods later. The calibration enable is carried alongside the
// code so that it stays aligned with it. Selecting between the two paths with
// dc_mode is this design's way of modelling the two supplies.
//
// Interface: s[N-1:0], phase[3:0], dc_mode in; int_out, frac_out, c_en out.
module logic_part #(
  parameter int unsigned N      = 8,
  parameter int unsigned STAGES = 8
) (
  input  logic [N-1:0]         s,
  input  logic [3:0]           phase,
  input  logic                 dc_mode,
  output logic [$clog2(N)-1:0] int_out,
  output logic [N-2:0]         frac_out,
  output logic                 c_en
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned CW = IW + N;  // c_en, integer, fraction

  logic [IW-1:0] int_raw, int_cal;
  logic [N-2:0]  frac_raw, frac_cal;
  logic          c_en_comb;

  log_converter #(.N(N)) u_conv (.s(s), .int_part(int_raw), .frac(frac_raw));

  calibration #(.N(N)) u_cal (
    .int_in  (int_raw),
    .frac_in (frac_raw),
    .int_out (int_cal),
    .frac_out(frac_cal),
    .c_en    (c_en_comb)
  );

  logic [CW-1:0] comb_word, piped_word;
  assign comb_word = {c_en_comb, int_cal, frac_cal};

  ecrl_chain #(.W(CW), .STAGES(STAGES)) u_chain (
    .d(comb_word), .phase(phase), .q(piped_word)
  );

  always_comb begin
    if (dc_mode) {c_en, int_out, frac_out} = comb_word;
    else         {c_en, int_out, frac_out} = piped_word;
  end
endmodule
