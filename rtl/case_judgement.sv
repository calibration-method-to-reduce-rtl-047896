// case_judgement: decides whether the calibration code is added.
//
// Calibration is wanted when the fraction lies between the fixed bounds
// (0.000101)_2 and (0.111)_2, judged on its six leading bits F_{N-2}..F_{N-7}.
// Instead of a general comparator, five AND terms mark the regions where no
// calibration is applied and a NOR of them gives C_EN:
//   F_{N-2..N-4} = 111 and any of F_{N-5}, F_{N-6}, F_{N-7} set (above 0.111000),
//   F_{N-2..N-5} = 0000                                         (below 0.0001),
//   F_{N-2..N-7} = 000100                                       (below 0.000101).
// So C_EN is high for 000101 <= F[N-2:N-7] <= 111000, both bounds included.
// Two logic levels regardless of N. Terms and bounds follow the published circuit;
// bits below F_{N-7} are ignored as it does.
//
// Interface: lead[5:0] in, the six leading fraction bits (lead[5] = F_{N-2},
// lead[0] = F_{N-7}); c_en out. Combinational and independent of N.
module case_judgement (
  input  logic [5:0] lead,
  output logic       c_en
);
  timeunit 1ns; timeprecision 1ps;

  logic [5:0] top;
  assign top = lead;

  logic [4:0] no_cal;
  assign no_cal[0] =  top[5] &  top[4] &  top[3] &  top[2];
  assign no_cal[1] =  top[5] &  top[4] &  top[3] &  top[1];
  assign no_cal[2] =  top[5] &  top[4] &  top[3] &  top[0];
  assign no_cal[3] = ~top[5] & ~top[4] & ~top[3] & ~top[2];
  assign no_cal[4] = ~top[5] & ~top[4] & ~top[3] &  top[2] & ~top[1] & ~top[0];

  assign c_en = ~(|no_cal);
endmodule
