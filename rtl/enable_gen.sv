// enable_gen: leading-one enable array of the logarithmic converter.
//
// For an N-bit input S, EN_i is high when S_i is the most significant set bit,
// i.e. when every bit above i is zero and S_i is one (a NOR of the higher bits
// with the complement of S_i). EN_0 is the NOR of S_{N-1}..S_1 alone, so an
// input of 0 or 1 selects position 0 and the enables are always one-hot.
// This follows the enable equations of the converter; the zero-input case
// falls out of that definition and gives the code 0.
//
// Interface: s[N-1:0] in, en[N-1:0] out. Purely combinational, no clock.
module enable_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s,
  output logic [N-1:0] en
);
  timeunit 1ns; timeprecision 1ps;

  // higher[i] is high when any bit above position i is set.
  logic [N-1:0] higher;

  always_comb begin
    higher[N-1] = 1'b0;
    for (int i = N - 2; i >= 0; i--) higher[i] = higher[i+1] | s[i+1];
  end

  always_comb begin
    for (int i = N - 1; i >= 1; i--) en[i] = ~(higher[i] | ~s[i]);
    en[0] = ~higher[0];
  end
endmodule
