// fraction_gen: fraction part of the Mitchell logarithm.
//
// An AND array forms R_{m,n} = EN_m & S_n, and each fraction bit is the OR
// F_i = R_{N-1,i} | R_{N-2,i-1} | ... | R_{N-1-i,0}. With the leading one at
// position m only EN_m is high, so F_i = S_{i-(N-1-m)}: the bits below the
// leading one are copied, left aligned, into F_{N-2}..F_0 and the rest are 0.
// The structure is the one given for the converter's fraction part.
//
// Interface: s[N-1:0] and en[N-1:0] in, frac[N-2:0] out. Combinational.
module fraction_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] en,
  output logic [N-2:0] frac
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    for (int i = 0; i <= N - 2; i++) begin
      frac[i] = 1'b0;
      for (int j = 0; j <= i; j++) frac[i] |= en[N-1-j] & s[i-j];
    end
  end
endmodule
