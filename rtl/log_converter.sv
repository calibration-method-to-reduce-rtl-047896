// log_converter: Mitchell logarithmic converter without calibration.
//
// log2(X) is approximated by I + F, where I is the position of the leading
// one and F the bits below it read as a binary fraction. The leading one is
// found in parallel by the enable array (no priority chain, no shifter); the
// integer encoder and the fraction AND-OR array both work from the enables.
// The result is the code I_{n}..I_0 . F_{N-2}..F_0.
//
// Interface: s[N-1:0] in; int_part[$clog2(N)-1:0] and frac[N-2:0] out.
// Combinational; N a power of two, at least 8.
module log_converter #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]         s,
  output logic [$clog2(N)-1:0] int_part,
  output logic [N-2:0]         frac
);
  timeunit 1ns; timeprecision 1ps;

  logic [N-1:0] en;

  enable_gen   #(.N(N)) u_en   (.s(s), .en(en));
  integer_enc  #(.N(N)) u_int  (.en(en), .int_part(int_part));
  fraction_gen #(.N(N)) u_frac (.s(s), .en(en), .frac(frac));
endmodule
