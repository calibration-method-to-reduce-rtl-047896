// calib_adder: simplified carry lookahead adder of the calibration block.
//
// Adding the fixed code (0.0001)_2 is done by feeding C_EN as the carry-in at
// bit F_{N-5} and adding an all-zero word. All generate terms are then 0 and
// all propagate terms equal the operand bits, so the carry into bit k is the
// AND of the carry-in and bits 0..k-1, and sum bit k is a_k XOR that carry.
// Only the carry AND array and the sum XOR array remain, as in the published circuit.
// The carry out of the top bit is not produced: the case judgement never
// enables calibration when it could occur.
//
// Interface: a[W-1:0], cin in; sum[W-1:0] out. Combinational.
module calib_adder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] a,
  input  logic         cin,
  output logic [W-1:0] sum
);
  timeunit 1ns; timeprecision 1ps;

  logic [W-1:0] carry;  // carry[k]: carry into bit k

  always_comb begin
    for (int k = 0; k < W; k++) begin
      carry[k] = cin;
      for (int j = 0; j < k; j++) carry[k] &= a[j];
    end
  end

  assign sum = a ^ carry;
endmodule
