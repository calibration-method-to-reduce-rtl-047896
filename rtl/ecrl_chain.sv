// ecrl_chain: timing model of the converter under four-phase clocked power.
//
// When the logic is powered by the four 90-degree clocked-power phases
// (efficient charge recovery logic, ECRL), every gate level evaluates in its
// own phase and hands its result to the next level one phase later; dummy
// buffers give every path the same number of levels. The logic therefore acts
// as a balanced pipeline of STAGES levels. Functionally that equals the
// combinational result passed through STAGES registers, register k loading on
// the rising edge of phase k mod 4. This module is that chain: it carries the
// finished result, not the split gate levels, which is this design's
// abstraction. STAGES defaults to 8, the longest logic path quoted for the
// 8-bit converter.
//
// Interface: d[W-1:0] in, phase[3:0] in (phase[k] lags phase[k-1] by 90
// degrees), q[W-1:0] out. Latency: STAGES quarter periods after the first
// phase[0] rise that samples d, i.e. about two clock periods for 8 stages.
// There is no reset: as on the chip, q is meaningless until the chain fills.
module ecrl_chain #(
  parameter int unsigned W      = 11,
  parameter int unsigned STAGES = 8
) (
  input  logic [W-1:0] d,
  input  logic [3:0]   phase,
  output logic [W-1:0] q
);
  timeunit 1ns; timeprecision 1ps;

  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    logic [W-1:0] r;
    if (k == 0) begin : g_first
      always_ff @(posedge phase[0]) r <= d;
    end else begin : g_next
      always_ff @(posedge phase[k % 4]) r <= g_stage[k-1].r;
    end
  end

  assign q = g_stage[STAGES-1].r;
endmodule
