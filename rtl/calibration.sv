// calibration: fixed-code calibration of the Mitchell logarithm.
//
// The uncalibrated code I.F is raised by (0.0001)_2 = 1/16 when the case
// judgement finds the fraction inside the calibration region; otherwise it
// passes unchanged. The simplified adder covers bit F_{N-5} and everything
// above it (the fraction's four leading bits and the integer part); the bits
// below F_{N-5} bypass it. Extending the adder over the integer bits is this
// design's choice; no carry ever reaches them.
//
// Interface: int_in, frac_in (uncalibrated) in; int_out, frac_out, c_en out.
// Combinational; N at least 8.
module calibration #(
  parameter int unsigned N = 8
) (
  input  logic [$clog2(N)-1:0] int_in,
  input  logic [N-2:0]         frac_in,
  output logic [$clog2(N)-1:0] int_out,
  output logic [N-2:0]         frac_out,
  output logic                 c_en
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned IW = $clog2(N);
  localparam int unsigned AW = IW + 4;  // F_{N-5}..F_{N-2} and I

  logic [AW-1:0] upper_in, upper_out;

  case_judgement u_judge (.lead(frac_in[N-2 -: 6]), .c_en(c_en));

  assign upper_in = {int_in, frac_in[N-2 -: 4]};

  calib_adder #(.W(AW)) u_add (.a(upper_in), .cin(c_en), .sum(upper_out));

  assign int_out  = upper_out[AW-1 -: IW];
  assign frac_out = {upper_out[3:0], frac_in[N-6:0]};

  // The region ends at (0.111000)_2, so the four leading fraction bits are
  // never all ones when calibrating and the add stays inside the fraction.
  always_comb begin
    if (c_en) assert (frac_in[N-2 -: 4] != 4'hF)
      else $error("calibration: carry would leave the fraction");
  end
endmodule
