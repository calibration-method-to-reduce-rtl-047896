// clock_generator: behavioural model of the four-phase clocked-power source.
// It is not synthesizable: the real block is analog (four seven-stage
// voltage-controlled ring oscillators with a diode-connected control stage,
// transistor sizes setting the 90-degree offsets between them).
//
// The model turns the control voltage into an oscillation frequency by linear
// interpolation between the operating points 1.2 V (oscillation stops), 1.3 V
// (79 MHz), 1.5 V (498 MHz) and 1.8 V (0.981 GHz); it saturates above 1.8 V.
// Those points are the published operating points; the straight lines between them are this
// model's choice. At or below 1.2 V the source delivers dc power: all four
// phases are held high and dc_mode is high. Above it, phase[k] is a square
// wave with 50 % duty that rises a quarter period after phase[k-1], standing
// for the sine phase 90k degrees. The control voltage is re-read every
// quarter period (every 1 ns while in dc mode).
//
// Interface: vctrl_mv (control voltage in millivolts) in; phase[3:0],
// dc_mode out.
module clock_generator (
  input  logic [11:0] vctrl_mv,
  output logic [3:0]  phase,
  output logic        dc_mode
);
  timeunit 1ns; timeprecision 1ps;

  // Oscillation frequency in MHz for a control voltage in mV.
  function automatic real freq_mhz(input int mv);
    if (mv <= 1200)      return 0.0;
    else if (mv <= 1300) return 79.0 * real'(mv - 1200) / 100.0;
    else if (mv <= 1500) return 79.0 + (498.0 - 79.0) * real'(mv - 1300) / 200.0;
    else if (mv <= 1800) return 498.0 + (981.0 - 498.0) * real'(mv - 1500) / 300.0;
    else                 return 981.0;
  endfunction

  initial begin
    phase   = 4'b1111;
    dc_mode = 1'b1;
  end

  always begin : osc
    real f;
    f = freq_mhz(int'(vctrl_mv));
    if (f == 0.0) begin
      dc_mode = 1'b1;
      phase   = 4'b1111;
      #1.0;
    end else begin
      dc_mode = 1'b0;
      for (int q = 0; q < 4; q++) begin
        phase[q]           = 1'b1;
        phase[(q + 2) % 4] = 1'b0;
        #(250.0 / freq_mhz(int'(vctrl_mv)));
      end
    end
  end
endmodule
