// tb_case_judgement: all 64 values of the six leading fraction bits; the
// calibration enable must be high exactly for 000101 .. 111000.
module tb_case_judgement;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [5:0] lead;
  logic       c_en;
  int         n_on = 0;

  case_judgement dut (.lead(lead), .c_en(c_en));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      lead = 6'(v); #1; checks++;
      if (c_en !== (v >= 5 && v <= 56)) begin
        failures++; $display("FAIL lead=%b c_en=%b", lead, c_en);
      end
      n_on += int'(c_en);
    end
    checks++;
    if (n_on != 52) begin failures++; $display("FAIL region size %0d", n_on); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
