// tb_logic_part: the calibrated converter in both power modes.
// dc mode: all 256 inputs of the 8-bit converter against the reference.
// Clocked mode: phases at about 498 MHz; every input is held for 10 ns and
// the output is checked 6 ns after each change, then the output must hold
// the previous value just after the change.
module tb_logic_part;
  timeunit 1ns; timeprecision 1ps;
  import log_ref_pkg::*;

  localparam real T = 1000.0 / 498.0;
  int checks = 0, failures = 0;
  logic [7:0] s;
  logic [3:0] phase = 4'b1111;
  logic       dc_mode = 1'b1;
  logic [2:0] int_out;
  logic [6:0] frac_out;
  logic       c_en;
  int n_cal = 0, n_hold = 0;

  logic_part #(.N(8), .STAGES(8)) dut (
    .s(s), .phase(phase), .dc_mode(dc_mode),
    .int_out(int_out), .frac_out(frac_out), .c_en(c_en)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always begin
    if (dc_mode) begin
      phase = 4'b1111;
      #1;
    end else begin
      for (int k = 0; k < 4; k++) begin
        phase[k] = 1'b1;
        phase[(k + 2) % 4] = 1'b0;
        #(T / 4);
      end
    end
  end

  task automatic check(input logic [7:0] x, input string tag);
    logic [6:0] f;
    f = 7'(ref_frac(x, 8));
    checks++;
    if (int_out !== 3'(ref_msb(x, 8)) || frac_out !== 7'(ref_cal_frac(64'(f), 8))
        || c_en !== ref_cal_en(64'(f), 8)) begin
      failures++;
      $display("FAIL %s s=%b -> %b.%b c_en=%b", tag, x, int_out, frac_out, c_en);
    end
  endtask

  initial begin
    dc_mode = 1'b1;
    for (int x = 0; x < 256; x++) begin
      s = 8'(x); #1;
      check(s, "dc");
      if (c_en) n_cal++;
    end
    dc_mode = 1'b0;
    for (int x = 0; x < 256; x += 7) begin
      logic [7:0] prev;
      prev = s;
      s = 8'(x);
      #0.3;
      // Still the previous result right after the change: the chain delays it.
      if (x != 0 && prev != s) begin
        check(prev, "hold");
        n_hold++;
      end
      #5.7;
      check(s, "ecrl");
      #4;
    end
    checks++;
    if (n_cal == 0 || n_hold == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
