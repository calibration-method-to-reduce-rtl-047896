// tb_clock_generator: behavioural four-phase source. Checks dc power below
// 1.2 V, the oscillation periods at 1.3 V (79 MHz), 1.5 V (498 MHz) and
// 1.8 V (0.981 GHz), and that each phase rises a quarter period after the
// previous one.
module tb_clock_generator;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [11:0] vctrl_mv;
  logic [3:0]  phase;
  logic        dc_mode;

  clock_generator dut (.vctrl_mv(vctrl_mv), .phase(phase), .dc_mode(dc_mode));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int mv, input real f_mhz);
    realtime t0, t1, tq [4];
    real period, want;
    vctrl_mv = 12'(mv);
    want = 1000.0 / f_mhz;
    repeat (3) @(posedge phase[0]);
    t0 = $realtime;
    for (int k = 1; k < 4; k++) begin
      @(posedge phase[k]);
      tq[k] = $realtime - t0;
    end
    @(posedge phase[0]);
    t1 = $realtime;
    period = t1 - t0;
    checks++;
    if (dc_mode !== 1'b0 || period < want * 0.99 || period > want * 1.01) begin
      failures++; $display("FAIL %0d mV: period %f ns, want %f", mv, period, want);
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (tq[k] < k * want / 4 - 0.01 || tq[k] > k * want / 4 + 0.01) begin
        failures++; $display("FAIL %0d mV: phase %0d at %f ns", mv, k, tq[k]);
      end
    end
  endtask

  initial begin
    vctrl_mv = 12'd1100;
    #20;
    checks++;
    if (dc_mode !== 1'b1 || phase !== 4'b1111) begin
      failures++; $display("FAIL dc power: dc_mode=%b phase=%b", dc_mode, phase);
    end
    measure(1300, 79.0);
    measure(1500, 498.0);
    measure(1800, 981.0);
    vctrl_mv = 12'd1200;
    #20;
    checks++;
    if (dc_mode !== 1'b1 || phase !== 4'b1111) begin
      failures++; $display("FAIL back to dc: dc_mode=%b phase=%b", dc_mode, phase);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
