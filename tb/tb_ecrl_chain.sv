// tb_ecrl_chain: four 90-degree phases (period 2 ns) drive the 8-stage chain.
// Each value applied to d must appear at q exactly 8 quarter periods after
// the phase[0] rise that samples it, and stay there until the next value
// arrives; a new value every period must stream through without loss.
module tb_ecrl_chain;
  timeunit 1ns; timeprecision 1ps;

  localparam real T = 2.0;
  int checks = 0, failures = 0;
  logic [10:0] d, q;
  logic [3:0]  phase = 4'b0000;

  ecrl_chain #(.W(11), .STAGES(8)) dut (.d(d), .phase(phase), .q(q));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // phase[k] rises at k*T/4 and falls half a period later.
  always begin
    for (int k = 0; k < 4; k++) begin
      phase[k] = 1'b1;
      phase[(k + 2) % 4] = 1'b0;
      #(T / 4);
    end
  end

  initial begin
    logic [10:0] vals [8];
    d = 11'h000;
    #(4 * T);
    // Latency: apply a value half a quarter before a phase[0] rise.
    @(posedge phase[0]);
    #(T - T / 8);
    d = 11'h5A5;
    @(posedge phase[0]);          // sampled here
    #(7 * T / 4 - 0.1);           // just before the 8th stage loads
    checks++;
    if (q === 11'h5A5) begin failures++; $display("FAIL value arrived early"); end
    #0.2;                         // just after
    checks++;
    if (q !== 11'h5A5) begin failures++; $display("FAIL latency: q=%h", q); end
    // Streaming: one new value per period.
    for (int i = 0; i < 8; i++) vals[i] = 11'($urandom);
    for (int i = 0; i < 8; i++) begin
      @(negedge phase[0]);
      d = vals[i];
      if (i >= 3) begin
        // A value set at a phase[0] fall is sampled half a period later and
        // reaches q 1.75 periods after that: 2.25 periods in all, so the
        // value set three periods ago is now at the output.
        checks++;
        if (q !== vals[i-3]) begin failures++; $display("FAIL stream %0d: q=%h want %h", i, q, vals[i-3]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
