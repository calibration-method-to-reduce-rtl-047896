// tb_integer_enc: drives every one-hot enable pattern for N = 8, 16 and 32
// and checks the integer code equals the position of the high enable. Also
// checks the worked case 00101101 (EN_5 high) gives 101.
module tb_integer_enc;
  timeunit 1ns; timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [7:0]  en8;  logic [2:0] i8;
  logic [15:0] en16; logic [3:0] i16;
  logic [31:0] en32; logic [4:0] i32;

  integer_enc #(.N(8))  dut8  (.en(en8),  .int_part(i8));
  integer_enc #(.N(16)) dut16 (.en(en16), .int_part(i16));
  integer_enc #(.N(32)) dut32 (.en(en32), .int_part(i32));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 8; p++) begin
      en8 = 8'(1 << p); #1; checks++;
      if (i8 !== 3'(p)) begin failures++; $display("FAIL N=8 p=%0d I=%b", p, i8); end
    end
    for (int p = 0; p < 16; p++) begin
      en16 = 16'(1 << p); #1; checks++;
      if (i16 !== 4'(p)) begin failures++; $display("FAIL N=16 p=%0d I=%b", p, i16); end
    end
    for (int p = 0; p < 32; p++) begin
      en32 = 32'(1) << p; #1; checks++;
      if (i32 !== 5'(p)) begin failures++; $display("FAIL N=32 p=%0d I=%b", p, i32); end
    end
    // Worked example: binary 00101101 has its leading one at position 5.
    en8 = 8'b0010_0000; #1; checks++;
    if (i8 !== 3'b101) begin failures++; $display("FAIL example I=%b", i8); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
