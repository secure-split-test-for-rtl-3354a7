// tb_sst_otp: self-checking test of the OTP model: blank word is zero, the
// first program stores the word, a second program is ignored, and nothing
// changes without a program pulse.
module tb_sst_otp;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        program_en, programmed;
  logic [15:0] din, q;
  sst_otp dut (.clk, .program_en, .din, .q, .programmed);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    program_en = 0; din = 16'hFFFF;
    repeat (3) @(negedge clk);
    check(q == 16'h0 && !programmed, "blank");
    din = 16'hA5C3; program_en = 1; @(negedge clk); program_en = 0;
    check(q == 16'hA5C3 && programmed, "first program");
    din = 16'h5A3C; program_en = 1; @(negedge clk); program_en = 0;
    check(q == 16'hA5C3, "second program ignored");
    din = 16'hFFFF; repeat (5) @(negedge clk);
    check(q == 16'hA5C3 && programmed, "retained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
