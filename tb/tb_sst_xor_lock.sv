// tb_sst_xor_lock: self-checking test of the XOR_F functional lock.  A core
// whose nets are stored inverted at a lock pattern is seen correctly only
// when IN1 ^ IN2 equals the pattern; every wrong key corrupts exactly the
// bits where it differs.
module tb_sst_xor_lock;
  int checks = 0, failures = 0;
  logic [15:0] in0, in1, in2, dout;
  sst_xor_lock dut (.in0, .in1, .in2, .dout);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] truth, lockp;
    for (int t = 0; t < 300; t++) begin
      truth = 16'($urandom); lockp = 16'($urandom);
      in0 = truth ^ lockp;
      // correct: identifier = pattern, KEY xor OTP = 0
      in1 = lockp; in2 = 16'h0; #1;
      check(dout == truth, "unlocked, blank OTP");
      // correct after key generation: identifier ^ (KEY ^ OTP) = pattern
      in2 = 16'($urandom); in1 = lockp ^ in2; #1;
      check(dout == truth, "unlocked with key");
      // wrong key
      in1 = lockp; in2 = 16'($urandom) | 16'h1; #1;
      check((dout ^ truth) == in2, "wrong key corrupts exactly the differing bits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
