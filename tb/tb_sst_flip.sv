// tb_sst_flip: self-checking test of the flipping circuit: exactly the bits
// of the secret mask are inverted, and flipping twice restores the number.
module tb_sst_flip;
  int checks = 0, failures = 0;
  logic [15:0] din, dout, dout2;
  sst_flip dut (.din, .dout);
  sst_flip dut2 (.din(dout), .dout(dout2));

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
    din = 16'h0000; #1;
    check(dout == 16'h5A3C, "mask visible on zero input");
    for (int t = 0; t < 200; t++) begin
      din = 16'($urandom); #1;
      for (int b = 0; b < 16; b++)
        check(dout[b] == (din[b] ^ (b inside {2,3,4,5,9,11,12,14})), $sformatf("bit %0d", b));
      check(dout2 == din, "involution");
      check($countones(dout ^ din) == 8, "eight bits flipped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
