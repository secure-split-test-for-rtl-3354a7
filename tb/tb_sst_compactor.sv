// tb_sst_compactor: self-checking test of the MISR compactor.  Random slices
// are absorbed and compared with a reference that treats the MISR as
// polynomial arithmetic (x^10 + x^7 + 1), plus clear, hold and the
// property that a single-bit change of one slice changes the signature.
module tb_sst_compactor;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       clear, en;
  logic [9:0] din, sig;

  sst_compactor dut (.clk, .rst_n, .clear, .en, .din, .sig);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [9:0] ref_absorb(logic [9:0] s, logic [9:0] d);
    logic [9:0] r;
    r = {1'b0, s[9:1]};
    if (s[0]) begin r[9] = ~r[9]; r[6] = ~r[6]; end
    return r ^ d;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] m, slices [64];
    logic [9:0] sig_a;
    clear = 0; en = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sig == 0, "reset");
    m = 0;
    for (int i = 0; i < 64; i++) begin
      slices[i] = 10'($urandom);
      din = slices[i]; en = 1;
      @(negedge clk);
      m = ref_absorb(m, slices[i]);
      check(sig == m, $sformatf("absorb %0d", i));
    end
    en = 0; din = 10'h3FF;
    repeat (3) @(negedge clk);
    check(sig == m, "hold");
    sig_a = sig;
    // same stream with one flipped bit -> different signature
    clear = 1; @(negedge clk); clear = 0;
    check(sig == 0, "clear");
    for (int i = 0; i < 64; i++) begin
      din = slices[i] ^ ((i == 17) ? 10'h004 : 10'h000); en = 1;
      @(negedge clk);
    end
    en = 0;
    check(sig != sig_a, "single-bit error detected");
    // clear wins over en
    clear = 1; en = 1; din = 10'h155; @(negedge clk); clear = 0; en = 0;
    check(sig == 0, "clear over en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
