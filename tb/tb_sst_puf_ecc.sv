// tb_sst_puf_ecc: self-checking test of the repetition-code ECC.  Three
// noisy copies of a word, with at most one flip per bit, must decode to the
// word; with two flips of a bit the majority (computed here) wins.  Also
// checks 'done' after exactly REP samples, that extra samples are ignored,
// and clear.
module tb_sst_puf_ecc;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        clear, sample, done;
  logic [15:0] din, dout;

  sst_puf_ecc dut (.clk, .rst_n, .clear, .sample, .din, .dout, .done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w, f0, f1, f2, maj;
    clear = 0; sample = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      w = 16'($urandom);
      // one flip per bit at most: disjoint flip masks
      f0 = 16'($urandom); f1 = 16'($urandom) & ~f0; f2 = 16'($urandom) & ~f0 & ~f1;
      if (t % 2 == 1) f1 = 16'($urandom);  // allow double flips
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      check(!done, "not done after clear");
      sample = 1; din = w ^ f0; @(negedge clk);
      check(!done, "not done after 1");
      din = w ^ f1; @(negedge clk);
      sample = 0; @(negedge clk);
      check(!done, "not done after 2");
      sample = 1; din = w ^ f2; @(negedge clk);
      din = 16'($urandom); @(negedge clk);  // ignored
      sample = 0;
      maj = ((w ^ f0) & (w ^ f1)) | ((w ^ f0) & (w ^ f2)) | ((w ^ f1) & (w ^ f2));
      check(done, "done after 3");
      check(dout == maj, "majority");
      if (t % 2 == 0) check(dout == w, "single flips corrected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
