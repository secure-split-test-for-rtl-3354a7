// tb_sst_lfsr: self-checking test of the PRNG LFSR.  Checks the reset seed,
// a load, the zero-seed guard, hold without 'step', 2000 steps of the
// default 32-bit register against a bit-serial reference built from the
// polynomial's taps, and the full period 255 of an 8-bit instance.
module tb_sst_lfsr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        load, step, load8, step8;
  logic [31:0] seed, state;
  logic [7:0]  seed8, state8;

  sst_lfsr dut (.clk, .rst_n, .load, .seed, .step, .state);
  sst_lfsr #(.W(8), .POLY(8'hB8), .SEED(8'h01)) dut8 (
    .clk, .rst_n, .load(load8), .seed(seed8), .step(step8), .state(state8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Reference: taps of x^32+x^22+x^2+x+1, applied bit by bit.
  function automatic logic [31:0] ref_step(logic [31:0] s);
    logic o;
    logic [31:0] r;
    o = s[0];
    r = s >> 1;
    if (o) begin
      r[31] = 1'b1;   // x^32 term
      r[21] ^= 1'b1;  // x^22
      r[1]  ^= 1'b1;  // x^2
      r[0]  ^= 1'b1;  // x^1
    end
    return r;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] m;
    int period;
    load = 0; step = 0; seed = 0; load8 = 0; step8 = 0; seed8 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(state == 32'h1, "reset seed");
    load = 1; seed = 32'hDEAD_BEEF; @(negedge clk); load = 0;
    check(state == 32'hDEAD_BEEF, "load");
    load = 1; seed = 0; @(negedge clk); load = 0;
    check(state == 32'h1, "zero seed replaced by 1");
    load = 1; seed = 32'h1234_5678; @(negedge clk); load = 0;
    repeat (3) @(negedge clk);
    check(state == 32'h1234_5678, "hold without step");
    m = 32'h1234_5678;
    step = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      m = ref_step(m);
      check(state == m, $sformatf("step %0d", i));
    end
    step = 0;
    // 8-bit instance: x^8+x^6+x^5+x^4+1 has period 255
    step8 = 1; period = 0;
    do begin @(negedge clk); period++; end while (state8 != 8'h01 && period < 300);
    step8 = 0;
    check(period == 255, $sformatf("8-bit period %0d", period));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
