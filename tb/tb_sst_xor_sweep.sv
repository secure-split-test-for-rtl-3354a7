// tb_sst_xor_sweep: Hamming-distance sweeps of the scan locking block over
// the number of XOR gates after the scrambler, 0 to 10 on ten scan chains
// (the s38417 configuration).  Eleven scan locks with N_XOR = 0..10 get the
// same seed and the same 2000 random response slices; for each the
// percentage of bits that differ between the raw responses and what leaves
// the lock is printed, together with the distance from the output of a lock
// seeded with a wrong guess (seed differing in one bit).  Checks: each
// output slice differs from a reordering of its input slice in at most as
// many ones as there are XOR gates, the raw-to-locked distance grows from 0
// to 10 XOR gates, and with 10 gates both distances
// lie in 40..60% (near the 50% a good lock aims for).  The same is measured
// for scrambler widths (NSB) of 2 and 4 lines, each line behind an XOR gate,
// next to the 10-line lock.
module tb_sst_xor_sweep;
  localparam int N = 10, LEN = 2000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, shift_en;
  logic [15:0]   seed, test_len;
  logic [N-1:0]  scan_in;
  logic [N-1:0]  out_ok [11], out_bad [11];
  logic          rdy_ok [11], rdy_bad [11];

  for (genvar x = 0; x <= 10; x++) begin : g_nx
    sst_scan_lock #(.N(N), .N_XOR(x)) u_ok (
      .clk, .rst_n, .start, .seed, .test_len, .shift_en, .scan_in,
      .ready(rdy_ok[x]), .done(), .busy(), .scrambled(out_ok[x]),
      .scrambled_valid(), .signature());
    sst_scan_lock #(.N(N), .N_XOR(x)) u_bad (
      .clk, .rst_n, .start, .seed(seed ^ 16'h0001), .test_len, .shift_en, .scan_in,
      .ready(rdy_bad[x]), .done(), .busy(), .scrambled(out_bad[x]),
      .scrambled_valid(), .signature());
  end

  // Scrambler-width sweep (NSB = 2 and 4; NSB = 10 is g_nx[10]), every
  // output line behind an XOR gate.
  logic [1:0] o2_ok, o2_bad;
  logic [3:0] o4_ok, o4_bad;
  sst_scan_lock #(.N(2), .N_XOR(2), .STAGES(2), .MISR_POLY(2'b11)) u_n2_ok (
    .clk, .rst_n, .start, .seed, .test_len, .shift_en, .scan_in(scan_in[1:0]),
    .ready(), .done(), .busy(), .scrambled(o2_ok), .scrambled_valid(), .signature());
  sst_scan_lock #(.N(2), .N_XOR(2), .STAGES(2), .MISR_POLY(2'b11)) u_n2_bad (
    .clk, .rst_n, .start, .seed(seed ^ 16'h0001), .test_len, .shift_en, .scan_in(scan_in[1:0]),
    .ready(), .done(), .busy(), .scrambled(o2_bad), .scrambled_valid(), .signature());
  sst_scan_lock #(.N(4), .N_XOR(4), .STAGES(4), .MISR_POLY(4'hC)) u_n4_ok (
    .clk, .rst_n, .start, .seed, .test_len, .shift_en, .scan_in(scan_in[3:0]),
    .ready(), .done(), .busy(), .scrambled(o4_ok), .scrambled_valid(), .signature());
  sst_scan_lock #(.N(4), .N_XOR(4), .STAGES(4), .MISR_POLY(4'hC)) u_n4_bad (
    .clk, .rst_n, .start, .seed(seed ^ 16'h0001), .test_len, .shift_en, .scan_in(scan_in[3:0]),
    .ready(), .done(), .busy(), .scrambled(o4_bad), .scrambled_valid(), .signature());

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
    int hd_raw [11], hd_guess [11];
    int n2_raw, n2_guess, n4_raw, n4_guess;
    n2_raw = 0; n2_guess = 0; n4_raw = 0; n4_guess = 0;
    start = 0; shift_en = 0; seed = 16'h5EED; test_len = 16'(LEN); scan_in = 0;
    for (int x = 0; x <= 10; x++) begin hd_raw[x] = 0; hd_guess[x] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    // set-up length grows with the control word; wait for the longest
    while (!rdy_ok[10]) @(negedge clk);
    for (int x = 0; x <= 10; x++) check(rdy_ok[x] && rdy_bad[x], "all locks ready");
    for (int p = 0; p < LEN; p++) begin
      scan_in = N'($urandom); shift_en = 1; #1;
      for (int x = 0; x <= 10; x++) begin
        // the scrambler only reorders and x gates invert at most x bits
        begin
          int d;
          d = $countones(out_ok[x]) - $countones(scan_in);
          check(d <= x && -d <= x, $sformatf("%0d gates: at most %0d bits inverted", x, x));
        end
        hd_raw[x]   += $countones(out_ok[x] ^ scan_in);
        hd_guess[x] += $countones(out_ok[x] ^ out_bad[x]);
      end
      check($countones(out_ok[0]) == $countones(scan_in), "0 gates: a permutation");
      n2_raw += $countones(o2_ok ^ scan_in[1:0]);  n2_guess += $countones(o2_ok ^ o2_bad);
      n4_raw += $countones(o4_ok ^ scan_in[3:0]);  n4_guess += $countones(o4_ok ^ o4_bad);
      @(negedge clk);
    end
    shift_en = 0;
    $display("XOR gates | %%HD raw->locked | %%HD right seed vs wrong seed");
    for (int x = 0; x <= 10; x++)
      $display("   %2d     |     %5.2f       |     %5.2f", x,
               100.0 * hd_raw[x] / (LEN * N), 100.0 * hd_guess[x] / (LEN * N));
    $display("NSB | %%HD raw->locked | %%HD right seed vs wrong seed");
    $display("  2 |     %5.2f       |     %5.2f", 100.0 * n2_raw / (LEN * 2), 100.0 * n2_guess / (LEN * 2));
    $display("  4 |     %5.2f       |     %5.2f", 100.0 * n4_raw / (LEN * 4), 100.0 * n4_guess / (LEN * 4));
    $display(" 10 |     %5.2f       |     %5.2f", 100.0 * hd_raw[10] / (LEN * N), 100.0 * hd_guess[10] / (LEN * N));
    check(n2_raw * 100 > 35 * LEN * 2 && n2_raw * 100 < 65 * LEN * 2, "NSB 2: distance near 50%");
    check(n4_raw * 100 > 35 * LEN * 4 && n4_raw * 100 < 65 * LEN * 4, "NSB 4: distance near 50%");
    check(n2_guess > 0 && n4_guess > 0, "NSB 2/4: a wrong seed changes the output");
    check(hd_raw[10] > hd_raw[0], "distance grows with the XOR gates");
    check(hd_raw[10] * 100 > 40 * LEN * N && hd_raw[10] * 100 < 60 * LEN * N, "10 gates: raw distance near 50%");
    check(hd_guess[10] * 100 > 40 * LEN * N && hd_guess[10] * 100 < 60 * LEN * N, "10 gates: wrong-seed distance near 50%");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
