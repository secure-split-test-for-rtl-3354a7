// tb_sst_scan_lock: self-checking test of the scan locking block.  A
// reference model (what the design house computes) rebuilds the control
// word from the seed, applies the swaps and XOR bits to every slice and
// runs the MISR.  Checks every scrambled slice, the final signature, the
// SETUP latency (ready KS_W = 55 clocks after the start edge), 'done' after exactly test_len accepted
// slices with random gaps in shift_en, and that a different seed gives a
// different signature for the same responses.
module tb_sst_scan_lock;
  localparam int N = 10, NX = 10, S = 10, LW = 16;
  localparam int CW = sst_pkg::scr_ctrl_bits(N, S);
  localparam int KW = CW + NX;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, shift_en, ready, done, busy, scrambled_valid;
  logic [LW-1:0] seed;
  logic [15:0]   test_len;
  logic [N-1:0]  scan_in, scrambled, signature;

  sst_scan_lock dut (.clk, .rst_n, .start, .seed, .test_len, .shift_en, .scan_in,
                     .ready, .done, .busy, .scrambled, .scrambled_valid, .signature);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- reference model ----
  logic [LW-1:0] m_lfsr;
  logic [KW-1:0] m_ks;
  logic [N-1:0]  m_sig;

  function automatic logic [LW-1:0] lstep(logic [LW-1:0] s);
    logic [LW-1:0] r;
    r = s >> 1;
    if (s[0]) begin r[15] ^= 1; r[13] ^= 1; r[12] ^= 1; r[10] ^= 1; end  // x^16+x^14+x^13+x^11+1
    return r;
  endfunction

  task automatic m_advance();
    m_ks   = {m_lfsr[0], m_ks[KW-1:1]};
    m_lfsr = lstep(m_lfsr);
  endtask

  function automatic logic [N-1:0] m_scramble(logic [N-1:0] d);
    logic [N-1:0] v;
    logic t;
    int k;
    v = d; k = 0;
    for (int s = 0; s < S; s++)
      for (int i = s % 2; i + 1 < N; i += 2) begin
        if (m_ks[k]) begin t = v[i]; v[i] = v[i+1]; v[i+1] = t; end
        k++;
      end
    for (int j = 0; j < NX; j++) v[j] ^= m_ks[CW + j];
    return v;
  endfunction

  function automatic logic [N-1:0] m_misr(logic [N-1:0] s, logic [N-1:0] d);
    logic [N-1:0] r;
    r = s >> 1;
    if (s[0]) begin r[9] ^= 1; r[6] ^= 1; end
    return r ^ d;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_test(input logic [LW-1:0] sd, input int len, input logic [N-1:0] resp [],
                          output logic [N-1:0] sig_out);
    int lat, accepted;
    logic [N-1:0] exp_s;
    m_lfsr = (sd == 0) ? 1 : sd; m_ks = '0; m_sig = '0;
    for (int i = 0; i < KW; i++) m_advance();
    @(negedge clk);
    seed = sd; test_len = 16'(len); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!ready && lat < 1000) begin @(negedge clk); lat++; end
    // lat counts the start edge too: ready rises KW clocks after it
    check(lat == KW + 1, $sformatf("setup latency %0d", lat));
    accepted = 0;
    while (accepted < len) begin
      scan_in  = resp[accepted];
      shift_en = ($urandom % 4) != 0;
      #1;
      if (shift_en) begin
        exp_s = m_scramble(scan_in);
        check(scrambled_valid && scrambled == exp_s, $sformatf("slice %0d", accepted));
        m_sig = m_misr(m_sig, exp_s);
        m_advance();
        accepted++;
      end
      @(negedge clk);
      check(done == (accepted == len), "done exactly after last slice");
    end
    shift_en = 0;
    check(signature == m_sig, "signature");
    repeat (3) @(negedge clk);
    check(done && !busy && signature == m_sig, "result holds");
    sig_out = signature;
  endtask

  initial begin
    logic [N-1:0] resp [];
    logic [N-1:0] s1, s2, s3;
    start = 0; shift_en = 0; seed = 0; test_len = 0; scan_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    resp = new[200];
    foreach (resp[i]) resp[i] = N'($urandom);
    run_test(16'hBEEF, 200, resp, s1);
    run_test(16'hBEEF, 200, resp, s2);
    check(s1 == s2, "same seed, same signature");
    run_test(16'h1234, 200, resp, s3);
    check(s3 != s1, "other seed, other signature");
    run_test(16'h0000, 17, resp, s3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
